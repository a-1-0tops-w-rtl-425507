// tb_nc_inst_fifo: random pushes and pops of 0..2 instructions per cycle
// against a queue model; checks both head entries, their valid flags,
// push_ready when 4 instructions wait, and empty.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_inst_fifo;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  logic push, push_ready, empty; inst_t pi; logic [1:0] hv, pop_n; inst_t [1:0] head;
  nc_inst_fifo dut (.clk, .rst_n, .push, .push_ready, .push_inst(pi), .head_valid(hv), .head, .pop_n, .empty);
  inst_t q[$]; int full_seen = 0; logic pr;
  initial begin
    push = 0; pop_n = 0; pi = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      push = ($urandom_range(99) < 60); pi = inst_t'({$urandom, $urandom, $urandom});
      pop_n = 2'($urandom_range(q.size() < 2 ? q.size() : 2));
      #1;
      `CHECK(empty == (q.size() == 0) && push_ready == (q.size() < 4), "flags")
      `CHECK(hv[0] == (q.size() >= 1) && hv[1] == (q.size() >= 2), "head valid")
      if (q.size() >= 1) `CHECK(head[0] == q[0], "head 0")
      if (q.size() >= 2) `CHECK(head[1] == q[1], "head 1")
      if (q.size() == 4) full_seen++;
      pr = push_ready;
      @(posedge clk);
      if (push && pr) q.push_back(pi);
      for (int k = 0; k < int'(pop_n); k++) void'(q.pop_front());
    end
    `CHECK(full_seen > 0, "full reached")
    `TB_END
  end
endmodule
