// tb_kautz_route_fifo: random traffic on the 4-in/3-out routing FIFO,
// compared with a queue model: every accepted word must come out once, in
// the order of acceptance (inputs in rotating-priority order within a
// cycle), the visible entries must match the model's head, and the FIFO
// must accept four words in one cycle when empty and refuse when full.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_kautz_route_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(20000)

  logic [3:0] wv, wr;
  logic [3:0][83:0] wd;
  logic [2:0] rv;
  logic [2:0][83:0] rd;
  logic [1:0] rc;
  logic [3:0] cnt;
  kautz_route_fifo dut (.clk, .rst_n, .wr_valid(wv), .wr_data(wd), .wr_ready(wr),
                        .rd_valid(rv), .rd_data(rd), .rd_count(rc), .count(cnt));

  logic [83:0] q[$];
  logic [3:0] wr_s;
  int prio = 0, seen_full = 0, seen4 = 0;

  initial begin
    wv = '0; rc = '0; wd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    prio = int'(dut.prio);   // the rotation runs from reset; start in step
    for (int cyc = 0; cyc < 3000; cyc++) begin
      if (cyc > 0) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        wv[i] = ($urandom_range(99) < (cyc < 1500 ? 60 : 30));
        wd[i] = {20'(cyc), 64'($urandom) << 2 | 64'(i)};
      end
      rc = 2'($urandom_range(int'(cnt) < 3 ? int'(cnt) : 3));
      #1;
      `CHECK(int'(cnt) == q.size(), "count")
      for (int r = 0; r < 3; r++)
        if (r < q.size()) `CHECK(rv[r] && rd[r] == q[r], $sformatf("head %0d cyc %0d size %0d %h %h p%0d %0d", r, cyc, q.size(), rd[r], q[r], prio, dut.prio))
        else `CHECK(!rv[r], "no extra valid")
      if (q.size() == 8) begin seen_full++; `CHECK(wr == 0, "full refuses") end
      if (q.size() <= 4 && wv == 4'hf) begin
        `CHECK(wr == 4'hf, "four writes when space")
        seen4++;
      end
      wr_s = wr;
      @(posedge clk);
      for (int r = 0; r < int'(rc); r++) void'(q.pop_front());
      for (int k = 0; k < 4; k++) begin
        int idx; idx = (prio + k) % 4;
        if (wr_s[idx]) q.push_back(wd[idx]);
      end
      prio = (prio + 1) % 4;
    end
    `CHECK(seen_full > 0 && seen4 > 0, "full and 4-write cases reached")
    `TB_END
  end
endmodule
