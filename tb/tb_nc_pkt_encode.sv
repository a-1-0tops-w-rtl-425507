// tb_nc_pkt_encode: eleven requesters with random packets and a randomly
// stalled output. Checks that every packet comes out exactly once and
// unchanged, that one requester's packets keep their order, that with all
// requesters waiting the grants rotate (no requester waits more than 11
// grants), and that the output sustains one packet per cycle.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_pkt_encode;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic [10:0] rv, rr; pkt_t [10:0] rp; logic ov, ordy; pkt_t op;
  nc_pkt_encode #(.N(11)) dut (.clk, .rst_n, .req_valid(rv), .req_ready(rr), .req_pkt(rp),
    .out_valid(ov), .out_ready(ordy), .out_pkt(op));
  int sent[11], got[11], wait_g[11], maxwait = 0, outs = 0, stall_pct = 0;
  logic [10:0] rr_s;
  always @(posedge clk) if (rst_n) begin
    if (ov && ordy) begin
      int s; s = int'(op.datum[15:12]);
      `CHECK(op.datum[11:0] == 12'(got[s]) && op.dst == {20'(s), 12'(got[s])}, "order and content")
      got[s]++; outs++;
    end
  end
  initial begin
    int c0;
    rv = '0; ordy = 1;
    foreach (sent[i]) begin sent[i] = 0; got[i] = 0; wait_g[i] = 0; end
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 11; i++) begin
        if (!rv[i] && $urandom_range(99) < 50) rv[i] = 1;
        rp[i] = '0; rp[i].datum = {4'(i), 12'(sent[i])}; rp[i].dst = {20'(i), 12'(sent[i])};
      end
      ordy = ($urandom_range(99) >= stall_pct);
      if (t == 1500) stall_pct = 40;
      #1; rr_s = rr;
      @(posedge clk); #1;
      for (int i = 0; i < 11; i++) begin
        if (rv[i] && rr_s[i]) begin sent[i]++; rv[i] = 0; wait_g[i] = 0; end
        else if (rv[i] && rr_s != 0) begin wait_g[i]++; if (wait_g[i] > maxwait) maxwait = wait_g[i]; end
      end
    end
    @(negedge clk); rv = '0; ordy = 1;
    // throughput: all requesting, output always ready
    repeat (3) @(negedge clk);
    c0 = outs;
    for (int t = 0; t < 22; t++) begin
      @(negedge clk); rv = '1; for (int i = 0; i < 11; i++) rp[i].datum = {4'(i), 12'(sent[i])};
      for (int i = 0; i < 11; i++) rp[i].dst = {20'(i), 12'(sent[i])};
      #1; rr_s = rr; @(posedge clk); #1;
      for (int i = 0; i < 11; i++) if (rr_s[i]) sent[i]++;
    end
    rv = '0; repeat (3) @(negedge clk);
    `CHECK(outs - c0 == 22, $sformatf("one packet per cycle (%0d in 22)", outs - c0))
    for (int i = 0; i < 11; i++) `CHECK(got[i] == sent[i], $sformatf("requester %0d all out", i))
    `CHECK(maxwait <= 10, $sformatf("round robin wait %0d", maxwait))
    `TB_END
  end
endmodule
