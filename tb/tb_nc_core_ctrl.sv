// tb_nc_core_ctrl: random event patterns; clk_en must be the OR of the five
// events in every cycle, n_active must count the enabled cycles and n_wake
// the idle-to-active switches, both counted here independently.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_core_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic [4:0] ev; logic en; logic [31:0] nw, na;
  nc_core_ctrl dut (.clk, .rst_n, .pkt_arriving(ev[0]), .ififo_nonempty(ev[1]), .pe_busy(ev[2]),
    .dma_busy(ev[3]), .enc_busy(ev[4]), .clk_en(en), .n_wake(nw), .n_active(na));
  initial begin
    int ew = 0, ea = 0; bit prev = 0;
    ev = '0; #12 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ev = ($urandom_range(3) == 0) ? 5'(1 << $urandom_range(4)) : 5'd0;
      #1;
      `CHECK(en == (ev != 0), "clk_en is the OR of the events")
      if (en) ea++;
      if (en && !prev) ew++;
      prev = en;
      @(posedge clk); #1;
      `CHECK(na == 32'(ea) && nw == 32'(ew), "active and wake counts")
    end
    `TB_END
  end
endmodule
