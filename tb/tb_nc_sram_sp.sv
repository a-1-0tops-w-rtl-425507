// tb_nc_sram_sp: writes random words to random addresses of the 1K x 16b
// single-port SRAM and reads them back, checking the one-cycle read latency
// and that a write does not disturb rdata.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_sram_sp;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic en, we; logic [9:0] addr; logic [15:0] wdata, rdata;
  nc_sram_sp dut (.clk, .en, .we, .addr, .wdata, .rdata);
  logic [15:0] model [1024];
  bit written [1024];
  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      en = 1; addr = 10'($urandom); we = ($urandom_range(1) == 1) || (t < 1000);
      wdata = 16'($urandom);
      if (!we && !written[addr]) we = 1;
      @(posedge clk); #1;
      if (we) begin model[addr] = wdata; written[addr] = 1; end
      else `CHECK(rdata == model[addr], $sformatf("read %0d", addr))
    end
    `TB_END
  end
endmodule
