// tb_nc_local_mem: writes all 81 coefficients with random bytes and checks
// that each appears at byte i%9 of row i/9 of the broadcast rows, that reset
// clears the file and that an index above 80 writes nothing.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_local_mem;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(10000)
  logic we; logic [6:0] widx; logic [7:0] wdata; logic [8:0][71:0] rows;
  nc_local_mem dut (.clk, .rst_n, .we, .widx, .wdata, .rows);
  logic [7:0] m [81];
  initial begin
    we = 0; widx = 0; wdata = 0;
    #12 rst_n = 1;
    `CHECK(rows == '0, "reset clears")
    for (int i = 0; i < 81; i++) begin
      @(negedge clk); we = 1; widx = 7'(i); wdata = 8'($urandom); m[i] = wdata;
    end
    @(negedge clk); we = 1; widx = 7'd100; wdata = 8'hff;
    @(negedge clk); we = 0;
    for (int i = 0; i < 81; i++) `CHECK(rows[i / 9][(i % 9) * 8 +: 8] == m[i], $sformatf("coef %0d", i))
    `TB_END
  end
endmodule
