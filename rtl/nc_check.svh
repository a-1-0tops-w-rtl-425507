// nc_check.svh: self-checking helpers for the testbenches. Each testbench
// declares int checks, failures; CHECK counts one comparison and reports a
// mismatch; TB_END prints the result line and ends the simulation.
// Interface: CHECK(cond, msg) and TB_END are statements; WATCHDOG(n) is an
// initial block that counts a failure, prints the result line and finishes
// after n clock cycles. These macros are test infrastructure of this
// design, not part of the architecture.
`ifndef NC_CHECK_SVH
`define NC_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end end
`define TB_END \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(cycles) \
  initial begin repeat (cycles) @(posedge clk); failures++; $display("FAIL watchdog"); `TB_END end
`endif
