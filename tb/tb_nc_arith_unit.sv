// tb_nc_arith_unit: random operands for every opcode, compared with a
// reference computed here in wide integers with 16-bit saturation; checks
// the zero-skip flag of MAC.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_arith_unit;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  op_e op; logic signed [15:0] x, y, res; logic signed [7:0] w; logic skip;
  nc_arith_unit dut (.op, .x, .w, .y, .res, .skip);

  function automatic longint sat(longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  initial begin
    op_e ops[7] = '{OP_WR, OP_ACC, OP_MAC, OP_MAX, OP_L1, OP_L2, OP_RD};
    for (int t = 0; t < 5000; t++) begin
      longint e, xl, yl, wl; bit es;
      op = ops[t % 7];
      x = 16'($urandom); y = 16'($urandom); w = 8'($urandom);
      if (t % 11 == 0) x = 0;
      if (t % 13 == 0) w = 0;
      if (t % 3 == 0) begin x = 16'($signed(x) >>> 8); y = 16'($signed(y) >>> 6); end
      #1;
      xl = x; yl = y; wl = w; es = 0;
      case (op)
        OP_WR:  e = xl;
        OP_ACC: e = sat(yl + xl);
        OP_MAC: begin es = (xl == 0 || wl == 0); e = es ? yl : sat(yl + xl * wl); end
        OP_MAX: e = xl > yl ? xl : yl;
        OP_L1:  e = sat(yl + ((xl - wl) < 0 ? wl - xl : xl - wl));
        OP_L2:  e = sat(yl + (xl - wl) * (xl - wl));
        default: e = yl;
      endcase
      `CHECK(longint'(res) == e && skip == es, $sformatf("op %0d x %0d w %0d y %0d -> %0d want %0d", op, x, w, y, res, e))
    end
    `TB_END
  end
endmodule
