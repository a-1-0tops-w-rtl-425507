// tb_nc_pkt_decode: random packets; checks the instruction fields (page,
// offset, datum, lane clamp to 1..9, one lane for SISD), that HOST packets
// go to the host port only, and that ready comes from the chosen side.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_pkt_decode;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic iv, ir, ov, orr, hv, hr; pkt_t p, hp; inst_t inst;
  nc_pkt_decode dut (.in_valid(iv), .in_ready(ir), .in_pkt(p), .inst_valid(ov), .inst_ready(orr),
                     .inst, .host_valid(hv), .host_ready(hr), .host_pkt(hp));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int el;
      p = pkt_t'({$urandom, $urandom, $urandom});
      if (t % 5 == 0) p.op = OP_HOST; else if (p.op == OP_HOST) p.op = OP_MAC;
      iv = $urandom_range(1); orr = $urandom_range(1); hr = $urandom_range(1);
      #1;
      el = !p.simd ? 1 : (p.lanes == 0 ? 1 : (p.lanes > 9 ? 9 : int'(p.lanes)));
      if (p.op == OP_HOST)
        `CHECK(hv == iv && !ov && ir == hr && hp == p, "host packet")
      else
        `CHECK(ov == iv && !hv && ir == orr && inst.vpn == p.dst[25:10] && inst.off == p.dst[9:0]
               && inst.x == p.datum && inst.op == p.op && int'(inst.lanes) == el && inst.coef == p.coef
               && inst.fire == p.fire && inst.fire_core == p.fire_core && inst.fire_op == p.fire_op
               && inst.fire_coef == p.fire_coef && inst.simd == p.simd, "instruction fields")
    end
    `TB_END
  end
endmodule
