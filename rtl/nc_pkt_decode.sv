// nc_pkt_decode: packet decoder of an NC core. Combinational, valid/ready.
//
// An arriving packet becomes an instruction for the instruction FIFO: the
// 26-bit private target address splits into a 16-bit virtual page number
// and a 10-bit word offset, the datum becomes operand x, and the SIMD lane
// count is limited to 1..9 (SISD instructions always use one lane). A packet
// with opcode HOST is not an instruction: it is handed to the host port
// (used by the cores that hold a system bus interface). The field mapping is
// this design's.
module nc_pkt_decode
  import nc_pkg::*;
(
  input  logic   in_valid,
  output logic   in_ready,
  input  pkt_t   in_pkt,
  output logic   inst_valid,
  input  logic   inst_ready,
  output inst_t  inst,
  output logic   host_valid,
  input  logic   host_ready,
  output pkt_t   host_pkt
);
  logic is_host;

  always_comb begin
    is_host        = (in_pkt.op == OP_HOST);
    inst.op        = in_pkt.op;
    inst.simd      = in_pkt.simd;
    inst.lanes     = !in_pkt.simd ? 4'd1 :
                     (in_pkt.lanes == 0) ? 4'd1 :
                     (in_pkt.lanes > 4'd9) ? 4'd9 : in_pkt.lanes;
    inst.vpn       = in_pkt.dst[25:10];
    inst.off       = in_pkt.dst[9:0];
    inst.x         = in_pkt.datum;
    inst.coef      = in_pkt.coef;
    inst.fire      = in_pkt.fire;
    inst.fire_core = in_pkt.fire_core;
    inst.fire_op   = in_pkt.fire_op;
    inst.fire_coef = in_pkt.fire_coef;
    host_pkt       = in_pkt;
    inst_valid     = in_valid && !is_host;
    host_valid     = in_valid && is_host;
    in_ready       = is_host ? host_ready : inst_ready;
  end

endmodule
