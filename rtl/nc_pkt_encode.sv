// nc_pkt_encode: packet encoder of an NC core.
//
// Collects the packets fired by the PEs (and, on the last requester input,
// packets injected by a system bus interface) and hands one per cycle to the
// router's In Ctrl. A round-robin arbiter, starting after the last winner,
// picks among the requesters whenever the output register is empty or being
// emptied; the winner sees req_ready for that cycle. The output is a
// valid/ready register, so a packet leaves one cycle after it is granted.
// Round-robin arbitration is this design's choice.
module nc_pkt_encode
  import nc_pkg::*;
#(
  parameter int unsigned N = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   req_valid,
  output logic [N-1:0]   req_ready,
  input  pkt_t [N-1:0]   req_pkt,
  output logic           out_valid,
  input  logic           out_ready,
  output pkt_t           out_pkt
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last;
  logic [IW-1:0] win;
  logic          any, space;

  always_comb begin
    int idx;
    any   = 1'b0;
    win   = '0;
    space = !out_valid || out_ready;
    for (int k = 1; k <= int'(N); k++) begin
      idx = (int'(last) + k) % int'(N);
      if (!any && req_valid[idx]) begin
        any = 1'b1;
        win = IW'(idx);
      end
    end
    req_ready = '0;
    if (any && space) req_ready[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      last      <= IW'(N - 1);
    end else if (space) begin
      out_valid <= any;
      if (any) begin
        out_pkt <= req_pkt[win];
        last    <= win;
      end
    end
  end

endmodule
