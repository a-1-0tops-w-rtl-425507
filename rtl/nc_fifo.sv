// nc_fifo: small synchronous FIFO with valid/ready on both sides, used for
// the router's input buffers. in_ready is high while an entry is free;
// out_valid while one is held. A push and a pop may happen in the same cycle.
// Timing: data written in one cycle is visible at out_* the next; in_ready
// does not depend on out_ready. The architecture gives only 'In Buf'; the
// depth (2 in the router) and the handshake are this design's choices.
module nc_fifo #(
  parameter int unsigned W     = 84,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign in_ready  = (int'(cnt) < int'(DEPTH));
  assign out_valid = (cnt != 0);
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      logic push, pop;
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      if (push) begin
        mem[wp] <= in_data;
        wp <= inc(wp);
      end
      if (pop) rp <= inc(rp);
      cnt <= cnt + push - pop;
    end
  end

endmodule
