// nc_inst_fifo: instruction FIFO of an NC core, 4 deep as in the
// architecture. One instruction may be pushed per cycle (push while
// push_ready); the dispatcher sees the two oldest entries on head/head_valid
// and removes 0, 1 or 2 of them per cycle with pop_n. Pops take effect before
// the push of the same cycle is counted against the space.
module nc_inst_fifo
  import nc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  output logic           push_ready,
  input  inst_t          push_inst,
  output logic [1:0]     head_valid,
  output inst_t [1:0]    head,
  input  logic [1:0]     pop_n,
  output logic           empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  inst_t            mem [DEPTH];
  logic [AW-1:0]    rp;
  logic [AW:0]      cnt;

  assign push_ready    = (int'(cnt) < int'(DEPTH));
  assign empty         = (cnt == 0);
  assign head_valid[0] = (cnt >= 1);
  assign head_valid[1] = (cnt >= 2);
  assign head[0]       = mem[rp];
  assign head[1]       = mem[rp + 1'b1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      cnt <= '0;
    end else begin
      rp  <= rp + AW'(pop_n);
      cnt <= cnt + (AW+1)'(push && push_ready) - (AW+1)'(pop_n);
    end
  end

  always_ff @(posedge clk) begin
    if (push && push_ready) mem[rp + AW'(cnt)] <= push_inst;
  end

  pop_le_count: assert property (@(posedge clk) disable iff (!rst_n)
    int'(pop_n) <= int'(cnt));

endmodule
