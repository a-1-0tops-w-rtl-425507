// nc_pe: processing element of an NC core.
//
// PE control takes an issued instruction (issue, inst) when idle. The data
// parser picks the operand x from the instruction's immediate datum and the
// coefficient w from the broadcast local memory rows (index inst.coef). A
// paging-memory PE then reads the target word y at the page offset (cycle 1),
// the 16b arithmetic unit computes, and the result is written back (cycle 2).
// If the instruction asks to fire, the data packer builds a packet carrying
// the result to {fire_core, page, offset} and holds it on fire_valid until
// the packet encoder takes it. A MAC with a zero datum or zero coefficient
// and no fire does no memory access at all (1 cycle, counted in n_skip).
// PE0 (LOCAL_PE = 1) serves the local memory unit: it executes WCOEF by
// writing one coefficient in one cycle.
//
// busy is high from the cycle after issue until the PE can take the next
// instruction. Registers advance only while ce (the core's clock enable)
// is high. The two-cycle schedule and packet layout are this design's.
module nc_pe
  import nc_pkg::*;
#(
  parameter bit LOCAL_PE = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  issue,
  input  inst_t                 inst,
  output logic                  busy,
  input  logic [8:0][71:0]      coef_rows,
  // memory unit port
  output logic                  mem_en,
  output logic                  mem_we,
  output logic [PAGE_AW-1:0]    mem_addr,
  output logic [15:0]           mem_wdata,
  input  logic [15:0]           mem_rdata,
  // local memory write (PE0)
  output logic                  lm_we,
  output logic [6:0]            lm_idx,
  output logic [7:0]            lm_wdata,
  // to packet encode
  output logic                  fire_valid,
  input  logic                  fire_ready,
  output pkt_t                  fire_pkt,
  output logic [15:0]           n_skip,
  output logic [15:0]           n_exec
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_FIRE} state_e;
  state_e state;
  inst_t  cur;
  logic signed [15:0] res;
  logic               au_skip;
  logic signed [7:0]  w_issue, w_cur;

  function automatic logic signed [7:0] coef_of(logic [8:0][71:0] rows, logic [6:0] idx);
    int i;
    i = (int'(idx) < 81) ? int'(idx) : 0;
    return rows[i / 9][(i % 9) * 8 +: 8];
  endfunction

  assign w_issue = coef_of(coef_rows, inst.coef);
  assign w_cur   = coef_of(coef_rows, cur.coef);
  assign busy    = (state != S_IDLE);

  nc_arith_unit u_au (
    .op(cur.op), .x(cur.x), .w(w_cur), .y(mem_rdata), .res(res), .skip(au_skip));

  logic take, zskip;
  assign take  = ce && issue && (state == S_IDLE);
  assign zskip = !LOCAL_PE && inst.op == OP_MAC && !inst.fire
                 && (inst.x == 0 || w_issue == 0);

  // memory port: read at issue, write back in S_EXEC
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = inst.off;
    mem_wdata = res;
    lm_we     = 1'b0;
    lm_idx    = cur.coef;
    lm_wdata  = cur.x[7:0];
    if (!LOCAL_PE) begin
      if (take && !zskip) begin
        mem_en = 1'b1;
      end else if (ce && state == S_EXEC) begin
        mem_addr = cur.off;
        mem_en   = (cur.op != OP_RD) && !au_skip;
        mem_we   = mem_en;
      end
    end else begin
      lm_we = ce && state == S_EXEC && cur.op == OP_WCOEF;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fire_valid <= 1'b0;
      n_skip     <= '0;
      n_exec     <= '0;
    end else if (ce) begin
      unique case (state)
        S_IDLE: if (issue) begin
          if (zskip) n_skip <= n_skip + 1'b1;
          else       state  <= S_EXEC;
        end
        S_EXEC: begin
          n_exec <= n_exec + 1'b1;
          if (!LOCAL_PE && cur.fire) begin
            fire_valid <= 1'b1;
            state      <= S_FIRE;
          end else begin
            state <= S_IDLE;
          end
          if (au_skip) n_skip <= n_skip + 1'b1;
        end
        S_FIRE: if (fire_ready) begin
          fire_valid <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (take) cur <= inst;
    if (ce && state == S_EXEC) begin
      fire_pkt           <= '0;
      fire_pkt.dst       <= {cur.fire_core, cur.vpn, cur.off};
      fire_pkt.datum     <= res;
      fire_pkt.op        <= cur.fire_op;
      fire_pkt.lanes     <= 4'd1;
      fire_pkt.coef      <= cur.fire_coef;
      fire_pkt.fire_op   <= OP_NOP;
    end
  end

endmodule
