// tb_nc_pe: a paging-memory PE on a 1K x 16b SRAM and PE0. Random
// instructions (WR, ACC, MAC, MAX, L1, L2, RD, some firing, some with zero
// datum or zero coefficient) are issued whenever the PE is idle; a model of
// the memory computed here predicts each stored word and each fired packet.
// Checks: memory contents, fired packet target {fire_core, page, offset},
// datum and opcode, the 2-cycle occupancy of a non-firing instruction, the
// 1-cycle zero skip without memory access, and PE0's WCOEF write.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_pe;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(200000)

  logic issue, busy, men, mwe, fv, fr, lwe; inst_t inst; logic [8:0][71:0] rows;
  logic [9:0] maddr; logic [15:0] mwd, mrd; logic [6:0] lidx; logic [7:0] lwd; pkt_t fp;
  logic [15:0] nskip, nexec;
  nc_pe #(.LOCAL_PE(1'b0)) dut (.clk, .rst_n, .ce(1'b1), .issue, .inst, .busy, .coef_rows(rows),
    .mem_en(men), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd), .mem_rdata(mrd),
    .lm_we(lwe), .lm_idx(lidx), .lm_wdata(lwd), .fire_valid(fv), .fire_ready(fr), .fire_pkt(fp),
    .n_skip(nskip), .n_exec(nexec));
  nc_sram_sp u_mem (.clk, .en(men), .we(mwe), .addr(maddr), .wdata(mwd), .rdata(mrd));

  logic issue0, busy0, m0en, m0we, f0v, l0we; logic [9:0] m0a; logic [15:0] m0wd; logic [6:0] l0i;
  logic [7:0] l0d; pkt_t f0p; logic [15:0] s0, e0;
  nc_pe #(.LOCAL_PE(1'b1)) pe0 (.clk, .rst_n, .ce(1'b1), .issue(issue0), .inst, .busy(busy0), .coef_rows(rows),
    .mem_en(m0en), .mem_we(m0we), .mem_addr(m0a), .mem_wdata(m0wd), .mem_rdata(16'd0),
    .lm_we(l0we), .lm_idx(l0i), .lm_wdata(l0d), .fire_valid(f0v), .fire_ready(1'b1), .fire_pkt(f0p),
    .n_skip(s0), .n_exec(e0));

  function automatic longint sat(longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  longint model [16];
  int nsk = 0, nfire = 0, memacc = 0;
  always @(posedge clk) if (men) memacc++;

  initial begin
    op_e ops[7] = '{OP_WR, OP_ACC, OP_MAC, OP_MAX, OP_L1, OP_L2, OP_RD};
    issue = 0; issue0 = 0; fr = 1; inst = '0;
    for (int i = 0; i < 9; i++) rows[i] = {$urandom, $urandom, 8'($urandom)};
    rows[0][7:0] = 8'd0;   // coefficient 0 is zero
    #12 rst_n = 1;
    // initialise 16 words
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); inst = '0; inst.op = OP_WR; inst.off = 10'(a); inst.x = 16'(a * 3 - 20);
      model[a] = a * 3 - 20; issue = 1; @(negedge clk); issue = 0;
      while (busy) @(negedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      longint x, w, y, e; int a, c, cyc, acc0; bit skip, fire;
      @(negedge clk);
      inst = inst_t'({$urandom, $urandom, $urandom});
      inst.op = ops[$urandom_range(6)];
      a = $urandom_range(15); c = $urandom_range(80);
      if (t % 7 == 0) c = 0;
      inst.off = 10'(a); inst.coef = 7'(c); inst.fire = ($urandom_range(3) == 0);
      if (t % 9 == 0) inst.x = 0; else if (t % 2 == 0) inst.x = 16'($signed(inst.x) >>> 7);
      x = $signed(inst.x); w = $signed(rows[c / 9][(c % 9) * 8 +: 8]); y = model[a];
      skip = 0; fire = inst.fire;
      case (inst.op)
        OP_WR: e = x; OP_ACC: e = sat(y + x);
        OP_MAC: begin skip = (x == 0 || w == 0); e = skip ? y : sat(y + x * w); end
        OP_MAX: e = x > y ? x : y; OP_L1: e = sat(y + (x > w ? x - w : w - x));
        OP_L2: e = sat(y + (x - w) * (x - w)); default: e = y;
      endcase
      acc0 = memacc;
      issue = 1; @(negedge clk); issue = 0; cyc = 1;
      while (busy && !fv) begin @(negedge clk); cyc++; end
      if (fire) begin
        `CHECK(fv && fp.dst == {inst.fire_core, inst.vpn, inst.off} && longint'($signed(fp.datum)) == e
               && fp.op == inst.fire_op && fp.coef == inst.fire_coef && !fp.fire, "fired packet")
        nfire++;
        fr = 0; repeat ($urandom_range(3)) @(negedge clk);
        `CHECK(fv, "fire held until taken")
        fr = 1; @(negedge clk); fr = 1;
        `CHECK(!busy && !fv, "idle after fire")
      end else if (skip && inst.op == OP_MAC) begin
        `CHECK(cyc == 1 && memacc == acc0, "zero skip: 1 cycle, no memory access")
        nsk++;
      end else begin
        `CHECK(cyc == 2, $sformatf("two cycles per instruction (%0d)", cyc))
      end
      model[a] = e;
      `CHECK(longint'($signed(u_mem.mem[a])) == e, $sformatf("memory word %0d = %0d want %0d", a, $signed(u_mem.mem[a]), e))
    end
    // PE0: WCOEF
    @(negedge clk); inst = '0; inst.op = OP_WCOEF; inst.coef = 7'd42; inst.x = 16'h00a5; issue0 = 1;
    @(negedge clk); issue0 = 0; #1;
    `CHECK(l0we && l0i == 7'd42 && l0d == 8'ha5, "PE0 writes a coefficient")
    `CHECK(nsk > 0 && nfire > 0, "skip and fire reached")
    `TB_END
  end
endmodule
