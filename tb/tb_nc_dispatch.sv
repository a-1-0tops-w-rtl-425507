// tb_nc_dispatch: random TLB contents, PE busy masks and instruction pairs
// (SISD, SIMD with 1..9 lanes, WCOEF, NOP). The expected issue is worked out
// here from a page -> unit map: the first instruction issues if all its
// pages are mapped, its PEs idle and the MMU idle; the second only with the
// first, with dual issue on, and on idle PEs disjoint from the first's.
// Checks pop count, per-PE issue and lane page/coefficient, the miss request
// (lowest missing page) and that dual issue, SIMD and SISD all occur.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_dispatch;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic hm; logic [1:0] hv, pop; inst_t [1:0] head; logic [9:0] busy; logic [8:0] tv;
  logic [8:0][15:0] tvpn; logic mb, mreq, dual; logic [15:0] mvpn; logic [9:0] iss; inst_t [9:0] pinst;
  logic [1:0] ns, nsi;
  nc_dispatch dut (.hmimd_en(hm), .head_valid(hv), .head, .pop_n(pop), .pe_busy(busy), .tlb_valid(tv),
    .tlb_vpn(tvpn), .mmu_busy(mb), .miss_req(mreq), .miss_vpn(mvpn), .pe_issue(iss), .pe_inst(pinst),
    .dual_issue(dual), .n_simd(ns), .n_sisd(nsi));
  int n_dual = 0, n_simd = 0, n_sisd = 0, n_miss = 0;

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int unitof[int]; logic [9:0] need[2]; bit ok[2]; int miss[2]; bit go0, go1; logic [9:0] eiss;
      unitof.delete();
      // TLB: distinct pages from a small range
      for (int e = 0; e < 9; e++) begin
        tv[e] = ($urandom_range(9) < 8);
        tvpn[e] = 16'(40 + e * 2 + $urandom_range(1));
        if (tv[e]) unitof[int'(tvpn[e])] = e + 1;
      end
      hm = ($urandom_range(3) != 0); mb = ($urandom_range(9) == 0);
      busy = 10'($urandom) & 10'($urandom) & 10'($urandom);
      hv = 2'($urandom);
      for (int i = 0; i < 2; i++) begin
        head[i] = inst_t'({$urandom, $urandom, $urandom});
        case ($urandom_range(5))
          0: head[i].op = OP_WCOEF;
          1: head[i].op = OP_NOP;
          default: head[i].op = OP_MAC;
        endcase
        head[i].simd = $urandom_range(1);
        head[i].lanes = head[i].simd ? 4'($urandom_range(1, 4)) : 4'd1;
        head[i].vpn = 16'(40 + $urandom_range(20));
        head[i].coef = 7'($urandom_range(70));
        need[i] = '0; ok[i] = 1; miss[i] = -1;
        if (head[i].op == OP_WCOEF) need[i][0] = 1;
        else if (head[i].op != OP_NOP)
          for (int l = 0; l < int'(head[i].lanes); l++) begin
            int v; v = int'(head[i].vpn) + l;
            if (unitof.exists(v)) need[i][unitof[v]] = 1;
            else begin ok[i] = 0; if (miss[i] < 0) miss[i] = v; end
          end
      end
      #1;
      go0 = hv[0] && ok[0] && !mb && ((need[0] & busy) == 0);
      go1 = go0 && hm && hv[1] && ok[1] && ((need[1] & busy) == 0) && ((need[1] & need[0]) == 0);
      eiss = (go0 ? need[0] : '0) | (go1 ? need[1] : '0);
      `CHECK(pop == 2'(go0) + 2'(go1) && iss == eiss && dual == go1, $sformatf("issue t=%0d", t))
      `CHECK(mreq == (hv[0] && !ok[0] && !mb) && (!mreq || int'(mvpn) == miss[0]), "miss request")
      for (int i = 0; i < 2; i++) if ((i == 0 ? go0 : go1) && head[i].op == OP_MAC)
        for (int l = 0; l < int'(head[i].lanes); l++) begin
          int u; u = unitof[int'(head[i].vpn) + l];
          `CHECK(int'(pinst[u].vpn) == int'(head[i].vpn) + l && pinst[u].coef == head[i].coef + 7'(l)
                 && pinst[u].x == head[i].x, "lane page and coefficient")
        end
      n_dual += go1; n_miss += mreq;
      n_simd += int'(ns); n_sisd += int'(nsi);
    end
    `CHECK(n_dual > 0 && n_simd > 0 && n_sisd > 0 && n_miss > 0, "all cases reached")
    `TB_END
  end
endmodule
