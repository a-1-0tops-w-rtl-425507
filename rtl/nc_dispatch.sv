// nc_dispatch: instruction dispatcher of an NC core (hybrid MIMD issue).
// Combinational issue decision; the PEs register what they are given.
//
// Each cycle it looks at the two oldest instructions of the instruction FIFO.
// An instruction needs a set of PEs: WCOEF needs PE0 (local memory unit);
// any other operation needs, for each lane l (one lane for SISD, 1..9 for
// SIMD), the PE of the paging memory unit that holds virtual page vpn+l,
// found by a fully associative lookup in the TLB contents given by the MMU.
// The oldest instruction issues when all its pages are present, its PEs are
// idle and the MMU is not busy; the second issues in the same cycle when
// dual issue is enabled (hmimd_en), the first issued, its pages are present
// and its PEs are idle and disjoint from the first's. So each of the two
// issued instructions may be SIMD or SISD. A page miss on the oldest
// instruction raises miss_req with the missing page; the MMU then loads it.
// NOP instructions are removed without using a PE.
//
// Dual issue of SIMD/SISD instructions to the PEs that cover the target
// addresses follows the architecture; the page-per-lane mapping, the
// in-order rule and the stall on a busy MMU are this design's choices.
module nc_dispatch
  import nc_pkg::*;
(
  input  logic                  hmimd_en,
  input  logic [1:0]            head_valid,
  input  inst_t [1:0]           head,
  output logic [1:0]            pop_n,
  input  logic [N_PE-1:0]       pe_busy,
  input  logic [N_PMU-1:0]      tlb_valid,
  input  logic [N_PMU-1:0][VPN_W-1:0] tlb_vpn,
  input  logic                  mmu_busy,
  output logic                  miss_req,
  output logic [VPN_W-1:0]      miss_vpn,
  output logic [N_PE-1:0]       pe_issue,
  output inst_t [N_PE-1:0]      pe_inst,
  output logic                  dual_issue,   // two instructions this cycle
  output logic [1:0]            n_simd,       // SIMD instructions issued
  output logic [1:0]            n_sisd        // SISD instructions issued
);

  logic [1:0]                 hit, go;
  logic [1:0][N_PE-1:0]       pes;
  logic [1:0][VPN_W-1:0]      mvpn;
  inst_t [1:0][N_PE-1:0]      linst;

  always_comb begin
    logic             f;
    logic [VPN_W-1:0] v;
    f = 1'b0;
    v = '0;
    for (int i = 0; i < 2; i++) begin
      hit[i]  = 1'b1;
      pes[i]  = '0;
      mvpn[i] = '0;
      for (int p = 0; p < int'(N_PE); p++) linst[i][p] = head[i];
      if (head[i].op == OP_WCOEF) begin
        pes[i][0] = 1'b1;
      end else if (head[i].op != OP_NOP) begin
        for (int l = int'(N_PMU) - 1; l >= 0; l--) begin
          if (l < int'(head[i].lanes)) begin
            v = head[i].vpn + VPN_W'(l);
            f = 1'b0;
            for (int e = 0; e < int'(N_PMU); e++) begin
              if (tlb_valid[e] && tlb_vpn[e] == v) begin
                f = 1'b1;
                pes[i][e+1] = 1'b1;
                linst[i][e+1].vpn  = v;
                linst[i][e+1].coef = head[i].coef + 7'(l);
              end
            end
            if (!f) begin
              hit[i]  = 1'b0;
              mvpn[i] = v;   // lowest missing lane wins (loop runs downwards)
            end
          end
        end
      end
    end

    go[0] = head_valid[0] && hit[0] && ((pes[0] & pe_busy) == '0) && !mmu_busy;
    go[1] = go[0] && hmimd_en && head_valid[1] && hit[1]
            && ((pes[1] & pe_busy) == '0) && ((pes[1] & pes[0]) == '0);
    pop_n = 2'(go[0]) + 2'(go[1]);

    miss_req = head_valid[0] && !hit[0] && !mmu_busy;
    miss_vpn = mvpn[0];

    pe_issue = '0;
    pe_inst  = linst[0];
    for (int p = 0; p < int'(N_PE); p++) begin
      if (go[1] && pes[1][p]) begin
        pe_issue[p] = 1'b1;
        pe_inst[p]  = linst[1][p];
      end
      if (go[0] && pes[0][p]) begin
        pe_issue[p] = 1'b1;
        pe_inst[p]  = linst[0][p];
      end
    end
    dual_issue = go[1];
    n_simd = 2'(go[0] && head[0].simd) + 2'(go[1] && head[1].simd);
    n_sisd = 2'(go[0] && !head[0].simd) + 2'(go[1] && !head[1].simd);
  end

endmodule
