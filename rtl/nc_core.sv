// nc_core: one event-driven neocortical computing core with its Kautz router.
//
// Dataflow: packets arriving at the router's local output are decoded into
// instructions and queued in the 4-deep instruction FIFO. The dispatcher
// issues up to two instructions per cycle (hybrid MIMD: each SIMD or SISD)
// to the PEs whose paging memory units hold the target pages; PE0 serves the
// 81-byte local memory unit that broadcasts the coefficients to all PEs.
// Page misses go to the MMU/TLB, whose DMA moves 1K-word pages over the 64b
// bus. Results that fire are packed by the PEs, arbitrated by the packet
// encoder and injected into the router, which sends them (unicast or
// multicast) to the next cores. The core control raises the compute clock
// enable only while there is work (event-driven execution).
//
// Interfaces: three link inputs/outputs to the Kautz neighbours, ext_* to
// inject packets from a system bus interface, host_* for HOST packets that
// leave through it, bus_* for the DMA, and statistics counters. The block
// structure follows the architecture; widths of the counters and the
// handshakes are this design's.
module nc_core
  import nc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  caddr_t           core_addr,
  input  fcis_t [1:0]      fcis_in,
  input  logic             hmimd_en,
  input  logic [2:0]       lnk_in_valid,
  output logic [2:0]       lnk_in_ready,
  input  pkt_t [2:0]       lnk_in_pkt,
  output logic [2:0]       lnk_out_valid,
  input  logic [2:0]       lnk_out_ready,
  output pkt_t [2:0]       lnk_out_pkt,
  input  logic             ext_valid,
  output logic             ext_ready,
  input  pkt_t             ext_pkt,
  output logic             host_valid,
  input  logic             host_ready,
  output pkt_t             host_pkt,
  output logic             bus_req,
  output logic             bus_we,
  output logic [31:0]      bus_addr,
  output logic [63:0]      bus_wdata,
  input  logic             bus_ack,
  input  logic [63:0]      bus_rdata,
  output logic [15:0]      n_mcast,
  output logic [15:0]      n_reroute,
  output logic [15:0]      n_miss,
  output logic [15:0]      n_dual,
  output logic [15:0]      n_simd,
  output logic [15:0]      n_sisd,
  output logic [15:0]      n_skip,
  output logic [31:0]      n_wake,
  output logic [31:0]      n_active
);

  // ---------------- router ----------------
  logic enc_valid, enc_ready;
  pkt_t enc_pkt;
  logic lout_valid, lout_ready;
  pkt_t lout_pkt;
  logic [15:0] n_ffull;

  kautz_router u_router (
    .clk, .rst_n, .local_addr(core_addr), .fcis_in,
    .lin_valid(enc_valid), .lin_ready(enc_ready), .lin_pkt(enc_pkt),
    .lnk_in_valid, .lnk_in_ready, .lnk_in_pkt,
    .lnk_out_valid, .lnk_out_ready, .lnk_out_pkt,
    .lout_valid, .lout_ready, .lout_pkt,
    .n_mcast, .n_reroute, .n_fifo_full(n_ffull));

  // ---------------- decode / inst FIFO ----------------
  logic  dec_valid, dec_ready, ififo_empty;
  inst_t dec_inst;
  logic [1:0]  head_valid, pop_n;
  inst_t [1:0] head;

  nc_pkt_decode u_dec (
    .in_valid(lout_valid), .in_ready(lout_ready), .in_pkt(lout_pkt),
    .inst_valid(dec_valid), .inst_ready(dec_ready), .inst(dec_inst),
    .host_valid, .host_ready, .host_pkt);

  nc_inst_fifo u_ififo (
    .clk, .rst_n, .push(dec_valid), .push_ready(dec_ready), .push_inst(dec_inst),
    .head_valid, .head, .pop_n, .empty(ififo_empty));

  // ---------------- control ----------------
  logic ce;
  logic [N_PE-1:0] pe_busy;
  logic mmu_busy;

  nc_core_ctrl u_ctrl (
    .clk, .rst_n, .pkt_arriving(lout_valid), .ififo_nonempty(!ififo_empty),
    .pe_busy(|pe_busy), .dma_busy(mmu_busy), .enc_busy(enc_valid),
    .clk_en(ce), .n_wake, .n_active);

  // ---------------- dispatch ----------------
  logic [N_PMU-1:0]            tlb_valid;
  logic [N_PMU-1:0][VPN_W-1:0] tlb_vpn;
  logic                        miss_req;
  logic [VPN_W-1:0]            miss_vpn;
  logic [N_PE-1:0]             pe_issue;
  inst_t [N_PE-1:0]            pe_inst;
  logic                        dual;
  logic [1:0]                  d_simd, d_sisd;
  logic [1:0]                  pop_d;

  nc_dispatch u_disp (
    .hmimd_en, .head_valid, .head, .pop_n(pop_d), .pe_busy,
    .tlb_valid, .tlb_vpn, .mmu_busy, .miss_req, .miss_vpn,
    .pe_issue, .pe_inst, .dual_issue(dual), .n_simd(d_simd), .n_sisd(d_sisd));

  assign pop_n = ce ? pop_d : 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_dual <= '0; n_simd <= '0; n_sisd <= '0;
    end else if (ce) begin
      n_dual <= n_dual + 16'(dual);
      n_simd <= n_simd + 16'(d_simd);
      n_sisd <= n_sisd + 16'(d_sisd);
    end
  end

  // ---------------- PEs and memories ----------------
  logic [8:0][71:0]           coef_rows;
  logic [N_PE-1:0]            m_en, m_we;
  logic [N_PE-1:0][PAGE_AW-1:0] m_addr;
  logic [N_PE-1:0][15:0]      m_wdata, m_rdata;
  logic [N_PE-1:0]            lm_we;
  logic [N_PE-1:0][6:0]       lm_idx;
  logic [N_PE-1:0][7:0]       lm_wdata;
  logic [N_PE:0]              f_valid, f_ready;
  pkt_t [N_PE:0]              f_pkt;
  logic [N_PE-1:0][15:0]      pe_skip, pe_exec;

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    nc_pe #(.LOCAL_PE(p == 0)) u_pe (
      .clk, .rst_n, .ce, .issue(pe_issue[p]), .inst(pe_inst[p]), .busy(pe_busy[p]),
      .coef_rows,
      .mem_en(m_en[p]), .mem_we(m_we[p]), .mem_addr(m_addr[p]),
      .mem_wdata(m_wdata[p]), .mem_rdata(m_rdata[p]),
      .lm_we(lm_we[p]), .lm_idx(lm_idx[p]), .lm_wdata(lm_wdata[p]),
      .fire_valid(f_valid[p]), .fire_ready(f_ready[p]), .fire_pkt(f_pkt[p]),
      .n_skip(pe_skip[p]), .n_exec(pe_exec[p]));
  end

  always_comb begin
    n_skip = '0;
    for (int p = 0; p < int'(N_PE); p++) n_skip = n_skip + pe_skip[p];
  end

  nc_local_mem u_lmu (
    .clk, .rst_n, .we(lm_we[0]), .widx(lm_idx[0]), .wdata(lm_wdata[0]), .rows(coef_rows));

  assign m_rdata[0] = '0;

  logic                 dma_active, dma_en, dma_we;
  logic [3:0]           dma_sel;
  logic [PAGE_AW-1:0]   dma_addr;
  logic [15:0]          dma_wdata, dma_rdata;
  logic [N_PMU-1:0]     pmu_written;

  for (genvar e = 0; e < N_PMU; e++) begin : g_pmu
    logic own;
    assign own = dma_active && (dma_sel == 4'(e));
    assign pmu_written[e] = ce && m_we[e+1];
    nc_sram_sp #(.WORDS(1 << PAGE_AW), .DW(16)) u_sram (
      .clk,
      .en   (own ? dma_en    : ce && m_en[e+1]),
      .we   (own ? dma_we    : m_we[e+1]),
      .addr (own ? dma_addr  : m_addr[e+1]),
      .wdata(own ? dma_wdata : m_wdata[e+1]),
      .rdata(m_rdata[e+1]));
  end

  assign dma_rdata = m_rdata[int'(dma_sel) + 1];

  nc_mmu_dma u_mmu (
    .clk, .rst_n, .core_addr, .miss_req(ce && miss_req), .miss_vpn, .busy(mmu_busy),
    .tlb_valid, .tlb_vpn, .pmu_written, .pmu_pe_busy(pe_busy[N_PE-1:1]),
    .dma_active, .dma_sel, .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata, .n_miss);

  // ---------------- packet encode ----------------
  assign f_valid[N_PE] = ext_valid;
  assign f_pkt[N_PE]   = ext_pkt;
  assign ext_ready     = f_ready[N_PE];

  nc_pkt_encode #(.N(N_PE + 1)) u_enc (
    .clk, .rst_n, .req_valid(f_valid), .req_ready(f_ready), .req_pkt(f_pkt),
    .out_valid(enc_valid), .out_ready(enc_ready), .out_pkt(enc_pkt));

endmodule
