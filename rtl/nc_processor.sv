// nc_processor: 36-core neocortical computing processor on a Kautz NoC.
//
// The 36 cores are the nodes of the Kautz graph K(3,3): a core's address is
// three base-4 digits with no two adjacent digits equal, and its output port
// k links to the core whose address is its own shifted left by one digit
// with the k-th digit different from its last digit appended (core 121 ->
// 210, 212, 213). Any core reaches any other in at most 3 hops and there
// are 3 disjoint paths between any two. At the receiving core the link
// lands in input buffer q, the rank of the sender's first digit among the
// digits different from the receiver's first digit.
//
// Core index i = 9*S1 + 3*rank(S2) + rank(S3) (see nc_pkg). Core groups
// CG0..CG3 are the cores with S1 = 0..3. System bus interface 1 injects at
// core 010 and serves the DMA of groups 0 and 1; interface 2 injects at
// core 232 and serves groups 2 and 3; each has its own external 64b memory
// bus (the DRAM is off chip). fcis_in (the fault/congestion strings) and
// hmimd_en (dual issue) go to every core. The outputs n_* sum the cores'
// event counters.
module nc_processor
  import nc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  fcis_t [1:0]       fcis_in,
  input  logic              hmimd_en,
  // system bus interfaces 1 and 2
  input  logic [1:0]        host_in_valid,
  output logic [1:0]        host_in_ready,
  input  logic [1:0][63:0]  host_in_data,
  output logic [1:0]        host_out_valid,
  input  logic [1:0]        host_out_ready,
  output logic [1:0][63:0]  host_out_data,
  output logic [1:0]        mem_req,
  output logic [1:0]        mem_we,
  output logic [1:0][31:0]  mem_addr,
  output logic [1:0][63:0]  mem_wdata,
  input  logic [1:0]        mem_ack,
  input  logic [1:0][63:0]  mem_rdata,
  // event counters summed over all cores
  output logic [31:0]       n_mcast,
  output logic [31:0]       n_reroute,
  output logic [31:0]       n_miss,
  output logic [31:0]       n_dual,
  output logic [31:0]       n_simd,
  output logic [31:0]       n_sisd,
  output logic [31:0]       n_skip,
  output logic [31:0]       n_wake
);
  localparam int NC = N_CORES;
  localparam int BUS_CORE [2] = '{0, 26};   // cores 010 and 232

  logic       li_valid [NC][3];
  logic       li_ready [NC][3];
  pkt_t       li_pkt   [NC][3];
  logic [2:0] lo_valid [NC];
  logic [2:0] lo_ready [NC];
  pkt_t [2:0] lo_pkt   [NC];

  logic       ext_valid [NC];
  logic       ext_ready [NC];
  pkt_t       ext_pkt   [NC];
  logic       hst_valid [NC];
  logic       hst_ready [NC];
  pkt_t       hst_pkt   [NC];

  logic [NC-1:0]       b_req, b_we, b_ack;
  logic [NC-1:0][31:0] b_addr;
  logic [NC-1:0][63:0] b_wdata;
  logic [1:0][63:0]    b_rdata;

  logic [15:0] c_mcast [NC], c_rer [NC], c_miss [NC], c_dual [NC];
  logic [15:0] c_simd [NC], c_sisd [NC], c_skip [NC];
  logic [31:0] c_wake [NC], c_act [NC];

  for (genvar i = 0; i < NC; i++) begin : g_core
    localparam caddr_t A = core_addr_of(i);
    logic [2:0] in_v, in_r;
    pkt_t [2:0] in_p;

    for (genvar k = 0; k < 3; k++) begin : g_lnk
      localparam caddr_t B = {A[3:0], nth_other(A[1:0], 2'(k))};
      localparam int     J = core_index(B);
      localparam int     Q = int'(other_rank(B[5:4], A[5:4]));
      assign li_valid[J][Q] = lo_valid[i][k];
      assign li_pkt[J][Q]   = lo_pkt[i][k];
      assign lo_ready[i][k] = li_ready[J][Q];
      assign in_v[k]        = li_valid[i][k];
      assign in_p[k]        = li_pkt[i][k];
      assign li_ready[i][k] = in_r[k];
    end

    nc_core u_core (
      .clk, .rst_n, .core_addr(A), .fcis_in, .hmimd_en,
      .lnk_in_valid(in_v), .lnk_in_ready(in_r), .lnk_in_pkt(in_p),
      .lnk_out_valid(lo_valid[i]), .lnk_out_ready(lo_ready[i]), .lnk_out_pkt(lo_pkt[i]),
      .ext_valid(ext_valid[i]), .ext_ready(ext_ready[i]), .ext_pkt(ext_pkt[i]),
      .host_valid(hst_valid[i]), .host_ready(hst_ready[i]), .host_pkt(hst_pkt[i]),
      .bus_req(b_req[i]), .bus_we(b_we[i]), .bus_addr(b_addr[i]), .bus_wdata(b_wdata[i]),
      .bus_ack(b_ack[i]), .bus_rdata(b_rdata[i / 18]),
      .n_mcast(c_mcast[i]), .n_reroute(c_rer[i]), .n_miss(c_miss[i]), .n_dual(c_dual[i]),
      .n_simd(c_simd[i]), .n_sisd(c_sisd[i]), .n_skip(c_skip[i]),
      .n_wake(c_wake[i]), .n_active(c_act[i]));

    if (i != BUS_CORE[0] && i != BUS_CORE[1]) begin : g_nobus
      assign ext_valid[i] = 1'b0;
      assign ext_pkt[i]   = '0;
      assign hst_ready[i] = 1'b1;   // HOST packets only leave at a bus core
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bus
    localparam int C = BUS_CORE[b];
    nc_sysbus_if #(.N_MASTERS(18)) u_if (
      .clk, .rst_n,
      .host_in_valid(host_in_valid[b]), .host_in_ready(host_in_ready[b]),
      .host_in_data(host_in_data[b]),
      .inj_valid(ext_valid[C]), .inj_ready(ext_ready[C]), .inj_pkt(ext_pkt[C]),
      .ret_valid(hst_valid[C]), .ret_ready(hst_ready[C]), .ret_pkt(hst_pkt[C]),
      .host_out_valid(host_out_valid[b]), .host_out_ready(host_out_ready[b]),
      .host_out_data(host_out_data[b]),
      .m_req(b_req[b*18 +: 18]), .m_we(b_we[b*18 +: 18]), .m_addr(b_addr[b*18 +: 18]),
      .m_wdata(b_wdata[b*18 +: 18]), .m_ack(b_ack[b*18 +: 18]), .m_rdata(b_rdata[b]),
      .ext_req(mem_req[b]), .ext_we(mem_we[b]), .ext_addr(mem_addr[b]),
      .ext_wdata(mem_wdata[b]), .ext_ack(mem_ack[b]), .ext_rdata(mem_rdata[b]));
  end

  always_comb begin
    n_mcast = '0; n_reroute = '0; n_miss = '0; n_dual = '0;
    n_simd = '0; n_sisd = '0; n_skip = '0; n_wake = '0;
    for (int i = 0; i < NC; i++) begin
      n_mcast   += 32'(c_mcast[i]);
      n_reroute += 32'(c_rer[i]);
      n_miss    += 32'(c_miss[i]);
      n_dual    += 32'(c_dual[i]);
      n_simd    += 32'(c_simd[i]);
      n_sisd    += 32'(c_sisd[i]);
      n_skip    += 32'(c_skip[i]);
      n_wake    += c_wake[i];
    end
  end

endmodule
