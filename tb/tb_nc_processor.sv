// tb_nc_processor: end-to-end run of the 36-core processor at its default
// size, with a DRAM model on each system bus.
//
// Workload (push-based, one 3-row SIMD convolution column):
//  1. Bus 1 multicasts the coefficients 1..9 to core group 1 (group address
//     110 = all nine cores 1xy) with WCOEF packets.
//  2. Bus 1 sends to core 121: a SIMD WR (3 lanes, pages 10..12, offsets
//     0..7) that clears the targets to 1000 (page misses fill units from
//     DRAM), then 8 SIMD MACs y_l[j] += x_j * w[l] (some x_j = 0: skipped),
//     with dual issue off for the first half and on for the second (mode
//     switch), then RD instructions that fire each y_l[j] as a HOST packet
//     to core 010, which returns it on bus 1.
//  3. With core 012 marked faulty, the packets from 010 to 121 must detour.
//  4. Bus 2 writes and reads back a word at core 303 through core 232.
// Every returned value is compared with 1000 + x_j * w[l] computed here,
// and the counters prove that backpressure stalls (random host_out_ready and
// NoC links), the single-to-dual issue mode switch, multicast, rerouting,
// page misses, SIMD, SISD, dual issue, zero skipping and wake-up all
// happened. Timing: inputs are driven after the falling edge; host packets
// are two 64b beats. The workload is this design's own small test; the
// mechanisms it exercises are the architecture's.
`include "rtl/nc_check.svh"
module tb_nc_processor;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(400000)

  fcis_t [1:0] fc; logic hm;
  logic [1:0] hiv, hir, hov, hor, mreq, mwe, mack; logic [1:0][63:0] hid, hod, mwd, mrd;
  logic [1:0][31:0] maddr;
  logic [31:0] n_mcast, n_rer, n_miss, n_dual, n_simd, n_sisd, n_skip, n_wake;
  int nrd[2], nwr[2];
  nc_processor dut (.clk, .rst_n, .fcis_in(fc), .hmimd_en(hm),
    .host_in_valid(hiv), .host_in_ready(hir), .host_in_data(hid),
    .host_out_valid(hov), .host_out_ready(hor), .host_out_data(hod),
    .mem_req(mreq), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd), .mem_ack(mack), .mem_rdata(mrd),
    .n_mcast, .n_reroute(n_rer), .n_miss, .n_dual, .n_simd, .n_sisd, .n_skip, .n_wake);
  for (genvar b = 0; b < 2; b++) begin : g_ddr
    nc_ddr_model ddr (.clk, .req(mreq[b]), .we(mwe[b]), .addr(maddr[b]), .wdata(mwd[b]),
      .ack(mack[b]), .rdata(mrd[b]), .n_rd(nrd[b]), .n_wr(nwr[b]));
  end

  localparam caddr_t C121 = 6'b01_10_01, C010 = 6'b00_01_00, C232 = 6'b10_11_10, C303 = 6'b11_00_11;

  // host output collectors: two beats per packet
  pkt_t ret[2][$];
  logic [63:0] lo[2]; bit hb[2] = '{0, 0};
  for (genvar b = 0; b < 2; b++) begin : g_ret
    always @(posedge clk) if (rst_n && hov[b] && hor[b]) begin
      if (!hb[b]) lo[b] = hod[b];
      else ret[b].push_back(pkt_t'({hod[b][19:0], lo[b]}));
      hb[b] = !hb[b];
    end
  end

  function automatic pkt_t mk(caddr_t c, int vpn, int off, op_e op, int x, bit simd = 0,
                              int lanes = 1, int coef = 0, bit fire = 0, caddr_t f = '0, op_e fop = OP_NOP);
    pkt_t p; p = '0;
    p.dst = {c, 16'(vpn), 10'(off)}; p.op = op; p.datum = 16'(x); p.simd = simd; p.lanes = 4'(lanes);
    p.coef = 7'(coef); p.fire = fire; p.fire_core = f; p.fire_op = fop;
    return p;
  endfunction

  task automatic host_send(int b, pkt_t p);
    for (int beat = 0; beat < 2; beat++) begin
      @(negedge clk); hiv[b] = 1; hid[b] = beat == 0 ? p[63:0] : {44'd0, p[83:64]};
      forever begin logic r; r = hir[b]; @(posedge clk); if (r) break; @(negedge clk); end
      #1 hiv[b] = 0;
    end
  endtask

  task automatic quiet(int n);   // wait until no core is active for n cycles
    int c; c = 0;
    while (c < n) begin
      bit act; act = 0;
      @(posedge clk);
      act = (hiv != 0) || (mreq != 0) || (hov != 0);
      if (act || n_active_now() != 0) c = 0; else c++;
    end
  endtask

  function automatic int n_active_now();
    int s; s = 0;
    for (int i = 0; i < 36; i++) if (dut.c_act[i] != act_prev[i]) s++;
    for (int i = 0; i < 36; i++) act_prev[i] = dut.c_act[i];
    return s;
  endfunction
  logic [31:0] act_prev [36];

  // stalls: a valid held without ready anywhere in the NoC or at the host
  int n_stall = 0, n_modesw = 0;
  always @(posedge clk) begin
    if (rst_n && hov != 0 && (hov & ~hor) != 0) n_stall++;
    for (int i = 0; i < 36; i++) if (rst_n && (dut.lo_valid[i] & ~dut.lo_ready[i]) != 0) n_stall++;
  end
  logic hm_q = 0;
  always @(posedge clk) begin if (hm != hm_q) n_modesw++; hm_q <= hm; end
  // random host-side backpressure on the result outputs
  always @(negedge clk) hor <= 2'($urandom_range(0, 3));

  int x[8] = '{3, 0, -2, 5, 7, 0, 1, -4};
  initial begin
    int d0, nres, t0;
    fc = '0; hm = 0; hiv = '0; hid = '0;
    foreach (act_prev[i]) act_prev[i] = 0;
    #12 rst_n = 1;
    repeat (5) @(posedge clk);
    `CHECK(n_wake == 0, "all cores asleep after reset")
    // core 012 faulty: 010 -> 121 must detour
    fc[0] = '{valid: 1'b1, is_link: 1'b0, s: {6'b00_01_10, 2'b00}};
    // 1. coefficients to group 1
    for (int i = 0; i < 9; i++) host_send(0, mk(6'b01_01_00, 0, 0, OP_WCOEF, i + 1, 0, 1, i));
    quiet(30);
    `CHECK(dut.g_core[9].u_core.coef_rows[0] == 72'h090807060504030201
           && dut.g_core[17].u_core.coef_rows[0] == 72'h090807060504030201, "group 1 has the coefficients")
    `CHECK(dut.g_core[0].u_core.coef_rows[0] == '0, "group 0 untouched")
    // 2. clear targets (SIMD WR) on 3 pages, 8 offsets
    for (int j = 0; j < 8; j++) host_send(0, mk(C121, 10, j, OP_WR, 1000, 1, 3, 0));
    quiet(30);
    // SIMD MACs, dual issue off then on
    for (int j = 0; j < 8; j++) begin
      if (j == 4) begin quiet(30); d0 = n_dual; `CHECK(d0 == 0, "no dual issue while off") hm = 1; end
      host_send(0, mk(C121, 10, j, OP_MAC, x[j], 1, 3, 0));
      host_send(0, mk(C121, 20 + j, 0, OP_WR, j));     // SISD on other pages
    end
    quiet(30);
    // read out: fire every y as HOST to core 010
    for (int j = 0; j < 8; j++) host_send(0, mk(C121, 10, j, OP_RD, 0, 1, 3, 0, 1, C010, OP_HOST));
    quiet(60);
    nres = 0;
    while (ret[0].size() > 0) begin
      pkt_t p; int l, j, e;
      p = ret[0].pop_front();
      l = int'(p.dst[25:10]) - 10; j = int'(p.dst[9:0]);
      e = 1000 + x[j] * (l + 1);
      `CHECK(p.dst[31:26] == C010 && l >= 0 && l < 3 && $signed(p.datum) == 16'(e),
             $sformatf("y[%0d][%0d] = %0d want %0d", l, j, $signed(p.datum), e))
      nres++;
    end
    `CHECK(nres == 24, $sformatf("24 results returned (%0d)", nres))
    // 4. bus 2: write and read back at core 303
    host_send(1, mk(C303, 3, 9, OP_WR, 4321));
    host_send(1, mk(C303, 3, 9, OP_RD, 0, 0, 1, 0, 1, C232, OP_HOST));
    quiet(60);
    `CHECK(ret[1].size() == 1 && ret[1][0].datum == 16'd4321, "bus 2 round trip")
    `CHECK(nrd[1] > 0 && nrd[0] > 0, "both DRAM buses used")
    // mechanisms
    $display("stall=%0d modesw=%0d", n_stall, n_modesw);
    $display("mcast=%0d reroute=%0d miss=%0d dual=%0d simd=%0d sisd=%0d skip=%0d wake=%0d",
             n_mcast, n_rer, n_miss, n_dual, n_simd, n_sisd, n_skip, n_wake);
    `CHECK(n_stall > 0, "backpressure stalls happened")
    `CHECK(n_modesw > 0 && d0 == 0, "mode switch to dual issue happened")
    `CHECK(n_mcast > 0, "multicast happened")
    `CHECK(n_rer > 0, "fault detour happened")
    `CHECK(n_miss > 0, "page misses happened")
    `CHECK(n_dual > 0, "dual issue happened")
    `CHECK(n_simd > 0 && n_sisd > 0, "SIMD and SISD issues happened")
    `CHECK(n_skip > 0, "zero skip happened")
    `CHECK(n_wake > 0, "cores woke up")
    `TB_END
  end
endmodule
