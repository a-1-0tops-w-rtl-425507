// tb_nc_core: one core (address 121) with a DRAM model on its DMA bus.
// Packets are injected through the external port and loop back through the
// router to the core itself. The program loads a 9-coefficient row of the
// local memory, writes and accumulates words on several pages (page misses
// fill the paging memory units from DRAM), runs a 3-lane SIMD MAC, two
// SISD instructions on different pages (dual issue), a zero-datum MAC
// (skipped), and reads results out with firing: one fired as a HOST packet
// that returns on the host port, one fired to core 210 that leaves on P1.
// Expected values are computed here from the DRAM initial contents. Also
// checks that the core's clock enable drops when it is idle.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_core;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(200000)

  localparam caddr_t ME = 6'b01_10_01;
  fcis_t [1:0] fc = '0;
  logic [2:0] li_v, li_r, lo_v, lo_r; pkt_t [2:0] li_p, lo_p;
  logic ev, er, hv, hr; pkt_t ep, hp;
  logic breq, bwe, back; logic [31:0] baddr; logic [63:0] bwd, brd; int nrd, nwr;
  logic [15:0] nmc, nrr, nmiss, ndual, nsimd, nsisd, nskip; logic [31:0] nwake, nact;
  nc_core dut (.clk, .rst_n, .core_addr(ME), .fcis_in(fc), .hmimd_en(1'b1),
    .lnk_in_valid(li_v), .lnk_in_ready(li_r), .lnk_in_pkt(li_p),
    .lnk_out_valid(lo_v), .lnk_out_ready(lo_r), .lnk_out_pkt(lo_p),
    .ext_valid(ev), .ext_ready(er), .ext_pkt(ep), .host_valid(hv), .host_ready(hr), .host_pkt(hp),
    .bus_req(breq), .bus_we(bwe), .bus_addr(baddr), .bus_wdata(bwd), .bus_ack(back), .bus_rdata(brd),
    .n_mcast(nmc), .n_reroute(nrr), .n_miss(nmiss), .n_dual(ndual), .n_simd(nsimd), .n_sisd(nsisd),
    .n_skip(nskip), .n_wake(nwake), .n_active(nact));
  nc_ddr_model ddr (.clk, .req(breq), .we(bwe), .addr(baddr), .wdata(bwd), .ack(back), .rdata(brd),
    .n_rd(nrd), .n_wr(nwr));

  pkt_t hq[$], lq[$];
  always @(posedge clk) begin
    if (rst_n && hv && hr) hq.push_back(hp);
    if (rst_n && lo_v[0] && lo_r[0]) lq.push_back(lo_p[0]);
  end

  function automatic pkt_t mk(caddr_t c, int vpn, int off, op_e op, int x, bit simd = 0,
                              int lanes = 1, int coef = 0, bit fire = 0, caddr_t fc_ = '0, op_e fop = OP_NOP);
    pkt_t p; p = '0;
    p.dst = {c, 16'(vpn), 10'(off)}; p.op = op; p.datum = 16'(x); p.simd = simd; p.lanes = 4'(lanes);
    p.coef = 7'(coef); p.fire = fire; p.fire_core = fc_; p.fire_op = fop;
    return p;
  endfunction

  task automatic inject(pkt_t p);
    @(negedge clk); ev = 1; ep = p; #1;
    forever begin logic r; r = er; @(posedge clk); if (r) break; @(negedge clk); #1; end
    #1 ev = 0;
  endtask

  function automatic int dram(int vpn, int off);
    logic [31:0] a; logic [63:0] b;
    a = {ME, 16'(vpn), 10'(off)}; b = ddr.peek({a[31:2], 2'b00});
    return int'($signed(b[16 * (off % 4) +: 16]));
  endfunction

  function automatic int word(int unit, int off);
    case (unit)
      0: return int'($signed(dut.g_pmu[0].u_sram.mem[off]));
      1: return int'($signed(dut.g_pmu[1].u_sram.mem[off]));
      3: return int'($signed(dut.g_pmu[3].u_sram.mem[off]));
      default: return int'($signed(dut.g_pmu[2].u_sram.mem[off]));
    endcase
  endfunction

  task automatic idle_wait(int n);
    int c; c = 0;
    while (c < n) begin @(posedge clk); if (dut.ce || ev) c = 0; else c++; end
  endtask

  initial begin
    int e5, e6, e7, a0; logic [31:0] act0;
    li_v = '0; li_p = '0; lo_r = '1; ev = 0; ep = '0; hr = 1;
    #12 rst_n = 1;
    repeat (5) @(posedge clk);
    `CHECK(!dut.ce && nact == 0, "idle after reset: clock enable low")
    // coefficients 0..8 = 1..9
    for (int i = 0; i < 9; i++) inject(mk(ME, 0, 0, OP_WCOEF, i + 1, 0, 1, i));
    idle_wait(5);
    `CHECK(dut.coef_rows[0] == {8'd9, 8'd8, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1}, "coefficient row")
    // SISD writes and accumulation on page 5
    inject(mk(ME, 5, 10, OP_WR, 100));
    inject(mk(ME, 5, 10, OP_ACC, 23));
    inject(mk(ME, 5, 11, OP_MAX, -7));
    idle_wait(5);
    `CHECK(nmiss == 1 && dut.tlb_valid[0] && dut.tlb_vpn[0] == 16'd5, "page 5 loaded into unit 1")
    `CHECK(word(0, 10) == 123, $sformatf("WR then ACC %0d %0d", word(0, 10), word(0, 11)))
    a0 = dram(5, 11);
    `CHECK(word(0, 11) == (a0 > -7 ? a0 : -7), "MAX with DRAM word")
    // 3-lane SIMD MAC at offset 4 of pages 5,6,7, coefficients 2,3,4
    e5 = word(0, 4) + 2 * 3; e6 = dram(6, 4) + 2 * 4; e7 = dram(7, 4) + 2 * 5;
    inject(mk(ME, 5, 4, OP_MAC, 2, 1, 3, 2));
    idle_wait(5);
    `CHECK(nmiss == 3 && nsimd == 1, "SIMD: two more pages loaded, one SIMD issue")
    `CHECK(word(0, 4) == e5 && word(1, 4) == e6 && word(2, 4) == e7, "SIMD MAC lanes")
    // two SISD instructions to different pages back to back: dual issue.
    // A miss on page 8 holds the queue so that the next ones wait behind it.
    inject(mk(ME, 8, 0, OP_WR, 77));
    inject(mk(ME, 6, 20, OP_WR, 5));
    inject(mk(ME, 7, 20, OP_WR, 6));
    inject(mk(ME, 6, 21, OP_L1, 10, 0, 1, 0));
    inject(mk(ME, 7, 21, OP_L2, 3, 0, 1, 4));
    idle_wait(5);
    `CHECK(word(1, 20) == 5 && word(2, 20) == 6, "SISD writes")
    `CHECK(word(1, 21) == dram(6, 21) + 9 && word(2, 21) == dram(7, 21) + 4, "L1 and L2 terms")
    `CHECK(ndual > 0 && nmiss == 4 && word(3, 0) == 77, $sformatf("dual issue happened (%0d)", ndual))
    // zero datum MAC: skipped
    inject(mk(ME, 5, 10, OP_MAC, 0, 0, 1, 3));
    idle_wait(5);
    `CHECK(nskip == 1 && word(0, 10) == 123, "zero datum skipped")
    // read out: fire to HOST (comes back to this core, leaves on the host port)
    inject(mk(ME, 5, 10, OP_RD, 0, 0, 1, 0, 1, ME, OP_HOST));
    // fire to core 210 (leaves on P1)
    inject(mk(ME, 6, 20, OP_ACC, 1, 0, 1, 0, 1, 6'b10_01_00, OP_ACC));
    idle_wait(10);
    `CHECK(hq.size() == 1 && hq[0].datum == 16'd123 && hq[0].dst == {ME, 16'd5, 10'd10}, "HOST result")
    `CHECK(lq.size() == 1 && lq[0].datum == 16'd6 && lq[0].dst == {6'b10_01_00, 16'd6, 10'd20}
           && lq[0].op == OP_ACC, "fired packet to 210 on P1")
    // event driven: no activity while idle
    act0 = nact; repeat (50) @(posedge clk);
    `CHECK(nact == act0 && nwake > 1, "clock enable stays low while idle")
    `TB_END
  end
endmodule
