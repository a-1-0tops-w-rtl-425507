// tb_nc_mmu_dma: the MMU/DMA with the nine paging memory SRAMs and a DRAM
// model. Misses on ten different pages fill the nine units and then evict;
// a unit is marked written before eviction. Checks: the TLB maps each loaded
// page, the SRAM holds the DRAM words of that page, a dirty victim is
// written back (DRAM then holds the SRAM data) and a clean one is not, the
// victim waits for its PE to go idle, and a page load takes 256 bus beats.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_mmu_dma;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(400000)

  localparam caddr_t CORE = 6'b10_01_00;
  logic mreq, busy, dact, den, dwe, breq, bwe, back; logic [15:0] mvpn, nmiss;
  logic [8:0] tv, pw, pbusy; logic [8:0][15:0] tvpn; logic [3:0] dsel; logic [9:0] daddr;
  logic [15:0] dwd, drd; logic [31:0] baddr; logic [63:0] bwd, brd; int nrd, nwr;
  nc_mmu_dma dut (.clk, .rst_n, .core_addr(CORE), .miss_req(mreq), .miss_vpn(mvpn), .busy,
    .tlb_valid(tv), .tlb_vpn(tvpn), .pmu_written(pw), .pmu_pe_busy(pbusy),
    .dma_active(dact), .dma_sel(dsel), .dma_en(den), .dma_we(dwe), .dma_addr(daddr),
    .dma_wdata(dwd), .dma_rdata(drd), .bus_req(breq), .bus_we(bwe), .bus_addr(baddr),
    .bus_wdata(bwd), .bus_ack(back), .bus_rdata(brd), .n_miss(nmiss));
  nc_ddr_model #(.MAXLAT(2)) ddr (.clk, .req(breq), .we(bwe), .addr(baddr), .wdata(bwd),
    .ack(back), .rdata(brd), .n_rd(nrd), .n_wr(nwr));

  logic [15:0] rd [9];
  logic [15:0] sram [9][1024];
  for (genvar e = 0; e < 9; e++) begin : g_m
    always @(posedge clk) if (dact && dsel == 4'(e) && den) begin
      if (dwe) sram[e][daddr] <= dwd; else rd[e] <= sram[e][daddr];
    end
  end
  assign drd = rd[dsel];

  function automatic logic [15:0] dram_word(logic [15:0] vpn, int off);
    logic [31:0] a; logic [63:0] b;
    a = {CORE, vpn, 10'(off)};
    b = ddr.peek({a[31:2], 2'b00});
    return b[16 * (off % 4) +: 16];
  endfunction

  task automatic miss(logic [15:0] v, output int cycles);
    @(negedge clk); mreq = 1; mvpn = v; @(negedge clk); mreq = 0; cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, e, wr0, rd0; logic [15:0] v;
    mreq = 0; mvpn = 0; pw = 0; pbusy = 0;
    #12 rst_n = 1;
    for (int p = 0; p < 9; p++) begin
      rd0 = nrd; miss(16'(100 + p), cyc);
      `CHECK(tv[p] && tvpn[p] == 16'(100 + p), $sformatf("entry %0d maps page %0d", p, 100 + p))
      `CHECK(nrd - rd0 == 256, "256 beats per page")
      `CHECK(sram[p][0] == dram_word(16'(100 + p), 0) && sram[p][777] == dram_word(16'(100 + p), 777)
             && sram[p][1023] == dram_word(16'(100 + p), 1023), "page contents")
    end
    `CHECK(nwr == 0, "no write-back of clean pages")
    // dirty unit 0 (round robin victim) with a pattern, PE busy for a while
    for (int i = 0; i < 1024; i++) sram[0][i] = 16'(i * 7);
    @(negedge clk); pw = 9'b1; @(negedge clk); pw = 0;
    pbusy[0] = 1;
    fork
      miss(16'd200, cyc);
      begin repeat (20) @(negedge clk); `CHECK(!dact, "waits for the PE") pbusy[0] = 0; end
    join
    `CHECK(nwr == 256, "dirty page written back")
    `CHECK(ddr.peek({CORE, 16'd100, 10'd12}) == {16'(15 * 7), 16'(14 * 7), 16'(13 * 7), 16'(12 * 7)},
           "write-back data")
    `CHECK(tv[0] && tvpn[0] == 16'd200 && sram[0][5] == dram_word(16'd200, 5), "new page in unit 0")
    // clean victim next: no write-back
    wr0 = nwr; miss(16'd201, cyc);
    `CHECK(nwr == wr0 && tvpn[1] == 16'd201, "clean victim not written back")
    `CHECK(nmiss == 11, "miss count")
    `TB_END
  end
endmodule
