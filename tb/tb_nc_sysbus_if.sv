// tb_nc_sysbus_if: host packets written as two 64b beats must reach the
// injection port intact; returned packets must leave as two beats; and the
// DMA requests of 18 cores with random addresses must each reach the DRAM
// model once, be acknowledged to the right core, and read back what was
// written.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_nc_sysbus_if;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  logic hiv, hir, iv, ir, rv, rr, hov, hor; logic [63:0] hid, hod; pkt_t ip, rp;
  logic [17:0] mreq, mwe, mack; logic [17:0][31:0] maddr; logic [17:0][63:0] mwd; logic [63:0] mrd;
  logic ereq, ewe, eack; logic [31:0] eaddr; logic [63:0] ewd, erd; int nrd, nwr;
  nc_sysbus_if #(.N_MASTERS(18)) dut (.clk, .rst_n, .host_in_valid(hiv), .host_in_ready(hir),
    .host_in_data(hid), .inj_valid(iv), .inj_ready(ir), .inj_pkt(ip), .ret_valid(rv), .ret_ready(rr),
    .ret_pkt(rp), .host_out_valid(hov), .host_out_ready(hor), .host_out_data(hod),
    .m_req(mreq), .m_we(mwe), .m_addr(maddr), .m_wdata(mwd), .m_ack(mack), .m_rdata(mrd),
    .ext_req(ereq), .ext_we(ewe), .ext_addr(eaddr), .ext_wdata(ewd), .ext_ack(eack), .ext_rdata(erd));
  nc_ddr_model ddr (.clk, .req(ereq), .we(ewe), .addr(eaddr), .wdata(ewd), .ack(eack), .rdata(erd),
    .n_rd(nrd), .n_wr(nwr));

  task automatic master(int m);
    for (int t = 0; t < 6; t++) begin
      logic [31:0] a; logic [63:0] d; logic [63:0] r;
      a = {6'(m), 24'($urandom), 2'b00}; d = {$urandom, $urandom};
      @(negedge clk); mreq[m] = 1; mwe[m] = 1; maddr[m] = a; mwd[m] = d;
      do @(posedge clk); while (!mack[m]); #1 mreq[m] = 0;
      @(negedge clk); mreq[m] = 1; mwe[m] = 0;
      do @(posedge clk); while (!mack[m]); r = mrd; #1 mreq[m] = 0;
      `CHECK(r == d, $sformatf("master %0d read back", m))
    end
  endtask

  initial begin
    ir = 1; rv = 0; hor = 1; hiv = 0; mreq = '0; mwe = '0; maddr = '0; mwd = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      pkt_t p; p = pkt_t'({$urandom, $urandom, $urandom});
      ir = (t % 3 != 0);
      @(negedge clk); hiv = 1; hid = p[63:0];
      do @(posedge clk); while (!hir); #1;
      hid = {44'd0, p[83:64]};
      do @(posedge clk); while (!hir); #1 hiv = 0;
      while (!iv) @(posedge clk);
      `CHECK(ip == p, "injected packet")
      ir = 1; @(posedge clk); #1;
      // return path
      rp = p; rv = 1; hor = 1;
      @(negedge clk); `CHECK(hov && hod == p[63:0], "return beat 0")
      @(posedge clk); #1; `CHECK(hov && hod == {44'd0, p[83:64]} && rr, "return beat 1")
      @(posedge clk); #1 rv = 0;
    end
    for (int m = 0; m < 18; m++) fork automatic int mm = m; master(mm); join_none
    wait fork;
    `CHECK(nrd == 108 && nwr == 108, "each request reaches DRAM once")
    `TB_END
  end
endmodule
