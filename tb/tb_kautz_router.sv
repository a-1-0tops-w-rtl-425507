// tb_kautz_router: the router at address 121. Packets enter on the local
// input and the three link inputs; each is expected on the output worked
// out here from the Kautz successor rule (P1..P3 = next cores 210, 212, 213,
// local output for 121). Checks: unicast port choice, loopback, multicast
// 211 cloned to 210/212/213 with rewritten targets, fault avoidance (323
// leaves on P3 normally and on P1 when 132 is faulty), per-output order
// under random back-pressure, the FIFO-full case, and the 3-cycle latency
// of an uncontested hop.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_kautz_router;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `WATCHDOG(50000)

  localparam caddr_t ME = 6'b01_10_01;   // 121
  fcis_t [1:0] fc;
  logic lin_valid, lin_ready; pkt_t lin_pkt;
  logic [2:0] li_v, li_r; pkt_t [2:0] li_p;
  logic [2:0] lo_v, lo_r; pkt_t [2:0] lo_p;
  logic lv, lr; pkt_t lp;
  logic [15:0] n_mc, n_rr, n_ff;
  kautz_router dut (.clk, .rst_n, .local_addr(ME), .fcis_in(fc),
    .lin_valid, .lin_ready, .lin_pkt, .lnk_in_valid(li_v), .lnk_in_ready(li_r), .lnk_in_pkt(li_p),
    .lnk_out_valid(lo_v), .lnk_out_ready(lo_r), .lnk_out_pkt(lo_p),
    .lout_valid(lv), .lout_ready(lr), .lout_pkt(lp), .n_mcast(n_mc), .n_reroute(n_rr), .n_fifo_full(n_ff));

  // expected per output (0..2 links, 3 local): datum and target core
  logic [15:0] exp_d[4][$];
  caddr_t      exp_c[4][$];
  int got = 0, sent = 0;
  int rdy_pct = 100;

  function automatic int out_of(caddr_t d, bit fault132);
    if (d == ME) return 3;
    if (fault132 && d == 6'b11_10_11) return 0;          // 323 via 210
    // next core: shift with the digit that starts the shortest remainder
    if (d[5:4] == ME[3:2] && d[3:2] == ME[1:0]) return int'(other_rank(ME[1:0], d[1:0]));
    if (d[5:4] == ME[1:0]) return int'(other_rank(ME[1:0], d[3:2]));
    return int'(other_rank(ME[1:0], d[5:4]));
  endfunction

  task automatic send(int src, caddr_t d, logic [15:0] id, bit fault132);
    pkt_t p; logic r; p = '0; p.dst = {d, 26'h00abc}; p.datum = id; p.op = OP_ACC;
    if (d == 6'b10_01_01) begin
      for (int k = 0; k < 3; k++) begin exp_d[k].push_back(id); exp_c[k].push_back({4'b1001, nth_other(2'b01, 2'(k))}); end
    end else begin
      exp_d[out_of(d, fault132)].push_back(id); exp_c[out_of(d, fault132)].push_back(d);
    end
    sent++;
    if (src == 3) begin
      @(negedge clk); lin_pkt = p; lin_valid = 1;
      forever begin r = lin_ready; @(posedge clk); if (r) break; @(negedge clk); end
      #1 lin_valid = 0;
    end else begin
      @(negedge clk); li_p[src] = p; li_v[src] = 1;
      forever begin r = li_r[src]; @(posedge clk); if (r) break; @(negedge clk); end
      #1 li_v[src] = 0;
    end
  endtask

  // output monitors
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) begin
      logic v; pkt_t p;
      v = (k < 3) ? lo_v[k] && lo_r[k] : lv && lr;
      p = (k < 3) ? lo_p[k] : lp;
      if (v) begin
        got++;
        if (exp_d[k].size() == 0) `CHECK(0, $sformatf("unexpected packet on %0d: %h %h", k, p.datum, p.dst[31:26]))
        else begin
          logic [15:0] ed; caddr_t ec;
          ed = exp_d[k].pop_front(); ec = exp_c[k].pop_front();
          `CHECK(p.datum == ed && p.dst[31:26] == ec && p.dst[25:0] == 26'h00abc,
                 $sformatf("out %0d got %h/%h want %h/%h", k, p.datum, p.dst[31:26], ed, ec))
        end
      end
    end
  end
  always @(negedge clk) begin
    for (int k = 0; k < 3; k++) lo_r[k] = ($urandom_range(99) < rdy_pct);
    lr = ($urandom_range(99) < rdy_pct);
  end

  initial begin
    int t0;
    fc = '0; lin_valid = 0; li_v = '0; li_p = '0; lin_pkt = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    // latency of one uncontested packet
    t0 = $time;
    fork send(3, 6'b10_01_00, 16'h0001, 0); join
    begin
      int c; c = 0;
      while (!(lo_v[0])) begin @(posedge clk); #1; c++; end
      `CHECK(c == 2, $sformatf("3-cycle hop latency (c=%0d)", c))  // edges after the input edge
    end
    repeat (5) @(posedge clk);
    // unicast from every input to every valid core
    for (int t = 0; t < 300; t++) begin
      caddr_t d;
      do d = 6'($urandom); while (!valid_name(d));
      send($urandom_range(3), d, 16'(16'h100 + t), 0);
    end
    // multicast group 211 (210, 212, 213)
    for (int t = 0; t < 10; t++) send($urandom_range(3), 6'b10_01_01, 16'(16'h800 + t), 0);
    repeat (50) @(posedge clk);
    // fault: 132 faulty, 323 must leave on P1
    fc[0] = '{valid: 1'b1, is_link: 1'b0, s: 8'b01_11_10_00};
    repeat (2) @(posedge clk);
    for (int t = 0; t < 5; t++) send(t % 4, 6'b11_10_11, 16'(16'h900 + t), 1);
    repeat (50) @(posedge clk);
    fc = '0;
    // back-pressure: outputs mostly stalled, four inputs flooding
    rdy_pct = 5;
    fork
      for (int t = 0; t < 40; t++) send(0, 6'b10_01_00, 16'(16'ha00 + t), 0);
      for (int t = 0; t < 40; t++) send(1, 6'b10_01_10, 16'(16'hb00 + t), 0);
      for (int t = 0; t < 40; t++) send(2, 6'b10_01_11, 16'(16'hc00 + t), 0);
      for (int t = 0; t < 40; t++) send(3, 6'b01_10_01, 16'(16'hd00 + t), 0);
    join
    rdy_pct = 100;
    repeat (200) @(posedge clk);
    `CHECK(got == sent + 2 * 10, $sformatf("all delivered %0d of %0d", got, sent + 20))
    `CHECK(n_mc == 10, "10 multicasts")
    `CHECK(n_rr == 5, "5 reroutes")
    `CHECK(n_ff > 0, "routing FIFO filled")
    `TB_END
  end
endmodule
