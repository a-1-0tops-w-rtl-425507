// tb_kautz_route_unit: checks the routing unit. Walks every source/target
// pair hop by hop through the unit (the next core is worked out here from
// the port number) and compares the hop count with a breadth-first search
// of the Kautz graph; checks the reference example 121 -> 323 with and
// without core 132 faulty; then, with two random faulty cores or links,
// checks that every walk avoids them and still arrives.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_kautz_route_unit;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(200000)

  caddr_t la, da;
  fcis_t [1:0] fc;
  logic is_local, rer;
  logic [1:0] port;
  logic [3:0] len, hops;
  kautz_route_unit dut (.local_addr(la), .dst_addr(da), .fcis(fc), .is_local, .port,
                        .rs_len(len), .rerouted(rer), .hops);

  caddr_t nodes[36];
  int hd[36][36];

  function automatic caddr_t succ(caddr_t a, int k);
    int c; int x;
    c = 0; x = 0;
    for (int d = 0; d < 4; d++) if (d != int'(a[1:0])) begin
      if (c == k) x = d;
      c++;
    end
    return {a[3:0], 2'(x)};
  endfunction

  // walk from s to d; returns hops or -1; bad set if a faulty node/link used
  task automatic walk(caddr_t s, caddr_t d, int maxh, caddr_t fn [2], logic [7:0] fl [2],
                      bit use_link, output int h, output bit bad);
    caddr_t cur, nx;
    h = 0; bad = 0; cur = s;
    while (cur != d && h <= maxh) begin
      la = cur; da = d; #1;
      nx = succ(cur, int'(port));
      if (use_link) begin
        if ({cur, nx[1:0]} == fl[0] || {cur, nx[1:0]} == fl[1]) bad = 1;
      end else begin
        if ((nx == fn[0] || nx == fn[1]) && nx != d) bad = 1;
      end
      cur = nx; h++;
    end
    if (cur != d) h = -1;
  endtask

  initial begin
    int n, h; bit bad;
    caddr_t fn [2]; logic [7:0] fl [2];
    n = 0;
    for (int a = 0; a < 64; a++) if (caddr_t'(a) != 0 && valid_name(caddr_t'(a))) nodes[n++] = caddr_t'(a);
    `CHECK(n == 36, "36 valid names")
    // BFS distances
    for (int i = 0; i < 36; i++) begin
      int q[$]; for (int j = 0; j < 36; j++) hd[i][j] = -1;
      hd[i][i] = 0; q.push_back(i);
      while (q.size() > 0) begin
        int u; u = q.pop_front();
        for (int k = 0; k < 3; k++) begin
          caddr_t v; int vi; v = succ(nodes[u], k); vi = -1;
          for (int j = 0; j < 36; j++) if (nodes[j] == v) vi = j;
          if (hd[i][vi] < 0) begin hd[i][vi] = hd[i][u] + 1; q.push_back(vi); end
        end
      end
    end
    fc = '0; fn = '{6'h3f, 6'h3f}; fl = '{8'hff, 8'hff};
    // shortest paths, no faults
    for (int i = 0; i < 36; i++) for (int j = 0; j < 36; j++) begin
      walk(nodes[i], nodes[j], 6, fn, fl, 0, h, bad);
      `CHECK(h == hd[i][j] && h <= 3, $sformatf("path %h->%h hops %0d bfs %0d", nodes[i], nodes[j], h, hd[i][j]))
    end
    // reference example: 121 -> 323 via 213 (P3), with 132 faulty via 210 (P1)
    la = 6'b01_10_01; da = 6'b11_10_11; #1;
    `CHECK(port == 2 && len == 6 && !rer && !is_local, "121->323 goes to 213")
    fc[0] = '{valid: 1'b1, is_link: 1'b0, s: {6'b01_11_10, 2'b00}}; #1;
    `CHECK(port == 0 && rer && hops == 4, "121->323 with 132 faulty goes to 210")
    fn = '{6'b01_11_10, 6'h3f};
    walk(6'b01_10_01, 6'b11_10_11, 8, fn, fl, 0, h, bad);
    `CHECK(h == 4 && !bad, "detour 210 103 032 323")
    la = 6'b01_10_01; da = la; #1;
    `CHECK(is_local, "loopback")
    // random pairs of faulty cores
    for (int t = 0; t < 400; t++) begin
      int a, b, s, d;
      a = $urandom_range(35); b = $urandom_range(35);
      s = $urandom_range(35); d = $urandom_range(35);
      if (a == s || a == d || b == s || b == d || s == d) continue;
      fn = '{nodes[a], nodes[b]};
      fc[0] = '{valid: 1'b1, is_link: 1'b0, s: {nodes[a], 2'b00}};
      fc[1] = '{valid: 1'b1, is_link: 1'b0, s: {nodes[b], 2'b00}};
      walk(nodes[s], nodes[d], 12, fn, fl, 0, h, bad);
      `CHECK(h > 0 && !bad, $sformatf("faulty cores %h %h: %h->%h hops %0d", nodes[a], nodes[b], nodes[s], nodes[d], h))
    end
    // random pairs of faulty links
    for (int t = 0; t < 400; t++) begin
      int a, b, s, d, ka, kb; caddr_t na, nb;
      a = $urandom_range(35); b = $urandom_range(35); ka = $urandom_range(2); kb = $urandom_range(2);
      s = $urandom_range(35); d = $urandom_range(35);
      if (s == d) continue;
      na = succ(nodes[a], ka); nb = succ(nodes[b], kb);
      fl = '{{nodes[a], na[1:0]}, {nodes[b], nb[1:0]}};
      fc[0] = '{valid: 1'b1, is_link: 1'b1, s: fl[0]};
      fc[1] = '{valid: 1'b1, is_link: 1'b1, s: fl[1]};
      walk(nodes[s], nodes[d], 12, fn, fl, 1, h, bad);
      `CHECK(h > 0 && !bad, $sformatf("faulty links %h %h: %h->%h hops %0d", fl[0], fl[1], nodes[s], nodes[d], h))
    end
    `TB_END
  end
endmodule
