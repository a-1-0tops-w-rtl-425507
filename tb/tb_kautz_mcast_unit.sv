// tb_kautz_mcast_unit: checks the multicast unit. Checks the reference example
// (target 211 at core 121 -> clones 210, 212, 213 on P1..P3), then, for every
// source core and every group address (D2==D3: cores D1D2x; D1==D2: all
// nine cores starting with D1), spreads one packet over the network with the
// multicast unit and a routing unit for the unicast hops, and checks that
// exactly the cores of the group receive it, each once. Links that carry
// the packet twice (a unicast hop that the tree later crosses again) are
// counted and reported, not failed: the group rules allow them.
//
// Timing: inputs are driven just after the falling clock edge and outputs
// are sampled at or after the rising edge, so every handshake is seen as
// the design sees it; a watchdog ends a run that hangs. The rules checked
// are the architecture's; the stimulus, the reference model and the
// checked numbers of cycles are this design's own.
`include "rtl/nc_check.svh"
module tb_kautz_mcast_unit;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(200000)

  caddr_t la, da;
  logic is_mcast;
  caddr_t [2:0] cd;
  kautz_mcast_unit dut (.local_addr(la), .dst_addr(da), .is_mcast, .clone_dst(cd));
  fcis_t [1:0] fc = '0;
  logic il, rr; logic [1:0] port; logic [3:0] ln, hp;
  kautz_route_unit ru (.local_addr(la), .dst_addr(da), .fcis(fc), .is_local(il), .port,
                       .rs_len(ln), .rerouted(rr), .hops(hp));

  function automatic caddr_t succ(caddr_t a, int k);
    int c, x; c = 0; x = 0;
    for (int d = 0; d < 4; d++) if (d != int'(a[1:0])) begin if (c == k) x = d; c++; end
    return {a[3:0], 2'(x)};
  endfunction

  int reuse = 0;
  initial begin
    la = 6'b01_10_01; da = 6'b10_01_01; #1;
    `CHECK(is_mcast && cd[0] == 6'b10_01_00 && cd[1] == 6'b10_01_10 && cd[2] == 6'b10_01_11,
           "211 at 121 -> 210 212 213")
    la = 6'b00_11_01; da = 6'b10_01_01; #1;
    `CHECK(!is_mcast, "211 at 031 is unicast")
    for (int s = 0; s < 64; s++) begin
      if (!valid_name(caddr_t'(s))) continue;
      for (int g = 0; g < 64; g++) begin
        caddr_t G; int got[64]; int linkuse[256]; bit dup; int nexp, ngot;
        caddr_t qa[$], qd[$];
        G = caddr_t'(g);
        if (valid_name(G)) continue;
        if (G[5:4] == G[3:2] && G[3:2] == G[1:0]) continue;   // not a group
        foreach (got[i]) got[i] = 0;
        foreach (linkuse[i]) linkuse[i] = 0;
        qa.push_back(caddr_t'(s)); qd.push_back(G);
        while (qa.size() > 0) begin
          caddr_t a, d;
          a = qa.pop_front(); d = qd.pop_front();
          la = a; da = d; #1;
          if (d == a) got[a]++;
          else if (is_mcast) begin
            for (int k = 0; k < 3; k++) begin
              linkuse[{a, 2'(k)}]++; qa.push_back(succ(a, k)); qd.push_back(cd[k]);
            end
          end else begin
            linkuse[{a, port}]++; qa.push_back(succ(a, int'(port))); qd.push_back(d);
          end
          if (qa.size() > 200) break;
        end
        dup = 0; nexp = 0; ngot = 0;
        foreach (linkuse[i]) if (linkuse[i] > 1) reuse++;
        for (int c = 0; c < 64; c++) begin
          bit member;
          member = valid_name(caddr_t'(c)) &&
                   ((G[3:2] == G[1:0]) ? (caddr_t'(c) >> 2) == (G >> 2)
                                       : caddr_t'(c) >> 4 == G >> 4);
          if (member) nexp++;
          if (got[c] > 0) ngot++;
          if (member != (got[c] == 1)) dup = 1;
        end
        `CHECK(!dup && ngot == nexp, $sformatf("group %h from %h: %0d of %0d", G, s, ngot, nexp))
      end
    end
    $display("links used twice: %0d", reuse);
    `TB_END
  end
endmodule
