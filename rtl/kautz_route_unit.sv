// kautz_route_unit: routing unit (RU) of the Kautz NoC router. Purely
// combinational.
//
// From the local address S1S2S3 and the target D1D2D3 it builds the routing
// string (RS): the shortest walk in the Kautz graph written as one digit
// string, whose every 3-digit window is a core on the path:
//   S2==D1 and S3==D2 : RS = S1 S2 S3 D3            (1 hop)
//   S3==D1            : RS = S1 S2 S3 D2 D3         (2 hops)
//   otherwise         : RS = S1 S2 S3 D1 D2 D3      (3 hops)
// If the RS contains a fault/congestion information string (a 3-digit core
// other than the source or target, or a 4-digit link), one digit I1 is
// inserted (S1S2S3 I1 D1D2D3), trying I1 = 0..3; if no single digit clears
// the faults, two digits (S1S2S3 I1 I2 D1D2D3) are tried. The first digit
// after S1S2S3 names the next hop S2 S3 x; the output port is the rank of x
// among the three digits different from S3 (P1 = smallest).
//
// The rules and the reference example follow the architecture; the ascending
// search order for inserted digits, exempting source and target from the
// core check and falling back to the plain RS when nothing clears the faults
// are this design's choices. Routing is distributed: every router on the way
// recomputes the RS from its own address.
module kautz_route_unit
  import nc_pkg::*;
(
  input  caddr_t           local_addr,
  input  caddr_t           dst_addr,
  input  fcis_t [1:0]      fcis,
  output logic             is_local,
  output logic [1:0]       port,       // 0..2 = P1..P3
  output logic [3:0]       rs_len,     // length of the plain RS (4..6)
  output logic             rerouted,   // a digit was inserted
  output logic [3:0]       hops        // hops of the chosen RS
);

  typedef logic [1:0] rs_t [8];

  function automatic logic hits(rs_t rs, int len, fcis_t f);
    logic h = 1'b0;
    if (f.valid) begin
      for (int p = 0; p < 5; p++) begin
        if (f.is_link) begin
          if (p + 4 <= len && {rs[p], rs[p+1], rs[p+2], rs[p+3]} == f.s) h = 1'b1;
        end else begin
          if (p >= 1 && p + 3 < len && {rs[p], rs[p+1], rs[p+2]} == f.s[7:2]) h = 1'b1;
        end
      end
    end
    return h;
  endfunction

  function automatic logic blocked(rs_t rs, int len, fcis_t [1:0] f);
    return hits(rs, len, f[0]) || hits(rs, len, f[1]);
  endfunction

  always_comb begin
    logic [1:0] s1, s2, s3, d1, d2, d3, nxt;
    rs_t rs, r1, r2;
    int len;
    logic found;
    found = 1'b0;
    s1 = local_addr[5:4]; s2 = local_addr[3:2]; s3 = local_addr[1:0];
    d1 = dst_addr[5:4];   d2 = dst_addr[3:2];   d3 = dst_addr[1:0];
    for (int i = 0; i < 8; i++) begin rs[i] = '0; r1[i] = '0; r2[i] = '0; end
    rs[0] = s1; rs[1] = s2; rs[2] = s3;
    if (s2 == d1 && s3 == d2) begin
      rs[3] = d3; len = 4;
    end else if (s3 == d1) begin
      rs[3] = d2; rs[4] = d3; len = 5;
    end else begin
      rs[3] = d1; rs[4] = d2; rs[5] = d3; len = 6;
    end
    rs_len   = 4'(len);
    is_local = (dst_addr == local_addr);
    nxt      = rs[3];
    rerouted = 1'b0;
    hops     = 4'(len - 3);
    if (!is_local && blocked(rs, len, fcis)) begin
      found = 1'b0;
      for (int a = 0; a < 4; a++) begin
        r1[0] = s1; r1[1] = s2; r1[2] = s3; r1[3] = 2'(a);
        r1[4] = d1; r1[5] = d2; r1[6] = d3;
        if (!found && 2'(a) != s3 && 2'(a) != d1 && !blocked(r1, 7, fcis)) begin
          found = 1'b1; nxt = 2'(a); hops = 4'd4;
        end
      end
      for (int a = 0; a < 4; a++) begin
        for (int b = 0; b < 4; b++) begin
          r2[0] = s1; r2[1] = s2; r2[2] = s3; r2[3] = 2'(a); r2[4] = 2'(b);
          r2[5] = d1; r2[6] = d2; r2[7] = d3;
          if (!found && 2'(a) != s3 && a != b && 2'(b) != d1 && !blocked(r2, 8, fcis)) begin
            found = 1'b1; nxt = 2'(a); hops = 4'd5;
          end
        end
      end
      rerouted = found;
    end
    port = other_rank(s3, nxt);
  end

endmodule
