// kautz_mcast_unit: multicast unit (MU) of the Kautz NoC router. Purely
// combinational.
//
// Group addresses are the disallowed core names. With the routing string
// built as in the routing unit, the MU clones a packet onto all three output
// ports Pk (the digits different from S3, ascending) and rewrites its target:
//   length(RS)==4 and D2==D3 : targets D1 D2 Pk   (the three cores D1D2x)
//   length(RS)==5 and D1==D2 : targets D1 Pk Pk   (three subgroups D1 Pk x)
// So "211" stands for cores 210, 212, 213 and "11x" for the nine cores of
// core group 1; the copies spread as a spanning tree with one packet per
// link. These rules follow the architecture; fault avoidance is not applied
// to multicast packets in this design.
module kautz_mcast_unit
  import nc_pkg::*;
(
  input  caddr_t       local_addr,
  input  caddr_t       dst_addr,
  output logic         is_mcast,
  output caddr_t [2:0] clone_dst   // target for P1..P3
);

  always_comb begin
    logic [1:0] s2, s3, d1, d2, d3, pk;
    s2 = local_addr[3:2]; s3 = local_addr[1:0];
    d1 = dst_addr[5:4];   d2 = dst_addr[3:2];  d3 = dst_addr[1:0];
    is_mcast = 1'b0;
    for (int k = 0; k < 3; k++) begin
      pk = nth_other(s3, 2'(k));
      clone_dst[k] = dst_addr;
      if (s2 == d1 && s3 == d2) begin            // RS length 4
        if (d2 == d3) begin
          is_mcast = 1'b1;
          clone_dst[k] = {d1, d2, pk};
        end
      end else if (s3 == d1) begin               // RS length 5
        if (d1 == d2) begin
          is_mcast = 1'b1;
          clone_dst[k] = {d1, pk, pk};
        end
      end
    end
  end

endmodule
