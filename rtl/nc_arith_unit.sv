// nc_arith_unit: the 16b arithmetic unit of a processing element. Purely
// combinational.
//
// It combines the arriving datum x, the coefficient w taken from the local
// memory unit and the current target value y into the new target value, with
// the resources of the architecture: two adder-subtractors, a multiplier and
// a comparator.
//   WR  y = x               ACC y = y + x           MAC y = y + x*w
//   MAX y = max(y, x)       L1  y = y + |x - w|     L2  y = y + (x - w)^2
//   RD  y unchanged (read out)
// Values are signed; results saturate to 16 bits. A MAC whose datum or
// coefficient is zero is skipped (skip = 1, y unchanged), as zero data and
// zero coefficients cause no computation in the architecture. The opcode
// set, 8b coefficients and saturation are this design's choices.
module nc_arith_unit
  import nc_pkg::*;
(
  input  op_e                op,
  input  logic signed [15:0] x,
  input  logic signed [7:0]  w,
  input  logic signed [15:0] y,
  output logic signed [15:0] res,
  output logic               skip
);

  function automatic logic signed [15:0] sat16(logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7fff;
    else if (v < -40'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  logic signed [39:0] ye, xe, we, diff, adiff, prod, sq;

  always_comb begin
    ye    = 40'(y);
    xe    = 40'(x);
    we    = 40'(w);
    diff  = xe - we;                       // adder-subtractor 1
    adiff = (diff < 0) ? -diff : diff;     // comparator selects sign
    prod  = xe * we;                       // multiplier
    sq    = diff * diff;                   // multiplier (L2)
    skip  = 1'b0;
    unique case (op)
      OP_WR:  res = x;
      OP_ACC: res = sat16(ye + xe);        // adder-subtractor 2
      OP_MAC: begin
        skip = (x == 0) || (w == 0);
        res  = skip ? y : sat16(ye + prod);
      end
      OP_MAX: res = (x > y) ? x : y;
      OP_L1:  res = sat16(ye + adiff);
      OP_L2:  res = sat16(ye + sq);
      default: res = y;
    endcase
  end

endmodule
