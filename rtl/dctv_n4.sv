// dctv_n4: DCT-V of length 4, y_k = sum_l x_l * cos(2*pi*k*l/7), k,l = 0..3.
//
// Combinational, 4 constant multipliers and 13 adders. The sum s = x1+x2+x3
// gives y0 = x0 + s directly; T = y0 + C51*s (C51 = -7/6) equals
// x0 + mean(cos(uk))*s, the part of y1..y3 shared by all three outputs. The
// zero-mean remainder is a 3-point cyclic correlation computed with three
// products on the differences x1-x3, x3-x2 and x1-x2 (Karatsuba form), whose
// constants C52..C54 are the ones of the reference coefficient table.
// The multiplier constants and the adder/multiplier count follow the reference
// structure; the sign of C51 (negative) is this design's reading, being the
// only one under which the outputs are the DCT-V. Scale: unity, no
// normalisation. Constants have FRAC fractional bits (see dctv_pkg).
module dctv_n4
  import dctv_pkg::*;
(
  input  word_t x [4],
  output word_t y [4]
);
  word_t s, y0, t, m1, m2, m3;

  always_comb begin
    s  = x[1] + x[2] + x[3];
    y0 = x[0] + s;
    t  = y0 + cmul(s, C51);
    m1 = cmul(x[1] - x[3], C52);
    m2 = cmul(x[3] - x[2], C53);
    m3 = cmul(x[1] - x[2], C54);
    y[0] = y0;
    y[1] = t + (m1 + m2);
    y[2] = t + (m3 - m1);
    y[3] = t - (m2 + m3);
  end
endmodule
