// dst7t_n3: transposed DST-VII of length 3,
// y_k = sum_l x_l * sin(pi*(2l+1)*(k+1)/7), k,l = 0..2.
//
// Combinational, 4 constant multipliers (S31..S34 of the reference
// coefficient table) and 11 adders. Each multiplier takes a signed sum of two
// or three inputs; each output is a signed sum of three products:
//   m31 = S31*(x1+x2-x0)  m32 = S32*(-x0-x1)  m33 = S33*(x2-x1)  m34 = S34*(x0+x2)
//   y0 = m31+m33+m34      y1 = m33-m31-m32    y2 = m32+m34-m31
// The constants are the reference ones; this particular pre-/post-adder network
// is this design's own (the reference quotes 10 adders, this one uses 11).
module dst7t_n3
  import dctv_pkg::*;
(
  input  word_t x [3],
  output word_t y [3]
);
  word_t m31, m32, m33, m34;

  always_comb begin
    m31 = cmul(x[1] + x[2] - x[0], S31);
    m32 = cmul(-(x[0] + x[1]), S32);
    m33 = cmul(x[2] - x[1], S33);
    m34 = cmul(x[0] + x[2], S34);
    y[0] = m31 + m33 + m34;
    y[1] = m33 - m31 - m32;
    y[2] = m32 + m34 - m31;
  end
endmodule
