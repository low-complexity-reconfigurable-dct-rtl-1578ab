// skew_dct3_n3: skew DCT-III of length 3 with r = 2/3,
// y_i = sum_l x_l * cos(l * (r + 2i) * pi / 3), i,l = 0..2
// (the three roots of T_3(y) = cos(r*pi)).
//
// Combinational, 6 constant multipliers and 6 adders, as in the reference
// figure: a twiddle box forms p = c1*x1 + s2*x2 and q = c2*x2 + s1*x1, then
//   y1 = x0 - q,  b = y1 + C32*q,  y2 = b + C31*p,  y0 = b - C31*p
// with C31 = -sqrt(3)/2 and C32 = 1.5. The twiddle definition
// c_l = cos(l*psi), s_l = sin(l*psi), psi = (2r+1)*pi/6 is this design's
// choice; it is the one under which this network evaluates the skew DCT-III.
module skew_dct3_n3
  import dctv_pkg::*;
(
  input  word_t x [3],
  output word_t y [3]
);
  word_t p, q, a, b, t;

  always_comb begin
    p = cmul(x[1], C3_C1) + cmul(x[2], C3_S2);
    q = cmul(x[2], C3_C2) + cmul(x[1], C3_S1);
    a = x[0] - q;
    b = a + cmul(q, C32);
    t = cmul(p, C31);
    y[0] = b - t;
    y[1] = a;
    y[2] = b + t;
  end
endmodule
