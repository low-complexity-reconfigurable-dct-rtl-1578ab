// b11_c5: reduction B11^(C5) of the DCT-V of length 11 (14 adders).
//
// The 11 points cos(2*pi*j/21) split into the 4 with j divisible by 3
// (the DCT-V N=4 points cos(2*pi*j'/7)) and the 7 roots of T_7(x) + 1/2
// (a skew DCT-III N=7 with r = 2/3). The coefficients are folded with
// T_l = T_{7-l} = T_{l-7} for the first and T_{7+m} = -T_m - T_{7-m},
// T_7 = -1/2 for the second:
//   f = { y0+y7, y1+y6+y8, y2+y5+y9, y3+y4+y10 }
//   z0 = y0 - y7/2, z_m = y_m - y_{7+m}, z_{7-m} = y_{7-m} - y_{7+m}  (m = 1..3)
// Combinational; the halving is an arithmetic shift right.
module b11_c5
  import dctv_pkg::*;
(
  input  word_t y  [11],
  output word_t f4 [4],
  output word_t z7 [7]
);
  always_comb begin
    f4[0] = y[0] + y[7];
    z7[0] = y[0] - (y[7] >>> 1);
    for (int m = 1; m <= 3; m++) begin
      f4[m]   = y[m] + y[7-m] + y[7+m];
      z7[m]   = y[m] - y[7+m];
      z7[7-m] = y[7-m] - y[7+m];
    end
  end
endmodule
