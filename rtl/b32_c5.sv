// b32_c5: input reduction B32^(C5) of the DCT-V of length 32 (42 adders).
//
// The DCT-V N=32 evaluates p(x) = sum x_l T_l(x) at cos(2*pi*k/63). The 32
// points split into the 11 with k divisible by 3 (the DCT-V N=11 points
// cos(2*pi*j/21)) and the 21 roots of T_21(x) + 1/2. This block reduces p
// modulo both parts, using T_l = T_{21-l} = T_{l-21} on the first and
// T_{21+m} = -T_m - T_{21-m}, T_21 = -1/2 on the second:
//   y_0 = x0 + x21,  y_m = x_m + x_{21-m} + x_{21+m}           (m = 1..10)
//   a_0 = x0 - x21/2, a_m = x_m - x_{21+m}, a_{21-m} = x_{21-m} - x_{21+m}
// The halving is an arithmetic shift right. Combinational.
module b32_c5
  import dctv_pkg::*;
(
  input  word_t x   [32],
  output word_t y11 [11],
  output word_t a21 [21]
);
  always_comb begin
    y11[0] = x[0] + x[21];
    a21[0] = x[0] - (x[21] >>> 1);
    for (int m = 1; m <= 10; m++) begin
      y11[m]    = x[m] + x[21-m] + x[21+m];
      a21[m]    = x[m] - x[21+m];
      a21[21-m] = x[21-m] - x[21+m];
    end
  end
endmodule
