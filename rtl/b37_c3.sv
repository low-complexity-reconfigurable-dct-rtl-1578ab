// b37_c3: basis change B3,7^(C3) for the 21-point branch (18 adders).
//
// The branch evaluates sum_{l<21} a_l T_l(x) at the roots of
// T_21(x) + 1/2 = T_3(T_7(x)) - cos(2*pi/3). The coefficients are rewritten
// in the basis T_i(x) * T_j(T_7(x)) (i = 0..6, j = 0..2) using
// T_{7+i} = 2 T_i T_7 - T_{7-i} and T_{14+i} = 2 T_i T_14 - 2 T_{7-i} T_7 + T_i:
//   b[0] = { a0, a7, a14 }
//   b[i] = { a_i - a_{14-i} + a_{14+i}, 2(a_{7+i} - a_{21-i}), 2 a_{14+i} }  (i = 1..6)
// Group b[i] is then a polynomial of degree 2 in y = T_7(x), evaluated by one
// skew DCT-III N=3 per group. The doublings are shifts. Combinational.
module b37_c3
  import dctv_pkg::*;
(
  input  word_t a [21],
  output word_t b [7][3]
);
  always_comb begin
    b[0][0] = a[0];
    b[0][1] = a[7];
    b[0][2] = a[14];
    for (int i = 1; i <= 6; i++) begin
      b[i][0] = a[i] - a[14-i] + a[14+i];
      b[i][1] = (a[7+i] - a[21-i]) <<< 1;
      b[i][2] = a[14+i] <<< 1;
    end
  end
endmodule
