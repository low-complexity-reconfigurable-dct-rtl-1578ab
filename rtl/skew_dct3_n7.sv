// skew_dct3_n7: skew DCT-III of length 7, the evaluation of
// sum_l a_l * T_l(x) (Chebyshev basis, l = 0..6) at the seven roots of
// T_7(x) = cos(r*pi), i.e. at x = cos((r + 2i)*pi/7), i = 0..6.
//
// Combinational. The chain follows the reference block diagram:
//   P7(r)  twiddles (12 multipliers, 6 adders)       -> p7_c3
//   G7^T   permutation; with the twiddle convention of p7_c3 the outputs are
//          already in place, so it is plain wiring here
//   D4     negates inputs 1 and 3 of the DCT-V N=4 (cosine part)
//   D'7    negates positions 4 and 6 (first and third DST-VII input)
//   C4^V   DCT-V N=4 -> dctv_n4;  (S3^VII)^T transposed DST-VII N=3 -> dst7t_n3
//   J4     reverses the four DCT-V outputs
//   H7     output butterflies -> h7
// Output y[o] is the value at the point with i = H7_POINT[o] = {6,1,4,3,2,5,0}.
//
// Reconfiguration: when mode4 is set, the DCT-V N=4 takes raw4 instead of
// the D4 outputs, and its result is offered on u4 (one of the five N=4
// transforms of the N=4 mode); y is then meaningless.
module skew_dct3_n7
  import dctv_pkg::*;
#(
  parameter int RSEL = 0
) (
  input  word_t a    [7],
  input  logic  mode4,
  input  word_t raw4 [4],
  output word_t y    [7],
  output word_t u4   [4]
);
  word_t p [7];
  word_t v [4], cv_in [4], z [3];
  word_t r3 [3];
  word_t h [7];

  p7_c3 #(.RSEL(RSEL)) u_p7 (.x(a), .y(p));

  always_comb begin
    // G7^T (identity) then D4 / D'7 sign alternation
    v[0] = p[0];
    v[1] = -p[1];
    v[2] = p[2];
    v[3] = -p[3];
    z[0] = -p[4];
    z[1] = p[5];
    z[2] = -p[6];
    for (int i = 0; i < 4; i++) cv_in[i] = mode4 ? raw4[i] : v[i];
  end

  dctv_n4  u_c4v (.x(cv_in), .y(u4));
  dst7t_n3 u_s3  (.x(z), .y(r3));

  always_comb begin
    // J4 reversal of the cosine part, sine part appended
    for (int i = 0; i < 4; i++) h[i] = u4[3-i];
    for (int i = 0; i < 3; i++) h[4+i] = r3[i];
  end

  h7 u_h7 (.x(h), .y(y));
endmodule
