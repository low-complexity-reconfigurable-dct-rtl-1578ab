// dctv_pkg: types, widths and fixed-point constants shared by the DCT-V datapath.
//
// All arithmetic inside the transform is done on W-bit two's-complement words.
// Input samples are 16 bits, the internal width is 32 bits and every constant
// multiplier uses FRAC = 8 fractional bits; these three numbers come from the
// fixed-point sizing of the reference design. A constant multiplication is
// x * K >>> FRAC, with K = round(c * 2^FRAC) (truncating shift).
//
// The constants are computed at elaboration from their formulas
// (u = 2*pi/7) and rounded to FRAC bits; changing FRAC here requantizes them
// all (coef_t holds 16 bits, enough for FRAC up to 13). Twiddle factors of
// the skew DCT-III N=7 are indexed by RSEL: 0 -> r = 2/3, 1 -> r = 2/9,
// 2 -> r = 4/9, 3 -> r = 8/9.
package dctv_pkg;

  localparam int IN_W  = 16;  // input and output sample width
  localparam int W     = 32;  // internal word width
  localparam int FRAC  = 8;   // fractional bits of constant coefficients

  typedef logic signed [W-1:0]    word_t;
  typedef logic signed [IN_W-1:0] sample_t;
  typedef logic signed [15:0]     coef_t;

  localparam real PI = 3.14159265358979323846;
  localparam real U  = 2.0 * PI / 7.0;   // angle step of the length-7 kernels

  // Round a real coefficient to FRAC fractional bits (to nearest, ties away
  // from zero). Evaluated at elaboration time only.
  function automatic coef_t qc(real c);
    real v;
    v = c * (2.0 ** FRAC);
    return (v >= 0.0) ? coef_t'($rtoi($floor(v + 0.5))) : coef_t'(-$rtoi($floor(-v + 0.5)));
  endfunction

  // C4^V (DCT-V, N = 4)
  localparam coef_t C51 = qc(-7.0 / 6.0);
  localparam coef_t C52 = qc((2.0 * $cos(U) - $cos(2.0 * U) - $cos(3.0 * U)) / 3.0);
  localparam coef_t C53 = qc(($cos(U) - 2.0 * $cos(2.0 * U) + $cos(3.0 * U)) / 3.0);
  localparam coef_t C54 = qc(($cos(U) + $cos(2.0 * U) - 2.0 * $cos(3.0 * U)) / 3.0);

  // (S3^VII)^T (transposed DST-VII, N = 3)
  localparam coef_t S31 = qc(($sin(U) + $sin(2.0 * U) - $sin(3.0 * U)) / 3.0);
  localparam coef_t S32 = qc((2.0 * $sin(U) - $sin(2.0 * U) + $sin(3.0 * U)) / 3.0);
  localparam coef_t S33 = qc(($sin(U) - 2.0 * $sin(2.0 * U) - $sin(3.0 * U)) / 3.0);
  localparam coef_t S34 = qc(($sin(U) + $sin(2.0 * U) + 2.0 * $sin(3.0 * U)) / 3.0);

  // C3^III(r) (skew DCT-III, N = 3), r = 2/3
  localparam coef_t C31 = qc(-$sqrt(3.0) / 2.0);
  localparam coef_t C32 = qc(1.5);
  // twiddles cos/sin(l*psi), psi = (2r+1)*pi/6
  localparam real   PSI   = (2.0 * (2.0 / 3.0) + 1.0) * PI / 6.0;
  localparam coef_t C3_C1 = qc($cos(PSI));
  localparam coef_t C3_S1 = qc($sin(PSI));
  localparam coef_t C3_C2 = qc($cos(2.0 * PSI));
  localparam coef_t C3_S2 = qc($sin(2.0 * PSI));

  // P7^(C3)(r) twiddles, phi = (r-1)*pi/7:
  //   p7_cos(r, l) = cos(l*phi), p7_sin(r, l) = sin(l*phi); R_OF[RSEL] gives r
  localparam real R_OF [4] = '{2.0 / 3.0, 2.0 / 9.0, 4.0 / 9.0, 8.0 / 9.0};
  function automatic coef_t p7_cos(real r, int l);
    return qc($cos(real'(l) * (r - 1.0) * PI / 7.0));
  endfunction
  function automatic coef_t p7_sin(real r, int l);
    return qc($sin(real'(l) * (r - 1.0) * PI / 7.0));
  endfunction

  // Order of the skew DCT-III N=7 outputs: output o holds the point
  // cos((r + 2*i)*pi/7) with i = H7_POINT[o].
  localparam int H7_POINT [7] = '{6, 1, 4, 3, 2, 5, 0};

  // Constant multiplication in fixed point: x * k / 2^FRAC, truncated.
  function automatic word_t cmul(word_t x, coef_t k);
    logic signed [W+15:0] p;
    p = x * k;
    return word_t'(p >>> FRAC);
  endfunction

endpackage
