// p7_c3: twiddle stage P7^(C3)(r) of the skew DCT-III of length 7.
//
// Combinational, three butterflies with 12 constant multipliers and 6 adders:
//   y0 = x0
//   y_l     = cos(l*phi)*x_l - cos((7-l)*phi)*x_{7-l}     l = 1..3
//   y_{7-l} = sin(l*phi)*x_l + sin((7-l)*phi)*x_{7-l}
// with phi = (r-1)*pi/7. Outputs 0..3 are the cosine-part inputs of the
// following DCT-V N=4, outputs 4..6 the sine-part inputs of the DST-VII.
// Pairing and operation count follow the reference; the twiddle definition
// is this design's. RSEL picks r: 0 -> 2/3, 1 -> 2/9, 2 -> 4/9, 3 -> 8/9.
module p7_c3
  import dctv_pkg::*;
#(
  parameter int RSEL = 0
) (
  input  word_t x [7],
  output word_t y [7]
);
  typedef coef_t tw_t [7];

  function automatic tw_t cos_table();
    tw_t t;
    for (int l = 0; l < 7; l++) t[l] = p7_cos(R_OF[RSEL], l);
    return t;
  endfunction
  function automatic tw_t sin_table();
    tw_t t;
    for (int l = 0; l < 7; l++) t[l] = p7_sin(R_OF[RSEL], l);
    return t;
  endfunction

  localparam tw_t KC = cos_table();
  localparam tw_t KS = sin_table();

  always_comb begin
    y[0] = x[0];
    for (int l = 1; l <= 3; l++) begin
      y[l]   = cmul(x[l], KC[l]) - cmul(x[7-l], KC[7-l]);
      y[7-l] = cmul(x[l], KS[l]) + cmul(x[7-l], KS[7-l]);
    end
  end
endmodule
