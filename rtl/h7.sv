// h7: output butterflies H7 of the skew DCT-III of length 7.
//
// Combinational, three add/subtract butterflies (6 adders):
//   y_j = x_j - x_{6-j},  y_{6-j} = x_j + x_{6-j}  (j = 0..2),  y3 = x3.
// Inputs 0..3 carry the (reversed) DCT-V N=4 results, inputs 4..6 the DST-VII
// results; each butterfly joins the cosine and sine part of two mirror points.
module h7
  import dctv_pkg::*;
(
  input  word_t x [7],
  output word_t y [7]
);
  always_comb begin
    for (int j = 0; j < 3; j++) begin
      y[j]   = x[j] - x[6-j];
      y[6-j] = x[j] + x[6-j];
    end
    y[3] = x[3];
  end
endmodule
