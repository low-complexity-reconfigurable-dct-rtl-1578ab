// dctv_reconf: reconfigurable DCT-V, one transform of length 32 or five
// transforms of length 4 per clock cycle.
//
// Transform: X_k = sum_{l=0..N-1} x_l * cos(2*pi*k*l/(2N-1)), N = 32 or 4.
//
// How it works. The DCT-V N=32 is the evaluation of p(x) = sum x_l T_l(x)
// at the 32 points cos(2*pi*k/63). Because 63 = 3*3*7, the points split by
// the Chinese remainder theorem for polynomials:
//   * k divisible by 3 (11 points): a DCT-V of length 11, itself split into
//     a DCT-V of length 4 (k divisible by 9) and a skew DCT-III of length 7
//     with r = 2/3 (b32_c5 -> b11_c5 -> dctv_n4 / skew_dct3_n7);
//   * the other 21 points, roots of T_21 + 1/2 = T_3(T_7) - cos(2pi/3): a
//     basis change (b37_c3), seven skew DCT-III of length 3 with r = 2/3
//     (skew_dct3_n3) and three skew DCT-III of length 7 with r = 2/9, 8/9 and
//     4/9 (skew_dct3_n7).
// Each skew DCT-III N=7 contains a DCT-V N=4, so the datapath holds five of
// them. In N=4 mode a multiplexer in front of each of the five feeds it with
// four raw input samples, and the output multiplexers take their results.
// The final output routing (output permutations) sends every branch result
// to the index k of the point it evaluates.
//
// Interface and timing. Input samples and the mode are registered on the
// clock edge where in_valid is sampled; the datapath between the input and
// the output register is purely combinational; results appear in the output
// register on the next edge: latency 2 cycles, one vector accepted every
// cycle (32 samples/cycle in N=32 mode, 20 in N=4 mode). In N=4 mode
// transform g (g = 0..4) reads x[4g..4g+3] and writes X[4g..4g+3]; X[20..31]
// then carry no meaning. rst_n is a synchronous active-low reset of the
// valid flags and the registers.
//
// Scaling: outputs are the transform shifted right by OSH32 (N=32) or OSH4
// (N=4) and saturated to 16 bits; these factors, the valid handshake and the
// reset are this design's choices. Widths (16-bit I/O, 32-bit internal,
// 8 fractional bits for constants) and the register placement (input and
// output only) follow the reference design.
module dctv_reconf
  import dctv_pkg::*;
#(
  parameter int OSH32 = 5,
  parameter int OSH4  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    mode4,
  input  sample_t x [32],
  output logic    out_valid,
  output sample_t X [32]
);
  // index k (0..31) of the DCT-V N=32 point evaluated by an output
  function automatic int fold63(int k);
    return (k > 31) ? 63 - k : k;
  endfunction
  function automatic int fold21(int j);
    return (j > 10) ? 21 - j : j;
  endfunction

  function automatic sample_t sat16(word_t v, int sh);
    word_t s;
    s = v >>> sh;
    if (s > word_t'(32767))       return sample_t'(16'sh7fff);
    else if (s < word_t'(-32768)) return sample_t'(16'sh8000);
    else                          return sample_t'(s);
  endfunction

  // ---------------- input register ----------------
  sample_t x_q [32];
  logic    mode_q, valid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      mode_q  <= 1'b0;
      for (int i = 0; i < 32; i++) x_q[i] <= '0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) begin
        mode_q <= mode4;
        x_q    <= x;
      end
    end
  end

  word_t xw [32];
  word_t raw [5][4];
  always_comb begin
    for (int i = 0; i < 32; i++) xw[i] = word_t'(x_q[i]);
    for (int g = 0; g < 5; g++)
      for (int i = 0; i < 4; i++) raw[g][i] = xw[4*g+i];
  end

  // ---------------- N = 11 branch ----------------
  word_t y11 [11], a21 [21], f4 [4], z7 [7];
  word_t c4_in [4], u0 [4];
  word_t s11 [7], u1 [4];

  b32_c5 u_b32 (.x(xw), .y11(y11), .a21(a21));
  b11_c5 u_b11 (.y(y11), .f4(f4), .z7(z7));

  always_comb
    for (int i = 0; i < 4; i++) c4_in[i] = mode_q ? raw[0][i] : f4[i];

  dctv_n4 u_c4v (.x(c4_in), .y(u0));

  skew_dct3_n7 #(.RSEL(0)) u_sk11 (
    .a(z7), .mode4(mode_q), .raw4(raw[1]), .y(s11), .u4(u1)
  );

  // ---------------- N = 21 branch ----------------
  word_t b [7][3];
  word_t q [7][3];
  word_t qt [3][7];
  word_t s21 [3][7];
  word_t u21 [3][4];

  b37_c3 u_b37 (.a(a21), .b(b));

  for (genvar i = 0; i < 7; i++) begin : g_c3
    skew_dct3_n3 u_c3 (.x(b[i]), .y(q[i]));
  end

  always_comb
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < 7; i++) qt[m][i] = q[i][m];

  // root m of T_3(y) = cos(2pi/3) is y = cos(r*pi), r = {2/9, 8/9, 4/9}[m];
  // the raw N=4 groups follow the r order 2/9, 4/9, 8/9 -> groups 2, 3, 4
  localparam int RSEL_OF [3] = '{1, 3, 2};
  localparam int K0_OF   [3] = '{1, 4, 2};
  localparam int GRP_OF  [3] = '{2, 4, 3};

  for (genvar m = 0; m < 3; m++) begin : g_sk21
    skew_dct3_n7 #(.RSEL(RSEL_OF[m])) u_sk (
      .a(qt[m]), .mode4(mode_q), .raw4(raw[GRP_OF[m]]), .y(s21[m]), .u4(u21[m])
    );
  end

  // ---------------- output permutation (Q3^11, K7^21, Q10^32) ----------------
  word_t x32 [32];
  word_t x4 [5][4];
  always_comb begin
    for (int j = 0; j < 4; j++) x32[9*j] = u0[j];
    for (int o = 0; o < 7; o++) x32[3*fold21(1 + 3*H7_POINT[o])] = s11[o];
    for (int m = 0; m < 3; m++)
      for (int o = 0; o < 7; o++) x32[fold63(K0_OF[m] + 9*H7_POINT[o])] = s21[m][o];
    for (int i = 0; i < 4; i++) begin
      x4[0][i] = u0[i];
      x4[1][i] = u1[i];
      x4[2][i] = u21[0][i];
      x4[3][i] = u21[2][i];
      x4[4][i] = u21[1][i];
    end
  end

  // ---------------- output multiplexers and register ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 32; k++) X[k] <= '0;
    end else begin
      out_valid <= valid_q;
      if (valid_q) begin
        for (int k = 0; k < 32; k++) begin
          if (mode_q && k < 20) X[k] <= sat16(x4[k/4][k%4], OSH4);
          else                  X[k] <= sat16(x32[k], OSH32);
        end
      end
    end
  end

  // Timing rule of the interface: a vector captured by the input register is
  // in the output register one edge later, with nothing lost or added.
  a_out_follows_in: assert property (@(posedge clk) disable iff (!rst_n) out_valid == $past(valid_q))
    else $error("out_valid does not follow the input register");
endmodule
