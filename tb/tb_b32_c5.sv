// tb_b32_c5: self-checking test of the B32 input reduction.
// Independent check of the polynomial identities behind it: for every DCT-V
// N=32 point cos(2*pi*k/63) with k divisible by 3, sum_l x_l T_l must equal
// sum_m y11_m T_m; for the other 21 points it must equal sum_m a21_m T_m.
// The halved term is truncated, so a tolerance of a few units is allowed.
`timescale 1ns/1ps
module tb_b32_c5;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;
  word_t x [32], y11 [11], a21 [21];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  b32_c5 dut (.x(x), .y11(y11), .a21(a21));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, full, red, err;
    for (int n = 0; n < 300; n++) begin
      for (int l = 0; l < 32; l++) x[l] = word_t'($signed(16'($urandom)));
      #1;
      for (int k = 0; k < 32; k++) begin
        th = 2.0 * PI * k / 63.0;
        full = 0.0;
        red  = 0.0;
        for (int l = 0; l < 32; l++) full += real'(x[l]) * $cos(l * th);
        if (k % 3 == 0) for (int m = 0; m < 11; m++) red += real'(y11[m]) * $cos(m * th);
        else            for (int m = 0; m < 21; m++) red += real'(a21[m]) * $cos(m * th);
        err = full - red;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d full=%f reduced=%f", k, full, red);
        end
      end
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
