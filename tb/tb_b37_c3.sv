// tb_b37_c3: self-checking test of the B3,7 basis change.
// The identity sum_l a_l cos(l*t) = sum_{i,j} b_ij cos(i*t) cos(7*j*t) must
// hold for every angle t; it is checked exactly (no rounding in this block)
// at 16 angles per random vector, up to floating-point noise.
`timescale 1ns/1ps
module tb_b37_c3;
  import dctv_pkg::*;
  word_t a [21];
  word_t b [7][3];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  b37_c3 dut (.a(a), .b(b));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, lhs, rhs, err;
    for (int n = 0; n < 500; n++) begin
      for (int l = 0; l < 21; l++) a[l] = word_t'($signed(18'($urandom)));
      #1;
      for (int t = 0; t < 16; t++) begin
        th = 0.1 + 0.37 * t;
        lhs = 0.0;
        rhs = 0.0;
        for (int l = 0; l < 21; l++) lhs += real'(a[l]) * $cos(l * th);
        for (int i = 0; i < 7; i++)
          for (int j = 0; j < 3; j++) rhs += real'(b[i][j]) * $cos(i * th) * $cos(7 * j * th);
        err = lhs - rhs;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 0.01) begin
          failures++;
          if (failures < 10) $display("FAIL t=%f lhs=%f rhs=%f", th, lhs, rhs);
        end
      end
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
