// tb_skew_dct3_n3: self-checking test of the skew DCT-III N=3 (r = 2/3).
// Output i is compared with sum_l x_l cos(l*(r+2i)*pi/3) in floating point.
`timescale 1ns/1ps
module tb_skew_dct3_n3;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real R  = 2.0 / 3.0;
  word_t x [3], y [3];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  skew_dct3_n3 dut (.x(x), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v, err, tol, sabs;
    for (int n = 0; n < 2000; n++) begin
      sabs = 0.0;
      for (int l = 0; l < 3; l++) begin
        if (n < 3) x[l] = (l == n) ? 100000 : 0;
        else       x[l] = word_t'($signed(20'($urandom)));
        sabs += (x[l] < 0) ? -real'(x[l]) : real'(x[l]);
      end
      #1;
      tol = 4.0 + 0.008 * sabs;
      for (int i = 0; i < 3; i++) begin
        ref_v = 0.0;
        for (int l = 0; l < 3; l++) ref_v += real'(x[l]) * $cos(l * (R + 2.0 * i) * PI / 3.0);
        err = real'(y[i]) - ref_v;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > tol) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d y=%0d ref=%f", i, y[i], ref_v);
        end
      end
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
