// tb_dst7t_n3: self-checking test of the transposed DST-VII N=3 block.
// Outputs are compared with y_k = sum_l x_l sin(pi*(2l+1)*(k+1)/7) computed in
// floating point, with a tolerance for the 8-bit constants.
`timescale 1ns/1ps
module tb_dst7t_n3;
  import dctv_pkg::*;
  word_t x [3], y [3];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dst7t_n3 dut (.x(x), .y(y));

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
        if (n < 3) x[l] = (l == n) ? -32768 : 0;
        else       x[l] = word_t'($signed(16'($urandom)));
        sabs += (x[l] < 0) ? -real'(x[l]) : real'(x[l]);
      end
      #1;
      tol = 4.0 + 0.006 * sabs;
      for (int k = 0; k < 3; k++) begin
        ref_v = 0.0;
        for (int l = 0; l < 3; l++)
          ref_v += real'(x[l]) * $sin(3.14159265358979 * (2 * l + 1) * (k + 1) / 7.0);
        err = real'(y[k]) - ref_v;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > tol) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d y=%0d ref=%f", k, y[k], ref_v);
        end
      end
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
