// tb_dctv_n4: self-checking test of the DCT-V N=4 block.
// Random and corner input vectors are applied; each output is compared with
// y_k = sum_l x_l cos(2*pi*k*l/7) computed in floating point. The tolerance
// covers the 8-bit fixed-point constants (relative) plus truncation (absolute).
`timescale 1ns/1ps
module tb_dctv_n4;
  import dctv_pkg::*;
  word_t x [4], y [4];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dctv_n4 dut (.x(x), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec();
    real ref_v, err, tol, sabs;
    sabs = 0.0;
    for (int l = 0; l < 4; l++) sabs += (x[l] < 0) ? -real'(x[l]) : real'(x[l]);
    tol = 4.0 + 0.006 * sabs;
    for (int k = 0; k < 4; k++) begin
      ref_v = 0.0;
      for (int l = 0; l < 4; l++) ref_v += real'(x[l]) * $cos(2.0 * 3.14159265358979 * k * l / 7.0);
      err = real'(y[k]) - ref_v;
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d y=%0d ref=%f", k, y[k], ref_v);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int l = 0; l < 4; l++) begin
        if (n < 4) x[l] = (l == n) ? 32767 : 0;          // unit impulses
        else       x[l] = word_t'($signed(16'($urandom)));
      end
      #1;
      check_vec();
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
