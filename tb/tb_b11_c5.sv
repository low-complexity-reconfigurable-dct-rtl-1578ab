// tb_b11_c5: self-checking test of the B11 reduction.
// For each DCT-V N=11 point cos(2*pi*j/21): if j is a multiple of 3 the
// folded 4-vector f4 must give the same polynomial value, otherwise the
// 7-vector z7 must (roots of T_7 + 1/2). Tolerance 1 for the halved term.
`timescale 1ns/1ps
module tb_b11_c5;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;
  word_t y [11], f4 [4], z7 [7];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  b11_c5 dut (.y(y), .f4(f4), .z7(z7));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, full, red, err;
    for (int n = 0; n < 500; n++) begin
      for (int l = 0; l < 11; l++) y[l] = word_t'($signed(18'($urandom)));
      #1;
      for (int j = 0; j < 11; j++) begin
        th = 2.0 * PI * j / 21.0;
        full = 0.0;
        red  = 0.0;
        for (int l = 0; l < 11; l++) full += real'(y[l]) * $cos(l * th);
        if (j % 3 == 0) for (int m = 0; m < 4; m++) red += real'(f4[m]) * $cos(m * th);
        else            for (int m = 0; m < 7; m++) red += real'(z7[m]) * $cos(m * th);
        err = full - red;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL j=%0d full=%f reduced=%f", j, full, red);
        end
      end
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
