// tb_p7_c3: self-checking test of the P7 twiddle butterflies for all four r.
// Expected: y0 = x0, y_l = cos(l*phi) x_l - cos((7-l)*phi) x_{7-l},
// y_{7-l} = sin(l*phi) x_l + sin((7-l)*phi) x_{7-l}, phi = (r-1)*pi/7.
`timescale 1ns/1ps
module tb_p7_c3;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real RV [4] = '{2.0/3.0, 2.0/9.0, 4.0/9.0, 8.0/9.0};
  word_t x [7];
  word_t y [4][7];
  int checks = 0, failures = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    p7_c3 #(.RSEL(g)) dut (.x(x), .y(y[g]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e [7];
    real ph, err, tol;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 7; i++) x[i] = word_t'($signed(20'($urandom)));
      #1;
      for (int g = 0; g < 4; g++) begin
        ph = (RV[g] - 1.0) * PI / 7.0;
        e[0] = real'(x[0]);
        for (int l = 1; l <= 3; l++) begin
          e[l]   = $cos(l * ph) * x[l] - $cos((7 - l) * ph) * x[7-l];
          e[7-l] = $sin(l * ph) * x[l] + $sin((7 - l) * ph) * x[7-l];
        end
        for (int i = 0; i < 7; i++) begin
          err = real'(y[g][i]) - e[i];
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          tol = 3.0 + 2.0 * 524288.0 / 512.0;
          checks++;
          if (err > tol) begin
            failures++;
            if (failures < 10) $display("FAIL r%0d i=%0d y=%0d exp=%f", g, i, y[g][i], e[i]);
          end
        end
      end
      @(posedge clk);
    end
    $display("max abs error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
