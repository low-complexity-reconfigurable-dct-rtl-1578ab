// tb_h7: self-checking test of the H7 output butterflies (exact integers).
`timescale 1ns/1ps
module tb_h7;
  import dctv_pkg::*;
  word_t x [7], y [7];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  h7 dut (.x(x), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [7];
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 7; i++) x[i] = word_t'($signed(24'($urandom)));
      #1;
      // mirror pairs (0,6), (1,5), (2,4): difference on the low index, sum on the high one
      e[0] = longint'(x[0]) - x[6]; e[6] = longint'(x[0]) + x[6];
      e[1] = longint'(x[1]) - x[5]; e[5] = longint'(x[1]) + x[5];
      e[2] = longint'(x[2]) - x[4]; e[4] = longint'(x[2]) + x[4];
      e[3] = x[3];
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (longint'(y[i]) != e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d y=%0d exp=%0d", i, y[i], e[i]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
