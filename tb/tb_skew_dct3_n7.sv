// tb_skew_dct3_n7: self-checking test of the skew DCT-III N=7 for all four
// r values used in the design, and of its N=4 bypass.
// Transform mode: output o must equal sum_l a_l cos(l*(r+2i)*pi/7) where
// the output order i(o) = {6,1,4,3,2,5,0} is part of the block's contract.
// N=4 mode: u4 must be the DCT-V N=4 of raw4.
`timescale 1ns/1ps
module tb_skew_dct3_n7;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real RV [4] = '{2.0/3.0, 2.0/9.0, 4.0/9.0, 8.0/9.0};
  localparam int  PT [7] = '{6, 1, 4, 3, 2, 5, 0};
  word_t a [7], raw4 [4];
  word_t y [4][7];
  word_t u4 [4][4];
  logic  mode4;
  int checks = 0, failures = 0;
  int n_mode4 = 0, n_mode32 = 0;
  real maxerr = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    skew_dct3_n7 #(.RSEL(g)) dut (.a(a), .mode4(mode4), .raw4(raw4), .y(y[g]), .u4(u4[g]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    real ref_v, err, tol, sabs;
    for (int n = 0; n < 1000; n++) begin
      mode4 = n[0];
      sabs = 0.0;
      for (int l = 0; l < 7; l++) begin
        a[l] = word_t'($signed(20'($urandom)));
        sabs += absr(real'(a[l]));
      end
      for (int l = 0; l < 4; l++) raw4[l] = word_t'($signed(16'($urandom)));
      #1;
      if (!mode4) begin
        n_mode32++;
        tol = 8.0 + 0.01 * sabs;
        for (int g = 0; g < 4; g++)
          for (int o = 0; o < 7; o++) begin
            ref_v = 0.0;
            for (int l = 0; l < 7; l++) ref_v += real'(a[l]) * $cos(l * (RV[g] + 2.0 * PT[o]) * PI / 7.0);
            err = absr(real'(y[g][o]) - ref_v);
            if (err > maxerr) maxerr = err;
            checks++;
            if (err > tol) begin
              failures++;
              if (failures < 10) $display("FAIL r%0d o=%0d y=%0d ref=%f", g, o, y[g][o], ref_v);
            end
          end
      end else begin
        n_mode4++;
        for (int g = 0; g < 4; g++)
          for (int k = 0; k < 4; k++) begin
            ref_v = 0.0;
            for (int l = 0; l < 4; l++) ref_v += real'(raw4[l]) * $cos(2.0 * PI * k * l / 7.0);
            err = absr(real'(u4[g][k]) - ref_v);
            checks++;
            if (err > 4.0 + 0.006 * 4.0 * 32768.0) begin
              failures++;
              if (failures < 10) $display("FAIL N4 r%0d k=%0d u=%0d ref=%f", g, k, u4[g][k], ref_v);
            end
          end
      end
      @(posedge clk);
    end
    if (n_mode4 == 0 || n_mode32 == 0) failures++;
    $display("max abs error %f (mode4 vectors %0d, transform vectors %0d)", maxerr, n_mode4, n_mode32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
