// tb_residual_blocks: block-transform workload for the reconfigurable DCT-V.
//
// Uses the 1-D unit as a video-coding residual transform would: a 32x32
// residual block is transformed row by row (32 vectors in 32 consecutive
// cycles), the testbench transposes the scaled row results and sends the 32
// columns through again, giving the separable 2-D DCT-V. Then twenty 4x4
// residual blocks go through in N=4 mode, five blocks' rows per cycle.
// Residuals are generated here: a smooth ramp plus noise, as left by
// prediction. Results are compared with a floating-point 2-D DCT-V with the
// same scaling (1/32 per pass for N=32, 1/4 per pass for N=4); the number of
// cycles from the first input to the last output is checked (one vector per
// cycle plus one cycle of register latency per pass).
`timescale 1ns/1ps
module tb_residual_blocks;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, mode4 = 1'b0;
  sample_t x [32];
  logic    out_valid;
  sample_t X [32];

  dctv_reconf dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t blk  [32][32];   // residual block
  sample_t pass [32][32];   // results collected from one pass, by input row
  real     ref2 [32][32];

  // Send n vectors (rows of src) back to back and collect the outputs.
  task automatic run_pass(input sample_t src [32][32], input int n, input logic m4,
                          output sample_t dst [32][32], output longint cycles);
    longint t0;
    int got;
    got = 0;
    t0 = cycle;
    fork
      begin
        for (int r = 0; r < n; r++) begin
          x = src[r];
          mode4 = m4;
          in_valid = 1'b1;
          @(posedge clk);
          #1;
        end
        in_valid = 1'b0;
      end
      begin
        while (got < n) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            dst[got] = X;
            got++;
          end
        end
      end
    join
    cycles = cycle - t0;
  endtask

  function automatic real absr(real v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    sample_t tr [32][32];
    longint c1, c2;
    real acc, err, maxerr;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------- 32x32 block, N = 32 ----------
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++)
        blk[r][c] = sample_t'(40 * r - 25 * c + int'($urandom % 201) - 100);
    run_pass(blk, 32, 1'b0, pass, c1);
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) tr[c][r] = pass[r][c];
    run_pass(tr, 32, 1'b0, pass, c2);
    // pass[c][k] now holds the coefficient (row freq k, column freq c)
    maxerr = 0.0;
    for (int k = 0; k < 32; k++)
      for (int c = 0; c < 32; c++) begin
        acc = 0.0;
        for (int r = 0; r < 32; r++)
          for (int l = 0; l < 32; l++)
            acc += real'(blk[r][l]) * $cos(2.0 * PI * c * l / 63.0) * $cos(2.0 * PI * k * r / 63.0);
        ref2[k][c] = acc / 1024.0;
        err = absr(real'(pass[c][k]) - ref2[k][c]);
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 10.0) begin
          failures++;
          if (failures < 10) $display("FAIL 32x32 (%0d,%0d) got %0d ref %f", k, c, pass[c][k], ref2[k][c]);
        end
      end
    $display("32x32 block: pass cycles %0d and %0d, max error %f", c1, c2, maxerr);
    checks++;
    if (c1 != 33 || c2 != 33) begin
      failures++;
      $display("FAIL cycle count, expected 33 per pass");
    end

    // ---------- twenty 4x4 blocks, N = 4 (five per vector) ----------
    // blk[r][4b + l] = row r, column l of block b (b = 0..4), four such groups
    // of rows (grp) give 20 blocks; only columns 0..19 are used.
    maxerr = 0.0;
    for (int grp = 0; grp < 4; grp++) begin
      sample_t src [32][32];
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 32; c++)
          src[r][c] = (c < 20) ? sample_t'(300 * (c % 4) - 200 * r + int'($urandom % 2001) - 1000) : '0;
      run_pass(src, 4, 1'b1, pass, c1);
      for (int b = 0; b < 5; b++)
        for (int r = 0; r < 4; r++)
          for (int k = 0; k < 4; k++) tr[k][4 * b + r] = pass[r][4 * b + k];
      // tr[k][4b + r]: for block b, column-frequency k of row r -> transpose
      for (int r = 0; r < 4; r++)
        for (int c = 20; c < 32; c++) tr[r][c] = '0;
      run_pass(tr, 4, 1'b1, pass, c2);
      for (int b = 0; b < 5; b++)
        for (int kc = 0; kc < 4; kc++)
          for (int kr = 0; kr < 4; kr++) begin
            acc = 0.0;
            for (int r = 0; r < 4; r++)
              for (int l = 0; l < 4; l++)
                acc += real'(src[r][4 * b + l]) * $cos(2.0 * PI * kc * l / 7.0) * $cos(2.0 * PI * kr * r / 7.0);
            acc = acc / 16.0;
            err = absr(real'(pass[kc][4 * b + kr]) - acc);
            if (err > maxerr) maxerr = err;
            checks++;
            if (err > 8.0) begin
              failures++;
              if (failures < 10) $display("FAIL 4x4 grp %0d blk %0d (%0d,%0d) got %0d ref %f", grp, b, kr, kc, pass[kc][4*b+kr], acc);
            end
          end
      checks++;
      if (c1 != 5 || c2 != 5) begin
        failures++;
        $display("FAIL 4x4 cycle count %0d %0d, expected 5", c1, c2);
      end
    end
    $display("4x4 blocks: 20 blocks, max error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
