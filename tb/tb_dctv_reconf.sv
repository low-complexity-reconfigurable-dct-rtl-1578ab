// tb_dctv_reconf: end-to-end test of the reconfigurable DCT-V at its default
// parameters.
//
// Streams random 16-bit input vectors, mostly back to back, with idle cycles,
// mode switches between the N=32 transform and the five N=4 transforms, and a
// reset in the middle. Every accepted vector is checked on the clock edge after the one that
// captured it (input register, then output register)
// (this checks latency and one-vector-per-cycle throughput) against the DCT-V computed
// in floating point, X_k = sum_l x_l cos(2*pi*k*l/(2N-1)), scaled by 2^-5
// (N=32) or 2^-2 (N=4). Also checked: a full-scale DC vector, impulses,
// out_valid after reset. Each mechanism (N=32 operation, N=4 operation,
// switch in both directions, idle cycle, reset) is counted; one that never
// happened is a failure.
`timescale 1ns/1ps
module tb_dctv_reconf;
  import dctv_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  NVEC = 600;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, mode4 = 1'b0;
  sample_t x [32];
  logic    out_valid;
  sample_t X [32];

  dctv_reconf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n32 = 0, n4 = 0, sw_to4 = 0, sw_to32 = 0, idles = 0, resets = 0;
  longint cycle = 0;
  real maxerr32 = 0.0, maxerr4 = 0.0;

  typedef struct {
    sample_t v [32];
    logic    m4;
    longint  t_in;
  } vec_t;
  vec_t pending [$];

  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check_out(vec_t e);
    real ref_v, err, tol, sabs;
    int n;
    checks++;
    if (cycle - e.t_in != 1) begin
      failures++;
      $display("FAIL latency %0d", cycle - e.t_in);
    end
    n = e.m4 ? 4 : 32;
    for (int k = 0; k < (e.m4 ? 20 : 32); k++) begin
      int g, kk;
      g  = e.m4 ? k / 4 : 0;
      kk = e.m4 ? k % 4 : k;
      ref_v = 0.0;
      sabs  = 0.0;
      for (int l = 0; l < n; l++) begin
        ref_v += real'(e.v[g*n*int'(e.m4) + l]) * $cos(2.0 * PI * kk * l / (2.0 * n - 1.0));
        sabs  += absr(real'(e.v[g*n*int'(e.m4) + l]));
      end
      ref_v = ref_v / (e.m4 ? 4.0 : 32.0);
      if (ref_v > 32767.0)  ref_v = 32767.0;
      if (ref_v < -32768.0) ref_v = -32768.0;
      tol = 3.0 + 0.008 * sabs / (e.m4 ? 4.0 : 32.0);
      err = absr(real'(X[k]) - ref_v);
      if (e.m4) begin if (err > maxerr4) maxerr4 = err; end
      else begin if (err > maxerr32) maxerr32 = err; end
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 12) $display("FAIL mode4=%0d k=%0d X=%0d ref=%f tol=%f", e.m4, k, X[k], ref_v, tol);
      end
    end
  endtask

  // output monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else check_out(pending.pop_front());
    end
  end

  task automatic drive(input logic m4, input int kind);
    for (int i = 0; i < 32; i++)
      case (kind)
        0: x[i] = sample_t'($urandom);
        1: x[i] = 16'sh7fff;                          // full-scale DC
        2: x[i] = 16'sh8000;                          // negative full scale
        default: x[i] = (i == kind - 3) ? 16'sh7fff : 16'sh0000;  // impulse
      endcase
    mode4    = m4;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    // captured by the input register on that edge; the output register
    // must hold the result one edge later
    pending.push_back('{v: x, m4: m4, t_in: cycle});
    in_valid = 1'b0;
  endtask

  initial begin
    logic prev_m4;
    logic m4;
    prev_m4 = 1'b0;
    for (int i = 0; i < 32; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    resets++;
    for (int n = 0; n < NVEC; n++) begin
      int kind;
      m4   = ($urandom % 4 == 0) ? ~prev_m4 : prev_m4;
      kind = (n < 36) ? ((n < 3) ? n + 1 : n) : 0;
      if (n == 36) m4 = 1'b1;
      if (m4 && !prev_m4) sw_to4++;
      if (!m4 && prev_m4) sw_to32++;
      if (m4) n4++; else n32++;
      prev_m4 = m4;
      drive(m4, kind);
      if ($urandom % 8 == 0) begin
        idles++;
        @(posedge clk);
        #1;
      end
      if (n == NVEC / 2) begin
        // synchronous reset between vectors: wait for the pipeline to drain first
        repeat (3) @(posedge clk);
        #1 rst_n = 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid not cleared by reset");
        end
        rst_n = 1'b1;
        resets++;
      end
    end
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", pending.size());
    end
    if (n32 == 0 || n4 == 0 || sw_to4 == 0 || sw_to32 == 0 || idles == 0 || resets < 2) failures++;
    $display("N32 ops %0d, N4 ops %0d, switches to N4 %0d, to N32 %0d, idle cycles %0d, resets %0d",
             n32, n4, sw_to4, sw_to32, idles, resets);
    $display("max abs error N32 %f LSB, N4 %f LSB", maxerr32, maxerr4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
