// tb_estimation_unit: self-checking test of the free-band LMS estimation at
// its default parameters. The signal vectors x_g, x_r are random white
// sequences (x_r about eight times larger, like the derivative of a
// higher-band signal), and the output is built as
//     y = c_g_true^T x_g + c_r_true^T x_r + (strong tone at 0.6*pi)
// so that the only thing in y outside the stop band of f[n] is the
// modelled error. With random gaps in in_valid the LMS must bring c_g and
// c_r to the true values, the error eps must fall far below its initial
// level (the leak of the tone through f[n] sets its floor), adapt_en = 0 must hold the coefficients, and clear must zero them.
`timescale 1ns/1ps
module tb_estimation_unit;
  import tiadc_pkg::*;

  localparam int  M   = 4;
  localparam real PI_ = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, adapt_en = 1, clear = 0;
  samp_t y = '0;
  samp_t x_g [M-1];
  samp_t x_r [M-1];
  acoef_t c_g [M-1];
  acoef_t c_r [M-1];
  samp_t eps;
  logic eps_valid;

  estimation_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cg_true [M-1] = '{0.012, -0.007, 0.003};
  real cr_true [M-1] = '{-0.0011, 0.0004, 0.0008};

  function automatic longint rnd_s(int bits);
    return longint'($urandom_range(0, (1 << bits) - 1)) - (longint'(1) << (bits - 1));
  endfunction

  function automatic real c2r(acoef_t c);
    return real'(c) / real'(64'sd1 <<< AF);
  endfunction

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  real eps_pow_early, eps_pow_late;
  int  n_early, n_late, n_eps;

  always @(posedge clk) begin
    if (rst_n && eps_valid) begin
      real e;
      e = real'(eps) / 32768.0;
      if (n_eps >= 100 && n_eps < 1100) begin eps_pow_early += e * e; n_early++; end
      if (n_eps >= 38000 && n_eps < 40000) begin eps_pow_late += e * e; n_late++; end
      n_eps++;
    end
  end

  task automatic feed(int n);
    real v;
    @(negedge clk);
    if ($urandom_range(0, 4) == 0) begin
      in_valid = 0;
      @(negedge clk);
    end
    v = 0.6 * $cos(0.6 * PI_ * n);
    for (int k = 0; k < M-1; k++) begin
      x_g[k] = samp_t'(rnd_s(15));
      x_r[k] = samp_t'(rnd_s(18));
      v += cg_true[k] * real'(x_g[k]) / 32768.0 + cr_true[k] * real'(x_r[k]) / 32768.0;
    end
    y = samp_t'($rtoi(v * 32768.0));
    in_valid = 1;
  endtask

  initial begin
    acoef_t hg [M-1];
    acoef_t hr [M-1];
    int n = 0;
    for (int k = 0; k < M-1; k++) begin x_g[k] = '0; x_r[k] = '0; end
    eps_pow_early = 0; eps_pow_late = 0; n_early = 0; n_late = 0; n_eps = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (40100) feed(n++);
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    for (int k = 0; k < M-1; k++) begin
      $display("c_g[%0d] = %9.6f (true %9.6f)  c_r[%0d] = %9.6f (true %9.6f)",
               k, c2r(c_g[k]), cg_true[k], k, c2r(c_r[k]), cr_true[k]);
      checks++;
      if (fabs(c2r(c_g[k]) - cg_true[k]) > 0.0005) begin failures++; $display("FAIL: c_g[%0d]", k); end
      checks++;
      if (fabs(c2r(c_r[k]) - cr_true[k]) > 0.00005) begin failures++; $display("FAIL: c_r[%0d]", k); end
    end
    $display("eps power: first samples %g, after convergence %g",
             eps_pow_early / n_early, eps_pow_late / n_late);
    checks++;
    if (eps_pow_late / n_late > 0.1 * eps_pow_early / n_early) begin
      failures++;
      $display("FAIL: eps did not fall by 10 dB");
    end
    // freeze with a different true model
    cg_true[0] = -0.02;
    @(negedge clk) adapt_en = 0;
    hg = c_g; hr = c_r;
    repeat (2000) feed(n++);
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (hg != c_g || hr != c_r) begin failures++; $display("FAIL: coefficients moved while frozen"); end
    // resume: c_g[0] must follow the new value
    @(negedge clk) adapt_en = 1;
    repeat (40000) feed(n++);
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (fabs(c2r(c_g[0]) + 0.02) > 0.0005) begin failures++; $display("FAIL: c_g[0] did not track, %f", c2r(c_g[0])); end
    // clear
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int k = 0; k < M-1; k++) begin
      checks++;
      if (c_g[k] != 0 || c_r[k] != 0) begin failures++; $display("FAIL: not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
