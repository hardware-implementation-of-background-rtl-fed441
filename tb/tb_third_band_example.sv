// tb_third_band_example: the calibrator at its default parameters on the
// third-Nyquist-band example: a 4-channel TIADC at 2.7 GS/s with 60 dB SNR,
// a multitone input between 3.24 GHz and 3.78 GHz (folded to 540 MHz ..
// 1.08 GHz, 0.4*pi .. 0.8*pi rad/sample), and gain/timing mismatches whose
// coefficients are those of the convergence plots of the example
// (c_g about 2.2e-3, -2.2e-3, -17.8e-3; c_r about 4.4e-4, 1.2e-4, -0.5e-4,
// read off the plots and assigned to the basis in that order). It runs
// 260,000 samples, the length of those plots, offered as back-to-back
// frames of four sub-ADC samples. It prints the coefficient trajectory and
// the SNDR, computed as sum x^2 / sum (x - x_hat)^2 against the ideal input,
// before and after calibration over the last 16,384 samples, and checks
//   - the coefficients against the expected values,
//   - an SNDR gain of at least 12 dB and a calibrated SNDR above 55 dB
//     (the example reports 42.37 dB before and 58.45 dB after),
//   - that the gain coefficients are within 10 % of their final values by
//     100,000 samples (the example converges in about 50,000 samples).
`timescale 1ns/1ps
module tb_third_band_example;
  import tiadc_pkg::*;
  import tiadc_model_pkg::*;

  localparam int M  = 4;
  localparam int DW = 12;
  localparam int D  = 15;
  localparam int NS = 260000;
  localparam int NT = 40;

  logic clk = 0, rst_n = 0;
  logic frame_valid = 0, frame_ready;
  logic signed [DW-1:0] y_ch [M];
  logic [3:0] nyq_band = 4'd3;
  logic adapt_en = 1, coef_clear = 0;
  logic out_valid, eps_valid;
  logic signed [DW-1:0] x_hat;
  acoef_t c_g [M-1];
  acoef_t c_r [M-1];
  samp_t eps;

  tiadc_calibration dut (.*);

  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NS + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real c2r(acoef_t c);
    return real'(c) / real'(64'sd1 <<< AF);
  endfunction

  real    xref [$];
  real    yref [$];
  longint n_out = 0;
  real    sig_pow = 0, err_cal = 0, err_raw = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out >= NS - 16384 + D) begin
        real xi, xo;
        xi = xref[n_out - D];
        xo = real'(x_hat) / real'(1 << (DW - 1));
        sig_pow += xi * xi;
        err_cal += (xi - xo) * (xi - xo);
        err_raw += (xi - yref[n_out - D]) * (xi - yref[n_out - D]);
      end
      n_out++;
    end
  end

  initial begin
    tiadc_model #(M, DW) adc;
    real cg_exp [M-1] = '{2.2e-3, -2.2e-3, -17.8e-3};
    real cr_exp [M-1] = '{4.4e-4, 1.2e-4, -0.5e-4};
    real cg_100k [M-1];
    real x, a, rms, sndr_raw, sndr_cal;
    logic signed [DW-1:0] ys;

    adc = new(3);
    // per-channel errors with the expected basis coefficients
    adc.dg[0] =  cg_exp[0] + cg_exp[2];
    adc.dg[1] =  cg_exp[1] - cg_exp[2];
    adc.dg[2] = -cg_exp[0] + cg_exp[2];
    adc.dg[3] = -cg_exp[1] - cg_exp[2];
    adc.r[0]  =  cr_exp[0] + cr_exp[2];
    adc.r[1]  =  cr_exp[1] - cr_exp[2];
    adc.r[2]  = -cr_exp[0] + cr_exp[2];
    adc.r[3]  = -cr_exp[1] - cr_exp[2];
    rms = 0.2;
    a = rms * $sqrt(2.0 / real'(NT));
    for (int i = 0; i < NT; i++)
      adc.add_tone((0.41 + 0.38 * real'(i) / real'(NT - 1)) * PI, a,
                   2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0);
    // 60 dB SNR in total: added noise plus the 12-bit rounding noise
    adc.noise_rms = $sqrt((rms * 1.0e-3) ** 2 - (1.0 / 2048.0) ** 2 / 12.0);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // one frame of M sub-ADC samples every M clocks, the full rate
    @(negedge clk);
    for (int n = 0; n < NS; n += M) begin
      for (int m = 0; m < M; m++) begin
        adc.sample(n + m, ys, x);
        xref.push_back(x);
        yref.push_back(real'(ys) / real'(1 << (DW - 1)));
        y_ch[m] = ys;
      end
      frame_valid = 1;
      while (!frame_ready) @(negedge clk);
      @(negedge clk);
      if (n % 25000 == 0 && n > 0)
        $display("n=%6d  c_g = %9.6f %9.6f %9.6f   c_r = %9.6f %9.6f %9.6f", n,
                 c2r(c_g[0]), c2r(c_g[1]), c2r(c_g[2]), c2r(c_r[0]), c2r(c_r[1]), c2r(c_r[2]));
      if (n == 100000)
        for (int k = 0; k < M-1; k++) cg_100k[k] = c2r(c_g[k]);
    end
    frame_valid = 0;
    repeat (40) @(negedge clk);

    for (int k = 0; k < M-1; k++) begin
      $display("c_g[%0d] = %9.6f (expected %9.6f)   c_r[%0d] = %9.6f (expected %9.6f)",
               k, c2r(c_g[k]), cg_exp[k], k, c2r(c_r[k]), cr_exp[k]);
      check(fabs(c2r(c_g[k]) - cg_exp[k]) < 0.001, $sformatf("c_g[%0d]", k));
      check(fabs(c2r(c_r[k]) - cr_exp[k]) < 0.00005, $sformatf("c_r[%0d]", k));
      check(fabs(cg_100k[k] - c2r(c_g[k])) < 0.1 * fabs(c2r(c_g[k])) + 0.0005,
            $sformatf("c_g[%0d] not settled by 100000 samples", k));
    end
    sndr_raw = 10.0 * $log10(sig_pow / err_raw);
    sndr_cal = 10.0 * $log10(sig_pow / err_cal);
    $display("SNDR before calibration %6.2f dB, after %6.2f dB", sndr_raw, sndr_cal);
    check(sndr_cal > sndr_raw + 12.0, "SNDR gain below 12 dB");
    check(sndr_cal > 55.0, "calibrated SNDR below 55 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
