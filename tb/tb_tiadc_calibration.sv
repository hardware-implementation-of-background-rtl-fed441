// tb_tiadc_calibration: end-to-end test of the calibrator at its default
// parameters, driven by the behavioural TIADC model.
//
// Each scenario resets the design, programs the Nyquist band, and feeds a
// multitone band-pass input (base-band image 0.42*pi..0.78*pi, the band of the
// 2.7 GS/s, 540 MHz..1.08 GHz example) sampled by a 4-channel TIADC with
// zero-mean gain and timing errors. The four sub-ADC samples of each round
// are offered as a frame through the valid/ready handshake, with random gaps
// between frames. After convergence it checks
//   - every gain and timing coefficient against the value worked out from
//     the model's mismatches,
//   - SNDR of the calibrated output against the ideal input, which must be
//     well above the SNDR of the raw TIADC output,
//   - the latency from taking the first frame to its calibrated sample,
//   - that the frame side accepts a frame every M clocks when offered,
// then, in the first scenario, that adapt_en = 0 holds the coefficients and
// that coef_clear zeroes them. Scenarios cover K = 3 (odd band, the
// example's third band), K = 2 (even band, inverted spectrum) and K = 1.
// Mechanisms counted: input stalls, adaptation frozen, coefficient clear,
// and each band mode; one that never happened is a failure.
`timescale 1ns/1ps
module tb_tiadc_calibration;
  import tiadc_pkg::*;
  import tiadc_model_pkg::*;

  localparam int M  = 4;
  localparam int DW = 12;
  localparam int D  = 15;            // (N_DIFF-1)/2 of the default design
  localparam int LAT_CLK = D + 5;    // clocks from frame taken to x_hat

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
  int n_stall = 0, n_freeze = 0, n_clear = 0, n_band [16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference samples, indexed by input sample number
  real    xref [$];
  real    yref [$];
  longint n_out;
  real    sig_pow, err_cal, err_raw;
  longint meas_from;

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // clock at which the first frame was taken, and the measured latency
  longint t_take_g, lat_g;

  // outputs are sampled at the falling edge, where they are stable
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out == D && t_take_g >= 0) lat_g = cyc - t_take_g;
      if (n_out >= D && n_out >= meas_from && (n_out - D) < xref.size()) begin
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

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real c2r(acoef_t c);
    return real'(c) / real'(64'sd1 <<< AF);
  endfunction

  task automatic run_scenario(int k, real dgv [M], real rv [M], int nsamp, bit extra);
    tiadc_model #(M, DW) adc;
    longint n;
    real x, eg, er, sndr_raw, sndr_cal;
    logic signed [DW-1:0] ys;
    longint t_last;
    bit rate_ok;

    adc = new(k);
    for (int m = 0; m < M; m++) begin
      adc.dg[m] = dgv[m];
      adc.r[m]  = rv[m];
    end
    for (int i = 0; i < 8; i++)
      adc.add_tone((0.42 + 0.36 * real'(i) / 7.0) * PI, 0.09, 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0);

    xref.delete(); yref.delete();
    n_out = 0; sig_pow = 0; err_cal = 0; err_raw = 0;
    meas_from = nsamp - 16384;
    rst_n = 0; frame_valid = 0; nyq_band = 4'(k); adapt_en = 1; coef_clear = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    n_band[k]++;

    // frames of M samples; the first frames back to back (latency and
    // rate), later ones with random gaps
    t_take_g = -1; lat_g = -1; t_last = 0; rate_ok = 1;
    n = 0;
    @(negedge clk);
    while (n < nsamp) begin
      if (n > 64 && $urandom_range(0, 7) == 0) begin
        frame_valid = 0;
        repeat ($urandom_range(1, 2 * M)) begin
          @(negedge clk);
          n_stall++;
        end
      end
      for (int m = 0; m < M; m++) begin
        adc.sample(n + m, ys, x);
        xref.push_back(x);
        yref.push_back(real'(ys) / real'(1 << (DW - 1)));
        y_ch[m] = ys;
      end
      frame_valid = 1;
      while (!frame_ready) @(negedge clk);
      // taken at the next rising edge
      if (t_take_g < 0) t_take_g = cyc + 1;
      if (n > 0 && n <= 64 && cyc + 1 - t_last != M) rate_ok = 0;
      t_last = cyc + 1;
      n += M;
      @(negedge clk);
    end
    frame_valid = 0;
    repeat (LAT_CLK + 8) @(negedge clk);

    check(rate_ok, $sformatf("K=%0d frames not taken every %0d clocks", k, M));
    check(lat_g == LAT_CLK, $sformatf("K=%0d latency %0d clocks, expected %0d", k, lat_g, LAT_CLK));
    check(n_out == longint'(nsamp), $sformatf("K=%0d %0d outputs for %0d inputs", k, n_out, nsamp));

    for (int i = 0; i < M-1; i++) begin
      eg = adc.basis_coef(dgv, i);
      er = adc.basis_coef(rv, i);
      $display("K=%0d c_g[%0d] = %9.6f (expected %9.6f)   c_r[%0d] = %9.6f (expected %9.6f)",
               k, i, c2r(c_g[i]), eg, i, c2r(c_r[i]), er);
      check(fabs(c2r(c_g[i]) - eg) < 0.0015, $sformatf("K=%0d c_g[%0d]", k, i));
      check(fabs(c2r(c_r[i]) - er) < 0.0003, $sformatf("K=%0d c_r[%0d]", k, i));
    end
    sndr_raw = 10.0 * $log10(sig_pow / err_raw);
    sndr_cal = 10.0 * $log10(sig_pow / err_cal);
    $display("K=%0d SNDR before %6.2f dB, after %6.2f dB", k, sndr_raw, sndr_cal);
    check(sndr_cal > sndr_raw + 10.0, $sformatf("K=%0d SNDR improvement", k));
    check(sndr_cal > 50.0, $sformatf("K=%0d calibrated SNDR", k));

    if (extra) begin
      acoef_t hold_g [M-1];
      acoef_t hold_r [M-1];
      // freeze: a changed mismatch must not move the coefficients
      for (int m = 0; m < M; m++) adc.dg[m] = -dgv[m];
      @(negedge clk) adapt_en = 0;
      n_freeze++;
      hold_g = c_g; hold_r = c_r;
      repeat (1000) begin
        for (int m = 0; m < M; m++) begin
          adc.sample(n + m, ys, x);
          y_ch[m] = ys;
        end
        frame_valid = 1;
        while (!frame_ready) @(negedge clk);
        @(negedge clk);
        n += M;
      end
      frame_valid = 0;
      repeat (LAT_CLK + 8) @(posedge clk);
      check(hold_g == c_g && hold_r == c_r, "coefficients moved while adapt_en = 0");
      // clear
      @(negedge clk) coef_clear = 1;
      @(negedge clk) coef_clear = 0;
      n_clear++;
      for (int i = 0; i < M-1; i++)
        check(c_g[i] == '0 && c_r[i] == '0, "coefficients not cleared");
    end
  endtask

  initial begin
    real dg1 [M] = '{0.012, -0.018, 0.002, 0.004};
    real r1  [M] = '{0.0015, -0.0010, 0.0004, -0.0009};
    real dg2 [M] = '{-0.010, 0.006, 0.011, -0.007};
    real r2  [M] = '{-0.0008, 0.0012, -0.0011, 0.0007};
    foreach (n_band[i]) n_band[i] = 0;
    run_scenario(3, dg1, r1, 120000, 1'b1);
    run_scenario(2, dg2, r2, 120000, 1'b0);
    run_scenario(1, dg1, r2, 250000, 1'b0);

    check(n_stall > 0,  "no input stall happened");
    check(n_freeze > 0, "adaptation was never frozen");
    check(n_clear > 0,  "coefficients were never cleared");
    check(n_band[1] > 0 && n_band[2] > 0 && n_band[3] > 0, "not every band mode ran");
    $display("mechanisms: stalls=%0d freeze=%0d clear=%0d K1=%0d K2=%0d K3=%0d",
             n_stall, n_freeze, n_clear, n_band[1], n_band[2], n_band[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
