// tb_bpd_filter: self-checking test of the band-pass derivative filter.
// For Nyquist bands K = 1, 2, 3 and 4 it feeds a sampled tone whose analog
// frequency lies in band K (base-band image at 0.3*pi, 0.5*pi and 0.7*pi)
// and compares x_der with the analytic derivative of the analog tone at the
// sampling instants, and y_al with the tone itself, both delayed by the
// filter's (N-1)/2 samples. The tolerance covers the ripple of the 31-tap
// windowed filters. It also checks that out_valid follows in_valid by two
// clocks and that every input sample yields exactly one output.
`timescale 1ns/1ps
module tb_bpd_filter;
  import tiadc_pkg::*;

  localparam int  N   = 31;
  localparam int  D   = (N - 1) / 2;
  localparam real PI_ = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0;
  samp_t y = '0, x_der, y_al;
  logic [3:0] nyq_band = 4'd1;
  logic out_valid;

  bpd_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real a_w, amp, phase;
  int  n_in, n_out;
  real max_err_d, max_err_y;

  function automatic real analog_w(int k, real wb);
    return (k % 2 == 1) ? real'(k - 1) * PI_ + wb : real'(k) * PI_ - wb;
  endfunction

  // compare outputs as they appear
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int j;
      real ed, ey, sd, sy;
      j = n_out - D;
      if (j >= 0 && n_out >= N) begin
        ed = -amp * a_w * $sin(a_w * j + phase);
        ey =  amp * $cos(a_w * j + phase);
        sd = real'(x_der) / 32768.0;
        sy = real'(y_al) / 32768.0;
        if ((sd - ed > 0.0 ? sd - ed : ed - sd) > max_err_d) max_err_d = (sd - ed > 0.0 ? sd - ed : ed - sd);
        if ((sy - ey > 0.0 ? sy - ey : ey - sy) > max_err_y) max_err_y = (sy - ey > 0.0 ? sy - ey : ey - sy);
      end
      n_out++;
    end
  end

  task automatic run(int k, real wb);
    real rel;
    int t_first;
    rst_n = 0;
    nyq_band = 4'(k);
    amp = 0.5;
    phase = 0.3;
    a_w = analog_w(k, wb);
    n_in = 0; n_out = 0; max_err_d = 0; max_err_y = 0;
    @(negedge clk) rst_n = 1;
    // first sample: timing check (out_valid two clocks later)
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n > 10 && $urandom_range(0, 3) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      y = samp_t'($rtoi(amp * $cos(a_w * n + phase) * 32768.0));
      in_valid = 1;
      n_in++;
      if (n == 0) begin
        @(posedge clk); #1 in_valid = 0;
        checks++;
        if (out_valid) begin failures++; $display("FAIL: out_valid after one clock"); end
        @(posedge clk); #1;
        checks++;
        if (!out_valid) begin failures++; $display("FAIL: out_valid not two clocks after the sample"); end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    rel = max_err_d / (amp * a_w);
    $display("K=%0d wb=%4.2fpi: max derivative error %f (%5.3f%% of peak), max y_al error %f",
             k, wb / PI_, max_err_d, 100.0 * rel, max_err_y);
    checks++;
    if (rel > 0.01) begin failures++; $display("FAIL: K=%0d derivative error too large", k); end
    checks++;
    if (max_err_y > 1.0 / 16384.0) begin failures++; $display("FAIL: K=%0d y_al misaligned", k); end
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL: K=%0d %0d outputs for %0d inputs", k, n_out, n_in); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    for (int k = 1; k <= 4; k++) begin
      run(k, 0.3 * PI_);
      run(k, 0.5 * PI_);
      run(k, 0.7 * PI_);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
