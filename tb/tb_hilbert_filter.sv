// tb_hilbert_filter: self-checking test of hilbert_filter (FIR Hilbert transformer, 31 taps).
// The expected taps are recomputed here from the ideal impulse response and
// the Hamming window. The test checks the impulse response tap by tap,
// compares a random input stream with a convolution done in the testbench,
// bit for bit, while in_valid has random gaps, checks that x_mid is the input
// delayed by (N-1)/2 samples, checks the one-clock output timing, and
// measures the magnitude response with tones against the ideal filter.
`timescale 1ns/1ps
module tb_hilbert_filter;
  import tiadc_pkg::*;

  localparam int N = 31;
  localparam real PI_ = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0;
  samp_t x = '0, y, x_mid;
  logic out_valid;

  hilbert_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ideal(int k);
    if ((k % 2) == 0) return 0.0; return 2.0 / (PI_ * real'(k));
  endfunction

  longint taps [N];
  initial begin
    for (int i = 0; i < N; i++) begin
      real v;
      v = ideal(i - (N-1)/2) * (0.54 - 0.46 * $cos(2.0 * PI_ * i / (N - 1))) * 16384.0;
      taps[i] = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    end
  end

  longint hist [$];

  function automatic longint model_y();
    longint acc = 0;
    for (int i = 0; i < N; i++)
      if (i < hist.size()) acc += taps[i] * hist[hist.size() - 1 - i];
    return (acc + 8192) >>> 14;
  endfunction

  task automatic push(longint v, output longint ey, output longint emid);
    @(negedge clk);
    x = samp_t'(v);
    in_valid = 1;
    hist.push_back(v);
    ey = model_y();
    emid = (hist.size() > (N-1)/2) ? hist[hist.size() - 1 - (N-1)/2] : 0;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || y !== samp_t'(ey) || x_mid !== samp_t'(emid)) begin
      failures++;
      $display("FAIL: n=%0d valid=%b y=%0d expected %0d, x_mid=%0d expected %0d",
               hist.size() - 1, out_valid, y, ey, x_mid, emid);
    end
  endtask

  // Feed a tone at w*pi rad/sample and compare the output amplitude (from
  // its mean square over 800 samples after settling) with the expected
  // magnitude response, within an absolute tolerance.
  task automatic tone_gain(real w, real g, real tol);
    real acc, amp;
    longint ey, em;
    acc = 0.0;
    for (int n = 0; n < N + 800; n++) begin
      push(longint'($rtoi(16384.0 * $cos(w * PI_ * n + 0.1))), ey, em);
      if (n >= N) acc += (real'(y) / 16384.0) ** 2;
    end
    amp = $sqrt(2.0 * acc / 800.0);
    $display("tone %4.2f*pi: gain %f, expected %f", w, amp, g);
    checks++;
    if (amp > g + tol || amp < g - tol) begin
      failures++;
      $display("FAIL: gain at %4.2f*pi", w);
    end
  endtask

  initial begin
    longint ey, em;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // impulse response
    push(32768, ey, em);
    checks++;
    if (y !== samp_t'((taps[0] * 32768 + 8192) >>> 14)) failures++;
    for (int i = 1; i < N + 4; i++) begin
      push(0, ey, em);
      checks++;
      if (i < N && y !== samp_t'((taps[i] * 32768 + 8192) >>> 14)) begin
        failures++;
        $display("FAIL: impulse response tap %0d = %0d", i, y);
      end
    end
    // random stream with gaps: out_valid must stay low in gaps
    for (int n = 0; n < 3000; n++) begin
      int gap;
      gap = $urandom_range(0, 2);
      repeat (gap) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL: out_valid without input");
        end
      end
      push(longint'($signed($urandom_range(0, 65535))) - 32768, ey, em);
    end
    // frequency response at a few frequencies
    tone_gain(0.5, 1.0, 0.005);
    tone_gain(0.3, 1.0, 0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
