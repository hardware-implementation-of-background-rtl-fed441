// freeband_filter: the filter f[n] of the estimation half of the calibrator.
// It removes the band occupied by the (folded) input signal, W1*pi..W2*pi
// rad/sample, and keeps the rest of the spectrum, the "free" or mismatch band
// where only mismatch images lie. It is an N-tap (odd N) windowed-sinc
// band-stop FIR: delta[k] minus a band-pass with edges W1 and W2, under a
// Hamming window. A low-pass input (signal band starting at 0) is covered with
// W1 = 0, which turns it into a high-pass. The publication names f[n] but not
// its design; the edges default to a stop band 0.35*pi..0.85*pi, which covers
// its example signal band 0.4*pi..0.8*pi (540 MHz to 1.08 GHz at 2.7 GS/s)
// with margin for the transition bands. Interface and timing are those of
// fir_filter: y one clock after the sample, filter delay (N-1)/2 samples.
module freeband_filter
  import tiadc_pkg::*;
#(
  parameter int N = 63,
  parameter real W1 = 0.35,
  parameter real W2 = 0.85
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  samp_t x,
  output logic  out_valid,
  output samp_t y,
  output samp_t x_mid
);

  typedef tap_t taps_t [N];

  function automatic taps_t design_taps();
    taps_t t;
    for (int i = 0; i < N; i++)
      t[i] = quant_tap(bandstop_ideal(i - (N-1)/2, W1, W2) * hamming(i, N));
    return t;
  endfunction

  localparam taps_t TAPS = design_taps();

  initial assert (N % 2 == 1) else $fatal(1, "freeband_filter: N must be odd");

  fir_filter #(.N(N), .COEF(TAPS)) u_fir (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y, .x_mid
  );

endmodule
