// hilbert_filter: the FIR Hilbert transformer h_h[n] of the calibrator, an
// N-tap (odd N, type III) filter approximating H(e^jw) = -j sgn(w), i.e. a
// 90-degree phase shift over the band of the signal. Only odd offsets from the
// centre tap are non-zero. The taps are the ideal response 2/(pi k) for odd k
// under a Hamming window, rounded to CF fractional bits at elaboration; length
// and design method are this design's choice, the publication only names the
// filter. Interface and timing are those of fir_filter: y and the aligned
// input x_mid one clock after the sample, filter delay (N-1)/2 samples.
module hilbert_filter
  import tiadc_pkg::*;
#(
  parameter int N = 31
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
      t[i] = quant_tap(hilbert_ideal(i - (N-1)/2) * hamming(i, N));
    return t;
  endfunction

  localparam taps_t TAPS = design_taps();

  initial assert (N % 2 == 1) else $fatal(1, "hilbert_filter: N must be odd");

  fir_filter #(.N(N), .COEF(TAPS)) u_fir (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y, .x_mid
  );

endmodule
