// derivative_filter: the fixed base-band differentiator h_d[n] of the
// calibrator, an N-tap (odd N) FIR approximating H_d(e^jw) = jw for
// |w| < pi, so that y[n] is the time derivative of x in units of one sample
// period. The taps are the ideal differentiator response (-1)^k/k shaped by a
// Hamming window and rounded to CF fractional bits at elaboration; the
// publication names the filter but gives neither its length nor its design
// method, so both are this design's choice. Interface and timing are those of
// fir_filter: y and the aligned input x_mid one clock after the sample, with
// a filter delay of (N-1)/2 samples.
module derivative_filter
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
      t[i] = quant_tap(diff_ideal(i - (N-1)/2) * hamming(i, N));
    return t;
  endfunction

  localparam taps_t TAPS = design_taps();

  initial assert (N % 2 == 1) else $fatal(1, "derivative_filter: N must be odd");

  fir_filter #(.N(N), .COEF(TAPS)) u_fir (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y, .x_mid
  );

endmodule
