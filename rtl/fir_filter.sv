// fir_filter: streaming direct-form FIR filter with constant taps, the common
// datapath of the differentiator, the Hilbert transformer and the free-band
// filters of the calibrator.
//
// Each cycle with in_valid high the new sample x enters an N-deep delay line
// and the register y is loaded with sum_i COEF[i] * x[n-i], rounded from
// F+CF to F fractional bits. x_mid is loaded with x[n-(N-1)/2], the input
// delayed by the group delay of a linear-phase (odd N) filter, so that it is
// time-aligned with y. Timing: y and x_mid appear one clock after the sample
// that completes them, with out_valid high for that one clock; the filter's
// own delay of (N-1)/2 samples comes on top. The delay line starts at zero
// after reset. The internal format (W bits) leaves enough headroom for the
// filters used here, so the result is not saturated. The structure is this
// design's choice: the publication only names the filters.
module fir_filter
  import tiadc_pkg::*;
#(
  parameter int   N = 31,
  parameter tap_t COEF [N] = '{default: '0}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  samp_t x,
  output logic  out_valid,
  output samp_t y,
  output samp_t x_mid
);

  localparam int ACCW = W + CW + $clog2(N) + 1;

  samp_t line [N];   // line[0] = x[n], line[i] = x[n-i]
  samp_t dly  [N-1]; // registered history x[n-1] .. x[n-N+1]

  always_comb begin
    line[0] = x;
    for (int i = 1; i < N; i++) line[i] = dly[i-1];
  end

  logic signed [ACCW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++)
      acc += ACCW'(line[i]) * ACCW'(COEF[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N-1; i++) dly[i] <= '0;
      y         <= '0;
      x_mid     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= x;
        for (int i = 1; i < N-1; i++) dly[i] <= dly[i-1];
        y     <= samp_t'(round_shift(128'(acc), CF));
        x_mid <= line[(N-1)/2];
      end
    end
  end

endmodule
