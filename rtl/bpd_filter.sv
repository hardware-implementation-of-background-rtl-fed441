// bpd_filter: band-pass derivative filter h_bpd[n] (the dashed box of the
// correction half of the calibrator). For a band-pass input folded down from
// Nyquist band K it estimates the derivative of the original analog signal
// from the sampled stream:
//     x'[n] = (h_d * y)[n] + (-1)^K * floor(K/2) * 2*pi * (h_h * y)[n]
// where h_d is the base-band differentiator and h_h the Hilbert transformer.
// For K = 1 the Hilbert branch has weight zero and the filter is the plain
// differentiator. This structure follows the publication; the widths, the
// pipeline and the run-time band input are this design's choice.
//
// Interface: y (internal format) with in_valid; nyq_band = K, 1..15, a static
// setting (changing it while running disturbs the output for a filter
// length). Outputs x_der (derivative in units of 1/sample period) and y_al,
// the input delayed to be aligned with x_der, both with out_valid.
// Timing: two clocks after the sample plus the filters' delay of (N-1)/2
// samples; one sample per clock.
module bpd_filter
  import tiadc_pkg::*;
#(
  parameter int N = 31
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  samp_t      y,
  input  logic [3:0] nyq_band,
  output logic       out_valid,
  output samp_t      x_der,
  output samp_t      y_al
);

  typedef scale_t scale_tab_t [16];

  function automatic scale_tab_t make_scales();
    scale_tab_t t;
    for (int k = 0; k < 16; k++) t[k] = band_scale(k);
    return t;
  endfunction

  localparam scale_tab_t SCALES = make_scales();

  logic  d_valid, h_valid;
  samp_t yd, yh, ymid_d, ymid_h;

  derivative_filter #(.N(N)) u_hd (
    .clk, .rst_n, .in_valid, .x(y),
    .out_valid(d_valid), .y(yd), .x_mid(ymid_d)
  );

  hilbert_filter #(.N(N)) u_hh (
    .clk, .rst_n, .in_valid, .x(y),
    .out_valid(h_valid), .y(yh), .x_mid(ymid_h)
  );

  localparam int PW = W + SW;
  logic signed [PW-1:0] hil_scaled;
  samp_t                sum;

  always_comb begin
    hil_scaled = PW'(yh) * PW'(SCALES[nyq_band]);
    sum        = yd + samp_t'(round_shift(128'(hil_scaled), SF));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_der     <= '0;
      y_al      <= '0;
    end else begin
      out_valid <= d_valid;
      if (d_valid) begin
        x_der <= sum;
        y_al  <= ymid_d;
      end
    end
  end

  // Both filters see the same stream, so they stay in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) d_valid == h_valid);
  assert property (@(posedge clk) disable iff (!rst_n) d_valid |-> ymid_d == ymid_h);

endmodule
