// tiadc_calibration: all-digital background calibration of gain and timing
// mismatches for an M-channel time-interleaved ADC whose analog input is a
// band-pass signal in any Nyquist band K.
//
// The multiplexed TIADC output y[n] = x[n] + e[n] carries an error that is a
// sum of modulated copies of the signal (gain) and of its derivative
// (timing). The correction half rebuilds that error as
// c_g^T (m_n y[n]) + c_r^T (m_n x'[n]) and subtracts it; x'[n] comes from the
// band-pass derivative filter (differentiator plus a K-dependent multiple of
// the Hilbert transform), which is what lets the scheme work above the first
// Nyquist band. The estimation half filters the output and the signal vectors
// with the free-band filter f[n] (which removes the signal band, leaving only
// mismatch images) and adapts c_g, c_r by LMS so that the filtered model
// matches the filtered output. Coefficients start at zero after reset and
// the calibration runs in the background, on the normal input signal.
//
// Datapath: y_ch -> channel_mux -> bpd_filter -> correction_unit -> x_hat
//                                                  |-> estimation_unit -> c_g, c_r
// This block structure follows the publication; the word lengths, filter
// lengths, pipeline and the one-sample-per-clock streaming form are this
// design's choices.
//
// Interface: the M sub-ADC samples of one round, y_ch[0..M-1] (channel m
// sampled at (lM+m)Ts), are offered as a frame with a valid/ready handshake
// (frame_valid, frame_ready); channel_mux turns them into the full-rate
// stream y[n], one sample per clock, so a frame can be taken every M clocks.
// Gaps between frames are allowed. nyq_band = K (1..15) is a static setting of the band the
// analog input occupies. adapt_en = 0 freezes the coefficients; coef_clear
// resets them. x_hat is the calibrated sample with out_valid, in the order
// y[n]; eps (with eps_valid) is the LMS error, for monitoring convergence.
// Latency, with frames back to back: the calibrated channel-0 sample of a
// frame leaves (N_DIFF-1)/2 + 5 clocks after the clock edge that takes the
// frame.
module tiadc_calibration
  import tiadc_pkg::*;
#(
  parameter int  M          = 4,
  parameter int  DW         = 12,
  parameter int  N_DIFF     = 31,
  parameter int  N_FB       = 63,
  parameter real FB_W1      = 0.35,
  parameter real FB_W2      = 0.85,
  parameter int  MU_G_SHIFT = 8,
  parameter int  MU_R_SHIFT = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_valid,
  input  logic signed [DW-1:0] y_ch [M],
  output logic                 frame_ready,
  input  logic [3:0]           nyq_band,
  input  logic                 adapt_en,
  input  logic                 coef_clear,
  output logic                 out_valid,
  output logic signed [DW-1:0] x_hat,
  output acoef_t               c_g [M-1],
  output acoef_t               c_r [M-1],
  output samp_t                eps,
  output logic                 eps_valid
);

  localparam int D_BPD = (N_DIFF - 1) / 2;   // sample delay of bpd_filter

  // sub-ADC frames to the full-rate stream y[n]
  logic                 in_valid;
  logic signed [DW-1:0] y_mux;

  channel_mux #(.M(M), .DW(DW)) u_mux (
    .clk, .rst_n, .frame_valid, .y_ch, .frame_ready,
    .out_valid(in_valid), .y(y_mux), .ch()
  );

  // input scaled from Q1.(DW-1) to the internal format
  samp_t y_int;
  assign y_int = samp_t'(y_mux) <<< (F - (DW - 1));

  logic  bpd_valid;
  samp_t x_der, y_al;

  bpd_filter #(.N(N_DIFF)) u_bpd (
    .clk, .rst_n, .in_valid, .y(y_int), .nyq_band,
    .out_valid(bpd_valid), .x_der, .y_al
  );

  tern_t                 m [M-1];

  // modulation_gen counts the same samples as the multiplexer, offset by the
  // sample delay of bpd_filter, so its vector belongs to the sample at the
  // correction stage.
  modulation_gen #(.M(M), .PHASE0((M - (D_BPD % M)) % M)) u_mod (
    .clk, .rst_n, .valid(bpd_valid), .m, .ch()
  );


  logic  est_valid;
  samp_t y_est;
  samp_t x_g [M-1];
  samp_t x_r [M-1];

  correction_unit #(.M(M), .DW(DW)) u_corr (
    .clk, .rst_n, .in_valid(bpd_valid), .y(y_al), .x_der, .m,
    .c_g, .c_r,
    .est_valid, .y_est, .x_g, .x_r,
    .out_valid, .x_hat
  );

  estimation_unit #(
    .M(M), .N(N_FB), .W1(FB_W1), .W2(FB_W2),
    .MU_G_SHIFT(MU_G_SHIFT), .MU_R_SHIFT(MU_R_SHIFT)
  ) u_est (
    .clk, .rst_n, .in_valid(est_valid), .y(y_est), .x_g, .x_r,
    .adapt_en, .clear(coef_clear),
    .c_g, .c_r, .eps, .eps_valid
  );

endmodule
