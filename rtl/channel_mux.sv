// channel_mux: the output multiplexer of an M-channel time-interleaved ADC.
// It takes one frame, the samples y_0[l] .. y_{M-1}[l] that the M sub-ADCs
// produced in one round, and emits them in channel order as the full-rate
// stream y[n], n = lM + m, one sample per clock. This is what the converter's
// output multiplexer does; putting it in the calibrator's input means the
// channel of every sample is known by construction (sample 0 after reset is
// channel 0), which the modulation vector depends on.
//
// Interface: valid/ready handshake on the frame side. A frame is taken on a
// clock where frame_valid and frame_ready are both high; frame_ready is high
// when no frame is being sent or its last sample is being sent, so frames
// can follow each other without a gap (a frame every M clocks). Once
// frame_valid is high it must stay high, with y_ch unchanged, until the frame
// is taken (checked by an assertion). On the stream side out_valid marks y,
// and ch is the channel of y. Channel 0 of a frame appears one clock after
// the clock edge that takes the frame, the others on the following clocks.
// The multiplexing follows the converter model; the handshake and buffering
// are this design's choice.
module channel_mux #(
  parameter int M  = 4,
  parameter int DW = 12
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         frame_valid,
  input  logic signed [DW-1:0]         y_ch [M],
  output logic                         frame_ready,
  output logic                         out_valid,
  output logic signed [DW-1:0]         y,
  output logic [$clog2(M)-1:0]         ch
);

  localparam int CW = $clog2(M);

  logic signed [DW-1:0] buf_q [M];
  logic                 busy;
  logic [CW-1:0]        idx;

  assign frame_ready = !busy || (idx == CW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      idx       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
      ch        <= '0;
      for (int m = 0; m < M; m++) buf_q[m] <= '0;
    end else begin
      // stream side: one buffered sample per clock
      out_valid <= busy;
      if (busy) begin
        y  <= buf_q[idx];
        ch <= idx;
      end
      // frame side: a new frame may be taken while the last sample leaves
      if (frame_valid && frame_ready) begin
        for (int m = 0; m < M; m++) buf_q[m] <= y_ch[m];
        idx  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        idx  <= (idx == CW'(M - 1)) ? '0 : idx + 1'b1;
        busy <= (idx != CW'(M - 1));
      end
    end
  end

  // valid/ready rule: an offered frame stays offered, unchanged, until taken
  logic                 hold_q;
  logic signed [DW-1:0] y_ch_q [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q <= 1'b0;
      for (int m = 0; m < M; m++) y_ch_q[m] <= '0;
    end else begin
      hold_q <= frame_valid && !frame_ready;
      y_ch_q <= y_ch;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && hold_q)
      assert (frame_valid && y_ch == y_ch_q)
        else $error("channel_mux: frame withdrawn or changed before it was taken");
  end

endmodule
