// adm_decoder: one-dimensional adaptive delta modulator receiver.
//
// The receiver is the encoder's feedback loop (adm_loop) driven by the
// received bits: it rebuilds the same estimate X_k the encoder formed, and
// x_out goes to a D/A converter and low-pass filter to give back composite
// video. Line and field sync pulses travel inside the video, so no word or
// sync timing is needed, only a bit clock (from a bit synchronizer outside
// this block).
//
// Timing: each rising clk edge with bit_valid high takes one bit. When the
// decoder is reset together with an encoder and fed its bit_out/bit_valid,
// x_out equals the encoder's x_test one clock later. A channel error puts
// the two out of step; they fall back into step once the estimate at both
// ends is pinned at a limit (a white or black stretch of the picture) and
// the step registers have run through the same bits.
module adm_decoder #(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN    = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX    = adm_pkg::ADM_YMAX
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bit_in,
  input  logic               bit_valid,
  output logic [VIDEO_W-1:0] x_out
);

  localparam int unsigned STEP_W = $clog2(YMAX + 1);

  logic              e_unused;
  logic [STEP_W-1:0] y_unused;

  adm_loop #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_loop (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (bit_valid),
    .bit_in(bit_in),
    .e_k   (e_unused),
    .x_k   (x_out),
    .y_mag (y_unused)
  );

endmodule
