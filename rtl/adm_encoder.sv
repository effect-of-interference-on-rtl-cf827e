// adm_encoder: one-dimensional adaptive delta modulator encoder for video.
//
// Each sample the video sample S_k is compared with the loop's estimate X_k
// and the sign of the difference is the next delta bit,
//   E_k+1 = sgn(S_k - X_k)          (1 = +1, 0 = -1; S_k == X_k gives +1)
// which is fed into the feedback loop (adm_loop). The bit held in the loop's
// first flip-flop is the transmitted digital output, one bit per sample; no
// word framing is needed. x_test is the estimate, the encoder's local copy
// of what a decoder rebuilds (the front-panel test output).
//
// In the original equipment S is an analog voltage compared with a D/A
// output; here S_k is a VIDEO_W-bit sample and the compare is digital.
//
// Timing: one sample per rising clk edge with en high. bit_out changes on
// that edge; bit_valid goes high with the first real decision after reset
// and stays high, so a decoder fed from bit_out/bit_valid starts in step.
module adm_encoder #(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN    = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX    = adm_pkg::ADM_YMAX
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [VIDEO_W-1:0] s_k,
  output logic               bit_out,
  output logic               bit_valid,
  output logic [VIDEO_W-1:0] x_test
);

  localparam int unsigned STEP_W = $clog2(YMAX + 1);

  logic              e_next;
  logic [STEP_W-1:0] y_unused;

  assign e_next = (s_k >= x_test);

  adm_loop #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_loop (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .bit_in(e_next),
    .e_k   (bit_out),
    .x_k   (x_test),
    .y_mag (y_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  bit_valid <= 1'b0;
    else if (en) bit_valid <= 1'b1;
  end

endmodule
