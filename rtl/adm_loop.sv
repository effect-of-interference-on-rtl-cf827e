// adm_loop: the feedback loop of the adaptive delta modulator, shared by the
// encoder and the decoder (the decoder is nothing but this loop).
//
// Registers, as in the source block diagram:
//   D1    E_k       the newest delta bit, loaded from bit_in
//   D2    E_k-1     the bit before it
//   |D|   |Y_k-1|   the previous step magnitude
//   D     X_k-1     the previous estimate
// Between them the step adapter forms |Y_k| from (E_k, E_k-1, |Y_k-1|) and
// the estimator forms X_k = X_k-1 +/- |Y_k| with the sign of E_k. X_k is
// combinational from the registers and is what the encoder compares the
// next video sample with.
//
// Timing: every rising clk edge with en high is one sample: D1 <= bit_in,
// D2 <= D1, |D| <= |Y_k|, D <= X_k. Reset (asynchronous, active low) clears
// all four registers; that reset state is this design's choice.
module adm_loop #(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN    = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX    = adm_pkg::ADM_YMAX,
  parameter int unsigned STEP_W  = $clog2(YMAX + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               bit_in,   // E_k+1
  output logic               e_k,      // D1
  output logic [VIDEO_W-1:0] x_k,      // estimate X_k
  output logic [STEP_W-1:0]  y_mag     // |Y_k|
);

  logic               e_km1_q;   // D2
  logic [STEP_W-1:0]  y_q;       // |D|
  logic [VIDEO_W-1:0] x_q;       // D

  adm_step_adapter #(.YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_step (
    .e_k   (e_k),
    .e_km1 (e_km1_q),
    .y_prev(y_q),
    .y_mag (y_mag)
  );

  adm_estimator #(.VIDEO_W(VIDEO_W), .STEP_W(STEP_W)) u_est (
    .x_prev(x_q),
    .y_mag (y_mag),
    .up    (e_k),
    .x_new (x_k)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_k     <= 1'b0;
      e_km1_q <= 1'b0;
      y_q     <= '0;
      x_q     <= '0;
    end else if (en) begin
      e_k     <= bit_in;
      e_km1_q <= e_k;
      y_q     <= y_mag;
      x_q     <= x_k;
    end
  end

  // The stored step never leaves the range the step rule allows.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    y_q <= STEP_W'(YMAX));

endmodule
