// adm_update: one delta-modulator step as a combinational block, for the
// two-dimensional codec where the state a pixel starts from is picked per
// pixel (left neighbour or neighbour above) instead of held in one loop.
//
// The state of a reconstructed pixel is (x, y, e): its estimate, the step
// magnitude that produced it and the delta bit that produced it. Given that
// state and the new delta bit e_new it returns the next state:
//   y_new = step rule (e_new, e, y)       (adm_step_adapter)
//   x_new = x +/- y_new, sign of e_new    (adm_estimator)
// which is the same arithmetic adm_loop performs between its registers.
module adm_update #(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN    = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX    = adm_pkg::ADM_YMAX,
  parameter int unsigned STEP_W  = $clog2(YMAX + 1)
) (
  input  logic [VIDEO_W-1:0] x,
  input  logic [STEP_W-1:0]  y,
  input  logic               e,
  input  logic               e_new,
  output logic [VIDEO_W-1:0] x_new,
  output logic [STEP_W-1:0]  y_new
);

  adm_step_adapter #(.YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) u_step (
    .e_k   (e_new),
    .e_km1 (e),
    .y_prev(y),
    .y_mag (y_new)
  );

  adm_estimator #(.VIDEO_W(VIDEO_W), .STEP_W(STEP_W)) u_est (
    .x_prev(x),
    .y_mag (y_new),
    .up    (e_new),
    .x_new (x_new)
  );

endmodule
