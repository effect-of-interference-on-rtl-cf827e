// adm_estimator: estimate update of the adaptive delta modulator,
// X_k = X_k-1 + Y_k, where the step magnitude |Y_k| is added when the delta
// bit is +1 and subtracted when it is -1.
//
// The estimate is a VIDEO_W-bit code of the video level. The sum saturates
// at 0 and at full scale instead of wrapping; that limit is this design's
// choice (a wrap would turn white into black). No leak factor is applied:
// the estimate register feeds the adder directly.
//
// Purely combinational.
module adm_estimator #(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned STEP_W  = $clog2(adm_pkg::ADM_YMAX + 1)
) (
  input  logic [VIDEO_W-1:0] x_prev,
  input  logic [STEP_W-1:0]  y_mag,
  input  logic               up,      // E_k = +1
  output logic [VIDEO_W-1:0] x_new
);

  localparam int unsigned SW = (VIDEO_W > STEP_W ? VIDEO_W : STEP_W) + 1;
  localparam logic [SW-1:0] FULL = SW'((1 << VIDEO_W) - 1);

  logic [SW-1:0] xe, ye;

  always_comb begin
    xe = SW'(x_prev);
    ye = SW'(y_mag);
    if (up) begin
      if (xe + ye > FULL) x_new = VIDEO_W'(FULL);
      else                x_new = VIDEO_W'(xe + ye);
    end else begin
      if (ye > xe) x_new = '0;
      else         x_new = VIDEO_W'(xe - ye);
    end
  end

endmodule
