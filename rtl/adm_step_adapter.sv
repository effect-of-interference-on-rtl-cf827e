// adm_step_adapter: step-size rule of the adaptive delta modulator.
//
// Given the newest delta bit E_k, the bit before it E_k-1 and the magnitude
// of the previous step |Y_k-1|, it returns |Y_k|:
//   |Y_k-1| <  2*YMIN             -> 2*YMIN
//   E_k == E_k-1                  -> |Y_k-1| + |Y_k-1|/2   (the step grows)
//   E_k != E_k-1                  -> |Y_k-1| - |Y_k-1|/2   (the step shrinks)
// and any result above YMAX is clamped to YMAX. This is Y_k =
// |Y_k-1| (E_k + E_k-1/2) of the source algorithm, computed as one
// adder/subtractor whose add/subtract control is the XOR of the two bits.
// The sign of Y_k is always E_k, so only the magnitude is produced. The half
// step is a right shift (truncating), as an adder fed with Y and Y shifted
// by one place gives; this rounding is this design's choice.
//
// Purely combinational. Bits: 1 = +1, 0 = -1.
module adm_step_adapter #(
  parameter int unsigned YMIN   = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX   = adm_pkg::ADM_YMAX,
  parameter int unsigned STEP_W = $clog2(YMAX + 1)
) (
  input  logic              e_k,
  input  logic              e_km1,
  input  logic [STEP_W-1:0] y_prev,
  output logic [STEP_W-1:0] y_mag
);

  localparam logic [STEP_W:0] TWO_YMIN = (STEP_W + 1)'(2 * YMIN);
  localparam logic [STEP_W:0] Y_MAX    = (STEP_W + 1)'(YMAX);

  logic [STEP_W:0] half;
  logic [STEP_W:0] sum;

  always_comb begin
    half = {1'b0, y_prev} >> 1;
    if (e_k ^ e_km1) sum = {1'b0, y_prev} - half;
    else             sum = {1'b0, y_prev} + half;

    if ({1'b0, y_prev} < TWO_YMIN) y_mag = STEP_W'(TWO_YMIN);
    else if (sum > Y_MAX)          y_mag = STEP_W'(Y_MAX);
    else                           y_mag = sum[STEP_W-1:0];
  end

endmodule
