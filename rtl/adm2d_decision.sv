// adm2d_decision: direction decision of the two-dimensional delta modulator.
//
// It compares the pixel to be coded with the estimates of the horizontal
// and the vertical delta modulators and picks the vertical one when its
// estimate is strictly closer (absolute code difference), otherwise the
// horizontal one. Where a neighbour does not exist the choice is forced:
// horizontal on the first line of a frame (v_ok low), vertical at the start
// of every other line (h_ok low). Tie-breaking and the edge rules are this
// design's choices.
//
// Purely combinational.
module adm2d_decision
  import adm_pkg::*;
#(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W
) (
  input  logic [VIDEO_W-1:0] s,
  input  logic [VIDEO_W-1:0] xh,
  input  logic [VIDEO_W-1:0] xv,
  input  logic               h_ok,
  input  logic               v_ok,
  output dir_e               dir
);

  logic [VIDEO_W-1:0] dh, dv;

  always_comb begin
    dh = (s >= xh) ? s - xh : xh - s;
    dv = (s >= xv) ? s - xv : xv - s;
    if (!v_ok)        dir = DIR_H;
    else if (!h_ok)   dir = DIR_V;
    else if (dv < dh) dir = DIR_V;
    else              dir = DIR_H;
  end

endmodule
