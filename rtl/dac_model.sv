// dac_model: behavioural model of the video D/A converter (not
// synthesizable logic; it stands for an analog part).
//
// An ideal linear converter: vout = code * VPP / 2**VIDEO_W volts, updated
// immediately when the code changes. VPP defaults to the 1 V peak-to-peak of
// composite video at the codec's analog ports. Settling time, glitches and
// the output filter of the real hardware are not modelled.
module dac_model #(
  parameter int unsigned VIDEO_W = adm_pkg::ADM_VIDEO_W,
  parameter real         VPP     = 1.0
) (
  input  logic [VIDEO_W-1:0] code,
  output real                vout
);

  always_comb vout = real'(code) * VPP / real'(2 ** VIDEO_W);

endmodule
