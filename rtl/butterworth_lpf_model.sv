// butterworth_lpf_model: behavioural model of the receiver's video output
// filter, a four-pole Butterworth low-pass with a 4 MHz corner (an analog
// part; this model is not synthesizable logic).
//
// The filter is modelled in discrete time at the codec's sample rate: two
// cascaded second-order sections (pole quality factors 0.5412 and 1.3066,
// the fourth-order Butterworth pair), each mapped from the analog prototype
// by the bilinear transform with the corner pre-warped, so the response is
// -3 dB at FC_HZ and has unit gain at DC. One output sample per rising clk
// edge with en high; vout is registered. The sample rate FS_HZ is a
// parameter because the codec clock is chosen by the user (16 MHz default).
module butterworth_lpf_model #(
  parameter real FS_HZ = 16.0e6,
  parameter real FC_HZ = 4.0e6
) (
  input  logic clk,
  input  logic en,
  input  real  vin,
  output real  vout
);

  localparam real PI = 3.14159265358979;
  localparam real Q1 = 0.54119610;
  localparam real Q2 = 1.30656296;

  // pre-warped analog corner, normalised: k = tan(pi * fc / fs)
  real k;
  real b0 [2], b1 [2], b2 [2], a1 [2], a2 [2];
  real z1 [2] = '{0.0, 0.0};
  real z2 [2] = '{0.0, 0.0};
  real mid, y;

  function automatic void design_section(input real q, output real nb0, output real nb1,
                                         output real nb2, output real na1, output real na2);
    real norm;
    norm = 1.0 / (1.0 + k / q + k * k);
    nb0 = k * k * norm;
    nb1 = 2.0 * nb0;
    nb2 = nb0;
    na1 = 2.0 * (k * k - 1.0) * norm;
    na2 = (1.0 - k / q + k * k) * norm;
  endfunction

  initial begin
    k = $tan(PI * FC_HZ / FS_HZ);
    design_section(Q1, b0[0], b1[0], b2[0], a1[0], a2[0]);
    design_section(Q2, b0[1], b1[1], b2[1], a1[1], a2[1]);
  end

  // transposed direct form II, one section after the other
  real n1_0, n2_0, n1_1, n2_1;

  always_comb begin
    mid  = b0[0] * vin + z1[0];
    n1_0 = b1[0] * vin - a1[0] * mid + z2[0];
    n2_0 = b2[0] * vin - a2[0] * mid;
    y    = b0[1] * mid + z1[1];
    n1_1 = b1[1] * mid - a1[1] * y + z2[1];
    n2_1 = b2[1] * mid - a2[1] * y;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      z1[0] <= n1_0;
      z2[0] <= n2_0;
      z1[1] <= n1_1;
      z2[1] <= n2_1;
      vout  <= y;
    end
  end

endmodule
