// adm_video_system: the delta-modulation video codecs side by side.
//
//  * One-dimensional link: adm_encoder turns one video sample per clock into
//    one bit; adm_decoder turns received bits back into the estimate. The
//    encoder's estimate and the decoder's output each drive a D/A model
//    (test output and video output); the decoder's analog output then
//    passes a model of the 4 MHz four-pole Butterworth output filter.
//  * Two-dimensional link: adm2d_encoder sends two bits per pixel (delta and
//    direction) and adm2d_decoder rebuilds the pixels.
//
// The channel of each link is left outside, as the cable between the two
// boxes of a test set-up: the encoder's output and the decoder's input are
// separate ports, so a channel that adds bit errors (interference) can be
// put between them. All logic runs on one clock here; the sample and pixel
// strobes set the rates.
module adm_video_system
  import adm_pkg::*;
#(
  parameter int unsigned VIDEO_W  = adm_pkg::ADM_VIDEO_W,
  parameter int unsigned YMIN     = adm_pkg::ADM_YMIN,
  parameter int unsigned YMAX     = adm_pkg::ADM_YMAX,
  parameter int unsigned LINE_LEN = adm_pkg::ADM_LINE_LEN,
  parameter real         FS_HZ    = 16.0e6   // 1-D bit rate, for the filter model
) (
  input  logic               clk,
  input  logic               rst_n,
  // one-dimensional transmitter
  input  logic               s_en,
  input  logic [VIDEO_W-1:0] s_k,
  output logic               tx1_bit,
  output logic               tx1_valid,
  output logic [VIDEO_W-1:0] tx1_test,
  output real                tx1_test_v,
  // one-dimensional receiver
  input  logic               rx1_bit,
  input  logic               rx1_valid,
  output logic [VIDEO_W-1:0] rx1_video,
  output real                rx1_video_v,
  output real                rx1_video_filt,
  // two-dimensional transmitter
  input  logic               pix_valid,
  input  logic [VIDEO_W-1:0] pix,
  input  logic               pix_sol,
  input  logic               pix_sof,
  output adm2d_sym_t         tx2,
  output logic [VIDEO_W-1:0] tx2_recon,
  // two-dimensional receiver
  input  adm2d_sym_t         rx2,
  output logic               rx2_pix_valid,
  output logic [VIDEO_W-1:0] rx2_pix
);

  adm_encoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX)) u_enc1 (
    .clk(clk), .rst_n(rst_n), .en(s_en), .s_k(s_k),
    .bit_out(tx1_bit), .bit_valid(tx1_valid), .x_test(tx1_test)
  );

  dac_model #(.VIDEO_W(VIDEO_W)) u_dac_test (.code(tx1_test), .vout(tx1_test_v));

  adm_decoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX)) u_dec1 (
    .clk(clk), .rst_n(rst_n), .bit_in(rx1_bit), .bit_valid(rx1_valid), .x_out(rx1_video)
  );

  dac_model #(.VIDEO_W(VIDEO_W)) u_dac_out (.code(rx1_video), .vout(rx1_video_v));

  butterworth_lpf_model #(.FS_HZ(FS_HZ), .FC_HZ(4.0e6)) u_filt (
    .clk(clk), .en(rx1_valid), .vin(rx1_video_v), .vout(rx1_video_filt)
  );

  adm2d_encoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .LINE_LEN(LINE_LEN)) u_enc2 (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix), .sol(pix_sol), .sof(pix_sof),
    .tx(tx2), .recon(tx2_recon)
  );

  adm2d_decoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .LINE_LEN(LINE_LEN)) u_dec2 (
    .clk(clk), .rst_n(rst_n), .rx(rx2), .pix_valid(rx2_pix_valid), .pix(rx2_pix)
  );

endmodule
