// tb_codec_compare_16mbps: the comparison the codecs were built for, both
// links of the top running at the same 16 Mb/s channel rate on the same
// picture, with every parameter at its default.
//
// At 16 Mb/s the one-dimensional codec (one bit per sample) takes 1016
// samples per 63.5 us line, the two-dimensional codec (two bits per pixel)
// 508 pixels. A 16-line picture with smooth shading, vertical and diagonal
// edges and fine horizontal detail is sampled at both rates and coded by
// both links. Checks: each receiver rebuilds exactly what its transmitter
// holds, and each codec's mean absolute error stays within 4 codes (of
// 127). The errors of both codecs are printed for comparison.
module tb_codec_compare_16mbps;
  import adm_pkg::*;

  localparam int W = ADM_VIDEO_W;
  localparam int N1 = 1016, N2 = 508, LINES = 16;

  logic clk = 0, rst_n = 0;
  logic s_en = 0;
  logic [W-1:0] s_k = '0;
  logic tx1_bit, tx1_valid;
  logic [W-1:0] tx1_test, rx1_video;
  real tx1_test_v, rx1_video_v, rx1_video_filt;
  logic pix_valid = 0, pix_sol = 0, pix_sof = 0;
  logic [W-1:0] pix = '0, tx2_recon, rx2_pix;
  adm2d_sym_t tx2;
  logic rx2_pix_valid;

  adm_video_system dut (
    .clk, .rst_n, .s_en, .s_k, .tx1_bit, .tx1_valid, .tx1_test, .tx1_test_v,
    .rx1_bit(tx1_bit), .rx1_valid(tx1_valid), .rx1_video, .rx1_video_v, .rx1_video_filt,
    .pix_valid, .pix, .pix_sol, .pix_sof, .tx2, .tx2_recon,
    .rx2(tx2), .rx2_pix_valid, .rx2_pix
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // picture at horizontal position u in [0,1) of line r
  function automatic int picture(real u, int r);
    real v;
    v = 30.0 + 60.0 * u;                                   // shading
    if (u > 0.30 && u < 0.45) v = 110.0;                   // vertical bar
    if (u > 0.60 + 0.01 * r && u < 0.75 + 0.01 * r) v = 15.0;  // diagonal band
    if (u > 0.85) v = 64.0 + 20.0 * $sin(u * 400.0);       // fine detail
    return int'(v);
  endfunction

  int err1 = 0, err2 = 0, cnt1 = 0, cnt2 = 0, prev_x, prev_s;
  int mism1 = 0, mism2 = 0;
  logic [W-1:0] last_recon;
  int last_pix;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // one-dimensional link, one line after another
    prev_x = -1;
    for (int r = 0; r < LINES; r++)
      for (int i = 0; i < N1; i++) begin
        int s;
        @(negedge clk);
        s = picture((real'(i) + 0.5) / real'(N1), r);
        s_k = W'(s);
        s_en = 1;
        #1;
        if (prev_x >= 0) begin
          checks++;
          if (int'(rx1_video) != prev_x) mism1++;
        end
        // the estimate that answers sample s is formed one sample later
        if (prev_x >= 0 && r > 0) begin
          err1 += (int'(tx1_test) > prev_s) ? int'(tx1_test) - prev_s : prev_s - int'(tx1_test);
          cnt1++;
        end
        prev_x = int'(tx1_test);
        prev_s = s;
        @(posedge clk);
      end
    @(negedge clk);
    s_en = 0;

    // two-dimensional link
    for (int r = 0; r < LINES; r++)
      for (int c = 0; c < N2; c++) begin
        int s;
        @(negedge clk);
        s = picture((real'(c) + 0.5) / real'(N2), r);
        pix = W'(s);
        pix_valid = 1;
        pix_sol = (c == 0);
        pix_sof = (c == 0 && r == 0);
        @(posedge clk); #1;
        if (rx2_pix_valid) begin
          checks++;
          if (rx2_pix != last_recon) mism2++;
        end
        last_recon = tx2_recon;
        if (r > 0) begin
          err2 += (int'(tx2_recon) > s) ? int'(tx2_recon) - s : s - int'(tx2_recon);
          cnt2++;
        end
      end

    $display("1-D: %0d samples/line, mean abs error %0d.%02d codes",
             N1, err1 / cnt1, (100 * err1 / cnt1) % 100);
    $display("2-D: %0d pixels/line,  mean abs error %0d.%02d codes",
             N2, err2 / cnt2, (100 * err2 / cnt2) % 100);
    failures += mism1 + mism2;
    checks++;
    if (err1 > 4 * cnt1) begin failures++; $display("FAIL 1-D error too large"); end
    checks++;
    if (err2 > 4 * cnt2) begin failures++; $display("FAIL 2-D error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
