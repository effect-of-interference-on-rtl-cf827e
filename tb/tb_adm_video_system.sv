// tb_adm_video_system: end-to-end test of both codecs at the default sizes
// (7-bit video, Ymin 1, Ymax 16, 512-pixel lines), with the channels closed
// in the testbench.
//
// One-dimensional link: eight synthetic television lines of 512 samples
// (sync tip, black, staircase, white bar, ramps, grey) are coded, sent
// through a channel that flips two chosen bits, and decoded. Away from
// the errors the decoder output must equal the encoder's test output one
// sample later and the D/A voltages must agree; after each error the
// decoder must come back into step within one line. Counted mechanisms:
// step growth, step shrink, step reset to 2*Ymin, step clamp at Ymax
// (slope overload), estimate saturation at black and white, a channel error
// and the recovery from it.
//
// Two-dimensional link: three frames of 12 lines of 512 pixels are coded
// and decoded. Frames 0 and 2 must be rebuilt exactly (the receiver output
// one clock after the encoder's reconstruction); frame 1 has one flipped
// delta bit, and frame 2 shows the error does not outlast its frame.
// Counted: horizontal and vertical choices, the forced choices at line and
// frame starts.
module tb_adm_video_system;
  import adm_pkg::*;

  localparam int W = ADM_VIDEO_W, LL = ADM_LINE_LEN, YMAX = ADM_YMAX, YMIN = ADM_YMIN;

  logic clk = 0, rst_n = 0;
  logic s_en = 0;
  logic [W-1:0] s_k = '0;
  logic tx1_bit, tx1_valid, rx1_bit, rx1_valid;
  logic [W-1:0] tx1_test, rx1_video;
  real tx1_test_v, rx1_video_v, rx1_video_filt;
  logic pix_valid = 0, pix_sol = 0, pix_sof = 0;
  logic [W-1:0] pix = '0, tx2_recon, rx2_pix;
  adm2d_sym_t tx2, rx2;
  logic rx2_pix_valid;

  adm_video_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channels ----------------
  bit flip1 = 0, flip2 = 0;
  assign rx1_bit   = tx1_bit ^ flip1;
  assign rx1_valid = tx1_valid;
  always_comb begin
    rx2 = tx2;
    rx2.e = tx2.e ^ flip2;
  end

  function automatic int video1(int n);
    int p = n % LL;
    if (p < 38)  return 0;                          // sync tip
    if (p < 90)  return 28;                         // black level
    if (p < 250) return 28 + ((p - 90) / 32) * 20;  // staircase
    if (p < 300) return 127;                        // white bar
    if (p < 400) return 127 - (p - 300);            // falling ramp
    if (p < 420) return 28 + (p - 400) * 5;         // steep ramp
    return 70;
  endfunction

  function automatic int picture(int f, int r, int c);
    if (r >= 4 && r < 6) return 100;
    if (c > 4 * r + 200 && c < 4 * r + 260) return 20;   // diagonal band
    return ((c / 40) % 2) ? 85 + f : 45;
  endfunction

  // mechanism counters
  int n_grow = 0, n_shrink = 0, n_reset = 0, n_clamp = 0, n_sat_lo = 0, n_sat_hi = 0;
  int n_filt = 0, n_err1 = 0, n_diverged = 0, n_recovered = 0;
  int n_h = 0, n_v = 0, n_forced_v = 0, n_forced_h = 0, n_err2 = 0, n_div2 = 0;

  // step-rule activity seen inside the one-dimensional encoder
  always @(posedge clk) if (rst_n && s_en) begin
    automatic int yp = int'(dut.u_enc1.u_loop.y_q);
    automatic int yk = int'(dut.u_enc1.u_loop.y_mag);
    automatic bit same = (dut.u_enc1.u_loop.e_k == dut.u_enc1.u_loop.e_km1_q);
    if (yp < 2 * YMIN) n_reset++;
    else if (same && yp + yp / 2 > YMAX) n_clamp++;
    else if (same) n_grow++;
    else n_shrink++;
    if (tx1_test == 0) n_sat_lo++;
    if (tx1_test == W'((1 << W) - 1)) n_sat_hi++;
  end

  int prev_test;
  bit in_error;
  int err_at;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---------------- one-dimensional link ----------------
    prev_test = -1;
    in_error = 0;
    for (int n = 0; n < 8 * LL; n++) begin
      @(negedge clk);
      flip1 = (n == 2 * LL + 100) || (n == 5 * LL + 270);
      if (flip1) begin n_err1++; in_error = 1; err_at = n; end
      s_k = W'(video1(n));
      s_en = 1;
      #1;
      if (prev_test >= 0) begin
        if (int'(rx1_video) == prev_test) begin
          if (in_error && n > err_at + 1) begin n_recovered++; in_error = 0;
            $display("1-D link back in step %0d samples after the error", n - err_at); end
          if (!in_error) begin
            checks++;
            if (rx1_video_v != tx1_test_v_prev) failures++;
          end
        end else begin
          if (!in_error) begin
            failures++;
            if (failures < 10) $display("FAIL 1-D n=%0d dec=%0d enc(prev)=%0d", n, rx1_video, prev_test);
          end else if (n == err_at + 2) n_diverged++;
          else if (n - err_at > LL) begin
            failures++; in_error = 0;
            $display("FAIL 1-D no recovery within a line after error at %0d", err_at);
          end
        end
      end
      // the filtered output settles on the grey level at the end of a line
      if (n % LL == LL - 1) begin
        n_filt++;
        checks++;
        if (rx1_video_filt < (70.0 - 3.0) / 128.0 || rx1_video_filt > (70.0 + 3.0) / 128.0) begin
          failures++;
          $display("FAIL filtered output %f at n=%0d", rx1_video_filt, n);
        end
      end
      prev_test = int'(tx1_test);
      tx1_test_v_prev = tx1_test_v;
      @(posedge clk);
    end
    @(negedge clk);
    s_en = 0; flip1 = 0;

    // ---------------- two-dimensional link ----------------
    for (int f = 0; f < 3; f++)
      for (int r = 0; r < 12; r++)
        for (int c = 0; c < LL; c++) begin
          @(negedge clk);
          pix = W'(picture(f, r, c));
          pix_valid = 1;
          pix_sol = (c == 0);
          pix_sof = (c == 0 && r == 0);
          @(posedge clk); #1;
          flip2 = 0;
          // tx2 now holds this pixel's symbol and the receiver output is the
          // previous pixel, rebuilt from the previous symbol
          if (rx2_pix_valid && cur_f != 1) begin
            checks++;
            if (rx2_pix != last_recon) begin
              failures++;
              if (failures < 10) $display("FAIL 2-D f%0d r%0d c%0d rx=%0d tx=%0d", f, r, c, rx2_pix, last_recon);
            end
          end
          if (rx2_pix_valid && cur_f == 1 && rx2_pix != last_recon) n_div2++;
          last_recon = tx2_recon;
          cur_f = f;
          if (tx2.dir == DIR_V) n_v++; else n_h++;
          if (c == 0 && r > 0) begin
            n_forced_v++;
            checks++; if (tx2.dir != DIR_V) failures++;
          end
          if (r == 0) begin
            n_forced_h++;
            checks++; if (tx2.dir != DIR_H) failures++;
          end
          if (f == 1 && r == 3 && c == 300) begin flip2 = 1; n_err2++; end
        end
    @(negedge clk);
    pix_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (rx2_pix != last_recon) failures++;

    $display("1-D step: grow=%0d shrink=%0d reset=%0d clamp=%0d  estimate at black=%0d at white=%0d",
             n_grow, n_shrink, n_reset, n_clamp, n_sat_lo, n_sat_hi);
    $display("1-D channel errors=%0d diverged=%0d recovered=%0d", n_err1, n_diverged, n_recovered);
    $display("2-D horizontal=%0d vertical=%0d forced vertical=%0d forced horizontal=%0d errors=%0d",
             n_h, n_v, n_forced_v, n_forced_h, n_err2);
    $display("2-D pixels wrong in the frame with the error=%0d", n_div2);
    checks++; if (n_grow == 0)      begin failures++; $display("FAIL no step growth"); end
    checks++; if (n_shrink == 0)    begin failures++; $display("FAIL no step shrink"); end
    checks++; if (n_reset == 0)     begin failures++; $display("FAIL no step reset"); end
    checks++; if (n_clamp == 0)     begin failures++; $display("FAIL no slope overload"); end
    checks++; if (n_sat_lo == 0 || n_sat_hi == 0) begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_err1 == 0 || n_diverged == 0) begin failures++; $display("FAIL no channel error seen"); end
    checks++; if (n_recovered != n_err1) begin failures++; $display("FAIL not every error recovered"); end
    checks++; if (n_h == 0 || n_v == 0) begin failures++; $display("FAIL a direction never chosen"); end
    checks++; if (n_forced_v == 0 || n_forced_h == 0) failures++;
    checks++; if (n_err2 == 0 || n_div2 == 0) begin failures++; $display("FAIL 2-D error had no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real tx1_test_v_prev;
  logic [W-1:0] last_recon;
  int cur_f;
endmodule
