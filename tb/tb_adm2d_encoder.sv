// tb_adm2d_encoder: codes two frames of a synthetic picture (vertical bars,
// a horizontal band and a diagonal edge) with gaps between pixels and
// compares, one clock after each pixel, the delta bit, the direction bit,
// the line/frame marks and the reconstructed pixel with the model codec.
// It counts horizontal and vertical choices, and fails if either is missing
// or if the reconstruction drifts far from the picture.
module tb_adm2d_encoder;
  import adm_pkg::*;
  import adm_ref_pkg::*;

  localparam int VIDEO_W = 7, YMIN = 1, YMAX = 16, LINE_LEN = 32, LINES = 24;

  logic clk = 0, rst_n = 0, pix_valid = 0, sol = 0, sof = 0;
  logic [VIDEO_W-1:0] pix = '0, recon;
  adm2d_sym_t tx;
  int checks = 0, failures = 0;

  adm2d_encoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .LINE_LEN(LINE_LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int picture(int r, int c);
    if (r >= 8 && r < 12) return 110;            // horizontal band
    if (c - r > 10) return 20;                   // diagonal edge
    return ((c / 6) % 2) ? 90 : 40;              // vertical bars
  endfunction

  adm2d_model m;
  int n_h = 0, n_v = 0, err_sum = 0, npix = 0;

  initial begin
    bit e, d;
    int x, p;
    m = new(VIDEO_W, YMIN, YMAX, LINE_LEN);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < LINES; r++)
        for (int c = 0; c < LINE_LEN; c++) begin
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            pix_valid = 0;
            @(posedge clk); #1;
            checks++;
            if (tx.valid !== 1'b0) failures++;
          end
          @(negedge clk);
          p = picture(r, c) + (f == 1 ? 3 : 0);
          pix = VIDEO_W'(p);
          pix_valid = 1;
          sol = (c == 0);
          sof = (c == 0 && r == 0);
          x = m.encode(p, sol, sof, e, d);
          @(posedge clk); #1;
          checks++;
          if (!tx.valid || tx.e != e || bit'(tx.dir) != d || tx.sol != sol || tx.sof != sof ||
              int'(recon) != x) begin
            failures++;
            if (failures < 10)
              $display("FAIL f%0d r%0d c%0d: e=%0d/%0d dir=%0d/%0d x=%0d/%0d", f, r, c,
                       tx.e, e, tx.dir, d, recon, x);
          end
          if (d) n_v++; else n_h++;
          err_sum += (x > p) ? x - p : p - x;
          npix++;
          #1 pix_valid = 0;
        end
    $display("horizontal=%0d vertical=%0d mean abs error=%0d/%0d", n_h, n_v, err_sum, npix);
    checks++;
    if (n_h == 0 || n_v == 0) failures++;
    checks++;
    if (err_sum > 8 * npix) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
