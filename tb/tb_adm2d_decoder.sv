// tb_adm2d_decoder: a model encoder codes two frames of a synthetic
// picture; its symbols are fed, with gaps, to the receiver, whose output
// pixel one clock later must equal the encoder's reconstruction.
module tb_adm2d_decoder;
  import adm_pkg::*;
  import adm_ref_pkg::*;

  localparam int VIDEO_W = 7, YMIN = 1, YMAX = 16, LINE_LEN = 32, LINES = 20;

  logic clk = 0, rst_n = 0;
  adm2d_sym_t rx = '0;
  logic pix_valid;
  logic [VIDEO_W-1:0] pix;
  int checks = 0, failures = 0;

  adm2d_decoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX), .LINE_LEN(LINE_LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int picture(int f, int r, int c);
    if ((r + c) % 16 < 4) return 100 - f * 5;
    if (r > 12) return 15 + c * 3;
    return (c < 10) ? 60 : 35;
  endfunction

  adm2d_model m;
  int n_v = 0, n_h = 0;

  initial begin
    bit e, d;
    int x;
    m = new(VIDEO_W, YMIN, YMAX, LINE_LEN);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < LINES; r++)
        for (int c = 0; c < LINE_LEN; c++) begin
          if ($urandom_range(0, 4) == 0) begin
            @(negedge clk);
            rx.valid = 0;
            @(posedge clk); #1;
            checks++;
            if (pix_valid !== 1'b0) failures++;
          end
          @(negedge clk);
          x = m.encode(picture(f, r, c), (c == 0), (c == 0 && r == 0), e, d);
          rx.valid = 1; rx.e = e; rx.dir = d ? DIR_V : DIR_H;
          rx.sol = (c == 0); rx.sof = (c == 0 && r == 0);
          if (d) n_v++; else n_h++;
          @(posedge clk); #1;
          checks++;
          if (!pix_valid || int'(pix) != x) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d r%0d c%0d got %0d exp %0d", f, r, c, pix, x);
          end
          #1 rx.valid = 0;
        end
    $display("horizontal=%0d vertical=%0d", n_h, n_v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
