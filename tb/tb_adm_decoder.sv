// tb_adm_decoder: two checks of the one-dimensional receiver.
//  1. Random received bits (with gaps in bit_valid): the output must follow
//     a model of the decoder loop sample by sample.
//  2. Bits from a model encoder coding a sine-like test signal: the
//     decoder's output must equal the encoder's estimate one sample later,
//     which is the property that lets the receiver rebuild the picture.
module tb_adm_decoder;
  import adm_ref_pkg::*;

  localparam int VIDEO_W = 7, YMIN = 1, YMAX = 16;

  logic clk = 0, rst_n = 0, bit_in = 0, bit_valid = 0;
  logic [VIDEO_W-1:0] x_out;
  int checks = 0, failures = 0;

  adm_decoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d_e1, d_e2, d_y, d_x, yk, xk;      // decoder model
  int c_e1, c_e2, c_y, c_x, cy, cx, cb;  // encoder model
  int enc_hist;

  task automatic reset_all();
    rst_n = 0; bit_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    d_e1 = 0; d_e2 = 0; d_y = 0; d_x = 0;
    c_e1 = 0; c_e2 = 0; c_y = 0; c_x = 0;
  endtask

  initial begin
    // part 1: random bits against the decoder model
    reset_all();
    for (int i = 0; i < 4000; i++) begin
      yk = ref_step(1'(d_e1), 1'(d_e2), d_y, YMIN, YMAX);
      xk = ref_est(d_x, yk, 1'(d_e1), VIDEO_W);
      checks++;
      if (int'(x_out) != xk) begin
        failures++;
        if (failures < 10) $display("FAIL part1 i=%0d x=%0d exp %0d", i, x_out, xk);
      end
      bit_valid = ($urandom_range(0, 5) != 0);
      bit_in = (i % 100 < 30) ? 1'b1 : 1'($urandom);
      @(posedge clk);
      if (bit_valid) begin d_e2 = d_e1; d_e1 = bit_in; d_y = yk; d_x = xk; end
      @(negedge clk);
    end

    // part 2: encoder model -> decoder, decoder x equals encoder x one sample later
    reset_all();
    enc_hist = 0;
    for (int i = 0; i < 4000; i++) begin
      int s;
      s = 64 + int'(50.0 * $sin(real'(i) * 0.05)) + ((i / 300) % 2) * 10;
      cy = ref_step(1'(c_e1), 1'(c_e2), c_y, YMIN, YMAX);
      cx = ref_est(c_x, cy, 1'(c_e1), VIDEO_W);
      if (i > 0) begin
        checks++;
        if (int'(x_out) != enc_hist) begin
          failures++;
          if (failures < 10) $display("FAIL part2 i=%0d dec=%0d enc(prev)=%0d", i, x_out, enc_hist);
        end
      end
      cb = (s >= cx) ? 1 : 0;
      // the encoder's transmitted bit this sample is its D1 register (c_e1)
      bit_in = 1'(c_e1);
      bit_valid = (i > 0);
      enc_hist = cx;
      @(posedge clk);
      c_e2 = c_e1; c_e1 = cb; c_y = cy; c_x = cx;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
