// tb_adm_encoder: feeds synthetic television lines (a sync tip, a blanking
// level, a staircase of grey levels, a ramp and a sharp black/white edge)
// into the one-dimensional encoder. Every sample it compares the output bit
// and the test-output estimate with a model of the encoder, checks that
// bit_valid rises one sample after the first strobe, and at the end of every
// flat stretch checks that the estimate has settled within 2*Ymin of the
// input (granular noise only). It counts slope overload (step at Ymax) and
// the step falling back to 2*Ymin, and fails if either never happened.
module tb_adm_encoder;
  import adm_ref_pkg::*;

  localparam int VIDEO_W = 7, YMIN = 1, YMAX = 16;
  localparam int LINE = 200;

  logic clk = 0, rst_n = 0, en = 0;
  logic [VIDEO_W-1:0] s_k = '0, x_test;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;

  adm_encoder #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int video(int n);
    int p = n % LINE;
    if (p < 15)  return 0;                 // sync tip
    if (p < 60)  return 30;                // blanking / black level
    if (p < 120) return 30 + ((p - 60) / 12) * 18;  // staircase, 5 steps of 12 samples
    if (p < 160) return 127;               // white, sharp edge in
    if (p < 180) return 30 + (p - 160) * 3;          // ramp
    return 64;                             // mid grey
  endfunction

  function automatic bit flat_end(int n);
    int p = n % LINE;
    return (p == 59 || p == 159 || p == 199);
  endfunction

  int m_e1, m_e2, m_y, m_x, y_k, x_k, s, nb;
  int n_overload = 0, n_min = 0, n_settled = 0;

  initial begin
    m_e1 = 0; m_e2 = 0; m_y = 0; m_x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (bit_valid !== 1'b0) failures++;
    for (int n = 0; n < 20 * LINE; n++) begin
      s = video(n);
      s_k = VIDEO_W'(s);
      en = 1;
      y_k = ref_step(1'(m_e1), 1'(m_e2), m_y, YMIN, YMAX);
      x_k = ref_est(m_x, y_k, 1'(m_e1), VIDEO_W);
      checks++;
      if (int'(x_test) != x_k || int'(bit_out) != m_e1) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d x=%0d/%0d bit=%0d/%0d", n, x_test, x_k, bit_out, m_e1);
      end
      if (y_k == YMAX) n_overload++;
      if (y_k == 2 * YMIN && m_y < 2 * YMIN) n_min++;
      if (flat_end(n) && n > LINE) begin
        checks++;
        n_settled++;
        if (x_k - s > 2 * YMIN || s - x_k > 2 * YMIN) begin
          failures++;
          $display("FAIL not settled at n=%0d: s=%0d x=%0d", n, s, x_k);
        end
      end
      nb = (s >= x_k) ? 1 : 0;
      @(posedge clk);
      m_e2 = m_e1; m_e1 = nb; m_y = y_k; m_x = x_k;
      @(negedge clk);
      if (n == 0) begin
        checks++;
        if (bit_valid !== 1'b1) begin failures++; $display("FAIL bit_valid latency"); end
      end
    end
    $display("slope overload samples=%0d step resets=%0d settled flats=%0d", n_overload, n_min, n_settled);
    checks++;
    if (n_overload == 0 || n_min == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
