// tb_adm_loop: drives the feedback loop with random bits and a random
// sample enable and compares E_k, |Y_k| and X_k every cycle with a model of
// the four loop registers. Also checks that a held enable freezes the loop.
module tb_adm_loop;
  import adm_ref_pkg::*;

  localparam int VIDEO_W = 7, YMIN = 1, YMAX = 16, STEP_W = 5;

  logic clk = 0, rst_n = 0, en = 0, bit_in = 0;
  logic e_k;
  logic [VIDEO_W-1:0] x_k;
  logic [STEP_W-1:0]  y_mag;
  int checks = 0, failures = 0;

  adm_loop #(.VIDEO_W(VIDEO_W), .YMIN(YMIN), .YMAX(YMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model registers
  int m_e1, m_e2, m_y, m_x, exp_y, exp_x;
  int n_hold = 0;

  initial begin
    m_e1 = 0; m_e2 = 0; m_y = 0; m_x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      exp_y = ref_step(1'(m_e1), 1'(m_e2), m_y, YMIN, YMAX);
      exp_x = ref_est(m_x, exp_y, 1'(m_e1), VIDEO_W);
      checks++;
      if (int'(e_k) != m_e1 || int'(y_mag) != exp_y || int'(x_k) != exp_x) begin
        failures++;
        if (failures < 10)
          $display("FAIL cyc %0d: e=%0d/%0d y=%0d/%0d x=%0d/%0d", i, e_k, m_e1, y_mag, exp_y, x_k, exp_x);
      end
      // runs of equal bits so that the step reaches Ymax and the estimate its limits
      en = ($urandom_range(0, 7) != 0);
      if (i % 200 < 40)       bit_in = 1;
      else if (i % 200 < 80)  bit_in = 0;
      else                    bit_in = 1'($urandom);
      @(posedge clk);
      if (en) begin
        m_e2 = m_e1; m_e1 = bit_in; m_y = exp_y; m_x = exp_x;
      end else n_hold++;
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
