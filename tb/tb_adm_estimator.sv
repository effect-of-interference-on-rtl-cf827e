// tb_adm_estimator: exhaustive check of X_k = X_k-1 +/- |Y_k| with the
// limits at 0 and full scale, for a 7-bit estimate and 5-bit step.
module tb_adm_estimator;
  import adm_ref_pkg::*;

  localparam int VIDEO_W = 7, STEP_W = 5;

  logic [VIDEO_W-1:0] x_prev, x_new;
  logic [STEP_W-1:0]  y_mag;
  logic               up;
  int checks = 0, failures = 0, n_top = 0, n_bottom = 0;

  adm_estimator #(.VIDEO_W(VIDEO_W), .STEP_W(STEP_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int x = 0; x < (1 << VIDEO_W); x++)
      for (int y = 0; y < (1 << STEP_W); y++)
        for (int u = 0; u < 2; u++) begin
          x_prev = VIDEO_W'(x); y_mag = STEP_W'(y); up = 1'(u);
          #1;
          exp = ref_est(x, y, up, VIDEO_W);
          checks++;
          if (int'(x_new) != exp) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d y=%0d up=%0d got %0d exp %0d", x, y, u, x_new, exp);
          end
          if (u == 1 && x + y > 127) n_top++;
          if (u == 0 && x - y < 0) n_bottom++;
        end
    x_prev = 120; y_mag = 16; up = 1; #1; checks++; if (x_new != 127) failures++;
    x_prev = 5;   y_mag = 9;  up = 0; #1; checks++; if (x_new != 0)   failures++;
    x_prev = 60;  y_mag = 13; up = 0; #1; checks++; if (x_new != 47)  failures++;
    $display("saturations: top=%0d bottom=%0d", n_top, n_bottom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
