// tb_adm_step_adapter: exhaustive check of the step-size rule for every
// pair of bits and every stored step magnitude, at the default sizes
// (Ymin = 1, Ymax = 16) and counting each case of the rule: the reset to
// 2*Ymin, growth, shrink and the clamp at Ymax.
module tb_adm_step_adapter;
  import adm_ref_pkg::*;

  localparam int YMIN = 1, YMAX = 16, STEP_W = 5;

  logic e_k, e_km1;
  logic [STEP_W-1:0] y_prev, y_mag;
  int checks = 0, failures = 0;
  int n_min = 0, n_grow = 0, n_shrink = 0, n_clamp = 0;

  adm_step_adapter #(.YMIN(YMIN), .YMAX(YMAX), .STEP_W(STEP_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++)
        for (int y = 0; y < (1 << STEP_W); y++) begin
          e_k = 1'(a); e_km1 = 1'(b); y_prev = STEP_W'(y);
          #1;
          exp = ref_step(e_k, e_km1, y, YMIN, YMAX);
          checks++;
          if (int'(y_mag) != exp) begin
            failures++;
            $display("FAIL e=%0d%0d y_prev=%0d got %0d exp %0d", a, b, y, y_mag, exp);
          end
          if (y < 2 * YMIN) n_min++;
          else if (exp == YMAX && y + y / 2 > YMAX && a == b) n_clamp++;
          else if (a == b) n_grow++;
          else n_shrink++;
        end
    // spot values worked by hand: 2 grows to 3, 3 to 4, 16 halves to 8,
    // 3 shrinks to 2, 1 resets to 2, 12 grows to 18 and is clamped to 16
    e_k = 1; e_km1 = 1; y_prev = 2;  #1; checks++; if (y_mag != 3)  failures++;
    e_k = 0; e_km1 = 0; y_prev = 3;  #1; checks++; if (y_mag != 4)  failures++;
    e_k = 1; e_km1 = 0; y_prev = 16; #1; checks++; if (y_mag != 8)  failures++;
    e_k = 0; e_km1 = 1; y_prev = 3;  #1; checks++; if (y_mag != 2)  failures++;
    e_k = 1; e_km1 = 0; y_prev = 1;  #1; checks++; if (y_mag != 2)  failures++;
    e_k = 1; e_km1 = 1; y_prev = 12; #1; checks++; if (y_mag != 16) failures++;
    $display("cases: reset-to-2Ymin=%0d grow=%0d shrink=%0d clamp=%0d", n_min, n_grow, n_shrink, n_clamp);
    checks++;
    if (n_min == 0 || n_grow == 0 || n_shrink == 0 || n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
