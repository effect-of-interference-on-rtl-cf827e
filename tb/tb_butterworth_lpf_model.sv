// tb_butterworth_lpf_model: response of the output-filter model at a 16 MHz
// sample rate: a step must settle to unit gain, a 4 MHz sine (four samples a
// period) must come out at -3 dB (amplitude 0.707), 1 MHz must pass nearly
// unchanged and the 8 MHz alternating sequence must be removed.
module tb_butterworth_lpf_model;
  logic clk = 0, en = 0;
  real vin = 0.0, vout;
  int checks = 0, failures = 0;

  butterworth_lpf_model #(.FS_HZ(16.0e6), .FC_HZ(4.0e6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive n samples of a waveform of the given period (samples) and return
  // the output amplitude over the last half of them, sqrt(2 * mean square)
  // (exact for a sine sampled at whole samples per period)
  task automatic run(input int n, input real period, input bit square, output real peak);
    real ss = 0.0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      en = 1;
      if (square) vin = (i % 2) ? -1.0 : 1.0;
      else if (period == 0.0) vin = 1.0;
      else vin = $sin(2.0 * 3.14159265358979 * (real'(i) + 0.5) / period);
      @(posedge clk); #1;
      if (i >= n / 2) ss += vout * vout;
    end
    peak = $sqrt(2.0 * ss / real'(n / 2));
  endtask

  task automatic expect_near(string what, real got, real lo, real hi);
    checks++;
    $display("%s: %f", what, got);
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s outside %f .. %f", what, lo, hi);
    end
  endtask

  initial begin
    real p;
    run(400, 0.0, 0, p);
    expect_near("step, final value", vout, 0.999, 1.001);
    run(400, 4.0, 0, p);
    expect_near("4 MHz amplitude", p, 0.69, 0.72);
    run(400, 16.0, 0, p);
    expect_near("1 MHz amplitude", p, 0.97, 1.01);
    run(400, 0.0, 1, p);
    expect_near("8 MHz amplitude", p, 0.0, 0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
