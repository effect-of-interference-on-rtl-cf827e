// tb_dac_model: checks the ideal D/A model at zero, mid and full scale and
// at random codes against code * VPP / 2**VIDEO_W.
module tb_dac_model;
  localparam int VIDEO_W = 7;
  logic [VIDEO_W-1:0] code = '0;
  real vout, exp;
  int checks = 0, failures = 0;

  dac_model #(.VIDEO_W(VIDEO_W), .VPP(1.0)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int c, real e);
    code = VIDEO_W'(c);
    #1;
    checks++;
    if (vout - e > 1e-9 || e - vout > 1e-9) begin
      failures++;
      $display("FAIL code %0d vout %f exp %f", c, vout, e);
    end
  endtask

  initial begin
    check(0, 0.0);
    check(64, 0.5);
    check(127, 127.0 / 128.0);
    for (int i = 0; i < 200; i++) begin
      int c = $urandom_range(0, 127);
      check(c, c / 128.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
