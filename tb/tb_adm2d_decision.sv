// tb_adm2d_decision: random and corner cases of the direction decision,
// against the rule "vertical when strictly closer, horizontal on the first
// line, vertical at the start of a line".
module tb_adm2d_decision;
  import adm_pkg::*;
  localparam int VIDEO_W = 7;
  logic [VIDEO_W-1:0] s, xh, xv;
  logic h_ok, v_ok;
  dir_e dir;
  int checks = 0, failures = 0, n_v = 0, n_h = 0;

  adm2d_decision #(.VIDEO_W(VIDEO_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int a, int b, int c, bit hk, bit vk);
    int dh, dv;
    bit exp;
    s = VIDEO_W'(a); xh = VIDEO_W'(b); xv = VIDEO_W'(c); h_ok = hk; v_ok = vk;
    #1;
    dh = a > b ? a - b : b - a;
    dv = a > c ? a - c : c - a;
    exp = !vk ? 1'b0 : (!hk ? 1'b1 : (dv < dh));
    checks++;
    if (bit'(dir) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL s=%0d xh=%0d xv=%0d h_ok=%0d v_ok=%0d dir=%0d", a, b, c, hk, vk, dir);
    end
    if (dir == DIR_V) n_v++; else n_h++;
  endtask

  initial begin
    check(50, 40, 55, 1, 1);   // vertical closer
    check(50, 52, 40, 1, 1);   // horizontal closer
    check(50, 45, 55, 1, 1);   // tie -> horizontal
    check(50, 50, 10, 0, 1);   // start of line -> vertical
    check(50, 10, 50, 1, 0);   // first line -> horizontal
    check(0, 127, 1, 1, 1);
    check(127, 0, 126, 1, 1);
    for (int i = 0; i < 20000; i++)
      check($urandom_range(0, 127), $urandom_range(0, 127), $urandom_range(0, 127),
            ($urandom_range(0, 9) != 0), ($urandom_range(0, 9) != 0));
    $display("vertical=%0d horizontal=%0d", n_v, n_h);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
