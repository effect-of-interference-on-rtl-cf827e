// tb_line_store: writes whole lines of random words and reads them back a
// line later through the same read-then-write access the codec makes, and
// checks that a read during a write returns the old word.
module tb_line_store;
  localparam int LINE_LEN = 64, WIDTH = 13;
  logic clk = 0, we = 0;
  logic [5:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int shadow [LINE_LEN];

  line_store #(.LINE_LEN(LINE_LEN), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int line = 0; line < 6; line++) begin
      for (int c = 0; c < LINE_LEN; c++) begin
        @(negedge clk);
        addr = 6'(c);
        wdata = WIDTH'($urandom);
        we = 1;
        #1;
        if (line > 0) begin
          checks++;
          if (int'(rdata) != shadow[c]) begin
            failures++;
            if (failures < 10) $display("FAIL line %0d col %0d got %0h exp %0h", line, c, rdata, shadow[c]);
          end
        end
        shadow[c] = int'(wdata);
        @(posedge clk);
      end
    end
    @(negedge clk);
    we = 0;
    for (int c = 0; c < LINE_LEN; c += 7) begin
      addr = 6'(c); #1;
      checks++;
      if (int'(rdata) != shadow[c]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
