// tb_rkm_base: checks the 16-bit leaf unit: product value, done one cycle
// after start, no done without start, and the result held between starts.
module tb_rkm_base;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, done;
  logic [15:0] a, b;
  logic [30:0] p;

  always #5 clk = ~clk;

  rkm_base dut (.clk, .rst, .start, .a, .b, .done, .p);

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 500; i++) begin
      logic [127:0] x, y;
      logic [30:0]  exp;
      x = pattern(i); y = pattern(i + 3);
      @(posedge clk);
      start <= 1; a <= x[15:0]; b <= y[15:0];
      exp = 31'(clmul(128'(x[15:0]), 128'(y[15:0]), 16));
      @(posedge clk);
      start <= 0; a <= ~a;
      #1;
      checks++;
      if (!done || p !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d done=%b p=%h exp=%h", i, done, p, exp);
      end
      @(posedge clk); #1;
      checks++;
      if (done || p !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
