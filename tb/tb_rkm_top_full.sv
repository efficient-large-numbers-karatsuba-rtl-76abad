// tb_rkm_top_full: the multiplier system at its default configuration (A11,
// 128-bit operands) through complete operations from host start to done:
// corner-case and random operands, product compared with the schoolbook
// reference, start-to-done time of 21 cycles checked.
module tb_rkm_top_full;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         start = 0, busy, done;
  logic [127:0] a_in = '0, b_in = '0;
  logic [254:0] c_out;

  rkm_top dut (.clk, .rst, .start, .a_in, .b_in, .busy, .done, .c_out);

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 64; i++) begin
      logic [254:0] exp;
      int cyc;
      a_in = pattern(i); b_in = pattern(i * 3 + 1);
      exp = clmul(a_in, b_in, 128);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin
        @(posedge clk); #1;
        cyc++;
      end
      checks++;
      if (c_out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d: product %h expected %h", i, c_out, exp);
      end
      checks++;
      if (cyc != 21) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d: latency %0d", i, cyc);
      end
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
