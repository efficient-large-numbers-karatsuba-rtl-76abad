// tb_ckm: checks the combinational Karatsuba multiplier at widths 1, 2, 4, 16
// and 32 against the schoolbook reference, with random and corner operands.
module tb_ckm;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;

  logic [0:0]  a1, b1;  logic [0:0]  p1;
  logic [1:0]  a2, b2;  logic [2:0]  p2;
  logic [3:0]  a4, b4;  logic [6:0]  p4;
  logic [15:0] a16, b16; logic [30:0] p16;
  logic [31:0] a32, b32; logic [62:0] p32;

  ckm #(.N(1))  u1  (.a(a1),  .b(b1),  .p(p1));
  ckm #(.N(2))  u2  (.a(a2),  .b(b2),  .p(p2));
  ckm #(.N(4))  u4  (.a(a4),  .b(b4),  .p(p4));
  ckm           u16 (.a(a16), .b(b16), .p(p16));
  ckm #(.N(32)) u32 (.a(a32), .b(b32), .p(p32));

  task automatic check(string what, logic [254:0] got, logic [254:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // Exhaustive at 1, 2 and 4 bits.
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      a2 = a4[1:0]; b2 = b4[1:0]; a1 = a4[0]; b1 = b4[0];
      #1;
      check("ckm4", 255'(p4), clmul(128'(a4), 128'(b4), 4));
      if (i < 16) check("ckm2", 255'(p2), clmul(128'(a2), 128'(b2), 2));
      if (i < 4)  check("ckm1", 255'(p1), clmul(128'(a1), 128'(b1), 1));
    end
    for (int i = 0; i < 2000; i++) begin
      logic [127:0] x, y;
      x = pattern(i); y = pattern(i / 8 + 3);
      a16 = x[15:0]; b16 = y[15:0]; a32 = x[31:0]; b32 = y[31:0];
      #1;
      check("ckm16", 255'(p16), clmul(128'(a16), 128'(b16), 16));
      check("ckm32", 255'(p32), clmul(128'(a32), 128'(b32), 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
