// tb_kom_xor_net: checks the XOR network of a 64-bit level. The pre-additions
// are compared with the half sums, and the recombination of reference half
// products T1, T2, T3 is compared with the reference full product.
module tb_kom_xor_net;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic [63:0]  a, b;
  logic [31:0]  sa, sb;
  logic [62:0]  t1, t2, t3;
  logic [126:0] p;

  kom_xor_net #(.N(64)) dut (.a, .b, .sa, .sb, .t1, .t2, .t3, .p);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [127:0] x, y;
      x = pattern(i); y = pattern(i * 5 + 4);
      a = x[63:0]; b = y[63:0];
      t1 = 63'(clmul(128'(a[63:32]), 128'(b[63:32]), 32));
      t3 = 63'(clmul(128'(a[31:0]),  128'(b[31:0]),  32));
      t2 = 63'(clmul(128'(a[63:32] ^ a[31:0]), 128'(b[63:32] ^ b[31:0]), 32));
      #1;
      checks++;
      if (sa !== (a[63:32] ^ a[31:0]) || sb !== (b[63:32] ^ b[31:0])) failures++;
      checks++;
      if (255'(p) !== clmul(128'(a), 128'(b), 64)) begin
        failures++;
        if (failures < 10) $display("FAIL combine a=%h b=%h p=%h", a, b, p);
      end
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
