// tb_operand_ram: writes and reads all words through both ports, checks the
// one-cycle read latency, read-before-write on a same-cycle access, and that
// the ports reach the same storage.
module tb_operand_ram;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         a_we = 0, b_we = 0;
  logic [1:0]   a_addr = 0, b_addr = 0;
  logic [127:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [127:0] model [4];

  operand_ram dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
                   .b_we, .b_addr, .b_wdata, .b_rdata);

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // Fill through port A, read back through port B.
    for (int w = 0; w < 4; w++) begin
      model[w] = rand128();
      @(posedge clk); #1;
      a_we = 1; a_addr = 2'(w); a_wdata = model[w];
    end
    @(posedge clk); #1;
    a_we = 0;
    for (int w = 0; w < 4; w++) begin
      b_addr = 2'(w);
      @(posedge clk); #1;
      chk(b_rdata, model[w], "port B read");
    end
    // Random traffic on both ports.
    for (int i = 0; i < 400; i++) begin
      logic [1:0] wa, wb;
      wa = 2'($urandom); wb = 2'($urandom);
      a_addr = wa; b_addr = wb;
      a_we = ($urandom % 2) == 1;
      b_we = ($urandom % 2) == 1 && !(a_we && wa == wb);
      a_wdata = rand128(); b_wdata = rand128();
      @(posedge clk); #1;
      // Read data is the word before this cycle's write.
      chk(a_rdata, model[wa], "port A read");
      chk(b_rdata, model[wb], "port B read");
      if (a_we) model[wa] = a_wdata;
      if (b_we) model[wb] = b_wdata;
    end
    a_we = 0; b_we = 0;
    for (int w = 0; w < 4; w++) begin
      a_addr = 2'(w);
      @(posedge clk); #1;
      chk(a_rdata, model[w], "final read");
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
