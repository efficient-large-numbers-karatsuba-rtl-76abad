// tb_rkm_acu: the arithmetic control unit with a real operand RAM and a
// behavioural model of the architecture unit (AU) whose latency D varies.
// The testbench preloads A and B through the other RAM port, pulses go, and
// checks the operands the AU receives, the product words written back to
// RAM, and the go-to-done time of D+5 cycles.
module tb_rkm_acu;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         go = 0, busy, done;
  logic         ram_we, h_we = 0;
  logic [1:0]   ram_addr, h_addr = 0;
  logic [127:0] ram_wdata, ram_rdata, h_wdata = 0, h_rdata;
  logic         au_start, au_done = 0;
  logic [127:0] au_a, au_b;
  logic [254:0] au_p = '0;

  rkm_acu dut (.clk, .rst, .go, .busy, .done, .ram_we, .ram_addr, .ram_wdata,
               .ram_rdata, .au_start, .au_a, .au_b, .au_done, .au_p);

  operand_ram u_ram (.clk, .a_we(h_we), .a_addr(h_addr), .a_wdata(h_wdata), .a_rdata(h_rdata),
                     .b_we(ram_we), .b_addr(ram_addr), .b_wdata(ram_wdata), .b_rdata(ram_rdata));

  // AU model, sampled just after each clock edge: done D cycles after the
  // start cycle, product from the reference, result held.
  int D = 3;
  int au_starts = 0;
  logic [127:0] got_a, got_b;
  initial forever begin
    @(posedge clk); #1;
    if (au_start) begin
      au_starts++;
      got_a = au_a; got_b = au_b;
      repeat (D) @(posedge clk);
      #1 au_done = 1; au_p = clmul(got_a, got_b, 128);
      @(posedge clk); #1 au_done = 0;
    end
  end

  task automatic hwrite(logic [1:0] ad, logic [127:0] d);
    @(posedge clk); #1;
    h_we = 1; h_addr = ad; h_wdata = d;
    @(posedge clk); #1;
    h_we = 0;
  endtask

  task automatic hread(logic [1:0] ad, output logic [127:0] d);
    @(posedge clk); #1;
    h_addr = ad;
    @(posedge clk); #1;
    d = h_rdata;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 60; i++) begin
      logic [127:0] x, y, lo, hi;
      logic [254:0] exp;
      int cyc;
      D = 1 + (i % 9);
      x = pattern(i); y = pattern(i * 3 + 1);
      exp = clmul(x, y, 128);
      hwrite(0, x);
      hwrite(1, y);
      @(posedge clk); #1;
      go = 1;
      @(posedge clk); #1;
      go = 0;
      cyc = 1;
      while (!done && cyc < 100) begin
        @(posedge clk); #1;
        cyc++;
      end
      checks++;
      if (got_a !== x || got_b !== y) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d AU operands", i);
      end
      checks++;
      if (cyc != D + 5) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d go-to-done %0d, expected %0d", i, cyc, D + 5);
      end
      hread(2, lo);
      hread(3, hi);
      checks++;
      if ({hi[126:0], lo} !== exp || hi[127] !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d result words", i);
      end
    end
    checks++;
    if (au_starts != 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
