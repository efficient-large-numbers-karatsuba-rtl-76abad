// tb_rkm_top: end-to-end test of the multiplier system in three
// organisations side by side: the default A11 (all parallel), A25 (two
// parallel + one sequential 64-bit units over RKM5) and A33 (three
// sequential 64-bit units over RKM3). Each computes back-to-back 128-bit
// products from host start to done, compared with the schoolbook reference,
// with the start-to-done time checked against 11 cycles of FSM/ACU/RAM
// overhead plus the RKM latency. Mechanisms counted (a failure is counted
// for any that never happens): a fully parallel round, a round in which a
// shared unit computes the third product after two parallel ones, a third
// sequential round on a single unit, an ignored start while busy, and the
// RAM write-back of both result words.
module tb_rkm_top;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NI = 3;
  localparam int LAT [NI] = '{10 + 11, 36 + 11, 38 + 11};

  logic         start [NI];
  logic [127:0] a_in [NI], b_in [NI];
  logic         busy [NI], done [NI];
  logic [254:0] c_out [NI];

  rkm_top dut11 (.clk, .rst, .start(start[0]), .a_in(a_in[0]), .b_in(b_in[0]),
                 .busy(busy[0]), .done(done[0]), .c_out(c_out[0]));
  rkm_top #(.DESIGN_I(2), .DESIGN_J(5)) dut25 (
                 .clk, .rst, .start(start[1]), .a_in(a_in[1]), .b_in(b_in[1]),
                 .busy(busy[1]), .done(done[1]), .c_out(c_out[1]));
  rkm_top #(.DESIGN_I(3), .DESIGN_J(3)) dut33 (
                 .clk, .rst, .start(start[2]), .a_in(a_in[2]), .b_in(b_in[2]),
                 .busy(busy[2]), .done(done[2]), .c_out(c_out[2]));

  // Mechanism counters, from the 128-bit level control units.
  int n_par3 = 0, n_seq_after_par = 0, n_third_seq = 0, n_ignored = 0, n_writeback = 0;
  always @(posedge clk) begin
    if (dut11.u_au.u_level.u_ctrl.sub_start) n_par3++;
    if (dut25.u_au.u_level.u_ctrl.sub_start && dut25.u_au.u_level.u_ctrl.round == 2'd1)
      n_seq_after_par++;
    if (dut33.u_au.u_level.u_ctrl.sub_start && dut33.u_au.u_level.u_ctrl.round == 2'd2)
      n_third_seq++;
    if (dut33.u_acu.ram_we && dut33.u_acu.ram_addr == 2'd3) n_writeback++;
  end

  task automatic run(int g, int i);
    logic [127:0] x, y;
    logic [254:0] exp;
    int cyc;
    x = pattern(i * 3 + g); y = pattern(i * 11 + 6);
    exp = clmul(x, y, 128);
    a_in[g] = x; b_in[g] = y; start[g] = 1;
    @(posedge clk); #1;
    start[g] = 0;
    cyc = 1;
    while (!done[g] && cyc < 200) begin
      if (cyc == 5) begin
        start[g] = 1; a_in[g] = ~x; b_in[g] = y;
        n_ignored++;
      end
      @(posedge clk); #1;
      start[g] = 0; a_in[g] = '0; b_in[g] = '0;
      cyc++;
    end
    checks++;
    if (c_out[g] !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL inst %0d op %0d: wrong product", g, i);
    end
    checks++;
    if (cyc != LAT[g]) begin
      failures++;
      if (failures < 10) $display("FAIL inst %0d op %0d: latency %0d expected %0d", g, i, cyc, LAT[g]);
    end
  endtask

  initial begin
    for (int g = 0; g < NI; g++) begin start[g] = 0; a_in[g] = '0; b_in[g] = '0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 40; i++)
      for (int g = 0; g < NI; g++) run(g, i);
    $display("mechanisms: parallel rounds %0d, sequential third product %0d, third sequential round %0d, ignored starts %0d, result write-backs %0d",
             n_par3, n_seq_after_par, n_third_seq, n_ignored, n_writeback);
    checks += 5;
    if (n_par3 == 0) failures++;
    if (n_seq_after_par == 0) failures++;
    if (n_third_seq == 0) failures++;
    if (n_ignored == 0) failures++;
    if (n_writeback == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
