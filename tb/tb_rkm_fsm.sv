// tb_rkm_fsm: the host-side state machine with a real operand RAM and a
// behavioural model of the arithmetic control unit (ACU) on the second RAM
// port. The model reads words 0 and 1, waits K cycles, writes the reference
// product into words 2 and 3 and pulses acu_done. Checks: c_out, a single
// done pulse, the start-to-done time (ACU time + 6 FSM cycles), ignored starts while
// busy, and c_out held after done.
module tb_rkm_fsm;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         start = 0, busy, done, acu_go, acu_done = 0;
  logic [127:0] a_in = 0, b_in = 0;
  logic [254:0] c_out;
  logic         f_we, m_we = 0;
  logic [1:0]   f_addr, m_addr = 0;
  logic [127:0] f_wdata, f_rdata, m_wdata = 0, m_rdata;

  rkm_fsm dut (.clk, .rst, .start, .a_in, .b_in, .busy, .done, .c_out,
               .ram_we(f_we), .ram_addr(f_addr), .ram_wdata(f_wdata), .ram_rdata(f_rdata),
               .acu_go, .acu_done);

  operand_ram u_ram (.clk, .a_we(f_we), .a_addr(f_addr), .a_wdata(f_wdata), .a_rdata(f_rdata),
                     .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata));

  // ACU model, sampled just after each clock edge. acu_done follows acu_go
  // by K+6 cycles: 2 reads, K wait cycles, 2 writes.
  int K = 2;
  int acu_runs = 0;
  initial forever begin
    logic [127:0] ra, rb;
    logic [254:0] pr;
    @(posedge clk); #1;
    if (acu_go) begin
      acu_runs++;
      m_addr = 0;
      @(posedge clk); #1 ra = m_rdata; m_addr = 1;
      @(posedge clk); #1 rb = m_rdata;
      pr = clmul(ra, rb, 128);
      repeat (K) @(posedge clk);
      #1 m_we = 1; m_addr = 2; m_wdata = pr[127:0];
      @(posedge clk); #1 m_addr = 3; m_wdata = {1'b0, pr[254:128]};
      @(posedge clk); #1 m_we = 0; acu_done = 1;
      @(posedge clk); #1 acu_done = 0;
    end
  end

  initial begin
    int ignored = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 40; i++) begin
      logic [127:0] x, y;
      logic [254:0] exp;
      int cyc, dones;
      K = i % 6;
      x = pattern(i + 1); y = pattern(i * 5 + 2);
      exp = clmul(x, y, 128);
      a_in = x; b_in = y; start = 1;
      @(posedge clk); #1;
      start = 0; a_in = '0; b_in = '0;
      cyc = 1; dones = 0;
      while (!done && cyc < 100) begin
        if (cyc == 3) begin
          start = 1; a_in = ~x; b_in = ~y;
          ignored++;
        end
        @(posedge clk); #1;
        start = 0; a_in = '0; b_in = '0;
        cyc++;
      end
      checks++;
      if (c_out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d c_out", i);
      end
      // acu_go in cycle 2, acu_done in cycle K+6, done 4 cycles later.
      checks++;
      if (cyc != K + 10) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d latency %0d expected %0d", i, cyc, K + 10);
      end
      repeat (3) begin
        @(posedge clk); #1;
        if (done) dones++;
      end
      checks++;
      if (dones != 0 || c_out !== exp || busy) failures++;
    end
    checks++;
    if (acu_runs != 40 || ignored != 40) failures++;
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
