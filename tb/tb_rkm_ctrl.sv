// tb_rkm_ctrl: checks the control unit sequences for 1, 2 and 3 rounds with
// a sub-multiplier model of latency S: the cycles of load, of each
// sub_start and its round number, of capture and finish, the total latency
// ROUNDS*(S+1)+2, and that a start while busy is ignored.
module tb_rkm_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int S = 3;

  logic       start [3];
  logic       sub_done [3];
  logic       busy [3], load [3], sub_start [3], capture [3], finish [3], done [3];
  logic [1:0] round [3];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    rkm_ctrl #(.ROUNDS(g + 1)) dut (
      .clk, .rst, .start(start[g]), .sub_done(sub_done[g]), .busy(busy[g]),
      .load(load[g]), .sub_start(sub_start[g]), .round(round[g]),
      .capture(capture[g]), .finish(finish[g]), .done(done[g])
    );
    // Sub-multiplier model: done S cycles after sub_start.
    logic [S-1:0] pipe;
    always_ff @(posedge clk) pipe <= rst ? '0 : {pipe[S-2:0], sub_start[g]};
    assign sub_done[g] = pipe[S-1];
  end

  task automatic run(int g);
    int cyc, starts, caps, fins, loads, t_done;
    int exp_start_cyc;
    cyc = 0; starts = 0; caps = 0; fins = 0; loads = 0; t_done = -1;
    start[g] = 1;
    #1;
    if (load[g]) loads++;
    @(posedge clk); #1;
    start[g] = 0;
    cyc = 1;
    while (cyc < 60 && t_done < 0) begin
      // A second start while busy must be ignored.
      if (cyc == 2) start[g] = 1;
      #1;
      if (load[g]) loads++;
      if (sub_start[g]) begin
        exp_start_cyc = 1 + starts * (S + 1);
        checks++;
        if (cyc != exp_start_cyc || round[g] != 2'(starts)) begin
          failures++;
          $display("FAIL R=%0d sub_start at %0d round %0d", g + 1, cyc, round[g]);
        end
        starts++;
      end
      if (capture[g]) caps++;
      if (finish[g]) fins++;
      if (done[g]) t_done = cyc;
      @(posedge clk); #1;
      start[g] = 0;
      cyc++;
    end
    checks++;
    if (starts != g + 1 || caps != g + 1 || fins != 1 || loads != 1) begin
      failures++;
      $display("FAIL R=%0d starts=%0d caps=%0d fins=%0d loads=%0d", g + 1, starts, caps, fins, loads);
    end
    checks++;
    if (t_done != (g + 1) * (S + 1) + 2) begin
      failures++;
      $display("FAIL R=%0d latency %0d", g + 1, t_done);
    end
    checks++;
    if (busy[g]) failures++;
  endtask

  initial begin
    for (int g = 0; g < 3; g++) start[g] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int rep = 0; rep < 3; rep++)
      for (int g = 0; g < 3; g++) run(g);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
