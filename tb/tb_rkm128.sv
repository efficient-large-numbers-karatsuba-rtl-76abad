// tb_rkm128: runs all fourteen 128-bit designs A_ij (i: 128-bit organisation,
// j: 64-bit design) side by side. Each computes random and corner-case
// 128-bit products that are compared with the schoolbook reference, and the
// start-to-done latency is compared with the value expected from the rounds
// of each level: leaf 1 cycle, each level ROUNDS*(S+1)+2, where the 128-bit
// level has i rounds, the 64-bit level 1 (j<=3) or 2 (j>=4) and the 32-bit
// level 1 (j=1,4), 2 (j=2,5) or 3 (j=3). A table of the cycle counts is
// printed.
module tb_rkm128;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int ND = 14;
  localparam int unsigned DI [ND] = '{1, 2, 3, 1, 3, 1, 2, 3, 1, 2, 3, 1, 2, 3};
  localparam int unsigned DJ [ND] = '{1, 1, 1, 2, 2, 4, 4, 4, 5, 5, 5, 3, 3, 3};

  function automatic int exp_latency(int unsigned i, int unsigned j);
    int r32, r64, l32, l64;
    r32 = (j == 1 || j == 4) ? 1 : (j == 3) ? 3 : 2;
    r64 = (j <= 3) ? 1 : 2;
    l32 = r32 * (1 + 1) + 2;
    l64 = r64 * (l32 + 1) + 2;
    return int'(i) * (l64 + 1) + 2;
  endfunction

  logic         start [ND];
  logic         busy [ND], done [ND];
  logic [127:0] a [ND], b [ND];
  logic [254:0] p [ND];
  int           lat [ND];

  for (genvar g = 0; g < ND; g++) begin : g_dut
    rkm128 #(.DESIGN_I(DI[g]), .DESIGN_J(DJ[g])) dut (
      .clk, .rst, .start(start[g]), .a(a[g]), .b(b[g]),
      .busy(busy[g]), .done(done[g]), .p(p[g])
    );
  end

  task automatic one(int g, int i);
    logic [254:0] exp;
    int cyc;
    a[g] = pattern(i + g); b[g] = pattern(i * 7 + 2);
    exp = clmul(a[g], b[g], 128);
    start[g] = 1;
    @(posedge clk); #1;
    start[g] = 0;
    a[g] = '0;
    cyc = 1;
    while (!done[g] && cyc < 400) begin
      @(posedge clk); #1;
      cyc++;
    end
    lat[g] = cyc;
    checks++;
    if (p[g] !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL A%0d%0d i=%0d", DI[g], DJ[g], i);
    end
    checks++;
    if (cyc != exp_latency(DI[g], DJ[g])) begin
      failures++;
      if (failures < 10) $display("FAIL A%0d%0d latency %0d", DI[g], DJ[g], cyc);
    end
  endtask

  initial begin
    for (int g = 0; g < ND; g++) begin start[g] = 0; a[g] = '0; b[g] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int g = 0; g < ND; g++)
      for (int i = 0; i < 24; i++) one(g, i);
    for (int g = 0; g < ND; g++)
      $display("design A%0d%0d: %0d cycles per 128-bit product", DI[g], DJ[g], lat[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
