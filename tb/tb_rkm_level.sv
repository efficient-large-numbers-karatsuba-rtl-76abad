// tb_rkm_level: checks hybrid levels against the schoolbook reference and
// against the latency formula ROUNDS*(S+1)+2 (leaf latency 1):
//   32-bit level in each organisation (4, 6 and 8 cycles),
//   64-bit level (parallel over sequential 32-bit: 11 cycles; two parallel +
//   one sequential over two parallel + one sequential: 16 cycles).
// Operations are issued back to back, and a start while busy is ignored.
module tb_rkm_level;
  import rkm_pkg::*;
  import rkm_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NC = 5;
  localparam int unsigned W   [NC] = '{32, 32, 32, 64, 64};
  localparam logic [15:0] MD  [NC] = '{16'h0000, 16'h0001, 16'h0002, 16'h0008, 16'h0005};
  localparam int          LAT [NC] = '{4, 6, 8, 11, 16};

  logic         start [NC];
  logic         busy [NC], done [NC];
  logic [127:0] a [NC], b [NC];
  logic [254:0] p [NC];

  for (genvar g = 0; g < NC; g++) begin : g_dut
    localparam int unsigned N = W[g];
    logic [2*N-2:0] pp;
    rkm_level #(.N(N), .BASE(16), .MODES(MD[g])) dut (
      .clk, .rst, .start(start[g]), .a(a[g][N-1:0]), .b(b[g][N-1:0]),
      .busy(busy[g]), .done(done[g]), .p(pp)
    );
    assign p[g] = 255'(pp);
  end

  task automatic one(int g, int i);
    logic [254:0] exp;
    int cyc;
    a[g] = pattern(i); b[g] = pattern(i * 3 + 5);
    exp = clmul(a[g], b[g], W[g]);
    start[g] = 1;
    @(posedge clk); #1;
    start[g] = 0;
    cyc = 1;
    a[g] = ~a[g];
    while (!done[g] && cyc < 100) begin
      // Ignored start while busy.
      if (cyc == 2) start[g] = 1;
      @(posedge clk); #1;
      start[g] = 0;
      cyc++;
    end
    checks++;
    if (p[g] !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL cfg %0d i=%0d p=%h exp=%h", g, i, p[g], exp);
    end
    checks++;
    if (cyc != LAT[g]) begin
      failures++;
      if (failures < 10) $display("FAIL cfg %0d latency %0d expected %0d", g, cyc, LAT[g]);
    end
  endtask

  initial begin
    for (int g = 0; g < NC; g++) begin start[g] = 0; a[g] = '0; b[g] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int g = 0; g < NC; g++)
      for (int i = 0; i < 200; i++) one(g, i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
