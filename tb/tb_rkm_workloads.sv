// tb_rkm_workloads: the operand sizes and organisations evaluated for this
// multiplier family besides the 128-bit designs:
//   - 32-bit level with three parallel and with three sequential 16-bit units
//   - the five 64-bit designs RKM1..RKM5
//   - 256-bit levels, all parallel and fully sequential at the two outer
//     levels, fed 240-bit operands padded with leading zeros (the 240-bit
//     comparison point) and full 256-bit operands (the top of the n range
//     of the area/delay models)
// Products are compared with a schoolbook reference and each latency with
// the value worked out from the rounds of each level (leaf 1 cycle, each
// level ROUNDS*(S+1)+2). The measured cycle counts are printed.
module tb_rkm_workloads;
  import rkm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NC = 9;
  localparam int unsigned W  [NC] = '{32, 32, 64, 64, 64, 64, 64, 256, 256};
  // Level modes, outermost level in bits [1:0].
  localparam logic [15:0] MD [NC] = '{
    16'h0000,                             // 32-bit, three parallel 16-bit
    16'h0002,                             // 32-bit, three sequential 16-bit
    design_modes(1, 1) >> 2, design_modes(1, 2) >> 2, design_modes(1, 3) >> 2,
    design_modes(1, 4) >> 2, design_modes(1, 5) >> 2,
    16'h0000,                             // 256-bit, all parallel
    {design_modes(3, 3)[13:0], 2'd2}      // 256-bit, A33 organisation below a sequential level
  };
  localparam string NAME [NC] = '{"32-bit A1 (parallel)", "32-bit A2 (sequential)",
    "64-bit RKM1", "64-bit RKM2", "64-bit RKM3", "64-bit RKM4", "64-bit RKM5",
    "256-bit all parallel", "256-bit sequential over A33"};

  function automatic int rounds_of(logic [1:0] m);
    return (m == 2'd0) ? 1 : (m == 2'd1) ? 2 : 3;
  endfunction

  // Latency from the level count and the rounds of each level.
  function automatic int exp_latency(int unsigned n, logic [15:0] md);
    int levels, lat;
    levels = $clog2(n / 16);
    lat = 1;
    for (int k = levels - 1; k >= 0; k--)
      lat = rounds_of(md[2*k +: 2]) * (lat + 1) + 2;
    return lat;
  endfunction

  function automatic logic [510:0] clmul256(logic [255:0] a, logic [255:0] b, int unsigned n);
    logic [510:0] r;
    r = '0;
    for (int unsigned i = 0; i < n; i++)
      if (b[i])
        for (int unsigned k = 0; k < n; k++)
          if (a[k]) r[i + k] = ~r[i + k];
    return r;
  endfunction

  function automatic logic [255:0] rnd(int unsigned bits, int unsigned k);
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom();
    if (k % 5 == 0) v = '1;
    if (k % 5 == 1) v = 256'd1 << (bits - 1);
    return v & ((bits == 256) ? '1 : ((256'd1 << bits) - 256'd1));
  endfunction

  logic         start [NC];
  logic         busy [NC], done [NC];
  logic [255:0] a [NC], b [NC];
  logic [510:0] p [NC];

  for (genvar g = 0; g < NC; g++) begin : g_dut
    localparam int unsigned N = W[g];
    logic [2*N-2:0] pp;
    rkm_level #(.N(N), .BASE(16), .MODES(MD[g])) dut (
      .clk, .rst, .start(start[g]), .a(a[g][N-1:0]), .b(b[g][N-1:0]),
      .busy(busy[g]), .done(done[g]), .p(pp)
    );
    assign p[g] = 511'(pp);
  end

  task automatic one(int g, int unsigned bits, int k);
    logic [510:0] exp;
    int cyc;
    a[g] = rnd(bits, k); b[g] = rnd(bits, k + 2);
    exp = clmul256(a[g], b[g], bits);
    start[g] = 1;
    @(posedge clk); #1;
    start[g] = 0;
    cyc = 1;
    while (!done[g] && cyc < 400) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (p[g] !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s (%0d-bit operands) product", NAME[g], bits);
    end
    checks++;
    if (cyc != exp_latency(W[g], MD[g])) begin
      failures++;
      if (failures < 10) $display("FAIL %s latency %0d expected %0d", NAME[g], cyc, exp_latency(W[g], MD[g]));
    end
    if (k == 0) $display("%s, %0d-bit operands: %0d cycles", NAME[g], bits, cyc);
  endtask

  initial begin
    for (int g = 0; g < NC; g++) begin start[g] = 0; a[g] = '0; b[g] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int g = 0; g < NC; g++)
      for (int k = 0; k < 12; k++) begin
        if (W[g] == 256) begin
          one(g, 240, k);
          one(g, 256, k);
        end else one(g, W[g], k);
      end
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
