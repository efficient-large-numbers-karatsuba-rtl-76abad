// rkm_base: leaf RKM unit (the 16-bit RKM of the hybrid designs).
//
// A combinational CKM of width N whose product is captured in a register when
// start is asserted. Timing: start and the operands in cycle t, done pulses
// and p is valid in cycle t+1; p then holds until the next start. Reset
// clears done and p.
module rkm_base #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           done,
  output logic [2*N-2:0] p
);
  logic [2*N-2:0] prod;

  ckm #(.N(N)) u_ckm (.a(a), .b(b), .p(prod));

  always_ff @(posedge clk) begin
    if (rst) begin
      done <= 1'b0;
      p    <= '0;
    end else begin
      done <= start;
      if (start) p <= prod;
    end
  end

endmodule
