// operand_ram: operand and result memory of the multiplier.
//
// DEPTH words of W bits with two independent ports, each with a write enable
// and a registered (one-cycle) read. Port A serves the host-side state
// machine, port B the arithmetic control unit. The word map used by the
// system is: 0 = A(x), 1 = B(x), 2 = C(x) bits [W-1:0], 3 = C(x) upper bits.
// A read returns the word as it was before a write to the same address in
// the same cycle. The two ports must not write the same word in one cycle.
// The contents are not reset. Two ports and the word map are this design's
// choice; the memory's role (holding the initial operands and the results)
// follows the system description.
module operand_ram #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr))
    else $error("operand_ram: both ports write word %0d", a_addr);

endmodule
