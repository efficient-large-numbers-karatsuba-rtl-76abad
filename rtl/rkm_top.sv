// rkm_top: 128-bit Karatsuba-Ofman polynomial multiplier system over GF(2).
//
// Computes C(x) = A(x)*B(x) for 128-bit binary polynomials (255-bit result,
// no modular reduction). The host-side FSM loads the operands into the
// operand RAM and, through the arithmetic control unit (ACU), has the
// 128-bit RKM architecture unit (design A_ij, DESIGN_I/DESIGN_J) compute the
// product, which goes back through the RAM to c_out.
// Interface: pulse start with a_in, b_in; done pulses once with c_out valid,
// and c_out holds until the next result. Starts while busy are ignored.
// Latency from start to done: 11 cycles plus the RKM latency (10 cycles for
// the default A11, 21 in all; 49 for A33).
module rkm_top #(
  parameter int unsigned DESIGN_I = 1,
  parameter int unsigned DESIGN_J = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] a_in,
  input  logic [127:0] b_in,
  output logic         busy,
  output logic         done,
  output logic [254:0] c_out
);
  localparam int unsigned N = 128;

  logic           fsm_we, acu_we;
  logic [1:0]     fsm_addr, acu_addr;
  logic [N-1:0]   fsm_wdata, acu_wdata, fsm_rdata, acu_rdata;
  logic           acu_go, acu_done, acu_busy;
  logic           au_start, au_done, au_busy;
  logic [N-1:0]   au_a, au_b;
  logic [2*N-2:0] au_p;

  rkm_fsm #(.N(N)) u_fsm (
    .clk, .rst, .start, .a_in, .b_in, .busy, .done, .c_out,
    .ram_we(fsm_we), .ram_addr(fsm_addr), .ram_wdata(fsm_wdata), .ram_rdata(fsm_rdata),
    .acu_go, .acu_done
  );

  operand_ram #(.W(N), .DEPTH(4)) u_ram (
    .clk,
    .a_we(fsm_we), .a_addr(fsm_addr), .a_wdata(fsm_wdata), .a_rdata(fsm_rdata),
    .b_we(acu_we), .b_addr(acu_addr), .b_wdata(acu_wdata), .b_rdata(acu_rdata)
  );

  rkm_acu #(.N(N)) u_acu (
    .clk, .rst, .go(acu_go), .busy(acu_busy), .done(acu_done),
    .ram_we(acu_we), .ram_addr(acu_addr), .ram_wdata(acu_wdata), .ram_rdata(acu_rdata),
    .au_start, .au_a, .au_b, .au_done, .au_p
  );

  rkm128 #(.DESIGN_I(DESIGN_I), .DESIGN_J(DESIGN_J)) u_au (
    .clk, .rst, .start(au_start), .a(au_a), .b(au_b),
    .busy(au_busy), .done(au_done), .p(au_p)
  );

  // The FSM only hands an operation to an idle ACU.
  assert property (@(posedge clk) disable iff (rst) acu_go |-> !acu_busy)
    else $error("rkm_top: ACU started while busy");

  // The ACU only starts the unit when it is idle.
  assert property (@(posedge clk) disable iff (rst) au_start |-> !au_busy)
    else $error("rkm_top: architecture unit started while busy");

endmodule
