// rkm128: the 128-bit RKM_ij architecture unit.
//
// A 128-bit hybrid Karatsuba-Ofman multiplier over GF(2)[x] in design A_ij:
// DESIGN_I (1..3) selects how the 128-bit level uses its 64-bit units (three
// parallel / two parallel and one sequential / three sequential) and
// DESIGN_J (1..5) the 64-bit design RKM_j, which fixes the organisation of
// the 64-bit and 32-bit levels over 16-bit leaf multipliers (see
// rkm_pkg::design_modes). The fourteen designs evaluated for this family are
// A11..A35 without A22 (15 combinations are accepted). Interface and timing as
// rkm_level: start with a, b; done pulses with the 255-bit product p.
// Default A11, the all-parallel and fastest organisation: 10 cycles.
module rkm128
  import rkm_pkg::*;
#(
  parameter int unsigned DESIGN_I = 1,
  parameter int unsigned DESIGN_J = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic         busy,
  output logic         done,
  output logic [254:0] p
);
  localparam logic [15:0] MODES = design_modes(DESIGN_I, DESIGN_J);

  rkm_level #(.N(128), .BASE(16), .MODES(MODES)) u_level (
    .clk, .rst, .start, .a, .b, .busy, .done, .p
  );

  initial begin
    assert (DESIGN_I >= 1 && DESIGN_I <= 3 && DESIGN_J >= 1 && DESIGN_J <= 5)
      else $error("rkm128: design A%0d%0d does not exist", DESIGN_I, DESIGN_J);
  end

endmodule
