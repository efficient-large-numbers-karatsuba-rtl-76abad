// rkm_level: one hybrid recursive Karatsuba-Ofman multiplier level (RKM).
//
// Multiplies two N-bit polynomials over GF(2) into a 2N-1 bit product. The
// operands are latched, split into halves by the XOR network, and the three
// half-width products T1 = A1*B1, T2 = (A1+A0)*(B1+B0), T3 = A0*B0 are
// obtained from N/2-bit sub-multipliers in the organisation given by
// MODES[1:0] (see rkm_pkg):
//   RKM_PAR3       units 0,1,2 compute T1,T2,T3 in one round
//   RKM_PAR2_SEQ1  round 1: unit 0 -> T1, unit 1 -> T3;
//                  round 2: unit 1 (through the operand mux) -> T2
//   RKM_SEQ3       unit 0 computes T1, T3, T2 in rounds 1, 2, 3
// The products are held in registers and recombined by the XOR network into
// the output register. Sub-multipliers are rkm_base leaves when N/2 equals
// BASE, otherwise rkm_level instances of width N/2 driven by MODES >> 2, so a
// single instance describes the whole 128/64/32/16-bit hierarchy.
//
// Interface: start with a, b in the same cycle (ignored while busy); done
// pulses for one cycle with p valid, and p holds until the next result.
// Latency: ROUNDS*(S+1)+2 cycles, S being the sub-multiplier latency and the
// leaf latency 1. The order in which a shared unit computes the products and
// the cycle schedule are this design's own choice.
// Lint note: Verilator's -Wall lint of this self-instantiating module reports
// the sub-unit result nets (u_done, u_busy, u_p) as undriven and the unit
// operands as unused, because it checks the recursive body apart from its
// instances. They are driven by the g_sub instances, as simulation shows.
module rkm_level
  import rkm_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter int unsigned BASE  = 16,
  parameter logic [15:0] MODES = 16'h0000
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-2:0] p
);
  localparam int unsigned H      = N / 2;
  localparam logic [1:0]  MODE   = MODES[1:0];
  localparam int unsigned NU     = mode_units(MODE);
  localparam int unsigned ROUNDS = mode_rounds(MODE);

  // Product selector of a unit in a round: which of T1/T2/T3 it computes.
  typedef enum logic [1:0] {SEL_T1, SEL_T2, SEL_T3, SEL_NONE} sel_e;

  function automatic sel_e unit_sel(int unsigned u, logic [1:0] r);
    case (MODE)
      RKM_PAR3:      return (r != 0) ? SEL_NONE :
                            (u == 0) ? SEL_T1 : (u == 1) ? SEL_T2 : SEL_T3;
      RKM_PAR2_SEQ1: if (r == 0) return (u == 0) ? SEL_T1 : SEL_T3;
                     else if (r == 1 && u == 1) return SEL_T2;
                     else return SEL_NONE;
      default:       return (r == 0) ? SEL_T1 : (r == 1) ? SEL_T3 :
                            (r == 2) ? SEL_T2 : SEL_NONE;
    endcase
  endfunction

  logic           load, sub_start, capture, finish, sub_done;
  logic [1:0]     round;
  logic [N-1:0]   ra, rb;
  logic [H-1:0]   sa, sb;
  logic [N-2:0]   t1, t2, t3;
  logic [2*N-2:0] p_comb;

  rkm_ctrl #(.ROUNDS(ROUNDS)) u_ctrl (
    .clk, .rst, .start, .sub_done, .busy, .load, .sub_start, .round,
    .capture, .finish, .done
  );

  kom_xor_net #(.N(N)) u_xor (
    .a(ra), .b(rb), .sa(sa), .sb(sb), .t1(t1), .t2(t2), .t3(t3), .p(p_comb)
  );

  logic [NU-1:0]       u_done;
  logic [NU-1:0]       u_busy;
  logic [NU-1:0]       u_start;
  logic [N-2:0]        u_p  [NU];
  sel_e                u_sel[NU];

  for (genvar u = 0; u < NU; u++) begin : g_unit
    logic [H-1:0] ua, ub;

    // Operand mux in front of the unit.
    always_comb begin
      u_sel[u] = unit_sel(u, round);
      case (u_sel[u])
        SEL_T1:  begin ua = ra[N-1:H]; ub = rb[N-1:H]; end
        SEL_T2:  begin ua = sa;        ub = sb;        end
        default: begin ua = ra[H-1:0]; ub = rb[H-1:0]; end
      endcase
      u_start[u] = sub_start && (u_sel[u] != SEL_NONE);
    end

    if (H == BASE) begin : g_leaf
      rkm_base #(.N(H)) u_mul (
        .clk, .rst, .start(u_start[u]), .a(ua), .b(ub),
        .done(u_done[u]), .p(u_p[u])
      );
      assign u_busy[u] = 1'b0;
    end else begin : g_sub
      rkm_level #(.N(H), .BASE(BASE), .MODES(MODES >> 2)) u_mul (
        .clk, .rst, .start(u_start[u]), .a(ua), .b(ub),
        .busy(u_busy[u]), .done(u_done[u]), .p(u_p[u])
      );
    end
  end

  // The last unit takes part in every round, so its done ends each round.
  assign sub_done = u_done[NU-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      ra <= '0;
      rb <= '0;
      t1 <= '0;
      t2 <= '0;
      t3 <= '0;
      p  <= '0;
    end else begin
      if (load) begin
        ra <= a;
        rb <= b;
      end
      if (capture) begin
        for (int u = 0; u < NU; u++) begin
          case (u_sel[u])
            SEL_T1:  t1 <= u_p[u];
            SEL_T2:  t2 <= u_p[u];
            SEL_T3:  t3 <= u_p[u];
            default: ;
          endcase
        end
      end
      if (finish) p <= p_comb;
    end
  end

  initial begin
    assert (N > BASE && (N & (N - 1)) == 0 && (BASE & (BASE - 1)) == 0)
      else $error("rkm_level: N=%0d must be a power of two above BASE=%0d", N, BASE);
    assert (MODE != 2'd3) else $error("rkm_level: invalid mode");
  end

  // All units started in a round finish together, and a unit is never
  // started while it is still working.
  for (genvar u = 0; u < NU; u++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst) u_start[u] |-> !u_busy[u])
      else $error("rkm_level: unit %0d started while busy", u);
    assert property (@(posedge clk) disable iff (rst)
                     (sub_done && u_sel[u] != SEL_NONE) |-> u_done[u])
      else $error("rkm_level: unit %0d out of step", u);
  end

endmodule
