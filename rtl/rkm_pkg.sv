// rkm_pkg: types and helpers shared by the recursive Karatsuba-Ofman
// multiplier (RKM) modules.
//
// A hybrid RKM level of width N splits each operand into two N/2-bit halves
// and needs three N/2-bit products. It obtains them from its sub-multipliers
// in one of three organisations, which are the ones the design space is built
// from:
//   RKM_PAR3      three sub-multipliers, all three products in one round
//   RKM_PAR2_SEQ1 two sub-multipliers, two products in round 1, the third in
//                 round 2 on one of the same units
//   RKM_SEQ3      one sub-multiplier used for three successive rounds
// A whole multiplier is described by one organisation per level, packed two
// bits per level into a level-mode vector, the outermost level in bits [1:0].
// The numeric encoding is this design's own choice.
package rkm_pkg;

  typedef enum logic [1:0] {
    RKM_PAR3      = 2'd0,
    RKM_PAR2_SEQ1 = 2'd1,
    RKM_SEQ3      = 2'd2
  } rkm_mode_e;

  // Number of sub-multiplier instances a level of the given organisation has.
  function automatic int unsigned mode_units(logic [1:0] m);
    case (m)
      RKM_PAR3:      return 3;
      RKM_PAR2_SEQ1: return 2;
      default:       return 1;
    endcase
  endfunction

  // Number of rounds (sub-multiplier passes) a level needs.
  function automatic int unsigned mode_rounds(logic [1:0] m);
    case (m)
      RKM_PAR3:      return 1;
      RKM_PAR2_SEQ1: return 2;
      default:       return 3;
    endcase
  endfunction

  // Level-mode vector of the 128-bit design A_ij: i selects the 128-bit
  // organisation (1: three parallel, 2: two parallel + one sequential,
  // 3: three sequential 64-bit units) and j the 64-bit design RKM_j:
  //   j=1: 3 parallel 32-bit, each 3 parallel 16-bit
  //   j=2: 3 parallel 32-bit, each 2 parallel + 1 sequential 16-bit
  //   j=3: 3 parallel 32-bit, each 3 sequential 16-bit
  //   j=4: 2 parallel + 1 sequential 32-bit, each 3 parallel 16-bit
  //   j=5: 2 parallel + 1 sequential 32-bit, each 2 parallel + 1 sequential
  function automatic logic [15:0] design_modes(int unsigned i, int unsigned j);
    logic [1:0] m128, m64, m32;
    m128 = (i == 1) ? RKM_PAR3 : (i == 2) ? RKM_PAR2_SEQ1 : RKM_SEQ3;
    m64  = (j <= 3) ? RKM_PAR3 : RKM_PAR2_SEQ1;
    case (j)
      1, 4:    m32 = RKM_PAR3;
      2, 5:    m32 = RKM_PAR2_SEQ1;
      default: m32 = RKM_SEQ3;
    endcase
    return {10'd0, m32, m64, m128};
  endfunction

endpackage
