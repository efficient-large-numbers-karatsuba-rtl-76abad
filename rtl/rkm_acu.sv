// rkm_acu: arithmetic control unit.
//
// Moves one operation through the architecture unit (AU, the RKM
// multiplier): on go it reads A(x) and B(x) from the operand RAM (port B),
// steers them through the operand mux onto the AU inputs, starts the AU,
// and when the AU reports done writes the 2N-1 bit product back to the RAM
// as two words (low N bits to word 2, the rest zero-extended to word 3), then
// pulses done. Schedule, one state per cycle:
//   go: read word 0 | RD_B: read word 1, A into register |
//   START: au_start, au_a = A register, au_b = RAM data (mux) |
//   WAIT until au_done | WR_LO | WR_HI, done follows one cycle later.
// Overhead around the AU is therefore 5 cycles. The word map and schedule are
// this design's own choice.
module rkm_acu #(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           go,
  output logic           busy,
  output logic           done,
  // operand RAM port
  output logic           ram_we,
  output logic [1:0]     ram_addr,
  output logic [N-1:0]   ram_wdata,
  input  logic [N-1:0]   ram_rdata,
  // architecture unit
  output logic           au_start,
  output logic [N-1:0]   au_a,
  output logic [N-1:0]   au_b,
  input  logic           au_done,
  input  logic [2*N-2:0] au_p
);
  typedef enum logic [2:0] {S_IDLE, S_RD_B, S_START, S_WAIT, S_WR_LO, S_WR_HI} state_e;
  state_e       state;
  logic [N-1:0] opa;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      opa   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (go) state <= S_RD_B;
        S_RD_B:  begin
          opa   <= ram_rdata;
          state <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT:  if (au_done) state <= S_WR_LO;
        S_WR_LO: state <= S_WR_HI;
        S_WR_HI: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    ram_we    = 1'b0;
    ram_addr  = 2'd0;
    ram_wdata = au_p[N-1:0];
    au_start  = (state == S_START);
    au_a      = opa;
    au_b      = ram_rdata;
    case (state)
      S_RD_B:  ram_addr = 2'd1;
      S_WR_LO: begin
        ram_we   = 1'b1;
        ram_addr = 2'd2;
      end
      S_WR_HI: begin
        ram_we    = 1'b1;
        ram_addr  = 2'd3;
        ram_wdata = {1'b0, au_p[2*N-2:N]};
      end
      default: ;
    endcase
  end

endmodule
