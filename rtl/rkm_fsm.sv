// rkm_fsm: host-side finite state machine.
//
// Accepts an operation, loads the operands into the operand RAM, hands over
// to the arithmetic control unit (ACU) and returns the result:
//   IDLE   on start: write a_in to word 0, hold b_in
//   WR_B   write B to word 1
//   GO     pulse acu_go
//   WAIT   until acu_done
//   RD_LO  read word 2;  RD_HI: read word 3, keep word 2
//   OUT    assemble c_out; done pulses one cycle later with c_out valid
// c_out holds until the next result. A start while an operation is in
// progress is ignored. Overhead around the ACU is 6 cycles. The schedule is
// this design's own choice.
module rkm_fsm #(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a_in,
  input  logic [N-1:0]   b_in,
  output logic           busy,
  output logic           done,
  output logic [2*N-2:0] c_out,
  // operand RAM port
  output logic           ram_we,
  output logic [1:0]     ram_addr,
  output logic [N-1:0]   ram_wdata,
  input  logic [N-1:0]   ram_rdata,
  // arithmetic control unit
  output logic           acu_go,
  input  logic           acu_done
);
  typedef enum logic [2:0] {S_IDLE, S_WR_B, S_GO, S_WAIT, S_RD_LO, S_RD_HI, S_OUT} state_e;
  state_e       state;
  logic [N-1:0] b_hold, c_lo;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      b_hold <= '0;
      c_lo   <= '0;
      c_out  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) begin
          b_hold <= b_in;
          state  <= S_WR_B;
        end
        S_WR_B:  state <= S_GO;
        S_GO:    state <= S_WAIT;
        S_WAIT:  if (acu_done) state <= S_RD_LO;
        S_RD_LO: state <= S_RD_HI;
        S_RD_HI: begin
          c_lo  <= ram_rdata;
          state <= S_OUT;
        end
        S_OUT: begin
          c_out <= {ram_rdata[N-2:0], c_lo};
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    acu_go    = (state == S_GO);
    ram_we    = 1'b0;
    ram_addr  = 2'd0;
    ram_wdata = a_in;
    case (state)
      S_IDLE:  ram_we = start;
      S_WR_B:  begin
        ram_we    = 1'b1;
        ram_addr  = 2'd1;
        ram_wdata = b_hold;
      end
      S_RD_LO: ram_addr = 2'd2;
      S_RD_HI: ram_addr = 2'd3;
      default: ;
    endcase
  end

endmodule
