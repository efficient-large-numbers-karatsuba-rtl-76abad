// rkm_ctrl: control unit of one hybrid RKM level.
//
// Sequences a level that needs ROUNDS passes (1, 2 or 3) through its
// sub-multipliers. States: IDLE -> ISSUE -> WAIT (-> ISSUE ...) -> FINISH.
//   IDLE    on start: 'load' (the level latches its operands), round = 0
//   ISSUE   'sub_start' for one cycle with the current round number
//   WAIT    on sub_done: 'capture' (the level stores the round's products);
//           then the next round, or FINISH after the last one
//   FINISH  'finish' (the level registers the XOR-combined product); the
//           registered 'done' pulse follows one cycle later
// With a sub-multiplier latency of S cycles the level latency from start to
// done is ROUNDS*(S+1)+2 cycles. A start while busy is ignored. The state
// encoding and this exact cycle schedule are this design's own choice; the
// rounds themselves follow the step tables of the hybrid designs.
module rkm_ctrl #(
  parameter int unsigned ROUNDS = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       sub_done,
  output logic       busy,
  output logic       load,
  output logic       sub_start,
  output logic [1:0] round,
  output logic       capture,
  output logic       finish,
  output logic       done
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_FINISH} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE;
          round <= '0;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (sub_done) begin
          if (32'(round) == ROUNDS - 1) state <= S_FINISH;
          else begin
            round <= round + 2'd1;
            state <= S_ISSUE;
          end
        end
        S_FINISH: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    load      = (state == S_IDLE) && start;
    sub_start = (state == S_ISSUE);
    capture   = (state == S_WAIT) && sub_done;
    finish    = (state == S_FINISH);
  end

  initial begin
    assert (ROUNDS >= 1 && ROUNDS <= 3)
      else $error("rkm_ctrl: ROUNDS=%0d out of range 1..3", ROUNDS);
  end

  // A sub-multiplier may only report completion while this level waits.
  assert property (@(posedge clk) disable iff (rst) sub_done |-> state == S_WAIT)
    else $error("rkm_ctrl: sub_done outside WAIT");

endmodule
