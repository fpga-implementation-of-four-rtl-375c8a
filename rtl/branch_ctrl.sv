// branch_ctrl: branch predictor and flush control of the training pipeline.
//
// The branch is the convergence decision at the end of each training pass:
// "taken" means the weights converged (or the pass limit was reached) and
// the loop ends, "not taken" means another pass follows. The controller
// predicts not taken, so the next pass's first memory read is started while
// the decision is still being computed. The predictor has two states: in
// PREDICT_NT a not-taken decision keeps it there and a taken decision moves
// it to TAKEN and raises flush for one cycle, which clears the pipeline
// registers in front of and behind the weight update (the speculative
// work); TAKEN returns to PREDICT_NT once the system controller is idle.
// mispredicts counts the flushes.
module branch_ctrl
  import ica_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ica_state_t  state,
  input  logic        decision_valid,
  input  logic        taken,
  output logic        flush,
  output logic        predict_taken,
  output logic [15:0] mispredicts
);
  typedef enum logic {PREDICT_NT = 1'b0, TAKEN_ST = 1'b1} bp_state_t;
  bp_state_t bp;

  assign predict_taken = (bp == TAKEN_ST);
  assign flush = decision_valid && taken && (bp == PREDICT_NT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bp <= PREDICT_NT; mispredicts <= '0;
    end else begin
      unique case (bp)
        PREDICT_NT: if (decision_valid && taken) begin
          bp <= TAKEN_ST; mispredicts <= mispredicts + 16'd1;
        end
        TAKEN_ST:   if (state == ST_IDLE) bp <= PREDICT_NT;
        default:    bp <= PREDICT_NT;
      endcase
    end
  end
endmodule
