// converge_decision: weight convergence check.
//
// Receives the sixteen (new, old) weight pairs of a training pass one per
// cycle (in_valid, index 15 last) and adds up |new - old|. One cycle after
// the last pair, decision_valid pulses and converged tells whether the total
// change is at most THRESH (in weight LSBs, 2^-14). Using the sum of absolute
// differences and the threshold value is this implementation's choice; the
// design only says the difference of new and old weights decides
// convergence.
module converge_decision
  import ica_pkg::*;
#(
  parameter int THRESH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [3:0]  in_idx,
  input  weight_t     w_new,
  input  weight_t     w_old,
  output logic        decision_valid,
  output logic        converged,
  output logic [20:0] distance
);
  logic signed [WEIGHT_W:0] diff;
  logic        [WEIGHT_W:0] adiff;
  logic        [20:0]       sum;

  always_comb begin
    diff  = (WEIGHT_W+1)'(w_new) - (WEIGHT_W+1)'(w_old);
    adiff = diff[WEIGHT_W] ? (WEIGHT_W+1)'(-diff) : (WEIGHT_W+1)'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; decision_valid <= 1'b0; converged <= 1'b0; distance <= '0;
    end else begin
      decision_valid <= 1'b0;
      if (in_valid) begin
        if (in_idx == 4'd15) begin
          sum <= '0;
          distance       <= sum + 21'(adiff);
          converged      <= (sum + 21'(adiff)) <= 21'(THRESH);
          decision_valid <= 1'b1;
        end else begin
          sum <= ((in_idx == 4'd0) ? 21'd0 : sum) + 21'(adiff);
        end
      end
    end
  end
endmodule
