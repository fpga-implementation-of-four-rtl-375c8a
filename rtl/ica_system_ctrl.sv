// ica_system_ctrl: the ICA system controller (micro-controller).
//
// States and transitions follow the controller's state table:
//   IDLE      samples are being received; on a pending DO_ICA request go to
//             TRAINING.
//   TRAINING  one training pass: a 4-bit cycle counter and a 9-bit block
//             (sample) counter; the pass ends when both are all ones, so it
//             takes exactly 16 x 512 = 8192 cycles, then CONVERGE.
//   CONVERGE  the weight update runs and the convergence decision is
//             awaited; when it arrives the new weights are committed and the
//             state goes to DONE if the weights converged or the pass
//             counter is all ones (128 passes), else back to TRAINING.
//   DONE      ICA_DONE has been given to the result multiplier; samples may
//             be written again; on the next DO_ICA request go to IDLE (once
//             the result multiplier has finished).
// Both the converged case and the 128-pass limit end the loop; DO_ICA is
// latched as a request so a pulse is not missed in another state; and
// DONE waits for the result multiplier. These are this design's choices.
//
// Memory schedule inside a 16-cycle sample slot: cycle 0 issues the read of
// sample `block`, cycle 1 loads it into the pipeline register (pr1_load is
// the read enable delayed by one cycle), cycle 2 starts the sample phase of
// the computing unit. In CONVERGE the first read of the next pass is issued
// at once, as if the branch were not taken (the branch controller flushes
// it otherwise); the next pass then skips its first read.
//
// The learning rate is lrate = 2^-8 / (pass + 1): the documented initial
// value, falling as 1/t with the pass number.
module ica_system_ctrl
  import ica_pkg::*;
#(
  parameter int DEPTH    = 512,
  parameter int MAX_PASS = 128,
  localparam int AW = $clog2(DEPTH),
  localparam int PW = $clog2(MAX_PASS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               do_ica,
  input  logic               decision_valid,
  input  logic               converged,
  input  logic               result_busy,
  output ica_state_t         state,
  output logic               write_allow,
  output logic               mem_rd_en,
  output logic [AW-1:0]      mem_rd_addr,
  output logic               pr1_load,
  output logic               acc_clear,
  output logic               sample_start,
  output logic               update_start,
  output logic [LRATE_W-1:0] lrate,
  output logic               weight_commit,
  output logic               taken,
  output logic               ica_done,
  output logic [PW-1:0]      pass_cnt
);
  logic [3:0]    counter;
  logic [AW-1:0] block;
  logic          req;
  logic          prefetched;
  logic          conv_first;

  assign taken = converged || (&pass_cnt);
  assign lrate = LRATE_W'(LRATE_INIT / (int'(pass_cnt) + 1));
  assign write_allow = (state == ST_IDLE) || (state == ST_DONE);

  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = block;
    if (state == ST_TRAINING && counter == 4'd0)
      mem_rd_en = !(block == '0 && prefetched);
    if (state == ST_CONVERGE && conv_first) begin
      mem_rd_en   = 1'b1;
      mem_rd_addr = '0;
    end
  end
  assign sample_start  = (state == ST_TRAINING) && (counter == 4'd2);
  assign update_start  = (state == ST_CONVERGE) && conv_first;
  assign weight_commit = (state == ST_CONVERGE) && decision_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; counter <= '0; block <= '0; req <= 1'b0;
      prefetched <= 1'b0; conv_first <= 1'b0; pass_cnt <= '0;
      pr1_load <= 1'b0; acc_clear <= 1'b0; ica_done <= 1'b0;
    end else begin
      pr1_load  <= mem_rd_en;
      acc_clear <= 1'b0;
      ica_done  <= 1'b0;
      if (do_ica) req <= 1'b1;
      unique case (state)
        ST_IDLE: if (req || do_ica) begin
          req <= 1'b0; state <= ST_TRAINING; acc_clear <= 1'b1;
          counter <= '0; block <= '0; pass_cnt <= '0;
        end
        ST_TRAINING: begin
          if (counter == 4'd0 && block == '0) prefetched <= 1'b0;
          counter <= counter + 4'd1;
          if (&counter) begin
            block <= block + 1'b1;
            if (&block) begin state <= ST_CONVERGE; conv_first <= 1'b1; end
          end
        end
        ST_CONVERGE: begin
          conv_first <= 1'b0;
          if (conv_first) prefetched <= 1'b1;
          if (decision_valid) begin
            if (taken) begin
              state <= ST_DONE; ica_done <= 1'b1; prefetched <= 1'b0;
            end else begin
              state <= ST_TRAINING; acc_clear <= 1'b1;
              counter <= '0; block <= '0; pass_cnt <= pass_cnt + 1'b1;
            end
          end
        end
        ST_DONE: if ((req || do_ica) && !result_busy) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
