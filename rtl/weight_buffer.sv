// weight_buffer: the 16-entry, 16-bit weight buffer (4 x 4 de-mixing
// matrix W).
//
// All sixteen weights are visible at once on w (entry (i,j) at index 4i+j)
// because both the training unit and the result multiplier use whole rows
// and columns every cycle. load copies a complete new matrix in one cycle
// (the commit after each training pass). Reset loads the identity (1.0 =
// 16384 on the diagonal), so the first window starts from "no de-mixing";
// the reset value is this implementation's choice. Weights are kept across
// windows, so each window starts from the previous window's result.
module weight_buffer
  import ica_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  wmat_t       w_in,
  output wmat_t       w
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_W; e++)
        w[e] <= (e % (N_CH + 1) == 0) ? weight_t'(1 << WEIGHT_FRAC) : '0;
    end else if (load) begin
      w <= w_in;
    end
  end
endmodule
