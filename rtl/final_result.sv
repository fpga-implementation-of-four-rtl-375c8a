// final_result: result multiplier (fast matrix multiplier), Y = W (X - mean).
//
// On the start strobe (ICA_DONE) it latches the channel means and the
// address of the oldest sample, then reads the newest N_OUT samples of the
// window (the part of the window not yet output) from the input memory in
// time order, one per cycle. Three pipeline stages follow the read:
//   1. memory data out
//   2. mean removal, xc_j = x_j - mean_j
//   3. all four outputs at once, y_i = sum_j W_ij xc_j (16 multipliers)
// so one four-channel result leaves per cycle (out_valid, out_y), three
// cycles after its read. y has the weight's 14 fraction bits on top of the
// sample scale: y / 2^14 is the output in sample units.
// Reads pause while hold is high (the output FIFO is nearly full); since at
// most three results are in flight, hold must rise with at least three free
// FIFO entries. busy is high from start until the last result has left.
// The newest-128 output set and W(x - mean) follow the design; the
// three-stage pipeline and the hold input are this implementation's choices.
module final_result
  import ica_pkg::*;
#(
  parameter int DEPTH = 512,
  parameter int N_OUT = 128,
  localparam int AW = $clog2(DEPTH),
  localparam int Y_ACC_W = WEIGHT_W + DATA_W + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  wmat_t               w,
  input  sample_t [N_CH-1:0]  mean,
  input  logic [AW-1:0]       wr_ptr,
  input  logic                hold,
  output logic                mem_en,
  output logic [AW-1:0]       mem_addr,
  input  word_t               mem_dout,
  output logic                out_valid,
  output logic signed [Y_ACC_W-1:0] out_y [N_CH],
  output logic                busy
);
  logic                issuing;
  logic [AW:0]         n_issued;
  logic [AW-1:0]       rd_addr;
  sample_t [N_CH-1:0]  mean_q;
  logic                v1, v2;
  data_t               xc [N_CH];

  logic signed [Y_ACC_W-1:0] y_comb [N_CH];
  always_comb
    for (int i = 0; i < N_CH; i++) begin
      y_comb[i] = '0;
      for (int j = 0; j < N_CH; j++)
        y_comb[i] += Y_ACC_W'(w[4*i + j]) * Y_ACC_W'(xc[j]);
    end

  assign mem_en   = issuing && !hold;
  assign mem_addr = rd_addr;
  assign busy     = issuing || v1 || v2 || out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0; n_issued <= '0; rd_addr <= '0; mean_q <= '0;
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      for (int c = 0; c < N_CH; c++) begin xc[c] <= '0; out_y[c] <= '0; end
    end else begin
      if (start && !busy) begin
        issuing  <= 1'b1;
        n_issued <= '0;
        rd_addr  <= wr_ptr - AW'(N_OUT);
        mean_q   <= mean;
      end else if (mem_en) begin
        rd_addr  <= rd_addr + 1'b1;
        n_issued <= n_issued + 1'b1;
        if (n_issued == (AW+1)'(N_OUT - 1)) issuing <= 1'b0;
      end
      // stage 1 -> 2
      v1 <= mem_en;
      v2 <= v1;
      if (v1)
        for (int c = 0; c < N_CH; c++)
          xc[c] <= data_t'({1'b0, mem_dout[c]}) - data_t'({1'b0, mean_q[c]});
      // stage 2 -> 3
      out_valid <= v2;
      if (v2)
        for (int i = 0; i < N_CH; i++) out_y[i] <= y_comb[i];
    end
  end
endmodule
