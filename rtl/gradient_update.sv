// gradient_update: the integrated computing unit of the Infomax ICA core.
//
// It carries out one training pass of the natural-gradient Infomax rule over
// a window of samples, in two phases.
//
// Sample phase (started by sample_start once per sample, 13 cycles, so one
// sample per 16-cycle slot gives 512 x 16 = 8192 cycles per pass):
//   ph 0      xc_j = sample_j - mean_j                       (11 bit)
//   ph 1..4   row r: u_r = ((sum_j W_rj * xc_j) >>> 7) + b_r  (4 multipliers)
//   ph 5..8   row r: y_r = g(u_r) from the sigmoid table, phi_r = 1 - 2 y_r
//   ph 9..12  row r: S_rj += phi_r * u_j (4 multipliers), s_r += phi_r
// Update phase (started by update_start, 16 cycles, one weight per cycle,
// entry e = 4i + j):
//   M_ik  = delta_ik + S_ik / T                 (T = 512, a shift)
//   A_ik  = lrate * M_ik
//   W'_ij = sat16(W_ij + sum_k A_ik W_kj)
// after which b_i += lrate * s_i / T. That is W <- W + l (I + <phi u^T>) W,
// the batch form of the rule with the averaging over the T samples of the
// window, computed in the order of the unit's block diagram (accumulate the
// outer product, scale by the learning rate, multiply by W, add W; bias path
// accumulate, scale, add).
//
// Each new weight leaves on nw_* together with the old weight, for the
// convergence check; the full new matrix stays on w_new until the next pass.
// The biases live here and carry over between passes and windows. All
// shifts are arithmetic (round toward minus infinity). Formats are in
// ica_pkg. The phase schedule is this implementation's own; the operations
// and widths of weight, data, u and y follow the design.
module gradient_update
  import ica_pkg::*;
#(
  parameter int LOG2_T = 9          // samples per pass = 2**LOG2_T
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                acc_clear,     // start of a pass: clear sums
  input  logic                sample_start,
  input  word_t               x_word,        // raw samples, held by caller
  input  sample_t [N_CH-1:0]  mean,
  input  wmat_t               w,             // current weights
  input  logic                update_start,
  input  logic [LRATE_W-1:0]  lrate,
  output logic                nw_valid,
  output logic [3:0]          nw_idx,
  output weight_t             nw_new,
  output weight_t             nw_old,
  output logic                update_done,
  output wmat_t               w_new,
  output weight_t [N_CH-1:0]  bias,
  output logic                busy
);
  localparam int PROD_W = WEIGHT_W + DATA_W;          // 27
  localparam int S_W    = PHI_W + U_W + LOG2_T;       // 44
  localparam int SB_W   = PHI_W + LOG2_T;             // 21
  localparam int M_W    = S_W - (Y_FRAC + LOG2_T) + 2;
  localparam int A_W    = M_W + LRATE_W + 1;

  function automatic weight_t sat_w(input logic signed [63:0] v);
    if (v > 64'sd32767)       return weight_t'(16'sh7fff);
    else if (v < -64'sd32768) return weight_t'(16'sh8000);
    else                      return weight_t'(v);
  endfunction

  // ---------------- sample phase ----------------
  data_t                         xc  [N_CH];
  u_t                            u   [N_CH];
  logic signed [PHI_W-1:0]       phi [N_CH];
  logic signed [S_W-1:0]         s_acc [N_W];
  logic signed [SB_W-1:0]        sb_acc [N_CH];
  logic [3:0]                    ph;
  logic                          s_busy;

  // row of the current step
  logic [1:0] row;
  assign row = 2'(ph - 4'd1);     // ph 1..4 -> 0..3, ph 5..8 -> 0..3, ph 9..12 -> 0..3

  // u of one row
  logic signed [PROD_W+1:0] dot;
  u_t                       u_row;
  always_comb begin
    dot = '0;
    for (int j = 0; j < N_CH; j++)
      dot += (PROD_W+2)'(w[4*row + 2'(j)]) * (PROD_W+2)'(xc[j]);
    u_row = U_W'(dot >>> DATA_FRAC) + U_W'(bias[row]);
  end

  // sigmoid of one row
  logic [Y_W-1:0] y_row;
  nonlinear_lut u_lut (.u(u[row]), .y(y_row));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; s_busy <= 1'b0;
      for (int c = 0; c < N_CH; c++) begin
        xc[c] <= '0; u[c] <= '0; phi[c] <= '0; sb_acc[c] <= '0;
      end
      for (int e = 0; e < N_W; e++) s_acc[e] <= '0;
    end else begin
      if (acc_clear) begin
        for (int c = 0; c < N_CH; c++) sb_acc[c] <= '0;
        for (int e = 0; e < N_W; e++)  s_acc[e] <= '0;
      end
      if (sample_start) begin
        for (int c = 0; c < N_CH; c++)
          xc[c] <= data_t'({1'b0, x_word[c]}) - data_t'({1'b0, mean[c]});
        ph <= 4'd1; s_busy <= 1'b1;
      end else if (s_busy) begin
        ph <= ph + 4'd1;
        if (ph == 4'd12) s_busy <= 1'b0;
        if (ph >= 4'd1 && ph <= 4'd4) u[row] <= u_row;
        if (ph >= 4'd5 && ph <= 4'd8)
          phi[row] <= PHI_W'(1 << Y_FRAC) - PHI_W'({y_row, 1'b0});
        if (ph >= 4'd9 && ph <= 4'd12) begin
          for (int j = 0; j < N_CH; j++)
            s_acc[4*row + 2'(j)] <= s_acc[4*row + 2'(j)] + S_W'(phi[row]) * S_W'(u[j]);
          sb_acc[row] <= sb_acc[row] + SB_W'(phi[row]);
        end
      end
    end
  end

  // ---------------- update phase ----------------
  logic       u_busy;
  logic [3:0] e_idx;
  logic [1:0] ui, uj;
  assign ui = e_idx[3:2];
  assign uj = e_idx[1:0];

  logic signed [M_W-1:0]   m_ik [N_CH];
  logic signed [A_W-1:0]   a_ik [N_CH];
  logic signed [63:0]      dsum;
  weight_t                 wn;
  always_comb begin
    dsum = '0;
    for (int k = 0; k < N_CH; k++) begin
      m_ik[k] = M_W'(s_acc[4*ui + 2'(k)] >>> (Y_FRAC + LOG2_T))
              + ((ui == 2'(k)) ? M_W'(1 << WEIGHT_FRAC) : '0);
      a_ik[k] = A_W'((A_W'(m_ik[k]) * A_W'($signed({1'b0, lrate}))) >>> LRATE_FRAC);
      dsum   += 64'(a_ik[k]) * 64'(w[4*k + 32'(uj)]);
    end
    wn = sat_w(64'(w[e_idx]) + (dsum >>> WEIGHT_FRAC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_busy <= 1'b0; e_idx <= '0; nw_valid <= 1'b0; nw_idx <= '0;
      nw_new <= '0; nw_old <= '0; update_done <= 1'b0;
      w_new <= '0; bias <= '0;
    end else begin
      nw_valid <= 1'b0; update_done <= 1'b0;
      if (update_start && !u_busy) begin
        u_busy <= 1'b1; e_idx <= '0;
      end else if (u_busy) begin
        nw_valid <= 1'b1; nw_idx <= e_idx; nw_new <= wn; nw_old <= w[e_idx];
        w_new[e_idx] <= wn;
        e_idx <= e_idx + 4'd1;
        if (e_idx == 4'd15) begin
          u_busy <= 1'b0; update_done <= 1'b1;
          for (int c = 0; c < N_CH; c++)
            bias[c] <= sat_w(64'(bias[c])
                     + (64'(sb_acc[c]) * 64'($signed({1'b0, lrate}))
                        >>> (LRATE_FRAC + LOG2_T - (WEIGHT_FRAC - Y_FRAC))));
        end
      end
    end
  end

  assign busy = s_busy || u_busy;
endmodule
