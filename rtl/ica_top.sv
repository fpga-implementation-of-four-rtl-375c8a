// ica_top: four-channel on-line Infomax ICA system.
//
// Mixed EEG samples arrive over a UART as frames (FF, ch1, ch2, ch3, ch4) at
// 64 Hz. They fill a circular 512-sample window (8 s). Every 128 new samples
// (2 s) the core trains the 4 x 4 de-mixing matrix W on the whole window with
// the natural-gradient Infomax rule, starting from the previous window's W
// so that the order of the separated components stays fixed, and repeats
// passes of 8192 cycles until W converges or 128 passes are done. Then W
// multiplies the 128 newest samples (mean removed); the results are
// encoded to bytes and sent back over the UART, again framed by FF.
//
// Data path, in order:
//   rx -> uart_rx -> rx_header_ctrl            (baud clock)
//      -> async_mem_ctrl -> in_memory port B   (crosses to system clock)
//   in_memory port A -> pipeline reg 1 -> gradient_update -> pipeline reg 2
//      -> converge_decision; ica_system_ctrl sequences it, branch_ctrl
//      flushes the pipeline registers, weight_buffer holds W
//   in_memory port A -> final_result -> result_encoder -> async_fifo
//      -> tx_header_ctrl -> uart_tx -> tx      (back to baud clock)
// Port A belongs to the result multiplier in DONE and to the controller
// otherwise.
//
// Clocks: sys_clk (68 MHz or more for real time at 64 Hz with 128 passes),
// baud_clk = 8 x the bit rate (8 x 115200 Hz). rst_n is asynchronous for
// both domains and must be released synchronously to each by the board.
// The remaining outputs report state and events for monitoring.
// Block structure, sizes and the two clock domains follow the design; the
// window freeze with one pending sample, the encoder ahead of the FIFO and
// the single computing unit are this implementation's choices. Some block
// outputs (bias, distance, mispredict count, predictor state, frame count,
// pipeline-register valid bits, update_done, busy of the computing unit) are
// left unconnected here on purpose: they are for observation in simulation
// and lint reports them as unused. Lint's note that rst_n is used both
// synchronously and asynchronously comes from the disable condition of the
// FIFO assertion at the end, not from any flop.
module ica_top
  import ica_pkg::*;
#(
  parameter int DEPTH      = 512,
  parameter int STEP       = 128,
  parameter int MAX_PASS   = 128,
  parameter int FIFO_DEPTH = 128,
  parameter int CONV_THRESH= 64,
  parameter int OVERSAMPLE = 8,
  parameter int IDLE_LIMIT = 32
) (
  input  logic       sys_clk,
  input  logic       baud_clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       tx,
  // monitoring
  output ica_state_t state,
  output logic       ica_enable,
  output logic [$clog2(MAX_PASS)-1:0] pass_cnt,
  output logic       decision_valid,
  output logic       converged,
  output logic       flush,
  output logic       sample_stall,
  output logic       sample_overflow,
  output logic       frame_error,
  output logic       mem_sleep,
  output logic       fifo_hold
);
  localparam int AW = $clog2(DEPTH);
  localparam int Y_ACC_W = WEIGHT_W + DATA_W + 2;

  // ---------------- receive side (baud clock) ----------------
  logic       rx_en;
  logic [7:0] rx_byte;
  logic       smp_valid;
  word_t      smp_data;

  uart_rx #(.OVERSAMPLE(OVERSAMPLE)) u_rx (
    .clk(baud_clk), .rst_n, .rx, .enable(rx_en), .data(rx_byte),
    .frame_err(frame_error));

  rx_header_ctrl u_rxh (
    .clk(baud_clk), .rst_n, .byte_en(rx_en), .byte_data(rx_byte),
    .sample_valid(smp_valid), .sample_data(smp_data));

  // ---------------- memory ----------------
  logic          write_allow, do_ica;
  logic          b_en, b_we;
  logic [AW-1:0] b_addr, wr_ptr;
  word_t         b_din, b_dout;
  sample_t [N_CH-1:0] mean;

  async_mem_ctrl #(.DEPTH(DEPTH), .STEP(STEP)) u_amc (
    .sys_clk, .baud_clk, .rst_n,
    .sample_valid(smp_valid), .sample_data(smp_data),
    .write_allow, .ica_enable, .do_ica,
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_data(b_din),
    .mem_rdata(b_dout), .wr_ptr, .mean,
    .stall_pulse(sample_stall), .overflow_pulse(sample_overflow));

  logic          a_en;
  logic [AW-1:0] a_addr;
  word_t         a_dout;

  in_memory #(.DEPTH(DEPTH), .IDLE_LIMIT(IDLE_LIMIT)) u_mem (
    .clk(sys_clk), .rst_n,
    .a_en, .a_addr, .a_dout,
    .b_en, .b_we, .b_addr, .b_din, .b_dout,
    .sleep(mem_sleep));

  // ---------------- training loop ----------------
  logic          c_rd_en, pr1_load, acc_clear, sample_start, update_start;
  logic          weight_commit, taken, ica_done, result_busy;
  logic [AW-1:0] c_rd_addr;
  logic [LRATE_W-1:0] lrate;

  ica_system_ctrl #(.DEPTH(DEPTH), .MAX_PASS(MAX_PASS)) u_ctrl (
    .clk(sys_clk), .rst_n, .do_ica, .decision_valid, .converged,
    .result_busy, .state, .write_allow,
    .mem_rd_en(c_rd_en), .mem_rd_addr(c_rd_addr), .pr1_load, .acc_clear,
    .sample_start, .update_start, .lrate, .weight_commit, .taken,
    .ica_done, .pass_cnt);

  logic [15:0] mispredicts;
  logic        predict_taken;
  branch_ctrl u_bp (
    .clk(sys_clk), .rst_n, .state, .decision_valid, .taken,
    .flush, .predict_taken, .mispredicts);

  word_t pr1_q;
  logic  pr1_valid;
  flush_reg #(.WIDTH(WORD_W)) u_pr1 (
    .clk(sys_clk), .rst_n, .load(pr1_load), .flush, .d(a_dout),
    .q(pr1_q), .valid(pr1_valid));

  wmat_t   w_cur, w_new;
  weight_t [N_CH-1:0] bias;
  logic    nw_valid, update_done, gu_busy;
  logic [3:0] nw_idx;
  weight_t nw_new, nw_old;

  gradient_update #(.LOG2_T(AW)) u_gu (
    .clk(sys_clk), .rst_n, .acc_clear, .sample_start, .x_word(pr1_q), .mean,
    .w(w_cur), .update_start, .lrate, .nw_valid, .nw_idx, .nw_new, .nw_old,
    .update_done, .w_new, .bias, .busy(gu_busy));

  localparam int PR2_W = 1 + 4 + 2 * WEIGHT_W;
  logic [PR2_W-1:0] pr2_q;
  logic             pr2_loaded;
  flush_reg #(.WIDTH(PR2_W)) u_pr2 (
    .clk(sys_clk), .rst_n, .load(1'b1), .flush,
    .d({nw_valid, nw_idx, nw_new, nw_old}), .q(pr2_q), .valid(pr2_loaded));

  logic [20:0] distance;
  converge_decision #(.THRESH(CONV_THRESH)) u_conv (
    .clk(sys_clk), .rst_n,
    .in_valid(pr2_q[PR2_W-1]), .in_idx(pr2_q[PR2_W-2 -: 4]),
    .w_new(weight_t'(pr2_q[2*WEIGHT_W-1 -: WEIGHT_W])),
    .w_old(weight_t'(pr2_q[WEIGHT_W-1:0])),
    .decision_valid, .converged, .distance);

  weight_buffer u_wb (
    .clk(sys_clk), .rst_n, .load(weight_commit), .w_in(w_new), .w(w_cur));

  // ---------------- result ----------------
  logic          f_en;
  logic [AW-1:0] f_addr;
  logic          y_valid;
  logic signed [Y_ACC_W-1:0] y [N_CH];
  logic          fifo_full;

  final_result #(.DEPTH(DEPTH), .N_OUT(STEP)) u_fr (
    .clk(sys_clk), .rst_n, .start(ica_done), .w(w_cur), .mean, .wr_ptr,
    .hold(fifo_hold), .mem_en(f_en), .mem_addr(f_addr), .mem_dout(a_dout),
    .out_valid(y_valid), .out_y(y), .busy(result_busy));

  assign a_en   = (state == ST_DONE) ? f_en   : c_rd_en;
  assign a_addr = (state == ST_DONE) ? f_addr : c_rd_addr;

  word_t y_code;
  result_encoder u_enc (.y, .code(y_code));

  // ---------------- transmit side ----------------
  logic  fifo_pop, fifo_empty;
  word_t fifo_rdata;
  async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(sys_clk), .wrst_n(rst_n), .push(y_valid), .wdata(y_code),
    .full(fifo_full), .afull(fifo_hold),
    .rclk(baud_clk), .rrst_n(rst_n), .pop(fifo_pop), .rdata(fifo_rdata),
    .empty(fifo_empty));

  logic       tx_start, tx_busy, tx_done;
  logic [7:0] tx_data;
  txh_state_t txh_state;
  logic [15:0] frames_sent;
  tx_header_ctrl u_txh (
    .clk(baud_clk), .rst_n, .fifo_empty, .fifo_pop, .fifo_rdata,
    .tx_start, .tx_data, .tx_busy, .tx_done, .state(txh_state), .frames_sent);

  uart_tx #(.OVERSAMPLE(OVERSAMPLE)) u_tx (
    .clk(baud_clk), .rst_n, .start(tx_start), .data(tx_data), .tx,
    .busy(tx_busy), .done(tx_done));

  // A result is never pushed into a full FIFO: the multiplier holds early.
  assert property (@(posedge sys_clk) disable iff (!rst_n) y_valid |-> !fifo_full);
endmodule
