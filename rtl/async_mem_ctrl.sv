// async_mem_ctrl: asynchronous memory controller between the UART side and
// the ICA core.
//
// Three parts, as in the controller's block diagram:
//  * Asynchronous transfer. On a sample_valid strobe in the baud-rate
//    domain the 32-bit word is held in a register and a toggle flag flips.
//    The flag crosses into the system clock through two flops; a change
//    marks a new sample. The held word is stable by then because the next
//    sample is at least five UART bytes later.
//  * Data counter. Counts stored samples. ica_enable rises once DEPTH
//    samples are stored; do_ica pulses on that sample and on every STEP-th
//    sample after it (512-sample window, 128 new samples per division).
//  * Memory control. Writes each sample to the circular buffer through
//    port B of in_memory: one cycle reads the word about to be overwritten,
//    the next writes the new word and updates four running channel sums
//    (sum += new - old), from which mean = round(sum / DEPTH).
//
// Writes are only made while write_allow is high (system controller in IDLE
// or DONE), so the window does not change under a training run. A sample
// that arrives otherwise waits in a one-entry pending register (stall,
// counted by stall_pulse); a second one arriving while the first still waits
// is lost and overflow_pulse reports it. Holding samples and the sums are
// this implementation's choices.
module async_mem_ctrl
  import ica_pkg::*;
#(
  parameter int DEPTH = 512,
  parameter int STEP  = 128,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          sys_clk,
  input  logic          baud_clk,
  input  logic          rst_n,
  // baud-rate domain
  input  logic          sample_valid,
  input  word_t         sample_data,
  // system domain
  input  logic          write_allow,
  output logic          ica_enable,
  output logic          do_ica,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output word_t         mem_data,
  input  word_t         mem_rdata,
  output logic [AW-1:0] wr_ptr,       // next write address = oldest sample
  output sample_t [N_CH-1:0] mean,
  output logic          stall_pulse,
  output logic          overflow_pulse
);
  localparam int SUM_W = SAMPLE_W + AW;

  // ---- baud-rate domain ----
  word_t hold_word;
  logic  toggle_b;
  always_ff @(posedge baud_clk or negedge rst_n) begin
    if (!rst_n) begin hold_word <= '0; toggle_b <= 1'b0; end
    else if (sample_valid) begin hold_word <= sample_data; toggle_b <= ~toggle_b; end
  end

  // ---- system domain ----
  logic t_s1, t_s2, t_s3;
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) {t_s1, t_s2, t_s3} <= '0;
    else        {t_s1, t_s2, t_s3} <= {toggle_b, t_s1, t_s2};
  end
  wire new_sample = t_s2 ^ t_s3;

  logic  pend;
  word_t pend_word;
  logic  phase;                 // 1: old word read issued, write this cycle
  logic [AW:0] count;           // stored samples, saturates at DEPTH
  logic [$clog2(STEP)-1:0] div_cnt;
  logic [SUM_W-1:0] sum [N_CH];

  wire start_wr = pend && write_allow && !phase;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; pend_word <= '0; phase <= 1'b0; wr_ptr <= '0;
      count <= '0; div_cnt <= '0; do_ica <= 1'b0;
      stall_pulse <= 1'b0; overflow_pulse <= 1'b0;
      for (int c = 0; c < N_CH; c++) sum[c] <= '0;
    end else begin
      do_ica <= 1'b0; stall_pulse <= 1'b0; overflow_pulse <= 1'b0;
      if (new_sample) begin
        if (pend && !start_wr) overflow_pulse <= 1'b1;
        else begin
          pend <= 1'b1; pend_word <= hold_word;
          if (!write_allow) stall_pulse <= 1'b1;
        end
      end
      if (start_wr) begin
        phase <= 1'b1;
        if (!new_sample) pend <= 1'b0;
        else begin pend <= 1'b1; pend_word <= hold_word; end
      end
      if (phase) begin
        phase  <= 1'b0;
        wr_ptr <= wr_ptr + 1'b1;
        for (int c = 0; c < N_CH; c++)
          sum[c] <= sum[c] + SUM_W'(mem_data[c])
                    - ((count == (AW+1)'(DEPTH)) ? SUM_W'(mem_rdata[c]) : '0);
        if (count != (AW+1)'(DEPTH)) count <= count + 1'b1;
        if (count >= (AW+1)'(DEPTH - 1)) begin
          div_cnt <= div_cnt + 1'b1;
          if (div_cnt == '0) do_ica <= 1'b1;
        end
      end
    end
  end

  // word being written: captured when the write sequence starts
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) mem_data <= '0;
    else if (start_wr) mem_data <= pend_word;
  end

  assign ica_enable = (count == (AW+1)'(DEPTH));
  assign mem_en     = start_wr || phase;
  assign mem_we     = phase;
  assign mem_addr   = wr_ptr;

  always_comb
    for (int c = 0; c < N_CH; c++)
      mean[c] = sample_t'((sum[c] + SUM_W'(DEPTH/2)) >> AW);
endmodule
