// in_memory: the 32 x 512 input sample memory (four 8-bit channels per word).
//
// Two synchronous ports, as in a dual-port FPGA block RAM: port A is read
// only (training reads and the final result multiply), port B reads and
// writes (the asynchronous memory controller reads the word it is about to
// overwrite, for the running mean, then writes the new sample). Reads have
// one cycle of latency. Every port acts only while its enable is high; the
// outputs hold their last value otherwise.
//
// Power save: an idle counter counts cycles in which neither port is
// enabled. When it reaches IDLE_LIMIT the bank reports sleep (power-save
// mode) until the next access, which is served without extra latency. The
// idea of a counter that detects "no demand" and lets the memory sleep
// follows the design; the counter's exact meaning and the limit are this
// implementation's choice.
module in_memory
  import ica_pkg::*;
#(
  parameter int DEPTH      = 512,
  parameter int IDLE_LIMIT = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A, read
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output word_t         a_dout,
  // port B, read/write
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  word_t         b_din,
  output word_t         b_dout,
  // power save
  output logic          sleep
);
  word_t mem [DEPTH];
  localparam int IW = $clog2(IDLE_LIMIT + 1);
  logic [IW-1:0] idle_cnt;

  always_ff @(posedge clk) begin
    if (a_en) a_dout <= mem[a_addr];
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_din;
      b_dout <= mem[b_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idle_cnt <= '0;
    else if (a_en || b_en) idle_cnt <= '0;
    else if (idle_cnt != IW'(IDLE_LIMIT)) idle_cnt <= idle_cnt + 1'b1;
  end
  assign sleep = (idle_cnt == IW'(IDLE_LIMIT));
endmodule
