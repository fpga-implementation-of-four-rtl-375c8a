// uart_rx: RS232 receiver, one start bit, 8 data bits LSB first, one stop
// bit, no parity.
//
// The module runs on the baud-rate clock, which ticks OVERSAMPLE times per
// bit (8 x 115200 Hz by default). The line is synchronised by two flops. A
// falling edge while idle starts a frame; the first data bit is sampled
// 12 ticks after the edge was seen (one and a half bit times, the middle of
// bit 0), every later bit OVERSAMPLE ticks after the previous one. The 12-tick
// offset is the documented one; OVERSAMPLE = 8 follows from it. If the stop
// bit reads 0 the byte is dropped and frame_err pulses instead of enable.
//
// Interface: rx (serial in), enable (one-tick strobe), data (valid with
// enable, held afterwards), frame_err (one-tick strobe).
module uart_rx #(
  parameter int OVERSAMPLE = 8
) (
  input  logic       clk,       // baud-rate clock
  input  logic       rst_n,
  input  logic       rx,
  output logic       enable,
  output logic [7:0] data,
  output logic       frame_err
);
  localparam int CW = $clog2(OVERSAMPLE * 2);

  typedef enum logic [1:0] {R_IDLE, R_DATA, R_STOP} rx_state_t;

  logic       rx_s1, rx_s2, rx_prev;
  rx_state_t  state;
  logic [CW-1:0] tick;
  logic [2:0] bit_idx;
  logic [7:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1; rx_prev <= 1'b1;
      state <= R_IDLE; tick <= '0; bit_idx <= '0; shreg <= '0;
      enable <= 1'b0; data <= '0; frame_err <= 1'b0;
    end else begin
      rx_s1 <= rx; rx_s2 <= rx_s1; rx_prev <= rx_s2;
      enable <= 1'b0; frame_err <= 1'b0;
      unique case (state)
        R_IDLE: if (rx_prev && !rx_s2) begin
          state <= R_DATA; bit_idx <= '0;
          // count down to the middle of data bit 0, 1.5 bit times away
          tick <= CW'(OVERSAMPLE + OVERSAMPLE/2 - 1);
        end
        R_DATA: begin
          if (tick == 0) begin
            shreg <= {rx_s2, shreg[7:1]};
            tick  <= CW'(OVERSAMPLE - 1);
            if (bit_idx == 3'd7) state <= R_STOP;
            bit_idx <= bit_idx + 3'd1;
          end else tick <= tick - 1'b1;
        end
        R_STOP: begin
          if (tick == 0) begin
            state <= R_IDLE;
            if (rx_s2) begin enable <= 1'b1; data <= shreg; end
            else frame_err <= 1'b1;
          end else tick <= tick - 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
