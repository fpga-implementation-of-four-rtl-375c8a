// rx_header_ctrl: receive-side header controller.
//
// The sender frames every four-channel sample as the header byte FF followed
// by the channel 1..4 bytes. The controller waits for FF, then collects the
// next four bytes whatever their value and emits them as one 32-bit word
// (channel 1 in bits [7:0], channel 4 in [31:24]) with a one-tick
// sample_valid strobe, the width of one input-memory word. Bytes that arrive
// while no header has been seen are dropped, so a receiver that starts in
// the middle of a frame resynchronises on the next header. Runs on the
// baud-rate clock with the receiver.
// The FF header and channel order follow the design; channel 1 in the low
// byte and dropping of bytes outside a frame are this implementation's
// choices.
module rx_header_ctrl
  import ica_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        byte_en,      // strobe from uart_rx
  input  logic [7:0]  byte_data,
  output logic        sample_valid,
  output word_t       sample_data
);
  logic       in_frame;
  logic [1:0] ch;
  word_t      acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame <= 1'b0; ch <= '0; acc <= '0;
      sample_valid <= 1'b0; sample_data <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (byte_en) begin
        if (!in_frame) begin
          if (byte_data == HEADER_BYTE) begin in_frame <= 1'b1; ch <= '0; end
        end else begin
          acc[ch] <= byte_data;
          ch <= ch + 2'd1;
          if (ch == 2'd3) begin
            in_frame     <= 1'b0;
            sample_valid <= 1'b1;
            sample_data  <= {byte_data, acc[2], acc[1], acc[0]};
          end
        end
      end
    end
  end
endmodule
