// tx_header_ctrl: transmit-side header controller.
//
// Sends each 32-bit result word from the FIFO as one frame: header FF, then
// channel 1..4 bytes (bits [7:0] first). States follow the header
// controller's state table:
//   IDLE       stay while the FIFO is empty, else pop a word -> HEADER
//   HEADER     hand FF to the transmitter -> SEND_DATA
//   SEND_DATA  each time the transmitter finishes a byte (stop bit done),
//              hand it the next one; after the fourth channel byte go to
//              HEADER (pop the next word) if the FIFO holds more, else IDLE.
// The counter counts channel bytes, 0..4. The transmitter's done
// strobe plays the role of "state = stop". Runs on the baud-rate clock.
// States, header and byte order follow the design; using the transmitter's
// done strobe for "stop" is this implementation's choice.
module tx_header_ctrl
  import ica_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fifo_empty,
  output logic        fifo_pop,
  input  word_t       fifo_rdata,   // valid the cycle after fifo_pop
  output logic        tx_start,
  output logic [7:0]  tx_data,
  input  logic        tx_busy,
  input  logic        tx_done,
  output txh_state_t  state,
  output logic [15:0] frames_sent
);
  logic [2:0] counter;      // channel bytes of this frame handed to the transmitter

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE; counter <= '0;
      fifo_pop <= 1'b0; tx_start <= 1'b0; tx_data <= '0; frames_sent <= '0;
    end else begin
      fifo_pop <= 1'b0; tx_start <= 1'b0;
      unique case (state)
        TX_IDLE: if (!fifo_empty) begin
          fifo_pop <= 1'b1; state <= TX_HEADER;
        end
        TX_HEADER: if (!tx_busy && !tx_start) begin
          tx_start <= 1'b1; tx_data <= HEADER_BYTE;
          counter <= 3'd0; state <= TX_SEND;
        end
        TX_SEND: if (tx_done) begin
          if (counter == 3'd4) begin
            frames_sent <= frames_sent + 16'd1;
            if (fifo_empty) state <= TX_IDLE;
            else begin fifo_pop <= 1'b1; state <= TX_HEADER; end
          end else begin
            tx_start <= 1'b1;
            tx_data  <= fifo_rdata[counter[1:0]];
            counter  <= counter + 3'd1;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end
endmodule
