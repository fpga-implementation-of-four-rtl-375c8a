// uart_tx: RS232 transmitter, one start bit, 8 data bits LSB first, one stop
// bit, no parity, idle high.
//
// Runs on the baud-rate clock; every bit lasts OVERSAMPLE ticks (8 x 115200
// Hz clock gives 115200 bps). start is accepted when busy is low; data is
// captured on that tick. done pulses for one tick at the end of the stop bit
// (the "stop" condition the header controller waits for). A new start may be
// given in the same tick as done.
// The 115200 bps RS232 link follows the design; the 8-tick bit time and
// no-parity framing are this implementation's choices.
module uart_tx #(
  parameter int OVERSAMPLE = 8
) (
  input  logic       clk,       // baud-rate clock
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       tx,
  output logic       busy,
  output logic       done
);
  localparam int CW = $clog2(OVERSAMPLE);
  logic [9:0]    frame;    // {stop, data, start}, shifted out LSB first
  logic [3:0]    nbits;
  logic [CW-1:0] tick;

  assign tx = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1; nbits <= '0; tick <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          frame <= {1'b1, data, 1'b0};
          nbits <= 4'd10; tick <= CW'(OVERSAMPLE - 1); busy <= 1'b1;
        end
      end else if (tick == 0) begin
        frame <= {1'b1, frame[9:1]};
        tick  <= CW'(OVERSAMPLE - 1);
        if (nbits == 4'd1) begin busy <= 1'b0; done <= 1'b1; end
        nbits <= nbits - 4'd1;
      end else tick <= tick - 1'b1;
    end
  end
endmodule
