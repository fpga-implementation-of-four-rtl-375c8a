// tb_tx_header_ctrl: the controller drives the real byte transmitter and
// reads from a queue model that answers pop with data one clock later. Words
// arrive in random bursts. Checks: every word goes out as FF, channel 1..4
// (bits [7:0] first), in order; a byte is never started while the
// transmitter is busy; bytes inside a frame start 82 clocks apart (80 clocks of
// frame, the done strobe and the registered start); the controller returns to IDLE when the
// queue is empty; the frame counter matches.
module tb_tx_header_ctrl;
  import ica_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fifo_empty, fifo_pop, tx_start, tx_busy, tx_done, tx;
  word_t fifo_rdata;
  logic [7:0] tx_data;
  txh_state_t state;
  logic [15:0] frames_sent;
  tx_header_ctrl dut (.*);
  uart_tx #(.OVERSAMPLE(8)) u_tx (.clk, .rst_n, .start(tx_start), .data(tx_data),
                                  .tx, .busy(tx_busy), .done(tx_done));
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t q [$];
  byte unsigned expect_bytes [$];
  assign fifo_empty = (q.size() == 0);
  always @(posedge clk) if (fifo_pop && q.size() > 0) fifo_rdata <= q.pop_front();

  int n_words = 0, n_bytes = 0, n_idle = 0;
  longint last_start = -1, cyc = 0, in_frame = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_start) begin
      automatic byte unsigned e = expect_bytes.size() ? expect_bytes.pop_front() : 8'h00;
      chk(!tx_busy, "start while transmitter busy");
      chk(tx_data == e, $sformatf("byte %0d: %h expected %h", n_bytes, tx_data, e));
      if (in_frame > 0) chk(cyc - last_start == 82, $sformatf("byte spacing %0d", cyc - last_start));
      in_frame = (tx_data == HEADER_BYTE) ? 1 : in_frame + 1;
      if (in_frame == 5) in_frame = 0;
      last_start = cyc; n_bytes++;
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int burst = 0; burst < 20; burst++) begin
      automatic int len = $urandom_range(1, 6);
      for (int k = 0; k < len; k++) begin
        automatic word_t w;
        for (int c = 0; c < N_CH; c++) w[c] = 8'($urandom_range(0, 254));
        q.push_back(w); n_words++;
        expect_bytes.push_back(HEADER_BYTE);
        for (int c = 0; c < N_CH; c++) expect_bytes.push_back(w[c]);
        repeat ($urandom_range(0, 300)) @(negedge clk);
      end
      // wait until everything is sent
      while (expect_bytes.size() > 0 || tx_busy || state != TX_IDLE) @(negedge clk);
      chk(state == TX_IDLE, "idle when the queue is empty");
      n_idle++;
      repeat ($urandom_range(1, 50)) @(negedge clk);
    end
    chk(n_bytes == 5 * n_words, "byte count");
    chk(int'(frames_sent) == n_words, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
