// tb_rx_header_ctrl: feeds byte streams with garbage before the first
// header, data bytes equal to FF inside frames, and random gaps, and checks
// every emitted 32-bit sample word (channel 1 in bits [7:0]) and that
// exactly one word comes per frame.
module tb_rx_header_ctrl;
  import ica_pkg::*;
  logic clk = 0, rst_n = 0, byte_en = 0;
  logic [7:0] byte_data = '0;
  logic sample_valid;
  word_t sample_data;
  always #5 clk = ~clk;
  rx_header_ctrl dut (.*);

  int checks = 0, failures = 0;
  word_t expq [$];
  always @(negedge clk) if (sample_valid) begin
    checks++;
    if (expq.size() == 0 || sample_data != expq[0]) begin
      failures++; $display("FAIL word %h exp %h", sample_data, expq.size() ? expq[0] : 0);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk); byte_en = 1; byte_data = b;
    @(negedge clk); byte_en = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    put(8'h12); put(8'h34); put(8'h00);          // no header yet: dropped
    for (int n = 0; n < 300; n++) begin
      word_t wd;
      for (int c = 0; c < 4; c++) wd[c] = (n % 7 == 0 && c == 2) ? 8'hFF : 8'($urandom);
      expq.push_back(wd);
      put(8'hFF);
      for (int c = 0; c < 4; c++) put(wd[c]);
      if (n % 11 == 0) put(8'h55);               // stray byte between frames
    end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
