// tb_uart_rx: sends random bytes at 8 clocks per bit with random idle gaps
// and checks each received byte, that
// enable comes in the stop bit, and that a frame with a 0 stop bit raises
// frame_err and no enable. A byte whose bit 0 is only held for the clocks
// around the 12th clock after the start edge checks the sampling point.
module tb_uart_rx;
  logic clk = 0, rst_n = 0, rx = 1;
  always #5 clk = ~clk;
  logic enable, frame_err;
  logic [7:0] data;
  uart_rx dut (.*);

  int checks = 0, failures = 0, n_en = 0, n_fe = 0;
  logic [7:0] last;
  always @(negedge clk) begin
    if (enable) begin n_en++; last = data; end
    if (frame_err) n_fe++;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input int bitlen, input bit stop);
    rx <= 0; repeat (bitlen) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (bitlen) @(posedge clk); end
    rx <= stop; repeat (bitlen) @(posedge clk);
    rx <= 1; repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int n0 = n_en;
      send(b, 8, 1'b1);
      repeat ($urandom_range(0, 20)) @(posedge clk);
      chk(n_en == n0 + 1 && last == b, $sformatf("byte %0d n_en=%0d n0=%0d last=%h b=%h", n, n_en, n0, last, b));
    end
    begin
      automatic int n0 = n_en;
      send(8'hA5, 8, 1'b0);
      repeat (20) @(posedge clk);
      chk(n_en == n0 && n_fe == 1, "framing error");
    end
    // sampling point: the start edge reaches the detector after the two
    // synchroniser flops; bit 0 is 1 only around that point + 12 clocks
    begin
      automatic int n0 = n_en;
      rx <= 0; repeat (8) @(posedge clk);
      rx <= 0; repeat (2) @(posedge clk);
      rx <= 1; repeat (5) @(posedge clk);  // clocks 10..14 after the edge
      rx <= 0; repeat (1) @(posedge clk);
      for (int i = 1; i < 8; i++) begin rx <= 0; repeat (8) @(posedge clk); end
      rx <= 1; repeat (30) @(posedge clk);
      chk(n_en == n0 + 1 && last == 8'h01, $sformatf("sampling point, got %h", last));
    end
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
