// tb_uart_tx: transmits random bytes back to back (next start on done) and
// checks every bit of the line at the bit centres (start 0, data LSB first,
// stop 1), busy, and that done comes exactly 80 clocks (10 bits of 8) after
// start.
module tb_uart_tx;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data = '0;
  logic tx, busy, done;
  always #5 clk = ~clk;
  uart_tx dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    chk(tx == 1 && !busy, "idle high");
    for (int n = 0; n < 50; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic logic [9:0] exp_frame = {1'b1, b, 1'b0};
      automatic int cyc = 0;
      start <= 1; data <= b;
      @(posedge clk); start <= 0;
      // now in bit 0 (start) for 8 clocks
      for (int k = 0; k < 10; k++) begin
        repeat (4) @(posedge clk);
        #1 chk(tx == exp_frame[k], $sformatf("byte %0d bit %0d", n, k));
        chk(busy, "busy");
        repeat (4) @(posedge clk);
      end
      #1 chk(done, $sformatf("done after 80 clocks, byte %0d", n));
      if (n % 2 == 1) repeat ($urandom_range(1, 10)) @(posedge clk);
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
