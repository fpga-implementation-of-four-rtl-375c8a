// tb_in_memory: writes random words through port B, reads them back through
// both ports (one-cycle latency), checks that a disabled port holds its
// output, that port B returns the old word during a write (read before
// write), and that sleep rises after exactly IDLE_LIMIT idle cycles and
// falls on the next access.
module tb_in_memory;
  import ica_pkg::*;
  localparam int DEPTH = 512, IDLE_LIMIT = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_en = 0, b_en = 0, b_we = 0, sleep;
  logic [8:0] a_addr = '0, b_addr = '0;
  word_t a_dout, b_din = '0, b_dout;
  in_memory #(.DEPTH(DEPTH), .IDLE_LIMIT(IDLE_LIMIT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  word_t model [DEPTH];

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = word_t'($urandom);
      b_en = 1; b_we = 1; b_addr = 9'(i); b_din = model[i];
      @(negedge clk);
    end
    b_en = 0; b_we = 0;
    for (int n = 0; n < 1000; n++) begin
      automatic int ia = $urandom_range(0, DEPTH-1), ib = $urandom_range(0, DEPTH-1);
      a_en = 1; a_addr = 9'(ia); b_en = 1; b_addr = 9'(ib);
      @(negedge clk);
      chk(a_dout == model[ia], "port A read");
      chk(b_dout == model[ib], "port B read");
    end
    // hold when disabled
    a_en = 0; b_en = 0; a_addr = 9'd7;
    begin
      automatic word_t held = a_dout;
      @(negedge clk);
      chk(a_dout == held, "hold while disabled");
    end
    // read before write on port B
    b_en = 1; b_we = 1; b_addr = 9'd5; b_din = ~model[5];
    @(negedge clk);
    chk(b_dout == model[5], "old word during write");
    model[5] = ~model[5];
    b_en = 0; b_we = 0;
    // power save
    for (int k = 1; k <= IDLE_LIMIT + 3; k++) begin
      @(negedge clk);
      chk(sleep == (k >= IDLE_LIMIT), $sformatf("sleep after %0d idle cycles", k));
    end
    a_en = 1; a_addr = 9'd5; @(negedge clk); a_en = 0;
    chk(!sleep, "wake on access");
    chk(a_dout == model[5], "read after wake");
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
