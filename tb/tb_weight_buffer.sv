// tb_weight_buffer: checks the identity reset value, that load replaces all
// sixteen weights at once and that the weights hold while load is low.
module tb_weight_buffer;
  import ica_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  always #5 clk = ~clk;
  wmat_t w_in, w;
  weight_buffer dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    w_in = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        chk(w[4*i+j] == ((i == j) ? 16'sd16384 : 16'sd0), "identity after reset");
    for (int n = 0; n < 20; n++) begin
      automatic wmat_t v;
      for (int e = 0; e < 16; e++) v[e] = weight_t'($urandom);
      w_in = v; load = 1; @(negedge clk); load = 0;
      chk(w == v, "loaded");
      w_in = ~v; repeat (3) @(negedge clk);
      chk(w == v, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
