// tb_converge_decision: streams sets of sixteen (new, old) weight pairs,
// with gaps, and checks distance = sum |new - old| and converged against
// the threshold, including sets exactly at and one above it, and that
// decision_valid comes exactly one cycle after the last pair.
module tb_converge_decision;
  import ica_pkg::*;
  localparam int THRESH = 64;
  logic clk = 0, rst_n = 0, in_valid = 0;
  always #5 clk = ~clk;
  logic [3:0] in_idx = '0;
  weight_t w_new = '0, w_old = '0;
  logic decision_valid, converged;
  logic [20:0] distance;
  converge_decision #(.THRESH(THRESH)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic int sum = 0, range;
      range = (n % 3 == 0) ? 2 : ((n % 3 == 1) ? 8 : 30000);
      for (int e = 0; e < 16; e++) begin
        automatic int o = int'($urandom_range(0, 60000)) - 30000;
        automatic int d = int'($urandom_range(0, 2*range)) - range;
        if (n == 10) d = (e == 0) ? THRESH : 0;
        if (n == 11) d = (e == 3) ? -(THRESH + 1) : 0;
        if (o + d > 32767 || o + d < -32768) d = -d;
        sum += (d < 0) ? -d : d;
        in_valid = 1; in_idx = 4'(e); w_old = weight_t'(o); w_new = weight_t'(o + d);
        @(negedge clk);
        in_valid = 0;
        if (e == 15) break;
        chk(!decision_valid, "no early decision");
        if (e % 5 == 4) begin
          @(negedge clk);
          chk(!decision_valid, "no decision in a gap");
        end
      end
      chk(decision_valid, "decision one cycle after the last pair");
      chk(distance == 21'(sum), $sformatf("distance %0d vs %0d", distance, sum));
      chk(converged == (sum <= THRESH), "converged flag");
      @(negedge clk);
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
