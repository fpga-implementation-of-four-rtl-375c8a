// tb_branch_ctrl: drives not-taken and taken decisions and state changes and
// checks the predictor's two states, that flush pulses only for a taken
// decision while predicting not taken, that it returns to predict-not-taken
// when the controller is idle, and the mispredict count.
module tb_branch_ctrl;
  import ica_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ica_state_t state = ST_IDLE;
  logic decision_valid = 0, taken = 0, flush, predict_taken;
  logic [15:0] mispredicts;
  branch_ctrl dut (.*);
  int checks = 0, failures = 0, n_taken = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic bit tk = ($urandom_range(0, 3) == 0);
      automatic bit was_pt = predict_taken;
      state = ST_CONVERGE;
      decision_valid = 1; taken = tk;
      #1 chk(flush == (tk && !was_pt), "flush only on taken while predicting not taken");
      @(negedge clk);
      decision_valid = 0; taken = 0;
      if (tk && !was_pt) n_taken++;
      chk(predict_taken == (was_pt || tk), "predictor state");
      chk(mispredicts == 16'(n_taken), "mispredict count");
      if (predict_taken) begin
        state = ST_DONE;  @(negedge clk);
        chk(predict_taken, "stays taken outside idle");
        if ($urandom_range(0, 1) == 1) begin
          state = ST_IDLE; @(negedge clk);
          chk(!predict_taken, "back to predict not taken in idle");
        end
      end
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
