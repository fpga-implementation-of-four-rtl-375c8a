// tb_ica_system_ctrl: runs the controller at its default sizes (512-sample
// window, 128 passes) against a model of the rest of the core: the
// convergence decision arrives 18 cycles after update_start with a chosen
// converged flag, the result multiplier stays busy for a random time after
// ICA_DONE, and DO_ICA pulses arrive at random times (also during training,
// where they must be remembered). Runs: converge after 1 pass, after 5
// passes, never (must stop after exactly 128 passes), plus random runs.
// Per pass it checks: TRAINING lasts exactly 8192 cycles; 512 sample_start
// pulses 16 cycles apart at slot cycle 2; reads of addresses 0..511 in order
// (the first one of a later pass comes from the prefetch in CONVERGE);
// pr1_load is the read enable one cycle later; acc_clear at each pass start;
// one update_start; lrate = 4096 / (pass + 1); write_allow only in IDLE or
// DONE; ica_done once per run; DONE is left only after the result
// multiplier is idle.
module tb_ica_system_ctrl;
  import ica_pkg::*;
  localparam int DEPTH = 512, MAX_PASS = 128, AW = 9, PW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic do_ica = 0, decision_valid = 0, converged = 0, result_busy = 0;
  ica_state_t state;
  logic write_allow, mem_rd_en, pr1_load, acc_clear, sample_start, update_start;
  logic weight_commit, taken, ica_done;
  logic [AW-1:0] mem_rd_addr;
  logic [LRATE_W-1:0] lrate;
  logic [PW-1:0] pass_cnt;
  ica_system_ctrl #(.DEPTH(DEPTH), .MAX_PASS(MAX_PASS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int conv_at = 0;            // pass index at which the model reports convergence (-1: never)
  int passes = 0, dones = 0;
  // monitor
  ica_state_t prev_state = ST_IDLE;
  logic prev_rd = 0;
  int train_cycles = 0, n_ss = 0, last_ss = -100, n_rd = 0, expect_addr = 0, n_upd = 0;
  int cyc = 0;
  int conv_wait = -1;
  logic busy_seen = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    chk(pr1_load == prev_rd, "pr1_load is the read enable delayed");
    prev_rd = mem_rd_en;
    chk(write_allow == (state == ST_IDLE || state == ST_DONE), "write_allow");
    if (mem_rd_en) begin
      chk(int'(mem_rd_addr) == expect_addr, $sformatf("read address %0d expected %0d", mem_rd_addr, expect_addr));
      expect_addr = (expect_addr + 1) % DEPTH; n_rd++;
    end
    if (state == ST_TRAINING) begin
      if (prev_state != ST_TRAINING) begin
        train_cycles = 0; n_ss = 0; last_ss = -100;
      end
      train_cycles++;
      chk(lrate == LRATE_W'(4096 / (int'(pass_cnt) + 1)), "lrate");
      if (sample_start) begin
        chk(last_ss < 0 || cyc - last_ss == 16, "sample_start spacing");
        chk(train_cycles % 16 == 3, "sample_start at slot cycle 2");
        last_ss = cyc; n_ss++;
      end
    end else chk(!sample_start, "sample_start only in TRAINING");
    if (prev_state == ST_TRAINING && state != ST_TRAINING) begin
      chk(state == ST_CONVERGE, "TRAINING -> CONVERGE");
      chk(train_cycles == 8192, $sformatf("pass length %0d cycles", train_cycles));
      chk(n_ss == 512, "512 samples per pass");
      passes++;
    end
    if (prev_state != ST_TRAINING && state == ST_TRAINING)
      chk(acc_clear, "acc_clear at pass start");
    if (update_start) begin
      chk(state == ST_CONVERGE && prev_state == ST_TRAINING, "update_start on entering CONVERGE");
      chk(mem_rd_en && mem_rd_addr == '0, "prefetch with update_start");
      n_upd++; conv_wait = 18;
    end
    if (ica_done) begin dones++; chk(state == ST_DONE, "ica_done on entering DONE"); end
    if (state == ST_DONE && result_busy) busy_seen = 1;
    if (prev_state == ST_DONE && state == ST_IDLE) chk(!result_busy, "leave DONE only when idle");
    prev_state = state;
  end

  // decision model
  always @(negedge clk) begin
    decision_valid = 0; converged = 0;
    if (conv_wait > 0) begin
      conv_wait--;
      if (conv_wait == 0) begin
        decision_valid = 1;
        converged = (conv_at >= 0 && int'(pass_cnt) >= conv_at);
        #1 chk(weight_commit, "weight_commit with the decision");
        chk(taken == (converged || pass_cnt == 7'd127), "taken");
      end
    end
  end

  task automatic pulse_do();
    do_ica = 1; @(negedge clk); do_ica = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // 1: converge after the first pass, then the remembered request runs again
    conv_at = 0; expect_addr = 0;
    pulse_do();
    repeat (2000) @(negedge clk);
    pulse_do();
    wait (state == ST_DONE); @(negedge clk);
    chk(passes == 1, "converged after one pass");
    result_busy = 1; repeat (50) @(negedge clk);
    chk(state == ST_DONE, "waits in DONE while busy");
    conv_at = 4; result_busy = 0; expect_addr = 0;
    wait (state == ST_TRAINING);
    wait (state == ST_DONE); @(negedge clk);
    chk(passes == 1 + 5, "converged after five passes");
    // 3: never converges: stop after 128 passes
    conv_at = -1; expect_addr = 0;
    @(negedge clk);
    chk(state == ST_DONE, "stays in DONE without a request");
    pulse_do();
    wait (state == ST_TRAINING);
    wait (state == ST_DONE); @(negedge clk);
    chk(passes == 6 + MAX_PASS, $sformatf("pass limit: %0d passes", passes - 6));
    // 4: random runs
    for (int r = 0; r < 4; r++) begin
      conv_at = $urandom_range(0, 20); expect_addr = 0;
      pulse_do();
      wait (state == ST_TRAINING);
      wait (state == ST_DONE); @(negedge clk);
    end
    @(negedge clk);
    chk(busy_seen, "result multiplier busy seen in DONE");
    chk(n_upd == passes, "one update per pass");
    chk(dones == 7, "ica_done count");
    $display("passes %0d runs %0d", passes, dones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
