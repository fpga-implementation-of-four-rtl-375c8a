// tb_ica_top_passlimit: the end-to-end test of tb_ica_top (same stimulus,
// bit-true reference and output decoding) with the pass limit reduced to 4
// and the convergence threshold to 0, so that runs leave the training loop
// on the pass limit rather than on convergence. It checks that exit through
// the whole chip: the flush on the taken branch at pass 4, the weights after
// exactly four passes and the results sent with them. Events required at
// least once: sample stall, sample overflow, branch not taken, branch taken
// on the pass limit with flush, memory power save, output-queue hold and
// receive frame error.
module tb_ica_top_passlimit;
  import ica_pkg::*;
  import ica_ref_pkg::*;
  localparam int DEPTH = 512, STEP = 128, MAX_PASS = 4, THRESH = 0, N_RUNS = 3;
  localparam int DEGEN = 512;    // samples of the degenerate opening window

  logic sys_clk = 0, baud_clk = 0, rst_n = 0, rx = 1, tx;
  always #5 sys_clk = ~sys_clk;
  always #21.5 baud_clk = ~baud_clk;
  ica_state_t state;
  logic ica_enable, decision_valid, converged, flush, sample_stall, sample_overflow;
  logic frame_error, mem_sleep, fifo_hold;
  logic [$clog2(MAX_PASS)-1:0] pass_cnt;
  ica_top #(.MAX_PASS(MAX_PASS), .CONV_THRESH(THRESH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- stimulus ----------------
  word_t sent [$];
  bit    dropped [$];
  int    last_sent = -1;        // index of the last sample whose bytes are out
  int    n_frame_err_sent = 0;
  bit    stop_sending = 0;

  task automatic send_byte(input logic [7:0] b, input bit good_stop = 1);
    rx = 0; repeat (8) @(negedge baud_clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (8) @(negedge baud_clk); end
    rx = good_stop;
    if (!good_stop) begin
      repeat (8) @(negedge baud_clk);
      rx = 1;
    end
    repeat (8) @(negedge baud_clk);
  endtask

  real mix [16] = '{1.0, 0.5, 0.3, 0.2,
                    0.4, 1.0, 0.4, 0.3,
                    0.2, 0.5, 1.0, 0.4,
                    0.3, 0.2, 0.5, 1.0};

  function automatic real source_value();
    real v;
    v = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 6.0;
    if ($urandom_range(0, 9) == 0) v = v * 6.0;
    return v;
  endfunction

  initial begin
    wait (rst_n);
    repeat (20) @(negedge baud_clk);
    while (!stop_sending) begin
      automatic real s [4];
      automatic word_t w;
      for (int k = 0; k < 4; k++) s[k] = source_value();
      for (int c = 0; c < 4; c++) begin
        automatic real x = 127.0;
        automatic int xi;
        if (sent.size() < DEGEN) begin
          // degenerate opening window: four identical full-swing channels
          if (c == 0) w[0] = $urandom_range(0, 1) ? 8'd254 : 8'd0;
          else w[c] = w[0];
          continue;
        end
        for (int k = 0; k < 4; k++) x += mix[4*c+k] * s[k];
        xi = int'(x);
        if (xi < 0) xi = 0;
        if (xi > 254) xi = 254;
        w[c] = 8'(xi);
      end
      sent.push_back(w); dropped.push_back(0);
      send_byte(HEADER_BYTE);
      for (int c = 0; c < 3; c++) send_byte(w[c]);
      // last byte: data bits, then mark the sample as out before its stop bit
      rx = 0; repeat (8) @(negedge baud_clk);
      for (int i = 0; i < 8; i++) begin rx = w[3][i]; repeat (8) @(negedge baud_clk); end
      last_sent = sent.size() - 1;
      rx = 1; repeat (8) @(negedge baud_clk);
      if (sent.size() % 97 == 0) begin send_byte(8'h00, 0); n_frame_err_sent++; end
      if (sent.size() % 61 == 0) send_byte(8'h55);
      repeat ($urandom_range(0, 24)) @(negedge baud_clk);
    end
  end

  // ---------------- model of the stored window ----------------
  word_t window [DEPTH];
  int n_written = 0, next_idx = 0;
  int n_stall = 0, n_overflow = 0, n_not_taken = 0, n_taken_conv = 0, n_taken_limit = 0;
  int n_flush = 0, n_sleep = 0, n_hold = 0, n_frame_err = 0;
  int n_runs_started = 0, n_runs_done = 0;
  logic prev_sleep = 0;

  always @(posedge sys_clk) if (rst_n) begin
    if (sample_overflow) begin
      n_overflow++;
      chk(last_sent >= 0 && !dropped[last_sent], "overflow refers to a sample");
      if (last_sent >= 0) dropped[last_sent] = 1;
    end
    if (sample_stall) n_stall++;
    if (mem_sleep && !prev_sleep) n_sleep++;
    prev_sleep = mem_sleep;
    if (fifo_hold) n_hold++;
    if (dut.b_en && dut.b_we) begin
      while (next_idx < sent.size() && dropped[next_idx]) next_idx++;
      chk(next_idx < sent.size(), "write of a sample that was sent");
      if (next_idx < sent.size()) begin
        chk(dut.b_din == sent[next_idx],
            $sformatf("stored sample %0d: %h expected %h", next_idx, dut.b_din, sent[next_idx]));
        chk(dut.b_addr == 9'(n_written % DEPTH), "write address");
        chk(state == ST_IDLE || state == ST_DONE || state == ST_TRAINING,
            "no write while converging");
      end
      window[n_written % DEPTH] = dut.b_din;
      n_written++; next_idx++;
    end
  end
  always @(posedge baud_clk) if (rst_n && frame_error) n_frame_err++;

  // ---------------- training reference ----------------
  lmat_t  w_ref;
  lvec4_t b_ref;
  int     exp_passes = 0, dut_passes = 0, train_len = 0;
  bit     exp_conv = 0;
  logic [7:0] exp_bytes [$];
  ica_state_t prev_state = ST_IDLE;

  task automatic reference_run();
    longint x [];
    lvec4_t mean;
    x = new [DEPTH * 4];
    for (int c = 0; c < 4; c++) begin
      automatic longint sum = 0;
      for (int a = 0; a < DEPTH; a++) sum += window[a][c];
      mean[c] = (sum + DEPTH/2) / DEPTH;
      chk(dut.mean[c] == 8'(mean[c]), $sformatf("mean ch%0d %0d vs %0d", c, dut.mean[c], mean[c]));
    end
    for (int a = 0; a < DEPTH; a++)
      for (int c = 0; c < 4; c++) x[a*4 + c] = window[a][c];
    exp_passes = 0; exp_conv = 0;
    for (int p = 0; p < MAX_PASS; p++) begin
      automatic lmat_t old = w_ref;
      train_pass(w_ref, b_ref, x, DEPTH, mean, lrate_ref(p), 9);
      exp_passes++;
      if (wdist(w_ref, old) <= THRESH) begin exp_conv = 1; break; end
    end
    // expected output frames: newest STEP samples in time order
    for (int k = 0; k < STEP; k++) begin
      automatic int a = (n_written - STEP + k) % DEPTH;
      exp_bytes.push_back(HEADER_BYTE);
      for (int i = 0; i < 4; i++) begin
        automatic longint y = 0;
        for (int j = 0; j < 4; j++) y += w_ref[4*i+j] * (longint'(window[a][j]) - mean[j]);
        exp_bytes.push_back(8'(encode_ref(y)));
      end
    end
    $display("[%0t] run %0d: %0d stored samples, expect %0d passes (%s)", $time,
             n_runs_started, n_written, exp_passes, exp_conv ? "converged" : "pass limit");
  endtask

  always @(posedge sys_clk) if (rst_n) begin
    if (state == ST_TRAINING) train_len++;
    if (prev_state != ST_TRAINING && state == ST_TRAINING) begin
      train_len = 1;
      if (prev_state == ST_IDLE) begin
        n_runs_started++; dut_passes = 0;
        chk(n_written >= DEPTH, "training starts with a full window");
        reference_run();
      end
    end
    if (prev_state == ST_TRAINING && state == ST_CONVERGE) begin
      chk(train_len == 8192, $sformatf("pass took %0d cycles", train_len));
      dut_passes++;
    end
    if (decision_valid) begin
      automatic bit tk = converged || (&pass_cnt);
      chk(flush == tk, "flush exactly when the branch is taken");
      if (!tk) n_not_taken++;
      else if (converged) n_taken_conv++;
      else n_taken_limit++;
    end
    if (flush) n_flush++;
    if (prev_state == ST_CONVERGE && state == ST_DONE) begin
      n_runs_done++;
      chk(dut_passes == exp_passes, $sformatf("passes %0d expected %0d", dut_passes, exp_passes));
      for (int e = 0; e < 16; e++)
        chk(longint'(dut.w_cur[e]) == w_ref[e],
            $sformatf("W[%0d] %0d expected %0d", e, dut.w_cur[e], w_ref[e]));
      for (int i = 0; i < 4; i++)
        chk(longint'(dut.bias[i]) == b_ref[i], $sformatf("b[%0d]", i));
    end
    prev_state = state;
  end

  // ---------------- output decoder ----------------
  int n_bytes_rx = 0;
  initial begin
    wait (rst_n);
    forever begin
      automatic logic [7:0] b;
      @(negedge baud_clk);
      if (tx == 0) begin
        repeat (4) @(negedge baud_clk);
        chk(tx == 0, "start bit");
        for (int i = 0; i < 8; i++) begin repeat (8) @(negedge baud_clk); b[i] = tx; end
        repeat (8) @(negedge baud_clk);
        chk(tx == 1, "stop bit");
        if (exp_bytes.size() == 0) chk(0, $sformatf("unexpected output byte %h", b));
        else begin
          automatic logic [7:0] e = exp_bytes.pop_front();
          chk(b == e, $sformatf("output byte %0d (frame %0d, byte %0d): %h expected %h",
                               n_bytes_rx, n_bytes_rx / 5, n_bytes_rx % 5, b, e));
        end
        n_bytes_rx++;
        repeat (3) @(negedge baud_clk);
      end
    end
  end

  // ---------------- sequencing ----------------
  initial begin
    for (int e = 0; e < 16; e++) w_ref[e] = (e % 5 == 0) ? 16384 : 0;
    for (int i = 0; i < 4; i++) b_ref[i] = 0;
    repeat (4) @(negedge sys_clk); rst_n = 1;
    wait (n_runs_done == N_RUNS);
    stop_sending = 1;
    wait (exp_bytes.size() == 0);
    repeat (2000) @(negedge baud_clk);
    chk(n_bytes_rx == N_RUNS * STEP * 5, $sformatf("%0d output bytes", n_bytes_rx));
    chk(n_stall > 0,        "event: sample stall");
    chk(n_overflow > 0,     "event: sample overflow");
    chk(n_not_taken > 0,    "event: branch not taken");
    chk(n_taken_limit > 0,  "event: taken on pass limit");
    chk(n_flush == n_taken_conv + n_taken_limit, "one flush per taken branch");
    chk(n_sleep > 0,        "event: memory power save");
    chk(n_hold > 0,         "event: output queue hold");
    chk(n_frame_err > 0 && n_frame_err == n_frame_err_sent, "event: frame error");
    $display("samples sent %0d stored %0d lost %0d stalls %0d", sent.size(), n_written, n_overflow, n_stall);
    $display("runs %0d not-taken %0d taken-converged %0d taken-limit %0d flush %0d",
             n_runs_done, n_not_taken, n_taken_conv, n_taken_limit, n_flush);
    $display("power-save entries %0d hold cycles %0d frame errors %0d", n_sleep, n_hold, n_frame_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000000) @(posedge sys_clk);
    failures++;
    $display("watchdog: runs done %0d", n_runs_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
