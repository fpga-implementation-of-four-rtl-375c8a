// tb_async_mem_ctrl: the controller with a real in_memory, at the default
// 512-sample window and 128-sample step, with a 10 ns system clock and a
// 37 ns baud-rate clock. Samples arrive every 5..40 baud clocks; write_allow
// is dropped for random stretches, some long enough to lose samples.
// Checks on every write: the written word is the next sample not reported
// lost, at address wr_ptr, the circular buffer wraps, the four means equal
// round(sum of stored samples / 512), do_ica pulses on the 512th write and
// every 128th after, ica_enable rises with the 512th write, a write sequence
// only starts while write_allow is high, and written + lost = sent.
// Also checks that stalls and losses both happened.
module tb_async_mem_ctrl;
  import ica_pkg::*;
  localparam int DEPTH = 512, STEP = 128, AW = 9;
  logic sys_clk = 0, baud_clk = 0, rst_n = 0;
  always #5 sys_clk = ~sys_clk;
  always #18.5 baud_clk = ~baud_clk;
  logic sample_valid = 0, write_allow = 1;
  word_t sample_data = '0;
  logic ica_enable, do_ica, mem_en, mem_we, stall_pulse, overflow_pulse, sleep;
  logic [AW-1:0] mem_addr, wr_ptr;
  word_t mem_data, mem_rdata, a_dout;
  sample_t [N_CH-1:0] mean;
  async_mem_ctrl #(.DEPTH(DEPTH), .STEP(STEP)) dut (.*);
  in_memory #(.DEPTH(DEPTH), .IDLE_LIMIT(32)) u_mem (
    .clk(sys_clk), .rst_n, .a_en(1'b0), .a_addr('0), .a_dout,
    .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr), .b_din(mem_data),
    .b_dout(mem_rdata), .sleep);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t sent [$];
  word_t buffer [DEPTH];
  int n_sent = 0, n_written = 0, n_lost = 0, n_stall = 0, n_do = 0, skip = 0;
  logic sending_done = 0;

  // sender, baud-rate domain
  initial begin
    repeat (4) @(negedge baud_clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      automatic word_t w;
      for (int c = 0; c < N_CH; c++) w[c] = 8'($urandom_range(0, 254));
      repeat ($urandom_range(5, 40)) @(negedge baud_clk);
      sample_valid = 1; sample_data = w; sent.push_back(w); n_sent++;
      @(negedge baud_clk);
      sample_valid = 0; sample_data = word_t'($urandom);
    end
    sending_done = 1;
  end

  // write_allow pattern, system domain
  initial begin
    @(posedge rst_n);
    while (!sending_done) begin
      repeat ($urandom_range(100, 3000)) @(negedge sys_clk);
      write_allow = 0;
      repeat ($urandom_range(10, ($urandom_range(0, 3) == 0) ? 3000 : 300)) @(negedge sys_clk);
      write_allow = 1;
    end
  end

  // monitor
  always @(posedge sys_clk) if (rst_n) begin
    if (mem_en && !mem_we) chk(write_allow, "write sequence starts only while allowed");
    if (stall_pulse) n_stall++;
    if (overflow_pulse) begin n_lost++; skip++; end
    if (do_ica) begin
      n_do++;
      chk(n_written >= DEPTH && (n_written - DEPTH) % STEP == 0,
          $sformatf("do_ica after %0d writes", n_written));
    end
  end
  always @(posedge sys_clk) if (rst_n && mem_we) begin
    automatic word_t e;
    // samples reported lost are the ones that arrived while one was pending:
    // drop them from the expected stream lazily by matching
    while (sent.size() > 0 && sent[0] != mem_data && skip > 0) begin
      void'(sent.pop_front()); skip--;
    end
    e = sent.size() ? sent.pop_front() : '0;
    chk(mem_data == e, $sformatf("write %0d: %h expected %h", n_written, mem_data, e));
    chk(mem_addr == AW'(n_written % DEPTH), "write address");
    buffer[n_written % DEPTH] = mem_data;
    n_written++;
    fork begin
      @(negedge sys_clk);
      chk(wr_ptr == AW'(n_written % DEPTH), "wr_ptr");
      chk(ica_enable == (n_written >= DEPTH), "ica_enable");
      for (int c = 0; c < N_CH; c++) begin
        automatic int s = 0;
        for (int k = 0; k < DEPTH && k < n_written; k++) s += buffer[k][c];
        chk(mean[c] == 8'((s + DEPTH/2) / DEPTH), $sformatf("mean ch%0d %0d vs %0d", c, mean[c], (s + DEPTH/2) / DEPTH));
      end
    end join_none
  end

  initial begin
    wait (sending_done);
    write_allow = 1;
    repeat (100) @(negedge sys_clk);
    wait (write_allow == 1);
    repeat (100) @(negedge sys_clk);
    chk(n_written + n_lost == n_sent, $sformatf("written %0d + lost %0d vs sent %0d", n_written, n_lost, n_sent));
    chk(n_do == 1 + (n_written - DEPTH) / STEP, "do_ica count");
    chk(n_stall > 0, "stalls happened");
    chk(n_lost > 0, "losses happened");
    $display("sent %0d written %0d stalled %0d lost %0d do_ica %0d", n_sent, n_written, n_stall, n_lost, n_do);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
