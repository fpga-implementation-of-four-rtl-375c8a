// tb_final_result: the result multiplier reading a real in_memory filled
// with random samples. For random weights, means and write pointers it
// checks the 128 outputs against y_i = sum_j W_ij (x_j - mean_j) for the
// newest 128 samples in time order (wrapping round the buffer), and the
// timing: with hold low the first result leaves 4 cycles after the start
// strobe, results are back to back, and busy lasts 131 cycles. With a
// small queue model whose almost-full flag drives hold (4 entries of margin)
// and a random reader, it checks that hold pauses the reads and the queue
// never overflows. A start while busy is ignored.
module tb_final_result;
  import ica_pkg::*;
  localparam int DEPTH = 512, N_OUT = 128, AW = 9, YW = WEIGHT_W + DATA_W + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, hold = 0, mem_en, out_valid, busy, sleep;
  wmat_t w;
  sample_t [N_CH-1:0] mean;
  logic [AW-1:0] wr_ptr = '0, mem_addr, b_addr = '0;
  word_t mem_dout, b_din = '0, b_dout;
  logic b_en = 0, b_we = 0;
  logic signed [YW-1:0] out_y [N_CH];
  final_result #(.DEPTH(DEPTH), .N_OUT(N_OUT)) dut (.*);
  in_memory #(.DEPTH(DEPTH), .IDLE_LIMIT(32)) u_mem (
    .clk, .rst_n, .a_en(mem_en), .a_addr(mem_addr), .a_dout(mem_dout),
    .b_en, .b_we, .b_addr, .b_din, .b_dout, .sleep);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t image [DEPTH];
  longint exp_y [$];
  int n_out = 0, cyc = 0, first_out = -1, last_out = -1, qlevel = 0, qmax = 0, hold_cycles = 0;
  bit use_queue = 0;
  localparam int QDEPTH = 8, QMARGIN = 4;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      for (int i = 0; i < N_CH; i++) begin
        automatic longint e = exp_y.size() ? exp_y.pop_front() : 0;
        chk(longint'(out_y[i]) == e, $sformatf("out %0d ch%0d: %0d expected %0d", n_out, i, out_y[i], e));
      end
      n_out++;
    end
    if (use_queue) begin
      if (hold) hold_cycles++;
      if (out_valid) qlevel++;
      if (qlevel > 0 && $urandom_range(0, 3) == 0) qlevel--;
      chk(qlevel <= QDEPTH, "queue overflow");
      if (qlevel > qmax) qmax = qlevel;
    end
  end
  always @(negedge clk) if (use_queue) hold = (qlevel >= QDEPTH - QMARGIN);

  task automatic one_run(input bit with_queue);
    int start_cyc;
    for (int e = 0; e < 16; e++)
      w[e] = (e % 5 == 0) ? weight_t'($urandom_range(0, 32767))
                          : weight_t'($urandom);
    for (int c = 0; c < N_CH; c++) mean[c] = 8'($urandom_range(0, 255));
    wr_ptr = AW'($urandom);
    for (int k = 0; k < N_OUT; k++) begin
      automatic int a = (int'(wr_ptr) - N_OUT + k + DEPTH) % DEPTH;
      for (int i = 0; i < N_CH; i++) begin
        automatic longint s = 0;
        for (int j = 0; j < N_CH; j++)
          s += longint'(w[4*i+j]) * (longint'(image[a][j]) - longint'(mean[j]));
        exp_y.push_back(s);
      end
    end
    n_out = 0; first_out = -1; use_queue = with_queue; qlevel = 0;
    if (!with_queue) hold = 0;
    start = 1; @(negedge clk); start = 0; start_cyc = cyc;
    // a second start while busy is ignored
    repeat (5) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    chk(n_out == N_OUT, $sformatf("%0d results", n_out));
    chk(exp_y.size() == 0, "all expected results seen");
    if (!with_queue) begin
      chk(first_out - start_cyc == 4, $sformatf("first result after %0d cycles", first_out - start_cyc));
      chk(last_out - first_out == N_OUT - 1, "results back to back");
      chk(cyc - start_cyc == N_OUT + 3, $sformatf("busy for %0d cycles", cyc - start_cyc));
    end
    repeat (10) @(negedge clk);
    chk(n_out == N_OUT, "nothing after busy");
    use_queue = 0; hold = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      for (int c = 0; c < N_CH; c++) image[a][c] = 8'($urandom_range(0, 254));
      b_en = 1; b_we = 1; b_addr = AW'(a); b_din = image[a];
      @(negedge clk);
    end
    b_en = 0; b_we = 0;
    for (int r = 0; r < 6; r++) one_run(0);
    for (int r = 0; r < 6; r++) one_run(1);
    chk(hold_cycles > 0, "hold used");
    $display("queue max level %0d, hold cycles %0d", qmax, hold_cycles);
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
