// tb_gradient_update: runs full training passes (512 samples, one every 16
// cycles, as the system controller schedules them) through the computing
// unit with random weights, samples and means, and compares all sixteen new
// weights, the streamed (new, old) pairs and the four biases bit for bit
// with the reference model. Also checks the update phase length (16 weights
// in 16 cycles) and that a pass of sample slots takes 8192 cycles.
module tb_gradient_update;
  import ica_pkg::*;
  import ica_ref_pkg::*;
  localparam int LOG2T = 9;
  localparam int NS = 1 << LOG2T;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic acc_clear = 0, sample_start = 0, update_start = 0;
  word_t x_word = '0;
  sample_t [N_CH-1:0] mean;
  wmat_t w;
  logic [LRATE_W-1:0] lrate;
  logic nw_valid, update_done, busy;
  logic [3:0] nw_idx;
  weight_t nw_new, nw_old;
  wmat_t w_new;
  weight_t [N_CH-1:0] bias;

  gradient_update #(.LOG2_T(LOG2T)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint xs [];
  lmat_t  wr;
  lvec4_t br, mr;

  initial begin
    int scale;
    xs = new[NS * 4];
    br = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      int t0, nvalid, upd_cycles;
      // random weights near a scaled identity, random data and means
      scale = (pass == 2) ? 3000 : 600;
      for (int e = 0; e < 16; e++) begin
        wr[e] = ((e % 5 == 0) ? 12000 : 0) + int'($urandom_range(0, 2*scale)) - scale;
        w[e]  = weight_t'(wr[e]);
      end
      for (int c = 0; c < 4; c++) begin
        mr[c] = $urandom_range(90, 160);
        mean[c] = sample_t'(mr[c]);
      end
      for (int n = 0; n < NS * 4; n++) xs[n] = $urandom_range(0, 255);
      lrate = LRATE_W'(lrate_ref(pass * 3));
      @(posedge clk); acc_clear <= 1; @(posedge clk); acc_clear <= 0;
      t0 = $time;
      for (int n = 0; n < NS; n++) begin
        x_word <= {sample_t'(xs[n*4+3]), sample_t'(xs[n*4+2]),
                   sample_t'(xs[n*4+1]), sample_t'(xs[n*4])};
        sample_start <= 1;
        @(posedge clk); sample_start <= 0;
        repeat (15) @(posedge clk);
      end
      chk(($time - t0) / 10 == 8192, "pass length 8192 cycles");
      chk(!busy, "idle after the last slot");
      train_pass(wr, br, xs, NS, mr, lrate_ref(pass * 3), LOG2T);
      update_start <= 1; @(posedge clk); update_start <= 0;
      nvalid = 0; upd_cycles = 0;
      while (!update_done) begin
        @(posedge clk); upd_cycles++;
        if (nw_valid) begin
          chk(longint'(nw_new) == wr[nw_idx], $sformatf("streamed weight %0d", nw_idx));
          chk(nw_old == w[nw_idx], "old weight");
          chk(int'(nw_idx) == nvalid, "order");
          nvalid++;
        end
        if (upd_cycles > 100) break;
      end
      chk(nvalid == 16, "16 weights streamed");
      chk(upd_cycles == 17, $sformatf("update length %0d", upd_cycles));
      @(posedge clk);
      for (int e = 0; e < 16; e++)
        chk(longint'(w_new[e]) == wr[e], $sformatf("w_new[%0d] %0d vs %0d", e, w_new[e], wr[e]));
      for (int c = 0; c < 4; c++)
        chk(longint'(bias[c]) == br[c], $sformatf("bias[%0d] %0d vs %0d", c, bias[c], br[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
