// tb_result_encoder: applies random and edge-case outputs (zero, the
// rounding midpoints, the clipping limits and the extremes of the input
// width) and compares the four codes with the reference rounding
// round(y / 2^14) + 128 clipped to 0..254. The block is combinational.
module tb_result_encoder;
  import ica_pkg::*;
  import ica_ref_pkg::*;
  localparam int IN_W = WEIGHT_W + DATA_W + 2;
  logic signed [IN_W-1:0] y [N_CH];
  word_t code;
  result_encoder #(.IN_W(IN_W)) dut (.*);
  int checks = 0, failures = 0;
  longint edges [] = '{0, 8191, 8192, -8192, -8193, 16383, 16384,
                       126*16384 + 8191, 126*16384 + 8192, 127*16384,
                       -128*16384 - 8192, -128*16384 - 8193, -128*16384 + 8191,
                       (1 <<< (IN_W-1)) - 1, -(1 <<< (IN_W-1))};
  task automatic apply(input longint v [N_CH]);
    for (int c = 0; c < N_CH; c++) y[c] = IN_W'(v[c]);
    #1;
    for (int c = 0; c < N_CH; c++) begin
      checks++;
      if (int'(code[c]) != encode_ref(v[c])) begin
        failures++;
        $display("FAIL y=%0d code=%0d expected %0d", v[c], code[c], encode_ref(v[c]));
      end
    end
  endtask
  initial begin
    automatic longint v [N_CH];
    foreach (edges[k]) begin
      for (int c = 0; c < N_CH; c++) v[c] = edges[(k + c) % edges.size()];
      apply(v);
    end
    for (int n = 0; n < 5000; n++) begin
      for (int c = 0; c < N_CH; c++)
        v[c] = (n % 2 == 0) ? longint'(int'($urandom_range(0, 2**22)) - 2**21)
                            : longint'($signed(IN_W'($urandom)));
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
