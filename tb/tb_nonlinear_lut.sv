// tb_nonlinear_lut: checks the sigmoid table against the real sigmoid
// (error within half a table step of slope plus rounding), exact symmetry
// g(-u) = 1 - g(u), monotonicity and saturation for |u| >= 8 and at the
// input range ends.
module tb_nonlinear_lut;
  import ica_pkg::*;
  u_t u;
  logic [Y_W-1:0] y;
  int checks = 0, failures = 0;
  nonlinear_lut dut (.u, .y);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s u=%0d y=%0d", what, u, y); end
  endtask

  initial begin
    int prev;
    prev = -1;
    // sweep -10 .. +10 in steps of 1/128
    for (int k = -1280; k <= 1280; k++) begin
      real ur, ideal;
      int yp;
      u = u_t'(k * 128);
      #1;
      ur = real'(k) / 128.0;
      ideal = 1024.0 / (1.0 + $exp(-ur));
      chk((rabs(real'(y) - ideal) <= 4.5), "accuracy");
      chk(int'(y) >= prev, "monotonic");
      prev = int'(y);
      yp = int'(y);
      u = u_t'(-k * 128);
      #1;
      if (k != 0) chk(int'(y) + yp == 1024, "symmetry");
    end
    u = u_t'(23'sh3fffff);  #1; chk(y == 11'd1024, "sat max");
    u = u_t'(-23'sh400000); #1; chk(y == 11'd0,    "sat min");
    u = u_t'(8 << 14);      #1; chk(y == 11'd1024, "sat at 8");
    u = '0;                 #1; chk(y == 11'd514,  "u=0 entry");
    for (int n = 0; n < 2000; n++) begin
      int r = int'($urandom_range(0, 8 << 14)) - (4 << 14);
      u = u_t'(r); #1;
      chk(rabs(real'(y) - 1024.0 / (1.0 + $exp(-real'(r) / 16384.0))) <= 4.5, "random");
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
