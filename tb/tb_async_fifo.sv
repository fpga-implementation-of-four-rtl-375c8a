// tb_async_fifo: writes on a 10 ns clock and reads on a 13 ns clock with
// random push and pop, in bursts that fill the queue and drain it. A
// scoreboard checks order and contents, that
// nothing is lost or duplicated, that almost-full rises before full, that
// pushes while full are ignored and that rdata appears one read clock after
// pop.
module tb_async_fifo;
  localparam int WIDTH = 32, DEPTH = 128, AF_MARGIN = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;
  logic push = 0, pop = 0, full, afull, empty;
  logic [WIDTH-1:0] wdata = '0, rdata;
  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AF_MARGIN(AF_MARGIN)) dut (.*);
  int checks = 0, failures = 0, seen_full = 0, seen_afull = 0, pushed = 0, popped = 0;
  logic [WIDTH-1:0] sb [$];
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  int phase = 0;   // 0: fill (reader slow), 1: drain (writer slow), 2: mixed
  logic wdone = 0;

  // writer
  initial begin
    repeat (3) @(negedge wclk); wrst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int pct = (phase == 0) ? 90 : (phase == 1 ? 10 : 50);
      push = ($urandom_range(0, 99) < pct);
      wdata = $urandom;
      @(posedge wclk);
      if (push) begin
        if (!full) begin sb.push_back(wdata); pushed++; end
        else seen_full++;
      end
      if (afull) seen_afull++;
      chk(!full || afull, "almost full set whenever full");
      @(negedge wclk);
      if (n == 800) phase = 1;
      if (n == 1600) phase = 2;
    end
    push = 0; wdone = 1;
  end
  // reader
  initial begin
    repeat (3) @(negedge rclk); rrst_n = 1;
    forever begin
      automatic int pct = (phase == 0) ? 5 : (phase == 1 ? 95 : 50);
      pop = !empty && ($urandom_range(0, 99) < pct);
      @(posedge rclk);
      #1;
      if (pop) begin
        automatic logic [WIDTH-1:0] exp_d;
        chk(sb.size() > 0, "pop with data written");
        exp_d = sb.pop_front();
        chk(rdata === exp_d, $sformatf("data %h expected %h", rdata, exp_d));
        popped++;
      end
      pop = 0;
      @(negedge rclk);
      if (wdone && empty && sb.size() == 0) break;
    end
    chk(seen_full > 0, "full reached");
    chk(seen_afull > 0, "almost full reached");
    chk(pushed == popped, "every word read once");
    $display("pushed %0d, pushes refused while full %0d", pushed, seen_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
