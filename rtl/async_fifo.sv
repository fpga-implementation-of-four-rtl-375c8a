// async_fifo: dual-clock FIFO, 32 bits x 128 entries, between the system
// clock (write side, result multiplier) and the baud-rate clock (read side,
// transmit header controller). 128 entries hold one division's output, two
// seconds at 64 Hz.
//
// Classic Gray-code design: binary read and write pointers one bit wider
// than the address, their Gray codes crossing the clock boundary through two
// flops each. full and afull (at most AF_MARGIN free entries) are computed
// on the write side, empty on the read side; both are conservative while a
// pointer is in flight. A push when full and a pop when empty are ignored.
// rdata appears one read clock after pop (registered read, like a block
// RAM). Gray-pointer synchronisation is this implementation's choice.
module async_fifo #(
  parameter int WIDTH     = 32,
  parameter int DEPTH     = 128,
  parameter int AF_MARGIN = 4,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             afull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW:0] rbin_w, level;
  assign rbin_w = gray2bin(rgray_w2);
  assign level  = wbin - rbin_w;
  assign full   = (level == (AW+1)'(DEPTH));
  assign afull  = (level >= (AW+1)'(DEPTH - AF_MARGIN));
  wire   do_push = push && !full;

  always_ff @(posedge wclk) if (do_push) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; end
    else begin
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      if (do_push) begin wbin <= wbin + 1'b1; wgray <= bin2gray(wbin + 1'b1); end
    end
  end

  // read side
  assign empty = (rgray == wgray_r2);
  wire   do_pop = pop && !empty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; rdata <= '0;
    end else begin
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      if (do_pop) begin
        rdata <= mem[rbin[AW-1:0]];
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
