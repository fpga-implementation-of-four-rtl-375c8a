// result_encoder: turns the four fixed-point results of one sample into 8-bit
// integers for the output stream and packs them into a 32-bit word
// (channel 1 in bits [7:0]).
//
// Each result y (14 fraction bits over the sample scale) is rounded to the
// sample scale, offset by 128 so that 128 means zero, and clipped to
// 0..254. 255 is never sent because FF is the frame header. Offset binary
// and the clipping are this design's choices; the design says only that the
// fixed-point result is encoded to an 8-bit integer. Combinational.
module result_encoder
  import ica_pkg::*;
#(
  parameter int IN_W = WEIGHT_W + DATA_W + 2
) (
  input  logic signed [IN_W-1:0] y [N_CH],
  output word_t                  code
);
  always_comb
    for (int c = 0; c < N_CH; c++) begin
      logic signed [IN_W:0] r;   // one extra bit so the rounding add cannot wrap
      r = (((IN_W+1)'(y[c]) + (IN_W+1)'(1 << (WEIGHT_FRAC - 1))) >>> WEIGHT_FRAC)
          + (IN_W+1)'(128);
      if (r < 0)             code[c] = 8'd0;
      else if (r > 254)      code[c] = 8'd254;
      else                   code[c] = 8'(r);
    end
endmodule
