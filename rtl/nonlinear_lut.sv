// nonlinear_lut: symmetric piecewise look-up table of the logistic sigmoid
// y = 1 / (1 + exp(-u)).
//
// Input u is In[22:0]: sign, 8 further integer bits and 14 fraction bits.
// Output y is Out[10:0]: 1 integer bit and 10 fraction bits, so 1024 = 1.0.
// Because g(-u) = 1 - g(u) only |u| is looked up and the sign bit picks
// either the entry or its complement ("symmetry"), which halves the table.
// The table covers 0 <= |u| < 8 in steps of 1/64: the index is the low
// three integer bits and the top six fraction bits of |u|. Entry k holds
// round(1024 * g((k + 0.5) / 64)), evaluated by a constant function at
// elaboration. For |u| >= 8 the output saturates to 1024 (or 0). Step size
// and range are this implementation's choices; the 23-bit input, 11-bit
// output and the symmetric table follow the design. Purely combinational.
module nonlinear_lut
  import ica_pkg::*;
#(
  parameter int IDX_W = 9        // table entries = 2**IDX_W
) (
  input  u_t             u,
  output logic [Y_W-1:0] y
);
  localparam int  N     = 1 << IDX_W;
  localparam int  SHIFT = WEIGHT_FRAC + 3 - IDX_W;   // index = |u|[16:SHIFT]
  localparam real STEP  = 8.0 / real'(N);
  localparam logic [Y_W-1:0] ONE = Y_W'(1 << Y_FRAC);

  typedef logic [Y_W-1:0] tab_t [N];
  function automatic tab_t build_table();
    tab_t t;
    for (int k = 0; k < N; k++)
      t[k] = Y_W'(int'($floor(real'(1 << Y_FRAC)
                 / (1.0 + $exp(-(real'(k) + 0.5) * STEP)) + 0.5)));
    return t;
  endfunction
  localparam tab_t TABLE = build_table();

  logic             neg;
  logic [U_W-1:0]   mag;
  logic             big;
  logic [Y_W-1:0]   g_pos;

  always_comb begin
    neg   = u[U_W-1];
    mag   = neg ? U_W'(-u) : U_W'(u);          // -(-2^22) wraps, caught by big
    big   = (mag[U_W-1:WEIGHT_FRAC+3] != '0);
    g_pos = big ? ONE : TABLE[mag[WEIGHT_FRAC+2:SHIFT]];
    y     = neg ? (ONE - g_pos) : g_pos;
  end
endmodule
