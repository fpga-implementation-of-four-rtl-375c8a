// ica_pkg: widths, fixed-point formats and state encodings shared by the
// four-channel on-line Infomax ICA core.
//
// Number formats (all two's complement unless noted):
//   weight   16 bit, 2 integer bits (sign included) and 14 fraction bits,
//            the format the design is built around.
//   data     11 bit, a mean-removed 8-bit sample; read as a value with 7
//            fraction bits (sample/128) so that W*x lands in the sigmoid's
//            useful range. The scaling is this design's choice.
//   u        23 bit, 9 integer and 14 fraction bits (input of the sigmoid).
//   y        11 bit unsigned, 1 integer and 10 fraction bits (sigmoid out).
//   lrate    16 bit unsigned, 20 fraction bits; 4096 = 2^-8 is the
//            initial learning rate.
package ica_pkg;

  localparam int N_CH       = 4;     // channels
  localparam int N_W        = N_CH * N_CH;
  localparam int SAMPLE_W   = 8;     // bits per channel sample
  localparam int WORD_W     = N_CH * SAMPLE_W;  // one memory word = 4 channels
  localparam int WEIGHT_W   = 16;
  localparam int WEIGHT_FRAC= 14;
  localparam int DATA_W     = 11;
  localparam int DATA_FRAC  = 7;
  localparam int U_W        = 23;
  localparam int Y_W        = 11;
  localparam int Y_FRAC     = 10;
  localparam int PHI_W      = 12;    // 1-2y, signed, 10 fraction bits
  localparam int LRATE_W    = 16;
  localparam int LRATE_FRAC = 20;
  localparam int LRATE_INIT = 4096;  // 2^-8 in LRATE_FRAC format
  localparam logic [7:0] HEADER_BYTE = 8'hFF;

  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [DATA_W-1:0]   data_t;
  typedef logic signed [U_W-1:0]      u_t;
  typedef logic [SAMPLE_W-1:0]        sample_t;
  typedef sample_t [N_CH-1:0]         word_t;     // channel c at bits [8c+7:8c]
  typedef weight_t [N_W-1:0]          wmat_t;     // entry (i,j) at index 4i+j

  // System controller states (Table of the micro-controller: 0..3).
  typedef enum logic [1:0] {
    ST_IDLE     = 2'd0,
    ST_TRAINING = 2'd1,
    ST_CONVERGE = 2'd2,
    ST_DONE     = 2'd3
  } ica_state_t;

  // Transmit header controller states.
  typedef enum logic [1:0] {
    TX_IDLE   = 2'd0,
    TX_HEADER = 2'd1,
    TX_SEND   = 2'd2
  } txh_state_t;

endpackage
