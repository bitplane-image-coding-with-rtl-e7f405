// bpc_pkg - shared constants and types of the BPC-PaCo codeblock codec.
//
// The codec codes one codeblock of quantized wavelet coefficients with T
// stripes of two columns each, one stripe per lane, all lanes in lockstep.
// The numbers below are the defaults of the design: 32 lanes and 64 rows give
// the 64x64 codeblock, 16-bit codewords and 7-bit probabilities follow the
// reference configuration of the coding method. The magnitude width, the
// number of subbands and the bitstream depth are this design's own choices.
//
// Context numbering in the probability table (one row of NCTX entries per
// subband and bitplane):
//   0..8   significance contexts (number of significant neighbours)
//   9..12  sign contexts
//   13     the single refinement context
package bpc_pkg;

  localparam int unsigned T_DEF        = 32;    // lanes = stripes of two columns
  localparam int unsigned ROWS_DEF     = 64;    // codeblock rows
  localparam int unsigned W_DEF        = 16;    // codeword length in bits
  localparam int unsigned PHAT_DEF     = 7;     // probability precision in bits
  localparam int unsigned MAG_W_DEF    = 20;    // magnitude bits (bitplanes)
  localparam int unsigned NSUB_DEF     = 16;    // subbands of a 5-level transform
  localparam int unsigned BS_WORDS_DEF = 8192;  // codeword slots of the bitstream

  localparam int unsigned NCTX       = 14;
  localparam int unsigned CTX_SIGN0  = 9;
  localparam int unsigned CTX_REF    = 13;
  localparam int unsigned CTX_W      = 4;

  typedef enum logic [1:0] {
    PASS_SPP = 2'd0,   // significance propagation pass
    PASS_MRP = 2'd1,   // magnitude refinement pass
    PASS_CP  = 2'd2    // cleanup pass
  } pass_e;

endpackage
