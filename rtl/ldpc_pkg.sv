// ldpc_pkg: constants shared by the min-sum LDPC decoder.
//
// Messages (intrinsic values, check-to-variable R and variable-to-check L
// messages, a-posteriori values) are signed two's-complement fixed-point
// numbers of LLR_W bits with LLR_F fractional bits. They are kept inside the
// symmetric range [-(2^(LLR_W-1)-1), +(2^(LLR_W-1)-1)] so that a magnitude
// never overflows. Received samples use the same scale with Y_W bits.
//
// The scaling factor alpha is ALPHA_NUM / 2^ALPHA_SHIFT; the default 3/4 is
// the value used in the worked example this decoder follows. The parity-check
// matrix H_EXAMPLE is that example's 4 x 6 matrix, written row by row with the
// leftmost bit being variable node 1 (index 0). The word widths and the
// iteration limit are this design's own choices.
package ldpc_pkg;

  localparam int M_DEF       = 4;   // check nodes (rows of H)
  localparam int N_DEF       = 6;   // variable nodes (columns of H)
  localparam int LLR_W       = 10;  // message width
  localparam int LLR_F       = 5;   // fractional bits of every message
  localparam int Y_W         = 8;   // received sample width, same scale
  localparam int ALPHA_NUM   = 3;   // alpha = 3 / 4 = 0.75
  localparam int ALPHA_SHIFT = 2;
  localparam int MAX_ITER    = 10;  // iteration limit

  localparam bit [0:M_DEF-1][0:N_DEF-1] H_EXAMPLE = {
    6'b110100,   // check 1: v1 v2 v4
    6'b011010,   // check 2: v2 v3 v5
    6'b100011,   // check 3: v1 v5 v6
    6'b001101    // check 4: v3 v4 v6
  };

  // Decoder sequencing states.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,   // waiting for start
    ST_HOR  = 3'd1,   // flooding: check nodes produce R for every edge
    ST_VER  = 3'd2,   // flooding: variable nodes produce L, Lv, bits
    ST_COL  = 3'd3,   // column layered: one column of H per cycle
    ST_CHK  = 3'd4    // parity check of the hard decisions, stop or repeat
  } dec_state_e;

endpackage
