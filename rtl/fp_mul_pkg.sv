// fp_mul_pkg: types and constants shared by the single-precision multiplier.
//
// fp32_t is the IEEE 754 binary32 layout: sign in bit 31, biased exponent in
// bits 30:23 and fraction in bits 22:0. BIAS is the exponent bias of 127.
// rnd_mode_e selects one of the three directed roundings the multiplier
// supports; the encoding is this design's own choice.
package fp_mul_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand with hidden 1
  localparam int unsigned PROD_W = 2 * SIG_W;    // 48-bit significand product
  localparam int unsigned EXPX_W = 10;           // signed exponent during computation
  localparam int unsigned BIAS   = 127;

  typedef struct packed {
    logic                  sign;
    logic [EXP_W-1:0]      exp;
    logic [FRAC_W-1:0]     frac;
  } fp32_t;

  typedef enum logic [1:0] {
    RND_ZERO    = 2'd0,   // toward zero (truncation)
    RND_POS_INF = 2'd1,   // toward +infinity
    RND_NEG_INF = 2'd2    // toward -infinity
  } rnd_mode_e;

endpackage
