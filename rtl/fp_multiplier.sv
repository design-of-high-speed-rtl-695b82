// fp_multiplier: IEEE 754 single-precision floating-point multiplier whose
// significand product comes from a Vedic (Urdhva-Tiryakbhyam) multiplier.
//
// fmresult = a * b, computed without a clock: all units are combinational
// and the product is valid one propagation delay after a and b settle.
// The operands are split into sign, biased exponent and fraction, and four
// units work on them side by side:
//   sign_unit      sign = s1 xor s2
//   exponent_unit  E1 + E2 - 127 with ripple carry adders
//   vedic_24x24    (1.M1) x (1.M2), 48 bits, from four 12x12 Vedic cells
//                  (each four 6x6, each four 3x3) summed with ripple carry
//                  adders
//   normaliser     shifts the product right when its leading one is at bit
//                  47 (exponent + 1), drops the hidden bit and rounds the
//                  23-bit fraction toward zero, +infinity or -infinity
// and exception_check flags overflow and underflow and packs the result.
//
// Ports: a, b and fmresult are 32-bit IEEE 754 words; rmode selects the
// rounding (RND_ZERO, RND_POS_INF, RND_NEG_INF); overflow and underflow
// flag a result exponent outside 1..254, which then gives signed infinity
// or signed zero. An operand with exponent field 0 (zero or subnormal) is
// taken as zero. Infinity and NaN operands get no special treatment. The
// rounding port, the flags and the zero, overflow and underflow results are
// this design's choices; the unit split, the Vedic hierarchy, the ripple
// carry adders and the bias arithmetic follow the published design.
module fp_multiplier
  import fp_mul_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  rnd_mode_e   rmode,
  output logic [31:0] fmresult,
  output logic        overflow,
  output logic        underflow
);

  fp32_t fa, fb, fr;

  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  logic                     sr;
  logic [EXP_W-1:0]         eresult;
  logic signed [EXPX_W-1:0] eraw;
  logic [PROD_W-1:0]        prod;
  logic [FRAC_W-1:0]        frac;
  logic signed [EXPX_W-1:0] e_final;
  logic                     zero_in;

  // An exponent field of zero marks zero (subnormals are flushed to zero).
  assign zero_in = (fa.exp == '0) || (fb.exp == '0);

  sign_unit u_sign (
    .s1(fa.sign), .s2(fb.sign), .sr(sr)
  );

  exponent_unit u_exp (
    .ea(fa.exp), .eb(fb.exp), .eresult(eresult), .eraw(eraw)
  );

  vedic_24x24 u_mant (
    .a({1'b1, fa.frac}), .b({1'b1, fb.frac}), .p(prod)
  );

  normaliser u_norm (
    .n1(prod), .sign(sr), .rmode(rmode), .e_in(eraw), .nout(frac), .e_out(e_final)
  );

  exception_check u_exc (
    .sign(sr), .e_final(e_final), .frac(frac), .zero_in(zero_in),
    .result(fr), .overflow(overflow), .underflow(underflow)
  );

  assign fmresult = fr;

endmodule
