// normaliser: normalises and rounds the 48-bit significand product.
//
// Both significands lie in [1,2), so their product n1 lies in [1,4): the
// leading one is at bit 46 or bit 47. At bit 46 the product is already
// normalised and the fraction is n1[45:23]; at bit 47 it is shifted right
// by one, the fraction is n1[46:24] and the exponent goes up by 1. The bits
// below the fraction are dropped, and the result is rounded by rmode:
//   RND_ZERO    : truncate
//   RND_POS_INF : add 1 ulp to a positive result if any dropped bit is 1
//   RND_NEG_INF : add 1 ulp to a negative result if any dropped bit is 1
// Adding the ulp can carry out of the fraction (1.111..1 + ulp = 10.0), which
// leaves a zero fraction and raises the exponent by 1 more. Both exponent
// steps are ripple carry additions on the 10-bit signed exponent.
// Round to nearest is not one of the modes. Combinational.
module normaliser
  import fp_mul_pkg::*;
(
  input  logic [PROD_W-1:0]        n1,
  input  logic                     sign,
  input  rnd_mode_e                rmode,
  input  logic signed [EXPX_W-1:0] e_in,
  output logic [FRAC_W-1:0]        nout,
  output logic signed [EXPX_W-1:0] e_out
);

  logic              shift;
  logic [FRAC_W-1:0] frac_t;
  logic              inexact;
  logic              round_up;
  logic [FRAC_W-1:0] frac_r;
  logic              frac_c;
  logic [EXPX_W-1:0] e_norm;
  logic [EXPX_W-1:0] e_rnd;
  logic              e_norm_c, e_rnd_c;

  always_comb begin
    shift   = n1[PROD_W-1];
    frac_t  = shift ? n1[PROD_W-2 -: FRAC_W] : n1[PROD_W-3 -: FRAC_W];
    inexact = shift ? (|n1[PROD_W-FRAC_W-2:0]) : (|n1[PROD_W-FRAC_W-3:0]);
    unique case (rmode)
      RND_POS_INF: round_up = inexact & ~sign;
      RND_NEG_INF: round_up = inexact & sign;
      default:     round_up = 1'b0;
    endcase
  end

  // Fraction rounding: frac_t + round_up.
  rca #(.N(FRAC_W)) u_round (
    .x(frac_t), .y('0), .cin(round_up), .s(frac_r), .cout(frac_c)
  );

  // Exponent + 1 when the product was shifted right.
  rca #(.N(EXPX_W)) u_exp_norm (
    .x(e_in), .y('0), .cin(shift), .s(e_norm), .cout(e_norm_c)
  );

  // Exponent + 1 when rounding carried out of the fraction.
  rca #(.N(EXPX_W)) u_exp_rnd (
    .x(e_norm), .y('0), .cin(frac_c), .s(e_rnd), .cout(e_rnd_c)
  );

  assign nout  = frac_r;
  assign e_out = signed'(e_rnd);

endmodule
