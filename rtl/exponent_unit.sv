// exponent_unit: biased exponent of a floating-point product.
//
// Both input exponents carry the bias of 127, so their sum carries it twice
// and one bias is taken off: ER = E1 + E2 - 127. A first ripple carry adder
// forms the 9-bit sum E1 + E2; a second one adds the two's complement of
// 127 (10'h381 in 10 bits), turning the subtraction into an addition.
// eraw is the full result as a 10-bit two's complement number (range
// -127..383), which the later range check needs; eresult is its low 8 bits.
// Normalisation may still add 1 or 2 (see normaliser). Combinational.
module exponent_unit
  import fp_mul_pkg::*;
#(
  parameter int unsigned BIAS_P = BIAS
) (
  input  logic [EXP_W-1:0]         ea,
  input  logic [EXP_W-1:0]         eb,
  output logic [EXP_W-1:0]         eresult,
  output logic signed [EXPX_W-1:0] eraw
);

  localparam logic [EXPX_W-1:0] NEG_BIAS = EXPX_W'(-int'(BIAS_P));

  logic [EXP_W-1:0]  sum;
  logic              sum_c;
  logic [EXPX_W-1:0] diff;
  logic              diff_c;

  rca #(.N(EXP_W)) u_add_exp (
    .x(ea), .y(eb), .cin(1'b0), .s(sum), .cout(sum_c)
  );

  rca #(.N(EXPX_W)) u_sub_bias (
    .x({1'b0, sum_c, sum}), .y(NEG_BIAS), .cin(1'b0), .s(diff), .cout(diff_c)
  );

  assign eraw    = signed'(diff);
  assign eresult = diff[EXP_W-1:0];

endmodule
