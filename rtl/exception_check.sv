// exception_check: range check and packing of the floating-point product.
//
// e_final is the biased result exponent as a signed 10-bit number. A normal
// single-precision result needs 1 <= e_final <= 254:
//   e_final > 254 : overflow,  result is infinity with the product's sign
//   e_final < 1   : underflow, result is zero with the product's sign
// Subnormal results are not formed (flush to zero). When an operand is zero
// (zero_in) the result is a signed zero and neither flag is raised.
// Otherwise the result is {sign, e_final[7:0], frac}. The choice of
// infinity and zero as the overflow and underflow results is this design's
// own. Combinational.
module exception_check
  import fp_mul_pkg::*;
(
  input  logic                     sign,
  input  logic signed [EXPX_W-1:0] e_final,
  input  logic [FRAC_W-1:0]        frac,
  input  logic                     zero_in,
  output fp32_t                    result,
  output logic                     overflow,
  output logic                     underflow
);

  localparam logic signed [EXPX_W-1:0] EXP_MAX = EXPX_W'(254);
  localparam logic signed [EXPX_W-1:0] EXP_MIN = EXPX_W'(1);

  always_comb begin
    overflow  = !zero_in && (e_final > EXP_MAX);
    underflow = !zero_in && (e_final < EXP_MIN);
    result.sign = sign;
    if (zero_in || underflow) begin
      result.exp  = '0;
      result.frac = '0;
    end else if (overflow) begin
      result.exp  = '1;
      result.frac = '0;
    end else begin
      result.exp  = e_final[EXP_W-1:0];
      result.frac = frac;
    end
  end

endmodule
