// sign_unit: sign of a floating-point product.
//
// The product is negative exactly when one operand is negative, so the sign
// is the exclusive-or of the two operand sign bits. Combinational.
module sign_unit (
  input  logic s1,
  input  logic s2,
  output logic sr
);

  assign sr = s1 ^ s2;

endmodule
