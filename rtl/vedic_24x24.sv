// vedic_24x24: 24x24-bit unsigned multiplier from four 12x12 Vedic multipliers.
//
// The operands are split into 12-bit halves. Four vedic_12x12 cells form the
// half-by-half products aL*bL, aL*bH, aH*bL and aH*bH in parallel, and
// vedic_combine adds them, shifted into place, with ripple carry adders.
// This is the mantissa calculation unit of the floating-point multiplier:
// a and b are the significands 1.M with the hidden bit at position 23, and
// p is the 48-bit intermediate product with its binary point after bit 46.
// Combinational: p = a * b.
module vedic_24x24 (
  input  logic [23:0]  a,
  input  logic [23:0]  b,
  output logic [47:0] p
);

  localparam int unsigned H = 12;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_12x12 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_12x12 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q1));
  vedic_12x12 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q2));
  vedic_12x12 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_combine #(.H(H)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );

endmodule
