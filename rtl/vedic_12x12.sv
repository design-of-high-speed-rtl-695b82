// vedic_12x12: 12x12-bit unsigned multiplier from four 6x6 Vedic multipliers.
//
// The operands are split into 6-bit halves. Four vedic_6x6 cells form the
// half-by-half products aL*bL, aL*bH, aH*bL and aH*bH in parallel, and
// vedic_combine adds them, shifted into place, with ripple carry adders.
// Combinational: p = a * b.
module vedic_12x12 (
  input  logic [11:0]  a,
  input  logic [11:0]  b,
  output logic [23:0] p
);

  localparam int unsigned H = 6;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_6x6 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_6x6 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q1));
  vedic_6x6 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q2));
  vedic_6x6 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_combine #(.H(H)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );

endmodule
