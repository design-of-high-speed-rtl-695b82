// vedic_6x6: 6x6-bit unsigned multiplier from four 3x3 Vedic multipliers.
//
// The operands are split into 3-bit halves. Four vedic_3x3 cells form the
// half-by-half products aL*bL, aL*bH, aH*bL and aH*bH in parallel, and
// vedic_combine adds them, shifted into place, with ripple carry adders.
// Combinational: p = a * b.
module vedic_6x6 (
  input  logic [5:0]  a,
  input  logic [5:0]  b,
  output logic [11:0] p
);

  localparam int unsigned H = 3;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_3x3 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q0));
  vedic_3x3 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q1));
  vedic_3x3 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q2));
  vedic_3x3 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q3));

  vedic_combine #(.H(H)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );

endmodule
