// vedic_combine: adds the four partial products of a split Vedic multiplier.
//
// An operand of 2H bits is split into halves aH:aL and bH:bL. With
//   q0 = aL*bL, q1 = aL*bH, q2 = aH*bL, q3 = aH*bH (each 2H bits)
// the product is q3<<2H + (q1+q2)<<H + q0. This is the crosswise step of
// Urdhva-Tiryakbhyam applied to half-words. The sum uses three ripple
// carry adders:
//   1. t1 = q1 + q2                       (2H bits plus carry)
//   2. t2 = t1 + q0[2H-1:H]               (2H+1 bits)
//   3. p[4H-1:2H] = q3 + t2[2H:H]         (2H bits; cannot carry out)
// and p[H-1:0] = q0[H-1:0], p[2H-1:H] = t2[H-1:0] pass straight through.
// Combinational. Used by vedic_6x6, vedic_12x12 and vedic_24x24.
module vedic_combine #(
  parameter int unsigned H = 3
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);

  logic [2*H-1:0] t1_s;
  logic           t1_c;
  logic [2*H:0]   t2;
  logic           t2_c;
  logic [2*H-1:0] hi;
  logic           hi_c;

  rca #(.N(2*H)) u_add_cross (
    .x(q1), .y(q2), .cin(1'b0), .s(t1_s), .cout(t1_c)
  );

  rca #(.N(2*H+1)) u_add_low (
    .x({t1_c, t1_s}), .y({(H+1)'(0), q0[2*H-1:H]}), .cin(1'b0), .s(t2), .cout(t2_c)
  );

  rca #(.N(2*H)) u_add_high (
    .x(q3), .y({(H-1)'(0), t2[2*H:H]}), .cin(1'b0), .s(hi), .cout(hi_c)
  );

  assign p = {hi, t2[H-1:0], q0[H-1:0]};

  // The full product fits in 4H bits, so the two outer adders never carry out.
  always_comb begin
    assert (t2_c == 1'b0);
    assert (hi_c == 1'b0);
  end

endmodule
