// vedic_3x3: 3x3-bit unsigned multiplier, Urdhva-Tiryakbhyam method.
//
// "Vertically and crosswise": output column k is the sum of all bit products
// a[i]&b[j] with i+j == k, plus the carry handed on from column k-1. All
// bit products are formed at once; only the short column carries ripple.
//   column 0: a0b0
//   column 1: a1b0 + a0b1
//   column 2: a2b0 + a1b1 + a0b2 + carry
//   column 3: a2b1 + a1b2        + carry
//   column 4: a2b2               + carry  (its upper bit is p[5])
// This is the base cell of the 6x6, 12x12 and 24x24 multipliers.
// Combinational: p = a * b.
module vedic_3x3 (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [5:0] p
);

  logic [1:0] col1;
  logic [2:0] col2, col3;
  logic [1:0] col4;

  always_comb begin
    col1 = 2'(a[1] & b[0]) + 2'(a[0] & b[1]);
    col2 = 3'(a[2] & b[0]) + 3'(a[1] & b[1]) + 3'(a[0] & b[2]) + 3'(col1[1]);
    col3 = 3'(a[2] & b[1]) + 3'(a[1] & b[2]) + 3'(col2[2:1]);
    col4 = 2'(a[2] & b[2]) + col3[2:1];
    p    = {col4, col3[0], col2[0], col1[0], a[0] & b[0]};
  end

endmodule
