// rca: N-bit ripple carry adder.
//
// s + (cout << N) = x + y + cin. The sum is formed bit by bit by a chain of
// full adders, each passing its carry to the next more significant bit, so
// the delay grows linearly with N. This is the adder used throughout the
// multiplier: in the exponent unit, the normaliser and to sum the partial
// products of the Vedic multipliers. Purely combinational.
module rca #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    assign s[i]   = x[i] ^ y[i] ^ c[i];
    assign c[i+1] = (x[i] & y[i]) | (x[i] & c[i]) | (y[i] & c[i]);
  end

  assign cout = c[N];

endmodule
