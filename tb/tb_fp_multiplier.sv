// tb_fp_multiplier: end-to-end self-check of the single-precision multiplier.
//
// Reference: both operands are widened to double precision, where the
// product of two 24-bit significands is exact, and the double result is cut
// back to single precision with the selected directed rounding, then range
// checked (exponent 1..254, else signed infinity or zero) in the way the
// multiplier specifies. Operands with exponent field 0 count as zero.
//
// The run applies
//   - the two published example products, in truncation mode:
//       0xC0C00000 (-6)       x 0x3FB4FDF3 (1.414) = 0xC107BE76 (-8.484)
//       0x43061000 (134.0625) x 0xC0100000 (-2.25) = 0xC396D200 (-301.640625)
//   - directed cases for rounding carry-out, overflow, underflow and zero
//   - random operands in all three rounding modes
// and counts each mechanism: product shifted right or not, rounded up,
// rounding carried into the exponent, overflow, underflow, zero operand.
// A mechanism that never happened counts as a failure.
module tb_fp_multiplier;
  import fp_mul_pkg::*;

  logic [31:0] a, b, fmresult;
  rnd_mode_e   rmode;
  logic        overflow, underflow;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_round_up = 0, n_round_carry = 0;
  int n_ovf = 0, n_udf = 0, n_zero = 0;
  int n_mode [3] = '{0, 0, 0};

  fp_multiplier dut (
    .a(a), .b(b), .rmode(rmode), .fmresult(fmresult), .overflow(overflow), .underflow(underflow)
  );

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input logic [31:0] x);
    logic [10:0] e11;
    if (x[30:23] == 8'h0) return 0.0;
    e11 = 11'(int'(x[30:23]) - 127 + 1023);
    return $bitstoreal({x[31], e11, x[22:0], 29'h0});
  endfunction

  // Expected {overflow, underflow, result}; also updates the mechanism counts.
  function automatic logic [33:0] reference(input logic [31:0] x, input logic [31:0] y,
                                            input rnd_mode_e m);
    real         p;
    logic [63:0] d;
    logic        s;
    int          e;
    logic [23:0] f;
    logic        inexact, up;
    s = x[31] ^ y[31];
    if (x[30:23] == 8'h0 || y[30:23] == 8'h0) begin
      n_zero++;
      return {2'b00, s, 31'h0};
    end
    if ({1'b1, x[22:0]} * {1'b1, y[22:0]} >= 48'h8000_0000_0000) n_shift++;
    else n_noshift++;
    p = to_real(x) * to_real(y);
    d = $realtobits(p);
    e = int'(d[62:52]) - 1023 + 127;
    f = {1'b0, d[51:29]};
    inexact = |d[28:0];
    up = inexact && ((m == RND_POS_INF && !s) || (m == RND_NEG_INF && s));
    if (up) begin
      n_round_up++;
      f = f + 24'd1;
      if (f[23]) begin
        n_round_carry++;
        e++;
      end
    end
    if (e > 254) begin n_ovf++; return {2'b10, s, 8'hff, 23'h0}; end
    if (e < 1)   begin n_udf++; return {2'b01, s, 31'h0}; end
    return {2'b00, s, 8'(e), f[22:0]};
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y, input rnd_mode_e m);
    logic [33:0] exp_v;
    a = x; b = y; rmode = m;
    #1;
    exp_v = reference(x, y, m);
    n_mode[int'(m)]++;
    checks++;
    if ({overflow, underflow, fmresult} !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h mode %0d: got %b%b %h expected %b%b %h", x, y, m,
                 overflow, underflow, fmresult, exp_v[33], exp_v[32], exp_v[31:0]);
    end
  endtask

  task automatic check_fixed(input logic [31:0] x, input logic [31:0] y, input logic [31:0] r);
    check(x, y, RND_ZERO);
    checks++;
    if (fmresult !== r) begin
      failures++;
      $display("FAIL example %h * %h: got %h expected %h", x, y, fmresult, r);
    end else
      $display("example %h * %h = %h", x, y, fmresult);
  endtask

  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  initial begin : stimulus
    static rnd_mode_e modes [3] = '{RND_ZERO, RND_POS_INF, RND_NEG_INF};

    check_fixed(32'hC0C00000, 32'h3FB4FDF3, 32'hC107BE76);
    check_fixed(32'h43061000, 32'hC0100000, 32'hC396D200);

    foreach (modes[m]) begin
      // 0x3FB504F3 squared lies just below 2 with an all-ones truncated
      // fraction and nonzero dropped bits: rounding up carries out
      check(32'h3FB504F3, 32'h3FB504F3, modes[m]);
      check(32'hBFB504F3, 32'h3FB504F3, modes[m]);
      check(32'h7F000000, 32'h40000000, modes[m]);   // 2^127 * 2 : overflow
      check(32'h00800000, 32'h3F000000, modes[m]);   // 2^-126 * 0.5 : underflow
      check(32'h00000000, 32'h7F000000, modes[m]);   // zero operand
      check(32'h80000000, 32'h3F800000, modes[m]);   // negative zero
      check(32'h3F800000, 32'h3F800000, modes[m]);   // 1 * 1
    end

    for (int i = 0; i < 60000; i++) begin
      if (i % 4 == 0) check(rand_fp(0, 255), rand_fp(0, 255), modes[i % 3]);
      else            check(rand_fp(64, 190), rand_fp(64, 190), modes[i % 3]);
    end

    $display("shifted=%0d not_shifted=%0d rounded_up=%0d round_carry=%0d overflow=%0d underflow=%0d zero=%0d",
             n_shift, n_noshift, n_round_up, n_round_carry, n_ovf, n_udf, n_zero);
    $display("mode zero=%0d pos_inf=%0d neg_inf=%0d", n_mode[0], n_mode[1], n_mode[2]);
    if (n_shift == 0)       begin failures++; $display("FAIL no shifted product"); end
    if (n_noshift == 0)     begin failures++; $display("FAIL no unshifted product"); end
    if (n_round_up == 0)    begin failures++; $display("FAIL no rounding up"); end
    if (n_round_carry == 0) begin failures++; $display("FAIL no rounding carry"); end
    if (n_ovf == 0)         begin failures++; $display("FAIL no overflow"); end
    if (n_udf == 0)         begin failures++; $display("FAIL no underflow"); end
    if (n_zero == 0)        begin failures++; $display("FAIL no zero operand"); end
    foreach (n_mode[k]) if (n_mode[k] == 0) begin failures++; $display("FAIL mode %0d unused", k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
