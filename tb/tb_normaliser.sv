// tb_normaliser: self-check of normalisation and directed rounding.
//
// The reference treats n1 as a number in [1,4) with 46 fraction bits and
// divides it by 2^k (k = 23, or 24 when n1 >= 2), rounding the quotient down
// or up as the mode and sign demand; a quotient of 2^24 after rounding up
// means one more exponent step and a zero fraction. Random products of
// both kinds (leading one at bit 46 and at bit 47), all-ones fractions that
// make rounding carry out, and exact products are run in every mode.
module tb_normaliser;
  import fp_mul_pkg::*;

  logic [47:0]       n1;
  logic              sign;
  rnd_mode_e         rmode;
  logic signed [9:0] e_in, e_out;
  logic [22:0]       nout;
  int checks = 0, failures = 0;
  int n_shift = 0, n_round_up = 0, n_round_carry = 0;

  normaliser dut (.n1(n1), .sign(sign), .rmode(rmode), .e_in(e_in), .nout(nout), .e_out(e_out));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [47:0] v, input logic s, input rnd_mode_e m, input int e);
    longint unsigned q, den;
    int k, e_exp;
    logic up;
    n1 = v; sign = s; rmode = m; e_in = 10'(e);
    #1;
    k   = (v >= 48'h8000_0000_0000) ? 24 : 23;
    den = 64'd1 << k;
    q   = 64'(v) / den;
    up  = (64'(v) % den != 0) && ((m == RND_POS_INF && !s) || (m == RND_NEG_INF && s));
    if (up) begin q++; n_round_up++; end
    e_exp = e + k - 23;
    if (k == 24) n_shift++;
    if (q == (64'd1 << 24)) begin
      q = 64'd1 << 23;
      e_exp++;
      n_round_carry++;
    end
    checks++;
    if (nout !== q[22:0] || int'(e_out) != e_exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL n1=%h s=%b m=%0d got %h/%0d expected %h/%0d", v, s, m, nout, e_out, q[22:0], e_exp);
    end
  endtask

  initial begin : stimulus
    static rnd_mode_e modes [3] = '{RND_ZERO, RND_POS_INF, RND_NEG_INF};
    logic [47:0] v;
    for (int i = 0; i < 30000; i++) begin
      v = 48'({$urandom, $urandom});
      v[47:46] = (i % 2 == 0) ? 2'b01 : (($urandom_range(0, 1) == 0) ? 2'b10 : 2'b11);
      if (i % 7 == 0) v[22:0] = '0;             // exact when not shifted
      check(v, 1'($urandom), modes[i % 3], int'($urandom_range(0, 300)) - 100);
    end
    // all-ones fractions: rounding up carries into the exponent
    foreach (modes[m])
      for (int s = 0; s < 2; s++) begin
        check({2'b01, {23{1'b1}}, 23'h1}, 1'(s), modes[m], 100);
        check({2'b11, {23{1'b1}}, 22'h0, 1'b1}, 1'(s), modes[m], 100);
        check({2'b01, 46'h0}, 1'(s), modes[m], 5);
      end
    if (n_shift == 0 || n_round_up == 0 || n_round_carry == 0) failures++;
    $display("shifted=%0d rounded_up=%0d round_carry=%0d", n_shift, n_round_up, n_round_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
