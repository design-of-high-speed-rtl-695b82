// tb_sign_unit: checks the product sign for all four sign combinations:
// negative exactly when the operand signs differ.
module tb_sign_unit;
  logic s1, s2, sr;
  int checks = 0, failures = 0;

  sign_unit dut (.s1(s1), .s2(s2), .sr(sr));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_neg;
    for (int i = 0; i < 4; i++) begin
      {s1, s2} = 2'(i);
      #1;
      // (+)(+) and (-)(-) are positive, mixed signs are negative
      expect_neg = (i == 1) || (i == 2);
      checks++;
      if (sr !== expect_neg) begin
        failures++;
        $display("FAIL s1=%b s2=%b sr=%b", s1, s2, sr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
