// tb_exponent_unit: exhaustive check of E1 + E2 - 127 for all pairs of 8-bit
// biased exponents: eraw against the signed integer result, eresult against
// its low 8 bits.
module tb_exponent_unit;
  logic [7:0] ea, eb, eresult;
  logic signed [9:0] eraw;
  int checks = 0, failures = 0;

  exponent_unit dut (.ea(ea), .eb(eb), .eresult(eresult), .eraw(eraw));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i); eb = 8'(j);
        #1;
        expected = i + j - 127;
        checks += 2;
        if (int'(eraw) != expected) begin
          failures++;
          if (failures < 10) $display("FAIL eraw %0d+%0d got %0d", i, j, eraw);
        end
        if (eresult !== 8'(expected)) begin
          failures++;
          if (failures < 10) $display("FAIL eresult %0d+%0d got %0d", i, j, eresult);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
