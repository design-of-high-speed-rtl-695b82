// tb_vedic_3x3: self-check of the 3x3 Vedic multiplier against the
// integer product a * b. All operand pairs are applied.
module tb_vedic_3x3;
  localparam int unsigned N = 3;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  vedic_3x3 dut (.a(a), .b(b), .p(p));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    longint unsigned expected;
    a = x; b = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (64'(p) !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d got %0d expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        check(N'(i), N'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
