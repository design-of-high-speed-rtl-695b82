// tb_vedic_12x12: self-check of the 12x12 Vedic multiplier against the
// integer product a * b. Corner operands (0, 1, all ones, single bits) are applied
// exhaustively against each other, then 200000 random pairs.
module tb_vedic_12x12;
  localparam int unsigned N = 12;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  vedic_12x12 dut (.a(a), .b(b), .p(p));

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
    logic [N-1:0] corner [$];
    corner.push_back('0);
    corner.push_back(N'(1));
    corner.push_back('1);
    for (int k = 0; k < N; k++) corner.push_back(N'(1) << k);
    foreach (corner[i])
      foreach (corner[j])
        check(corner[i], corner[j]);
    for (int k = 0; k < 200000; k++)
      check(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
