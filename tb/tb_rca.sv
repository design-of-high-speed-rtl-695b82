// tb_rca: exhaustive self-check of the ripple carry adder at its default
// width of 8 bits.
// Every x, y and cin is applied and {cout, s} is compared with the integer
// sum x + y + cin. A watchdog ends the run with a failure if it hangs.
module tb_rca;
  localparam int unsigned N = 8;
  logic [N-1:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        for (int c = 0; c < 2; c++) begin
          x = N'(i); y = N'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, s} !== (N+1)'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d got %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
