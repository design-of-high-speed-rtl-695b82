// tb_exception_check: checks the result packing and the overflow and
// underflow limits. Every exponent from -200 to 400 is applied with random
// sign and fraction, with and without a zero operand, and the result and
// flags are compared with the rules: 1..254 packs normally, above 254 gives
// signed infinity and overflow, below 1 signed zero and underflow, and a zero
// operand signed zero with no flag.
module tb_exception_check;
  import fp_mul_pkg::*;

  logic              sign, zero_in, overflow, underflow;
  logic signed [9:0] e_final;
  logic [22:0]       frac;
  fp32_t             result;
  int checks = 0, failures = 0;

  exception_check dut (
    .sign(sign), .e_final(e_final), .frac(frac), .zero_in(zero_in),
    .result(result), .overflow(overflow), .underflow(underflow)
  );

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_res;
    logic exp_ovf, exp_udf;
    for (int e = -200; e <= 400; e++)
      for (int z = 0; z < 2; z++) begin
        sign = 1'($urandom); frac = 23'($urandom); e_final = 10'(e); zero_in = 1'(z);
        #1;
        exp_ovf = 1'b0; exp_udf = 1'b0;
        if (z == 1)        exp_res = {sign, 31'h0};
        else if (e > 254) begin exp_res = {sign, 8'hff, 23'h0}; exp_ovf = 1'b1; end
        else if (e < 1)   begin exp_res = {sign, 31'h0};        exp_udf = 1'b1; end
        else               exp_res = {sign, 8'(e), frac};
        checks++;
        if (result !== exp_res || overflow !== exp_ovf || underflow !== exp_udf) begin
          failures++;
          if (failures < 10)
            $display("FAIL e=%0d z=%0d got %h %b%b expected %h %b%b", e, z, result, overflow, underflow,
                     exp_res, exp_ovf, exp_udf);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
