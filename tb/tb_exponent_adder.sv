// tb_exponent_adder: exhaustive check of the exponent adder over every pair of
// 8-bit exponents and both values of the normalization increment. The
// reference removes the bias from each operand, adds the true exponents,
// adds the increment and re-biases, then keeps the low 8 bits.
`timescale 1ns/1ps
module tb_exponent_adder;
  logic [7:0] exp_a, exp_b, exp_r;
  logic       norm_shift;
  int checks = 0, failures = 0;

  exponent_adder #(.EXP_W(8), .BIAS(127)) dut (.exp_a, .exp_b, .norm_shift, .exp_r);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: 131 and 130 give 134 (true exponent 7)
    exp_a = 8'b10000011; exp_b = 8'b10000010; norm_shift = 1'b0;
    #1;
    checks++;
    if (exp_r !== 8'b10000110) begin
      failures++;
      $display("FAIL worked example got %b", exp_r);
    end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int s = 0; s < 2; s++) begin
          int true_exp;
          logic [7:0] expected;
          exp_a = 8'(a); exp_b = 8'(b); norm_shift = s[0];
          #1;
          true_exp = (a - 127) + (b - 127) + s;
          expected = 8'(true_exp + 127);
          checks++;
          if (exp_r !== expected) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d s=%0d got %0d expected %0d", a, b, s, exp_r, expected);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
