// tb_sign_unit: exhaustive self-check of sign_unit against the sign rule of
// a product (unlike signs give a negative result), written as a table.
`timescale 1ns/1ps
module tb_sign_unit;
  logic sign_a, sign_b, sign_r;
  int checks = 0, failures = 0;
  // expected[{a,b}]: + * + = +, + * - = -, - * + = -, - * - = +
  localparam logic [3:0] EXPECTED = 4'b0110;

  sign_unit dut (.sign_a, .sign_b, .sign_r);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sign_a, sign_b} = 2'(i);
      #1;
      checks++;
      if (sign_r !== EXPECTED[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b got %0b", sign_a, sign_b, sign_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
