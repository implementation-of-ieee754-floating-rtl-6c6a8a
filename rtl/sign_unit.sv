// sign_unit: sign of a floating point product.
//
// The sign of a product is negative exactly when the two operand signs
// differ, so the result sign is the exclusive-or of the operand signs
// (Sr = Sa XOR Sb). Purely combinational, no latency. The rule is the published one.
//
// Ports: sign_a, sign_b - operand sign bits (1 = negative)
//        sign_r         - result sign bit
module sign_unit (
  input  logic sign_a,
  input  logic sign_b,
  output logic sign_r
);

  always_comb sign_r = sign_a ^ sign_b;

endmodule
