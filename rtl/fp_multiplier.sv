// fp_multiplier: IEEE 754 single-precision floating point multiplier.
//
// A product (-1)^Sa * 1.Ma * 2^(Ea-127) times (-1)^Sb * 1.Mb * 2^(Eb-127)
// is computed in four independent-looking steps that meet at the output:
//   1. mantissa_multiplier: the two 24-bit significands (hidden 1 put back
//      in front of each 23-bit fraction) are multiplied into 48 bits;
//   2. normalizer: the leading 1 of that product is located (bit 47 or 46),
//      dropped, and the next 23 bits taken as the result fraction;
//   3. exponent_adder: Er = Ea + Eb - 127, plus one when step 2 shifted;
//   4. sign_unit: Sr = Sa XOR Sb.
// The three fields are then packed into the 32-bit result word.
//
// The four steps, the single-precision widths and the port list (operands
// split into fields, the raw 48-bit significand product brought out next to
// the packed result) follow the published description of this multiplier.
// Being purely combinational is this design's choice: the result is valid one
// propagation delay after the inputs settle, with no clock.
//
// Also this design's choice, since the algorithm has no step for them: the
// fraction is truncated (no rounding), operands are taken to be normal
// numbers (zero, denormal, infinity and NaN inputs are not recognised), and
// an exponent that leaves the 8-bit range wraps without a flag.
//
// Ports: signa, signb         - operand signs
//        exponenta, exponentb - biased 8-bit operand exponents
//        mantissaA, mantissaB - 23-bit operand fractions (hidden 1 implied)
//        result               - 48-bit product of the two significands
//        floatingresult       - packed single-precision product
module fp_multiplier
  import fpmul_pkg::*;
(
  input  logic              signa,
  input  logic              signb,
  input  logic [FRAC_W-1:0] mantissaA,
  input  logic [FRAC_W-1:0] mantissaB,
  input  logic [EXP_W-1:0]  exponenta,
  input  logic [EXP_W-1:0]  exponentb,
  output logic [PROD_W-1:0] result,
  output logic [31:0]       floatingresult
);

  logic [SIG_W-1:0]  sig_a, sig_b;
  logic [FRAC_W-1:0] frac_r;
  logic [EXP_W-1:0]  exp_r;
  logic              norm_shift;
  logic              sign_r;
  sp_float_t         packed_r;

  // Restore the hidden leading 1 of each normal operand.
  assign sig_a = {1'b1, mantissaA};
  assign sig_b = {1'b1, mantissaB};

  mantissa_multiplier #(.OP_W(SIG_W)) u_mult (
    .port_opa    (sig_a),
    .port_opb    (sig_b),
    .port_result (result)
  );

  normalizer #(.FRAC_W(FRAC_W)) u_norm (
    .product    (result),
    .fraction   (frac_r),
    .norm_shift (norm_shift)
  );

  exponent_adder #(.EXP_W(EXP_W), .BIAS(BIAS)) u_exp (
    .exp_a      (exponenta),
    .exp_b      (exponentb),
    .norm_shift (norm_shift),
    .exp_r      (exp_r)
  );

  sign_unit u_sign (
    .sign_a (signa),
    .sign_b (signb),
    .sign_r (sign_r)
  );

  always_comb begin
    packed_r.sign     = sign_r;
    packed_r.exponent = exp_r;
    packed_r.fraction = frac_r;
    floatingresult    = packed_r;
  end

endmodule
