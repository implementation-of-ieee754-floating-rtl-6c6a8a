// exponent_adder: biased exponent of a floating point product.
//
// Both exponent fields carry a bias. Removing it from each operand, adding,
// and putting it back once gives Er = (Ea - BIAS) + (Eb - BIAS) + BIAS
// = Ea + Eb - BIAS. When the normalizer had to shift the product one place,
// one more is added. The sum is formed modulo 2^EXP_W, so a result outside
// the field range wraps; this block raises no overflow or underflow flag.
//
// Parameters: EXP_W - exponent field width (8), BIAS - exponent bias (127)
// Ports:      exp_a, exp_b - biased operand exponents
//             norm_shift   - 1 adds one for a product normalized by a shift
//             exp_r        - biased result exponent
// Timing:     purely combinational.
// The formula follows the published algorithm; the modulo wrap is this
// design's choice, as the algorithm does not treat overflow.
module exponent_adder #(
  parameter int unsigned EXP_W = fpmul_pkg::EXP_W,
  parameter int unsigned BIAS  = fpmul_pkg::BIAS
) (
  input  logic [EXP_W-1:0] exp_a,
  input  logic [EXP_W-1:0] exp_b,
  input  logic             norm_shift,
  output logic [EXP_W-1:0] exp_r
);

  localparam logic [EXP_W-1:0] BIAS_V = EXP_W'(BIAS);

  always_comb exp_r = exp_a + exp_b + EXP_W'(norm_shift) - BIAS_V;

endmodule
