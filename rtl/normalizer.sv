// normalizer: turns the raw significand product into the 23-bit fraction
// field of the result and tells the exponent path whether it shifted.
//
// Each significand lies in [1, 2), so their product lies in [1, 4): the
// leading 1 of the 2*SIG_W-bit product is either in the top bit (product
// >= 2) or in the bit below it. In the first case the binary point moves one
// place left, which costs one increment of the exponent (norm_shift = 1).
// After the leading 1 is dropped (it becomes the hidden bit of the result),
// the next FRAC_W bits are the result fraction. The remaining low bits are
// discarded: the result is truncated, i.e. rounded toward zero in magnitude.
// Any other rounding mode would be an addition to the plain algorithm.
//
// Parameters: FRAC_W - result fraction width (23 for single precision)
// Ports:      product    - raw product of two significands, 2*(FRAC_W+1) bits
//             fraction   - normalized fraction, hidden 1 removed
//             norm_shift - 1 when the product was >= 2 (exponent + 1)
// Timing:     purely combinational.
// Dropping the leading 1 and keeping the next 23 bits follows the published
// algorithm; truncating the rest is this design's reading of it.
module normalizer #(
  parameter int unsigned FRAC_W = fpmul_pkg::FRAC_W
) (
  input  logic [2*(FRAC_W+1)-1:0] product,
  output logic [FRAC_W-1:0]       fraction,
  output logic                    norm_shift
);

  localparam int unsigned P_W = 2 * (FRAC_W + 1);

  always_comb begin
    norm_shift = product[P_W-1];
    if (norm_shift)
      fraction = product[P_W-2 -: FRAC_W];   // leading 1 at bit P_W-1
    else
      fraction = product[P_W-3 -: FRAC_W];   // leading 1 at bit P_W-2
  end

endmodule
