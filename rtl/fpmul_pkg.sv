// fpmul_pkg: shared constants and the field layout of an IEEE 754
// single-precision number, as used by the floating point multiplier.
//
// A single-precision word is {sign, 8-bit biased exponent, 23-bit fraction}.
// The exponent bias is 127. The significand that enters the multiplier is the
// fraction with its hidden leading 1 restored (24 bits), so the raw product of
// two significands is 48 bits wide. All of these numbers are those of the
// IEEE 754 single format; nothing here is a free design choice.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;            // biased exponent field
  localparam int unsigned FRAC_W = 23;           // stored fraction field
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand with hidden 1
  localparam int unsigned PROD_W = 2 * SIG_W;    // raw significand product
  localparam int unsigned BIAS   = 127;          // exponent bias

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exponent;
    logic [FRAC_W-1:0] fraction;
  } sp_float_t;

endpackage
