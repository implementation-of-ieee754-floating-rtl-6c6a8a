// mantissa_multiplier: unsigned combinational multiplier for the
// significands of two floating point operands.
//
// Both operands are full significands, i.e. the stored fraction with the
// implicit leading 1 already put back in front of it. The product is exact
// and twice as wide as an operand, so nothing is lost here; the choice of
// which product bits survive is made by the normalizer that follows.
// The multiplication is written as a single '*' so that a synthesis tool can
// map it onto whatever hard multipliers the target offers (four 18x18
// blocks cover the 24x24 default on an FPGA of the Spartan-3 class).
//
// Parameters: OP_W  - operand width (24: 23-bit fraction plus hidden 1)
// Ports:      port_opa, port_opb - unsigned operands, OP_W bits
//             port_result        - unsigned product, 2*OP_W bits
// Timing:     purely combinational, no clock, no latency.
// The port names and the combinational multiplier follow the published
// design; its internal structure is left to synthesis here.
module mantissa_multiplier #(
  parameter int unsigned OP_W = fpmul_pkg::SIG_W
) (
  input  logic [OP_W-1:0]   port_opa,
  input  logic [OP_W-1:0]   port_opb,
  output logic [2*OP_W-1:0] port_result
);

  always_comb port_result = (2*OP_W)'(port_opa) * (2*OP_W)'(port_opb);

endmodule
