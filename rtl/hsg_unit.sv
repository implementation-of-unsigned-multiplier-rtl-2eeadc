// hsg_unit -- half-sum generation (HSG) unit of the adder.
//
// For every bit position i the unit forms the half-sum s0[i] = a[i] ^ b[i]
// and the half-carry c0[i] = a[i] & b[i], i.e. a row of W independent half
// adders. These two words are all that the later carry generation and final
// sum stages need from the operands.
//
// Interface: a, b (W bits each) in; s0, c0 (W bits each) out.
// Timing: purely combinational, one gate level.
// The structure follows the published adder; the width default of 32 matches
// the 32-bit adder simulated for this design.
module hsg_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,
  output logic [W-1:0] c0
);
  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end
endmodule
