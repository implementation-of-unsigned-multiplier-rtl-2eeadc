// cs_unit -- carry selection (CS) unit of the adder.
//
// Chooses the final carry word c: c1_0 when cin = 0, c1_1 when cin = 1.
// A plain 2-to-1 multiplexer would do, but every bit where c1_0 is 1 also has
// c1_1 equal to 1 (a carry that appears with input carry 0 appears with input
// carry 1 as well). The selection therefore collapses to one AND-OR per bit:
//     c[i] = c1_0[i] | (cin & c1_1[i])
// The result is only correct for words with that property, which CG0 and CG1
// always deliver.
//
// Interface: c1_0, c1_1 (W bits), cin in; c (W bits) out. c[W-1] is the
// adder's carry out.
// Timing: combinational, one AND-OR level.
module cs_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] c1_0,
  input  logic [W-1:0] c1_1,
  input  logic         cin,
  output logic [W-1:0] c
);
  always_comb c = c1_0 | ({W{cin}} & c1_1);
endmodule
