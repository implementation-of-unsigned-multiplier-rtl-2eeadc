// adp_adder -- W-bit adder that schedules carry selection before the sum.
//
// A conventional carry-select adder computes two complete sums (for input
// carry 0 and 1) and then picks one. This adder instead computes only the
// two candidate carry words, picks one of those, and forms a single sum at
// the end:
//   HSG  : half-sum s0 = a ^ b and half-carry c0 = a & b
//   CG0  : carry word c1_0 for input carry 0
//   CG1  : carry word c1_1 for input carry 1
//   CS   : c = c1_0 | (cin & c1_1)   (valid because c1_0 implies c1_1)
//   FSG  : s = s0 ^ {c[W-2:0], cin}, cout = c[W-1]
// Only one XOR row is spent on the sum, which is where the area saving over
// the dual-sum carry-select adder comes from.
//
// Interface: a, b (W bits), cin in; s (W bits), cout out.
// Timing: purely combinational. The critical path runs through the CG1
// ripple chain, then one AND-OR (CS) and one XOR (FSG).
// The unit partition and the equations follow the published adder; the
// default width of 32 matches the adder simulated for this design.
module adp_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] s0, c0, c1_0, c1_1, c;

  hsg_unit #(.W(W)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  cg0_unit #(.W(W)) u_cg0 (.s0(s0), .c0(c0), .c1_0(c1_0));
  cg1_unit #(.W(W)) u_cg1 (.s0(s0), .c0(c0), .c1_1(c1_1));
  cs_unit  #(.W(W)) u_cs  (.c1_0(c1_0), .c1_1(c1_1), .cin(cin), .c(c));
  fsg_unit #(.W(W)) u_fsg (.s0(s0), .c(c), .cin(cin), .s(s));

  assign cout = c[W-1];
endmodule
