// cg0_unit -- carry generation unit for an input carry of 0 (CG0).
//
// Produces the full-carry word c1_0, where c1_0[i] is the carry out of bit i
// of a + b under the assumption that the adder's carry input is 0. Because
// that input carry is fixed, bit 0 reduces to the half-carry c0[0], and each
// higher bit is the usual generate/propagate recurrence
//     c1_0[i] = c0[i] | (s0[i] & c1_0[i-1])
// with the half-carry as generate and the half-sum as propagate.
//
// Interface: s0, c0 (W bits, from the HSG unit) in; c1_0 (W bits) out.
// Timing: combinational ripple of W-1 AND-OR stages.
module cg0_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c0,
  output logic [W-1:0] c1_0
);
  logic carry;  // carry out of the bit just handled

  always_comb begin
    carry   = c0[0];
    c1_0[0] = carry;
    for (int unsigned i = 1; i < W; i++) begin
      carry   = c0[i] | (s0[i] & carry);
      c1_0[i] = carry;
    end
  end
endmodule
