// cg1_unit -- carry generation unit for an input carry of 1 (CG1).
//
// Produces the full-carry word c1_1, where c1_1[i] is the carry out of bit i
// of a + b + 1. With the input carry fixed at 1, bit 0 reduces to
// c0[0] | s0[0] (a carry leaves bit 0 when either operand bit is set), and
// each higher bit follows the same recurrence as CG0:
//     c1_1[i] = c0[i] | (s0[i] & c1_1[i-1])
//
// Interface: s0, c0 (W bits, from the HSG unit) in; c1_1 (W bits) out.
// Timing: combinational ripple of W AND-OR stages.
module cg1_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c0,
  output logic [W-1:0] c1_1
);
  logic carry;  // carry out of the bit just handled

  always_comb begin
    carry   = c0[0] | s0[0];
    c1_1[0] = carry;
    for (int unsigned i = 1; i < W; i++) begin
      carry   = c0[i] | (s0[i] & carry);
      c1_1[i] = carry;
    end
  end
endmodule
