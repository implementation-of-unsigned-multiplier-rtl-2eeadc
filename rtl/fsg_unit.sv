// fsg_unit -- final sum generation (FSG) unit of the adder.
//
// Forms the sum word from the half-sum and the selected carry word:
//     s[0] = s0[0] ^ cin
//     s[i] = s0[i] ^ c[i-1]      for i = 1 .. W-1
// Only the W-1 low bits of the carry word are used; its top bit leaves the
// adder as the carry out.
//
// Interface: s0 (W bits), c (W bits), cin in; s (W bits) out.
// Timing: combinational, one XOR level.
module fsg_unit #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] s0,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s
);
  always_comb s = s0 ^ {c[W-2:0], cin};
endmodule
