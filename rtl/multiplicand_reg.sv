// multiplicand_reg -- register holding the multiplicand B.
//
// Captures the multiplicand when load is high and holds it for the whole
// multiplication, so that the operand inputs may change while the
// multiplier is busy. Its output feeds one input of the adder.
//
// Interface: clk, rst_n (active-low asynchronous reset to 0), load, d in;
// q (N bits) out.
// Timing: q takes d on the rising clock edge where load is high.
// The register itself is part of the published block diagram; the reset and
// the load enable are this design's choice.
module multiplicand_reg #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
