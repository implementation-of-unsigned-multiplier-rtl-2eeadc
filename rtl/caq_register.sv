// caq_register -- carry flip-flop C, accumulator A and multiplier register Q.
//
// The three registers form one 2N+1 bit shift register {C, A, Q}. A load
// clears C and A and puts the multiplier into Q. A shift step moves the whole
// chain right by one bit: Q's LSB (the multiplier bit just used) drops out,
// A's LSB enters Q's MSB, and C enters A's MSB. When add is also high in
// that step, {C, A} first takes the adder result {sum_cout, sum}, so the
// shifted value is (A + B) >> 1 with the adder's carry kept. After N steps
// {A, Q} holds the 2N-bit product.
//
// Interface: clk, rst_n (active-low asynchronous reset), load, shift, add,
// mplier (N bits), sum (N bits), sum_cout in; c, a, q out.
// Timing: all updates happen on the rising clock edge; load has priority.
// The register arrangement and the right shift follow the published block
// diagram; performing the add and the shift in the same clock edge is this
// design's choice.
module caq_register #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic         add,
  input  logic [N-1:0] mplier,
  input  logic [N-1:0] sum,
  input  logic         sum_cout,
  output logic         c,
  output logic [N-1:0] a,
  output logic [N-1:0] q
);
  logic         c_pre;
  logic [N-1:0] a_pre;

  // Value of {C, A} after the optional add, before the shift.
  always_comb begin
    if (add) {c_pre, a_pre} = {sum_cout, sum};
    else     {c_pre, a_pre} = {c, a};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= 1'b0;
      a <= '0;
      q <= '0;
    end else if (load) begin
      c <= 1'b0;
      a <= '0;
      q <= mplier;
    end else if (shift) begin
      {c, a, q} <= {1'b0, c_pre, a_pre, q[N-1:1]};
    end
  end
endmodule
