// sa_multiplier -- N x N unsigned shift-and-add multiplier.
//
// The multiplier works like long multiplication by hand, one multiplier bit
// per clock cycle, right to left. The multiplicand B sits in its own
// register. The accumulator A, with a carry flip-flop C above it, and the
// multiplier register Q form one shift register {C, A, Q}. In each of the N
// steps the control logic looks at Q's LSB: if it is 1 the adder forms
// A + B into {C, A}; in every step {C, A, Q} then shifts right by one. The
// product's low half collects in Q as the multiplier bits are shifted out,
// and after N steps the 2N-bit product is {A, Q}.
//
// The adder is adp_adder, which selects between two precomputed carry words
// and forms a single sum afterwards, instead of selecting between two full
// sums as a carry-select adder does. Its carry input is tied to 0 here.
//
// Interface: clk, rst_n (active-low asynchronous reset), start, multiplicand
// (N bits), multiplier (N bits) in; product (2N bits), busy, done out.
// Timing: raise start for a cycle while busy is low; the operands are
// captured on that edge. done pulses for one cycle N+1 edges later, and
// product is valid from then until the next start. Throughput: one product
// per N+1 cycles.
// The datapath, the adder and the per-bit algorithm follow the published
// design, with N = 16 as in its evaluation; doing the add and the shift of
// one step in a single edge, and the start/busy/done handshake, are this
// design's choices.
module sa_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product,
  output logic           busy,
  output logic           done
);
  logic         load, add, shift;
  logic         c_q;
  logic [N-1:0] b_q, a_q, q_q;
  logic [N-1:0] sum;
  logic         sum_cout;

  sa_control #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .q0(q_q[0]),
    .load, .add, .shift, .busy, .done
  );

  multiplicand_reg #(.N(N)) u_breg (
    .clk, .rst_n, .load, .d(multiplicand), .q(b_q)
  );

  adp_adder #(.W(N)) u_adder (
    .a(a_q), .b(b_q), .cin(1'b0), .s(sum), .cout(sum_cout)
  );

  caq_register #(.N(N)) u_caq (
    .clk, .rst_n, .load, .shift, .add, .mplier(multiplier),
    .sum, .sum_cout, .c(c_q), .a(a_q), .q(q_q)
  );

  assign product = {a_q, q_q};

  // C is only ever set by an add and is cleared by the shift that follows in
  // the same edge, so it reads 0 between steps.
  a_c_clear: assert property (@(posedge clk) disable iff (!rst_n) !c_q);
endmodule
