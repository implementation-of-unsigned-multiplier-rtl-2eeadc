// sa_control -- shift-and-add control logic.
//
// Sequences one unsigned N x N multiplication. In IDLE a start request
// raises load for one cycle (operands captured, C and A cleared) and moves to
// RUN. In RUN the controller raises shift every cycle and raises add exactly
// when the current multiplier bit q0 (the LSB of Q) is 1, so the multiplicand
// is added into A only for the 1 bits of the multiplier. A down-counter
// counts the N steps; on the last one the controller returns to IDLE and
// pulses done for one cycle, in the same edge that stores the final step.
//
// Interface: clk, rst_n (active-low asynchronous reset), start, q0 in;
// load, add, shift, busy, done out.
// Timing: start is sampled on a rising edge while idle; the N shift steps
// take the next N edges; done is high in the cycle after the N-th step edge,
// i.e. N+1 clock edges after the one that sampled start. start is ignored
// while busy.
// The add/shift behaviour follows the published algorithm; the state
// encoding, the counter and the start/done handshake are this design's.
module sa_control
  import sa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic q0,
  output logic load,
  output logic add,
  output logic shift,
  output logic busy,
  output logic done
);
  localparam int unsigned CW = $clog2(N + 1);

  sa_state_e     state;
  logic [CW-1:0] count;   // steps still to do, including the current one

  always_comb begin
    load  = (state == SA_IDLE) && start;
    shift = (state == SA_RUN);
    add   = (state == SA_RUN) && q0;
    busy  = (state == SA_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SA_IDLE;
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        SA_IDLE: if (start) begin
          state <= SA_RUN;
          count <= CW'(N);
        end
        SA_RUN: begin
          count <= count - 1'b1;
          if (count == CW'(1)) begin
            state <= SA_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= SA_IDLE;
      endcase
    end
  end

  // One step per cycle: the counter never wraps while running.
  a_count_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SA_RUN) |-> (count != '0));
endmodule
