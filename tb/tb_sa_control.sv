// tb_sa_control -- self-checking test of the shift-and-add controller.
// For each operation the testbench raises start for one cycle, feeds a random
// multiplier bit stream into q0 and checks: load is high only in the start
// cycle; shift is high for exactly N consecutive cycles after it; add equals
// q0 in those cycles and is low otherwise; busy matches shift; done pulses
// once, in the cycle after the N-th shift, i.e. N+1 edges after the edge that
// sampled start. A start raised while busy must be ignored.
module tb_sa_control;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, q0 = 1'b0;
  logic load, add, shift, busy, done;
  int checks = 0, failures = 0;

  sa_control dut (.clk, .rst_n, .start, .q0, .load, .add, .shift, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    check(!done && !busy && !shift, "reset state");
    rst_n = 1'b1;
    for (int op = 0; op < 50; op++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) begin
        check(!load && !shift && !add && !busy && !done, "idle outputs");
        @(negedge clk);
      end
      start = 1'b1;
      #1;
      check(load && !shift && !add, "load in start cycle");
      @(negedge clk);
      // N shift steps; keep start high in some of them to test that it is ignored.
      for (int step = 0; step < N; step++) begin
        start = 1'($urandom);
        q0    = 1'($urandom);
        #1;
        check(shift && busy && !load, "shift during run");
        check(add == q0, "add follows q0");
        check(!done, "no done during run");
        @(negedge clk);
      end
      start = 1'b0;
      q0    = 1'($urandom);
      #1;
      check(done, "done after N steps");
      check(!shift && !add && !busy, "idle after N steps");
      @(negedge clk);
      #1;
      check(!done, "done is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
