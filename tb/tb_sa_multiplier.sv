// tb_sa_multiplier -- end-to-end test of the 16 x 16 shift-and-add multiplier
// at its default size.
// It runs the operand pairs 15 x 12, 255 x 255 and 65535 x 65535, then
// corner cases and random pairs, some of them started back to back. For every
// operation it checks the 32-bit product against integer multiplication and
// that done rises exactly N+1 clock edges after the edge that sampled start.
// It also raises start while the multiplier is busy and checks that the
// running operation is not disturbed. The mechanisms of the datapath are
// counted, and one that never occurred counts as a failure: a step that
// adds the multiplicand, a step that only shifts, an add whose carry out is
// 1 (kept in C and shifted into A), and a start ignored while busy.
module tb_sa_multiplier;
  localparam int unsigned N = 16;
  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   multiplicand = '0, multiplier = '0;
  logic [2*N-1:0] product;
  logic           busy, done;
  int checks = 0, failures = 0;
  int n_add = 0, n_shift_only = 0, n_carry = 0, n_ignored = 0, n_ops = 0;

  sa_multiplier dut (.clk, .rst_n, .start, .multiplicand, .multiplier,
                     .product, .busy, .done);

  always #5 clk = ~clk;

  // Mechanism counters, sampled at every rising edge.
  always @(posedge clk) if (rst_n && dut.shift) begin
    if (dut.add) begin
      n_add++;
      if (dut.sum_cout) n_carry++;
    end else begin
      n_shift_only++;
    end
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // One multiplication: start for one cycle, optionally poke start again
  // while busy, count edges until done, compare the product.
  task automatic multiply(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke);
    logic [2*N-1:0] expected;
    int edges;
    expected = (2*N)'(x) * (2*N)'(y);
    @(negedge clk);
    multiplicand = x;
    multiplier   = y;
    start        = 1'b1;
    @(negedge clk);
    start = 1'b0;
    edges = 1;
    // Operands may change once captured.
    multiplicand = N'($urandom);
    multiplier   = N'($urandom);
    while (!done) begin
      if (poke && edges == 3) begin
        start = 1'b1;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      edges++;
      if (edges > 4 * N) break;
    end
    start = 1'b0;
    n_ops++;
    check(done, "done seen");
    check(edges == N + 1, $sformatf("latency %0d edges, expected %0d", edges, N + 1));
    check(product == expected,
          $sformatf("%0d x %0d = %0d, expected %0d", x, y, product, expected));
    @(negedge clk);
    check(!done && !busy, "idle after done");
    check(product == expected, "product held after done");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #22;
    rst_n = 1'b1;
    multiply(16'd15, 16'd12, 1'b0);
    multiply(16'd255, 16'd255, 1'b0);
    multiply(16'd65535, 16'd65535, 1'b0);
    multiply(16'd0, 16'd65535, 1'b0);
    multiply(16'd65535, 16'd0, 1'b0);
    multiply(16'd1, 16'd1, 1'b0);
    multiply(16'h8000, 16'h8000, 1'b1);
    multiply(16'hAAAA, 16'h5555, 1'b0);
    for (int n = 0; n < 2000; n++)
      multiply(N'($urandom), N'($urandom), (n % 7) == 0);

    $display("mechanisms: ops=%0d add_steps=%0d shift_only_steps=%0d carry_out_adds=%0d ignored_starts=%0d",
             n_ops, n_add, n_shift_only, n_carry, n_ignored);
    check(n_add > 0, "an add step occurred");
    check(n_shift_only > 0, "a shift-only step occurred");
    check(n_carry > 0, "an add with carry out occurred");
    check(n_ignored > 0, "a start while busy occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
