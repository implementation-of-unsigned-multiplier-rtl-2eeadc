// tb_caq_register -- self-checking test of the {C, A, Q} shift register.
// Random load, shift and add commands with random adder results are applied;
// a reference model held as one 2N+1 bit integer predicts the registers:
// load gives {0, 0, mplier}; shift without add divides the whole value by 2;
// shift with add replaces the upper N+1 bits with {sum_cout, sum} and then
// divides by 2.
module tb_caq_register;
  localparam int unsigned N = 16;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load = 1'b0, shift = 1'b0, add = 1'b0, sum_cout = 1'b0;
  logic [N-1:0] mplier = '0, sum = '0, a, q;
  logic         c;
  logic [2*N:0] model = '0;
  int checks = 0, failures = 0;

  caq_register dut (.clk, .rst_n, .load, .shift, .add, .mplier,
                             .sum, .sum_cout, .c, .a, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if ({c, a, q} !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load     = 1'($urandom_range(0, 7) == 0);
      shift    = 1'($urandom);
      add      = 1'($urandom);
      mplier   = N'($urandom);
      sum      = N'($urandom);
      sum_cout = 1'($urandom);
      if (load)
        model = (2*N+1)'(mplier);
      else if (shift) begin
        if (add) model = {sum_cout, sum, model[N-1:0]};
        model = model >> 1;
      end
      @(posedge clk);
      #1;
      checks++;
      if ({c, a, q} !== model) begin
        failures++;
        $display("FAIL step %0d (load=%b shift=%b add=%b): got %h expected %h",
                 n, load, shift, add, {c, a, q}, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
