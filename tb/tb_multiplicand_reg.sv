// tb_multiplicand_reg -- self-checking test of the multiplicand register.
// After reset the register must read 0; it must take a new value on an edge
// with load high and keep it over edges with load low while the input
// changes.
module tb_multiplicand_reg;
  localparam int unsigned N = 16;
  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] d = '0, q, model = '0;
  int checks = 0, failures = 0;

  multiplicand_reg dut (.clk, .rst_n, .load, .d, .q);

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
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      load = 1'($urandom_range(0, 3) == 0);
      d    = N'($urandom);
      if (load) model = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d load=%b: q=%h expected %h", n, load, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
