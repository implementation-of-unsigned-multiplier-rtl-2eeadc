// tb_sa_multiplier_n8 -- exhaustive test of an 8 x 8 instance of the
// shift-and-add multiplier: every one of the 65536 operand pairs is
// multiplied, with each operation started in the cycle right after the
// previous done, and the 16-bit product is compared with integer
// multiplication. The latency of N+1 edges is checked on every operation.
module tb_sa_multiplier_n8;
  localparam int unsigned N = 8;
  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   multiplicand = '0, multiplier = '0;
  logic [2*N-1:0] product;
  logic           busy, done;
  int checks = 0, failures = 0;

  sa_multiplier #(.N(N)) dut (.clk, .rst_n, .start, .multiplicand, .multiplier,
                              .product, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (65536 * (N + 3) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    #22;
    rst_n = 1'b1;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        @(negedge clk);
        multiplicand = N'(x);
        multiplier   = N'(y);
        start        = 1'b1;
        @(negedge clk);
        start = 1'b0;
        edges = 1;
        while (!done && edges <= 4 * N) begin
          @(negedge clk);
          edges++;
        end
        checks++;
        if (edges != N + 1 || product != 16'(x * y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d x %0d: product %0d after %0d edges", x, y, product, edges);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
