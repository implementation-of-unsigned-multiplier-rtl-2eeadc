// tb_cs_unit -- self-checking test of the carry selection unit.
// The testbench derives both candidate carry words arithmetically (the carry
// out of each bit of a + b and of a + b + 1), drives them with a random
// carry input and expects the carry word of a + b + cin. It also confirms on
// every vector that a 1 in the first word is a 1 in the second, the property
// the unit's reduced selection logic relies on.
module tb_cs_unit;
  localparam int unsigned W = 32;
  logic [W-1:0] c1_0, c1_1, c;
  logic         cin;
  int checks = 0, failures = 0;

  cs_unit dut (.c1_0, .c1_1, .cin, .c);

  // Carry out of every bit of x + y + ci.
  function automatic logic [W-1:0] carries(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    logic [W-1:0] r;
    logic [W:0]   mask;
    logic [W+1:0] full;
    for (int i = 0; i < W; i++) begin
      mask = (W+1)'((64'd1 << (i + 1)) - 1);
      full = (W+2)'(x & mask[W-1:0]) + (W+2)'(y & mask[W-1:0]) + (W+2)'(ci);
      r[i] = full[i+1];
    end
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b, input logic ci);
    logic [W-1:0] exp_c;
    c1_0 = carries(a, b, 1'b0);
    c1_1 = carries(a, b, 1'b1);
    cin  = ci;
    exp_c = carries(a, b, ci);
    #1;
    checks++;
    if ((c1_0 & ~c1_1) != '0) begin
      failures++;
      $display("FAIL carry words break the implication for a=%h b=%h", a, b);
    end
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: c=%h expected %h", a, b, ci, c, exp_c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '0, 1'b0);
    apply(32'd55, 32'd55, 1'b0);
    for (int n = 0; n < 400; n++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
