// tb_fsg_unit -- self-checking test of the final sum generation unit.
// From random operands the testbench forms the half-sum word and the true
// carry word of a + b + cin (from wide arithmetic); the unit must then return
// the low W bits of a + b + cin.
module tb_fsg_unit;
  localparam int unsigned W = 32;
  logic [W-1:0] s0, c, s;
  logic         cin;
  int checks = 0, failures = 0;

  fsg_unit dut (.s0, .c, .cin, .s);

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b, input logic ci);
    logic [W:0]   mask;
    logic [W+1:0] full;
    logic [63:0]  total;
    for (int i = 0; i < W; i++) begin
      mask = (W+1)'((64'd1 << (i + 1)) - 1);
      full = (W+2)'(a & mask[W-1:0]) + (W+2)'(b & mask[W-1:0]) + (W+2)'(ci);
      c[i] = full[i+1];
    end
    s0    = a ^ b;
    cin   = ci;
    total = 64'(a) + 64'(b) + 64'(ci);
    #1;
    checks++;
    if (s !== total[W-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: s=%h expected %h", a, b, ci, s, total[W-1:0]);
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
    apply(32'd55, 32'd55, 1'b0);
    for (int n = 0; n < 400; n++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
