// tb_cg1_unit -- self-checking test of the carry generation unit for an
// input carry of 1. The testbench builds the half-sum and half-carry words
// itself from random operands and takes the expected carry out of bit i as
// bit i+1 of the wide arithmetic sum of the operands' low i+1 bits plus 1.
module tb_cg1_unit;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, s0, c0, c1;
  int checks = 0, failures = 0;

  assign s0 = a ^ b;
  assign c0 = a & b;

  cg1_unit dut (.s0, .c0, .c1_1(c1));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [W:0]  mask;
    logic [W+1:0] full;
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < W; i++) begin
      mask = (W+1)'((64'd1 << (i + 1)) - 1);
      full = (W+2)'(a & mask[W-1:0]) + (W+2)'(b & mask[W-1:0]) + (W+2)'(1);
      checks++;
      if (c1[i] !== full[i+1]) begin
        failures++;
        $display("FAIL a=%h b=%h bit %0d: got %b expected %b", a, b, i, c1[i], full[i+1]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, 32'd1);
    apply(32'h5555_5555, 32'hAAAA_AAAA);
    apply(32'd55, 32'd55);
    for (int n = 0; n < 300; n++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
