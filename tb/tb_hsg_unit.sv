// tb_hsg_unit -- self-checking test of the half-sum generation unit.
// Each bit pair is added arithmetically as a 2-bit number; its LSB must be
// the half-sum bit and its MSB the half-carry bit. Corner words and random
// words are applied at the default width of 32.
module tb_hsg_unit;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, s0, c0;
  int checks = 0, failures = 0;

  hsg_unit dut (.a, .b, .s0, .c0);

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [1:0] pair;
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < W; i++) begin
      pair = 2'(a[i]) + 2'(b[i]);
      checks++;
      if ({c0[i], s0[i]} !== pair) begin
        failures++;
        $display("FAIL a=%h b=%h bit %0d: c0=%b s0=%b expected %b", a, b, i, c0[i], s0[i], pair);
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
    apply('0, '1);
    apply('1, '1);
    apply(32'd55, 32'd55);
    for (int n = 0; n < 200; n++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
