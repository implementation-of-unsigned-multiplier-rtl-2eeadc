// tb_adp_adder -- self-checking test of the carry-selecting adder.
// The 32-bit default instance gets the worked case 55 + 55 = 110, full
// carry-propagation cases and random operands with random carry input; an
// 8-bit instance is checked exhaustively over all operand pairs and both
// carry inputs. Expected values come from wide integer addition.
module tb_adp_adder;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  int checks = 0, failures = 0;

  adp_adder           dut   (.a, .b, .cin, .s, .cout);
  adp_adder #(.W(8))  dut8  (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input logic ci);
    logic [32:0] exp_sum;
    a = ta; b = tb_; cin = ci;
    exp_sum = 33'(ta) + 33'(tb_) + 33'(ci);
    #1;
    checks++;
    if ({cout, s} !== exp_sum) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: got cout=%b s=%0d expected %0d", ta, tb_, ci, cout, s, exp_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'd55, 32'd55, 1'b0);
    apply('1, 32'd0, 1'b1);
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply('0, '0, 1'b0);
    for (int n = 0; n < 2000; n++) apply($urandom, $urandom, 1'($urandom));

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = 1'(ci);
          #1;
          checks++;
          if ({cout8, s8} !== 9'(x + y + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d + %0d + %0d: got %0d", x, y, ci, {cout8, s8});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
