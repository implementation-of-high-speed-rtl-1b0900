// Exhaustive check of the 4-bit TSG ripple-carry adder: every a, b and
// carry in (512 cases) against integer addition, then a random check of a
// 16-bit instance to exercise the width parameter.
module tb_rev_rca;
  localparam int W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  logic [15:0] a16, b16, s16;
  logic c16, co16;
  int checks = 0, failures = 0;

  rev_rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  rev_rca #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2**W; x++)
      for (int y = 0; y < 2**W; y++)
        for (int c = 0; c < 2; c++) begin
          int exp;
          a = W'(x); b = W'(y); cin = 1'(c);
          exp = x + y + c;
          #1;
          checks++;
          if ({cout, sum} !== (W+1)'(exp)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got %0d", x, y, c, {cout, sum});
          end
        end
    for (int n = 0; n < 2000; n++) begin
      int unsigned exp;
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      exp = int'(a16) + int'(b16) + int'(c16);
      #1;
      checks++;
      if ({co16, s16} !== 17'(exp)) begin
        failures++;
        $display("FAIL 16-bit %0d + %0d + %0d: got %0d", a16, b16, c16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
