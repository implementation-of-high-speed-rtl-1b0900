// Check of the TSG gate: all sixteen input patterns against
//   P = A, Q = A xor B, R = A xor B xor D, S = (A xor B)D xor AB xor C,
// the full-adder use (C = 0: R is the sum and S the carry of A + B + D,
// computed with integer addition), the reference vector a=1 b=0 c=0 d=1 ->
// p=1 q=1 r=0 s=1, and that the sixteen output patterns are all different.
module tb_tsg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  tsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s abcd=%b%b%b%b: got %b want %b", what, a, b, c, d, got, exp);
    end
  endtask

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      logic [3:0] exp;
      {a, b, c, d} = 4'(v);
      exp = {a, a ^ b, a ^ b ^ d, ((a ^ b) & d) ^ (a & b) ^ c};
      #1;
      check({p, q, r, s}, exp, "mapping");
      if (!c) begin
        int total;
        total = int'(a) + int'(b) + int'(d);
        check({2'b00, s, r}, 4'(total), "full adder");
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    {a, b, c, d} = 4'b1001;
    #1;
    check({p, q, r, s}, 4'b1101, "reference vector");
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL outputs are not a permutation: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
