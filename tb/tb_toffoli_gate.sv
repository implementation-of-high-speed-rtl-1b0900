// Exhaustive check of the Toffoli gate against its mapping P = A, Q = B, R = AB xor C,
// written out independently, and check that its eight output patterns are
// all different (the gate is reversible).
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp;
      {a, b, c} = 3'(v);
      exp = {a, b, (a & b) ^ c};
      #1;
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%b%b%b: got %b%b%b want %b", a, b, c, p, q, r, exp);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs are not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
