// Exhaustive check of the Fredkin gate: for every input triple, P = A and
// B, C swapped onto Q, R when A = 1, passed straight when A = 0. Also checks
// that the gate is its own inverse and that it is a permutation of the eight
// input patterns.
module tb_fredkin_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

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
      exp = a ? {a, c, b} : {a, b, c};
      #1;
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%b%b%b: got %b%b%b want %b", a, b, c, p, q, r, exp);
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL gate applied twice does not restore %b%b%b", a, b, c);
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
