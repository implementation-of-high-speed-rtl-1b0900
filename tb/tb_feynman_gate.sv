// Exhaustive check of the Feynman gate against its truth table:
// (A, B) -> (A, A xor B) for all four input pairs, plus the reversibility
// check that applying the gate twice restores the inputs.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  // expected outputs, indexed by {a, b}: {p, q}
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== EXP[v]) begin
        failures++;
        $display("FAIL a=%b b=%b: got p=%b q=%b", a, b, p, q);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL twice-applied gate did not restore %b%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
