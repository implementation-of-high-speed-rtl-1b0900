// Exhaustive check of the regeneration unit: for all 64 input patterns
// every copy must equal its source and agbb1 must be the complement of agb.
module tb_regen_unit;
  logic agb, alb, d0, d0b, d1, d1b;
  logic [2:0] d0_c, d0b_c;
  logic [4:0] d1_c;
  logic [1:0] d1b_c;
  logic agb1, agbb1, alb1;
  int checks = 0, failures = 0;

  regen_unit dut (
    .agb(agb), .alb(alb), .d0(d0), .d0b(d0b), .d1(d1), .d1b(d1b),
    .d0_c(d0_c), .d0b_c(d0b_c), .d1_c(d1_c), .d1b_c(d1b_c),
    .agb1(agb1), .agbb1(agbb1), .alb1(alb1)
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {agb, alb, d0, d0b, d1, d1b} = 6'(v);
      #1;
      checks++;
      if (d0_c !== {3{d0}} || d0b_c !== {3{d0b}} || d1_c !== {5{d1}} ||
          d1b_c !== {2{d1b}} || agb1 !== agb || agbb1 !== ~agb || alb1 !== alb) begin
        failures++;
        $display("FAIL inputs %b: d0_c=%b d0b_c=%b d1_c=%b d1b_c=%b agb1=%b agbb1=%b alb1=%b",
                 6'(v), d0_c, d0b_c, d1_c, d1b_c, agb1, agbb1, alb1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
