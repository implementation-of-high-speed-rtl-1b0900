// Check of the two-flip-flop state register: d0/d1 take n0/n1 at each
// rising edge, d0b/d1b are their complements, and reset forces both
// outputs to 0 while it is high.
module tb_ff_unit;
  logic clk = 1'b0, reset, n0, n1, d0, d0b, d1, d1b;
  logic [1:0] ref_q;
  int checks = 0, failures = 0;

  ff_unit dut (.clk(clk), .reset(reset), .n0(n0), .n1(n1),
               .d0(d0), .d0b(d0b), .d1(d1), .d1b(d1b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0; {n1, n0} = 2'b00;
    @(posedge clk);
    ref_q = {n1, n0};
    for (int n = 0; n < 400; n++) begin
      logic [1:0] exp;
      #2;
      reset = ($urandom_range(0, 4) == 0);
      {n1, n0} = 2'($urandom);
      #1;
      exp = reset ? 2'b00 : ref_q;
      checks++;
      if ({d1, d0} !== exp || {d1b, d0b} !== ~exp) begin
        failures++;
        $display("FAIL at %0t: d1d0=%b%b d1bd0b=%b%b want %b", $time, d1, d0, d1b, d0b, exp);
      end
      @(posedge clk);
      ref_q = {n1, n0};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
