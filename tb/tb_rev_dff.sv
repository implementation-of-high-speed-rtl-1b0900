// Check of the reversible D flip-flop with reset: q follows d at rising
// edges, qb is always the complement of q, and while reset is high q reads 0
// at once; after reset falls, q shows the last value stored before it fell.
module tb_rev_dff;
  logic clk = 1'b0, reset, d, q, qb;
  logic ref_q;
  int checks = 0, failures = 0;

  rev_dff dut (.clk(clk), .reset(reset), .d(d), .q(q), .qb(qb));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q !== exp || qb !== ~exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%b qb=%b want %b", what, $time, q, qb, exp);
    end
  endtask

  initial begin
    reset = 1'b0; d = 1'b0;
    @(posedge clk);
    ref_q = d;
    for (int n = 0; n < 400; n++) begin
      #1;
      reset = ($urandom_range(0, 5) == 0);
      #1;
      expect_q(reset ? 1'b0 : ref_q, reset ? "reset" : "hold");
      d = 1'($urandom);
      #6;
      expect_q(reset ? 1'b0 : ref_q, reset ? "reset late" : "hold late");
      @(posedge clk);
      ref_q = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
