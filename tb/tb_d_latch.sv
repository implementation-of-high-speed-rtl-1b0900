// Check of the reversible D latch: while clk is low the output follows d
// (transparent); while clk is high it keeps the value d had when clk rose,
// whatever d does. clk_o must repeat clk.
module tb_d_latch;
  logic clk, d, clk_o, d_o, q_o;
  logic held;
  int checks = 0, failures = 0;

  d_latch dut (.clk(clk), .d(d), .clk_o(clk_o), .d_o(d_o), .q_o(q_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q_o !== exp || clk_o !== clk) begin
      failures++;
      $display("FAIL %s: clk=%b d=%b q_o=%b want %b clk_o=%b", what, clk, d, q_o, exp, clk_o);
    end
  endtask

  initial begin
    clk = 1'b0; d = 1'b0;
    for (int n = 0; n < 200; n++) begin
      // transparent phase
      clk = 1'b0;
      repeat (3) begin
        d = 1'($urandom);
        #1;
        expect_q(d, "transparent");
      end
      held = d;
      // hold phase
      clk = 1'b1;
      #1;
      expect_q(held, "hold at rise");
      repeat (3) begin
        d = 1'($urandom);
        #1;
        expect_q(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
