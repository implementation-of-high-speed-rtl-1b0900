// Check of the master-slave flip-flop: q must take the value of d at each
// rising clock edge and hold it for the whole cycle, although d changes
// several times in every clock phase.
module tb_edge_ff;
  logic clk = 1'b0, d = 1'b0, q;
  logic ref_q;
  int checks = 0, failures = 0;

  edge_ff dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // d changes at 1, 3, 6, 8 within each 10-unit period; edges at 5, 15, ...
    @(posedge clk);
    ref_q = d;
    for (int n = 0; n < 500; n++) begin
      #1 checks++; if (q !== ref_q) begin failures++; $display("FAIL cycle %0d: q=%b want %b", n, q, ref_q); end
      d = 1'($urandom);
      #2 checks++; if (q !== ref_q) begin failures++; $display("FAIL cycle %0d high: q=%b want %b", n, q, ref_q); end
      d = 1'($urandom);
      #3 checks++; if (q !== ref_q) begin failures++; $display("FAIL cycle %0d low: q=%b want %b", n, q, ref_q); end
      d = 1'($urandom);
      #3 d = 1'($urandom);
      @(posedge clk);
      ref_q = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
