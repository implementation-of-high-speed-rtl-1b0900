// Exhaustive check of the 8 x 8 reversible Wallace tree multiplier (65536
// products) against integer multiplication, plus an exhaustive check of a
// 4 x 4 instance, which includes the reference product 6 x 3 = 18.
module tb_wallace_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  wallace_mult dut (.a(a), .b(b), .p(p));
  wallace_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (p !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, p);
        end
      end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          $display("FAIL 4-bit %0d * %0d: got %0d", x, y, p4);
        end
      end
    a4 = 4'b0110; b4 = 4'b0011;
    #1;
    checks++;
    if (p4 !== 8'b0001_0010) begin
      failures++;
      $display("FAIL reference 6 * 3: got %b", p4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
