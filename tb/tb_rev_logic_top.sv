// End-to-end test of the top level at its default sizes (4-bit adder,
// 8 x 8 multiplier, GCD control unit with a behavioural 8-bit datapath).
// Adder: all 512 input combinations against integer addition.
// Multiplier: 20000 random products plus the corner products, against
// integer multiplication.
// GCD: 40 operand pairs run to completion; the result must equal Euclid's
// GCD and the cycle count must equal two cycles per subtraction plus one per
// swap. Meanwhile the adder and multiplier inputs keep changing, to show the
// three circuits are independent.
// Mechanisms counted, each of which must occur: adder carry out, multiplier
// product above 8 bits, operand load (reset), subtract, swap, and finish
// (the unit resting in its compare state with A == B).
module tb_rev_logic_top;
  logic [3:0]  rca_a, rca_b, rca_sum;
  logic        rca_cin, rca_cout;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_p;
  logic        clk = 1'b0;
  logic        reset, agb, alb, lda, ldab, ldb, sub, swap;
  logic [7:0]  ain, bin, a_q, b_q;
  int checks = 0, failures = 0;
  int n_carry = 0, n_wide = 0, n_load = 0, n_sub = 0, n_swap = 0, n_done = 0;

  rev_logic_top dut (
    .rca_a(rca_a), .rca_b(rca_b), .rca_cin(rca_cin), .rca_sum(rca_sum), .rca_cout(rca_cout),
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p),
    .clk(clk), .reset(reset), .agb(agb), .alb(alb),
    .lda(lda), .ldab(ldab), .ldb(ldb), .sub(sub), .swap(swap)
  );

  gcd_datapath_model #(.W(8)) u_dp (
    .clk(clk), .ain(ain), .bin(bin), .lda(lda), .ldab(ldab), .ldb(ldb),
    .sub(sub), .swap(swap), .a_q(a_q), .b_q(b_q), .agb(agb), .alb(alb)
  );

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gcd_ref(input int x, input int y);
    while (y != 0) begin
      int t;
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int cycles_ref(input int x, input int y);
    int c = 0;
    while (x != y) begin
      if (x < y) begin
        int t;
        t = x; x = y; y = t;
        c += 1;
      end
      x -= y;
      c += 2;
    end
    return c;
  endfunction

  // combinational circuits, checked at every falling edge with new inputs
  task automatic check_comb();
    int s, m;
    rca_a = 4'($urandom); rca_b = 4'($urandom); rca_cin = 1'($urandom);
    mul_a = 8'($urandom); mul_b = 8'($urandom);
    #1;
    s = int'(rca_a) + int'(rca_b) + int'(rca_cin);
    m = int'(mul_a) * int'(mul_b);
    checks++;
    if ({rca_cout, rca_sum} !== 5'(s)) begin
      failures++;
      $display("FAIL adder %0d+%0d+%0d = %0d", rca_a, rca_b, rca_cin, {rca_cout, rca_sum});
    end
    checks++;
    if (mul_p !== 16'(m)) begin
      failures++;
      $display("FAIL mult %0d*%0d = %0d", mul_a, mul_b, mul_p);
    end
    if (rca_cout) n_carry++;
    if (mul_p > 16'd255) n_wide++;
  endtask

  always @(negedge clk) if (!reset) check_comb();

  task automatic run_gcd(input int x, input int y);
    int cyc;
    @(posedge clk);
    #2;
    reset = 1'b1;
    ain = 8'(x); bin = 8'(y);
    @(posedge clk);
    #2;
    reset = 1'b0;
    #1;
    n_load++;
    checks++;
    if (a_q !== 8'(x) || b_q !== 8'(y)) begin
      failures++;
      $display("FAIL operands not loaded: %0d %0d", a_q, b_q);
    end
    cyc = 0;
    while (!(a_q == b_q && !lda && !ldb && !ldab) && cyc < 2000) begin
      if (sub) n_sub++;
      if (swap) n_swap++;
      @(posedge clk);
      #2;
      cyc++;
    end
    n_done++;
    checks++;
    if (int'(a_q) != gcd_ref(x, y) || cyc != cycles_ref(x, y)) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): got %0d in %0d cycles, want %0d in %0d",
               x, y, a_q, cyc, gcd_ref(x, y), cycles_ref(x, y));
    end
  endtask

  initial begin
    reset = 1'b1; ain = 8'd1; bin = 8'd1;
    rca_a = '0; rca_b = '0; rca_cin = 1'b0; mul_a = '0; mul_b = '0;
    #1;
    // exhaustive adder and multiplier corners before the clocked part
    for (int v = 0; v < 512; v++) begin
      {rca_cin, rca_a, rca_b} = 9'(v);
      #1;
      checks++;
      if ({rca_cout, rca_sum} !== 5'(int'(rca_a) + int'(rca_b) + int'(rca_cin))) begin
        failures++;
        $display("FAIL adder %0d+%0d+%0d", rca_a, rca_b, rca_cin);
      end
    end
    mul_a = 8'hFF; mul_b = 8'hFF;
    #1;
    checks++;
    if (mul_p !== 16'd65025) begin
      failures++;
      $display("FAIL 255*255 = %0d", mul_p);
    end
    repeat (2) @(posedge clk);
    run_gcd(48, 18);
    run_gcd(18, 48);
    run_gcd(100, 100);
    run_gcd(255, 1);
    for (int n = 0; n < 36; n++)
      run_gcd($urandom_range(1, 255), $urandom_range(1, 255));
    $display("carry %0d wide %0d load %0d sub %0d swap %0d done %0d",
             n_carry, n_wide, n_load, n_sub, n_swap, n_done);
    checks++;
    if (n_carry == 0 || n_wide == 0 || n_load == 0 || n_sub == 0 || n_swap == 0 || n_done == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
