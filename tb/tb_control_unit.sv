// Closed-loop check of the reversible GCD control unit with a behavioural
// datapath. For each pair of nonzero 8-bit operands the testbench pulses
// reset (the datapath loads the operands), then at every rising clock edge
// compares the unit's outputs and state with a reference state machine, and
// once the unit rests in CMP with A == B checks that A holds the GCD
// (computed by Euclid's remainder method) and that the number of clock
// cycles equals the count worked out from the subtract/swap sequence:
// two cycles per subtraction (SUB, CMP) and one more per swap.
module tb_control_unit;
  import rev_pkg::*;
  localparam int W = 8;

  logic clk = 1'b0;
  logic reset, agb, alb, lda, ldab, ldb, sub, swap;
  logic [W-1:0] ain, bin, a_q, b_q;
  int checks = 0, failures = 0;
  int n_sub = 0, n_swap = 0, n_done = 0;

  control_unit dut (
    .clk(clk), .reset(reset), .agb(agb), .alb(alb),
    .lda(lda), .ldab(ldab), .ldb(ldb), .sub(sub), .swap(swap)
  );

  gcd_datapath_model #(.W(W)) u_dp (
    .clk(clk), .ain(ain), .bin(bin), .lda(lda), .ldab(ldab), .ldb(ldb),
    .sub(sub), .swap(swap), .a_q(a_q), .b_q(b_q), .agb(agb), .alb(alb)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  function automatic logic [4:0] outs_of(input gcd_state_e s);
    case (s)
      ST_INIT: return 5'b01000;
      ST_CMP:  return 5'b00000;
      ST_SUB:  return 5'b10010;
      default: return 5'b10101;
    endcase
  endfunction

  task automatic run(input int x, input int y);
    gcd_state_e ref_s;
    int cyc;
    bit done;
    // reset held over one falling (load) and one rising edge
    @(posedge clk);
    #2;
    reset = 1'b1;
    ain = W'(x); bin = W'(y);
    #1;
    checks++;
    if ({lda, ldab, ldb, sub, swap} !== outs_of(ST_INIT)) begin
      failures++;
      $display("FAIL outputs during reset: %b", {lda, ldab, ldb, sub, swap});
    end
    @(posedge clk);
    #2;
    reset = 1'b0;
    ref_s = ST_CMP;
    cyc = 0;
    done = 0;
    while (!done && cyc < 2000) begin
      #1;
      checks++;
      if (dut.state !== ref_s || {lda, ldab, ldb, sub, swap} !== outs_of(ref_s)) begin
        failures++;
        $display("FAIL %0d,%0d cycle %0d: state %s outputs %b, want %s",
                 x, y, cyc, dut.state.name(), {lda, ldab, ldb, sub, swap}, ref_s.name());
      end
      if (ref_s == ST_CMP && a_q == b_q) begin
        done = 1;
      end else begin
        if (ref_s == ST_SUB) n_sub++;
        if (ref_s == ST_SWAP) n_swap++;
        // the reference machine decides on the comparison before the edge
        case (ref_s)
          ST_CMP:  ref_s = agb ? ST_SUB : (alb ? ST_SWAP : ST_CMP);
          ST_SUB:  ref_s = ST_CMP;
          ST_SWAP: ref_s = ST_SUB;
          default: ref_s = ST_CMP;
        endcase
        @(posedge clk);
        #2;
        cyc++;
      end
    end
    n_done++;
    checks++;
    if (int'(a_q) != gcd_ref(x, y)) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): got %0d want %0d", x, y, a_q, gcd_ref(x, y));
    end
    checks++;
    if (cyc != cycles_ref(x, y)) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): %0d cycles, want %0d", x, y, cyc, cycles_ref(x, y));
    end
    // once finished the unit must rest in CMP
    repeat (3) begin
      @(posedge clk);
      #3;
      checks++;
      if (dut.state !== ST_CMP || {lda, ldab, ldb, sub, swap} !== 5'b0) begin
        failures++;
        $display("FAIL gcd(%0d,%0d): left CMP after finishing", x, y);
      end
    end
  endtask

  initial begin
    reset = 1'b1; ain = 8'd1; bin = 8'd1;
    repeat (2) @(posedge clk);
    run(48, 18);
    run(18, 48);
    run(7, 7);
    run(255, 1);
    run(1, 255);
    run(144, 89);
    for (int n = 0; n < 60; n++)
      run($urandom_range(1, 255), $urandom_range(1, 255));
    checks++;
    if (n_sub == 0 || n_swap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: sub %0d swap %0d", n_sub, n_swap);
    end
    $display("runs %0d, SUB cycles %0d, SWAP cycles %0d", n_done, n_sub, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
