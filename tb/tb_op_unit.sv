// Exhaustive check of the output and next-state unit against a reference
// state machine written with a case statement: for every state and every
// legal comparison result (A > B, A < B, A == B), the five control outputs
// and the next state.
module tb_op_unit;
  import rev_pkg::*;
  logic [2:0] d0_c, d0b_c;
  logic [4:0] d1_c;
  logic [1:0] d1b_c;
  logic agb1, agbb1, alb1;
  logic lda, ldab, ldb, n0, n1, sub, swap;
  int checks = 0, failures = 0;

  op_unit dut (
    .d0_c(d0_c), .d0b_c(d0b_c), .d1_c(d1_c), .d1b_c(d1b_c),
    .agb1(agb1), .agbb1(agbb1), .alb1(alb1),
    .lda(lda), .ldab(ldab), .ldb(ldb), .n0(n0), .n1(n1), .sub(sub), .swap(swap)
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int st = 0; st < 4; st++)
      for (int cmp = 0; cmp < 3; cmp++) begin
        gcd_state_e s, nxt;
        logic gt, lt;
        logic [4:0] outs;  // {lda, ldab, ldb, sub, swap}
        s  = gcd_state_e'(st);
        gt = (cmp == 0);
        lt = (cmp == 1);
        case (s)
          ST_INIT: begin nxt = ST_CMP;  outs = 5'b01000; end
          ST_CMP:  begin
            nxt = gt ? ST_SUB : (lt ? ST_SWAP : ST_CMP);
            outs = 5'b00000;
          end
          ST_SUB:  begin nxt = ST_CMP;  outs = 5'b10010; end
          default: begin nxt = ST_SUB;  outs = 5'b10101; end
        endcase
        d0_c  = {3{st[0]}};  d0b_c = {3{~st[0]}};
        d1_c  = {5{st[1]}};  d1b_c = {2{~st[1]}};
        agb1  = gt; agbb1 = ~gt; alb1 = lt;
        #1;
        checks++;
        if ({n1, n0} !== nxt) begin
          failures++;
          $display("FAIL state %s cmp %0d: next %b want %b", s.name(), cmp, {n1, n0}, nxt);
        end
        checks++;
        if ({lda, ldab, ldb, sub, swap} !== outs) begin
          failures++;
          $display("FAIL state %s: outputs %b want %b", s.name(), {lda, ldab, ldb, sub, swap}, outs);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
