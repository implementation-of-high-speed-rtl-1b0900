// Control unit of a GCD processor that runs Euclid's subtract-compare-swap
// algorithm, built from reversible gates in three parts:
//   ff_unit    two reversible D flip-flops holding the state {d1, d0}
//   regen_unit Feynman gates copying state and status bits (fan-out of one)
//   op_unit    Fredkin gates computing the control outputs and next state
// The datapath holds operands A and B and reports agb (A > B) and alb
// (A < B). The unit steps INIT -> CMP, then from CMP to SUB while A > B, to
// SWAP (then SUB) while A < B, and stays in CMP once A == B, when A holds the
// GCD. Outputs are Moore outputs of the state:
//   ldab  INIT   load both operands into A and B
//   sub   SUB    select A - B      lda  SUB, SWAP   load A
//   swap  SWAP   exchange A and B  ldb  SWAP        load B
// Timing: state changes on the rising clock edge. reset is level-sensitive:
// while it is high the unit is in INIT (ldab = 1, so the datapath takes new
// operands at every edge) and the next edge after it falls leaves CMP. A new
// computation starts by pulsing reset for at least one rising edge.
// agb and alb must not be high together. The three-part structure and its
// port names follow the described block diagram; the states and equations
// are this design's own. The state path ff_unit -> regen_unit -> op_unit ->
// ff_unit is reported as a combinational loop by lint and synthesis, since
// the flip-flops are latch pairs; it is never open (see rev_dff).
module control_unit
  import rev_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic agb,
  input  logic alb,
  output logic lda,
  output logic ldab,
  output logic ldb,
  output logic sub,
  output logic swap
);
  logic d0, d0b, d1, d1b;
  logic n0, n1;
  logic [2:0] d0_c, d0b_c;
  logic [4:0] d1_c;
  logic [1:0] d1b_c;
  logic agb1, agbb1, alb1;

  ff_unit u1 (
    .clk(clk), .reset(reset), .n0(n0), .n1(n1),
    .d0(d0), .d0b(d0b), .d1(d1), .d1b(d1b)
  );

  regen_unit u2 (
    .agb(agb), .alb(alb), .d0(d0), .d0b(d0b), .d1(d1), .d1b(d1b),
    .d0_c(d0_c), .d0b_c(d0b_c), .d1_c(d1_c), .d1b_c(d1b_c),
    .agb1(agb1), .agbb1(agbb1), .alb1(alb1)
  );

  op_unit u3 (
    .d0_c(d0_c), .d0b_c(d0b_c), .d1_c(d1_c), .d1b_c(d1b_c),
    .agb1(agb1), .agbb1(agbb1), .alb1(alb1),
    .lda(lda), .ldab(ldab), .ldb(ldb), .n0(n0), .n1(n1),
    .sub(sub), .swap(swap)
  );

  // Decoded state, for assertions and waveform viewing.
  gcd_state_e state;
  assign state = gcd_state_e'({d1, d0});

  // The datapath's comparison is either A > B, A < B or neither.
  a_cmp_onehot: assert property (@(posedge clk) disable iff (reset) !(agb && alb))
    else $error("agb and alb both high");
  // The two state bits and their complements must agree.
  a_compl: assert property (@(posedge clk) (d0 != d0b) && (d1 != d1b))
    else $error("flip-flop complement outputs disagree");
  // In CMP exactly the loads stay idle.
  a_cmp_idle: assert property (@(posedge clk) disable iff (reset)
      (state == ST_CMP) |-> !(lda || ldb || ldab || sub || swap))
    else $error("load asserted in CMP");
endmodule
