// Behavioural model of a GCD datapath, for testbenches only: two 8-bit
// registers A and B, a subtractor and a comparator, driven by the control
// unit's load, subtract and swap signals.
//   ldab        A <= ain, B <= bin
//   lda & sub   A <= A - B
//   lda & swap  A <= B        ldb & swap  B <= A
// agb = (A > B), alb = (A < B). The registers change on the falling clock
// edge, half a cycle after the control unit's state changes on the rising
// edge, so the model never races the control unit in simulation.
module gcd_datapath_model #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] ain,
  input  logic [W-1:0] bin,
  input  logic         lda,
  input  logic         ldab,
  input  logic         ldb,
  input  logic         sub,
  input  logic         swap,
  output logic [W-1:0] a_q,
  output logic [W-1:0] b_q,
  output logic         agb,
  output logic         alb
);
  always_ff @(negedge clk) begin
    if (ldab) begin
      a_q <= ain;
      b_q <= bin;
    end else begin
      if (lda) a_q <= swap ? b_q : (sub ? a_q - b_q : a_q);
      if (ldb) b_q <= swap ? a_q : b_q;
    end
  end

  assign agb = (a_q > b_q);
  assign alb = (a_q < b_q);
endmodule
