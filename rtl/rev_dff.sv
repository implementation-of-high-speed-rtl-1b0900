// Reversible D flip-flop with reset and complementary outputs.
// A master-slave edge_ff stores d on the rising clock edge. Its output goes
// through a Fredkin gate controlled by reset (B = stored value, C = 0), whose
// Q output is the stored value while reset is low and 0 while it is high. A
// Feynman gate with B = 1 then gives q on P and its complement qb on Q.
// Reset thus acts on the output, at once and without a clock: while it is
// held, q reads 0 and the logic after it sees state 0, and what that logic
// feeds back into d is stored at every rising edge. Once reset falls, q shows
// the last value stored. The edge_ff, Fredkin and Feynman chain follows the
// described flip-flop; the pin use of the two gates is this design's own.
// Lint and synthesis report a combinational loop through q when the flip
// flop sits in a state machine: q feeds the next-state logic, which feeds d,
// which passes the master latch while clk is low and the slave latch while
// clk is high. The two latches are never transparent at the same time, so
// the loop is never open; it stands because the storage is built from
// latches, as the described flip-flop is.
module rev_dff (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q,
  output logic qb
);
  logic q_edge;
  logic q_rst;
  logic rst_pass, garbage;

  edge_ff u_edge (.clk(clk), .d(d), .q(q_edge));

  fredkin_gate u_fr (
    .a(reset), .b(q_edge), .c(1'b0),
    .p(rst_pass), .q(q_rst), .r(garbage)
  );

  feynman_gate u_fn (.a(q_rst), .b(1'b1), .p(q), .q(qb));
endmodule
