// Feynman (controlled-NOT) gate: 2 inputs, 2 outputs, P = A, Q = A ^ B.
// It is the fan-out element of a reversible circuit: with B = 0 it copies A
// onto Q, with B = 1 it gives the complement of A. The mapping follows the
// gate definition of the design; it is purely combinational, no timing.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
