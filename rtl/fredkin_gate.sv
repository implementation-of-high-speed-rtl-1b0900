// Fredkin (controlled-swap) gate: 3 inputs, 3 outputs.
// A is the control and passes through as P. With A = 0 the other two inputs
// pass straight (Q = B, R = C); with A = 1 they are exchanged (Q = C, R = B).
// So Q = A'B ^ AC and R = A'C ^ AB. With C = 0 the gate yields AND (Q = AB),
// with C = 1 it yields OR (Q = A | B); the control unit uses it both ways.
// Purely combinational, no timing.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
