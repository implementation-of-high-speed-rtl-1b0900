// Toffoli gate: 3 inputs, 3 outputs, P = A, Q = B, R = (A & B) ^ C.
// With C = 0 it forms the AND of A and B on R; the multiplier makes each
// partial product bit with one. Purely combinational, no timing.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
