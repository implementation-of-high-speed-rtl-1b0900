// Peres gate: 3 inputs, 3 outputs, P = A, Q = A ^ B, R = (A & B) ^ C.
// With C = 0 it is a half adder (Q = sum, R = carry); the multiplier uses it
// that way. Purely combinational, no timing.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
