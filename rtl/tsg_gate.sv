// TSG gate: 4 inputs, 4 outputs, used as a reversible full adder.
//   P = A, Q = A ^ B, R = A ^ B ^ D, S = ((A ^ B) & D) ^ (A & B) ^ C
// With C = 0, A and B the addend bits and D the carry in, R is the sum and S
// the carry out. S is read as the carry function so that the gate adds; the
// value set a=1 b=0 c=0 d=1 giving p=1 q=1 r=0 s=1 agrees with that reading.
// Purely combinational, no timing.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p = a;
  assign q = axb;
  assign r = axb ^ d;
  assign s = (axb & d) ^ (a & b) ^ c;
endmodule
