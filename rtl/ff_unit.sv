// State register of the GCD control unit: two reversible D flip-flops.
// State bit 0 (d0, d0b) stores n0 and state bit 1 (d1, d1b) stores n1 on the
// rising edge of clk; each flip-flop gives its value and its complement.
// reset forces both outputs to 0 while it is held (see rev_dff).
// Two flip-flops with binary state encoding follow the described control
// unit; the port names are those of its block diagram.
module ff_unit (
  input  logic clk,
  input  logic reset,
  input  logic n0,
  input  logic n1,
  output logic d0,
  output logic d0b,
  output logic d1,
  output logic d1b
);
  rev_dff u_ff0 (.clk(clk), .reset(reset), .d(n0), .q(d0), .qb(d0b));
  rev_dff u_ff1 (.clk(clk), .reset(reset), .d(n1), .q(d1), .qb(d1b));
endmodule
