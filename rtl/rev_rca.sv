// Reversible ripple-carry adder: WIDTH chained TSG gates.
// Stage i feeds A = a[i], B = b[i], C = 0 and D = carry in; the gate's R
// output is sum[i] and its S output the carry into stage i+1. The sum of a
// stage and its carry out are both formed from A ^ B and the incoming carry,
// so the carry path through a stage is one TSG gate. The pass-through P and
// Q outputs are the gate's garbage outputs and are left unconnected.
// Interface: a, b (WIDTH bits), cin; sum (WIDTH bits), cout. Purely
// combinational. The 4-bit default and the constant-0 C input follow the
// described adder; the width parameter is this design's own addition.
module rev_rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    tsg_gate u_tsg (
      .a(a[i]), .b(b[i]), .c(1'b0), .d(carry[i]),
      .p(), .q(), .r(sum[i]), .s(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
