// Regeneration unit of the GCD control unit: makes one copy of a state or
// status signal for every gate input that uses it, with Feynman gates, so
// that no signal drives more than one gate input.
//   d0   -> d0_c[2:0]   (3 copies)      d0b -> d0b_c[2:0]  (3 copies)
//   d1   -> d1_c[4:0]   (5 copies)      d1b -> d1b_c[1:0]  (2 copies)
//   agb  -> agb1 and its complement agbb1 (one Feynman gate with B = 1)
//   alb  -> alb1
// The copy counts are those the output unit's equations need. Purely
// combinational. Duplication by Feynman gates follows the described design;
// the counts follow from this design's state equations.
module regen_unit (
  input  logic       agb,
  input  logic       alb,
  input  logic       d0,
  input  logic       d0b,
  input  logic       d1,
  input  logic       d1b,
  output logic [2:0] d0_c,
  output logic [2:0] d0b_c,
  output logic [4:0] d1_c,
  output logic [1:0] d1b_c,
  output logic       agb1,
  output logic       agbb1,
  output logic       alb1
);
  feynman_fanout #(.K(3)) u_d0  (.x(d0),  .y(d0_c));
  feynman_fanout #(.K(3)) u_d0b (.x(d0b), .y(d0b_c));
  feynman_fanout #(.K(5)) u_d1  (.x(d1),  .y(d1_c));
  feynman_fanout #(.K(2)) u_d1b (.x(d1b), .y(d1b_c));

  feynman_gate u_agb (.a(agb), .b(1'b1), .p(agb1), .q(agbb1));

  logic alb_garbage;
  feynman_gate u_alb (.a(alb), .b(1'b0), .p(alb_garbage), .q(alb1));
endmodule
