// Output and next-state unit of the GCD control unit, built only from
// Fredkin gates. With x on A, B = 0 and y on C, the gate's Q output is x & y;
// with x on A, y on B and C = 1 it is x | y. With state = {d1, d0}:
//   ldab = ~d1 & ~d0          load both operands    (state INIT)
//   sub  =  d1 & ~d0          A <= A - B             (state SUB)
//   swap =  d1 &  d0          exchange A and B       (state SWAP)
//   ldb  =  d1 &  d0          load B                 (state SWAP)
//   lda  =  d1                load A                 (SUB or SWAP)
//   n1   =  d0 & (d1 | agb | alb)
//   n0   = ~d0 | (~d1 & ~agb)
// giving INIT -> CMP; CMP -> SUB if A > B, SWAP if A < B, CMP if A == B;
// SUB -> CMP; SWAP -> SUB. Every input is a separate copy made by the
// regeneration unit and is used once. Purely combinational.
// Outputs and next state from Fredkin gates follow the described design;
// the state assignment and the equations are this design's own.
module op_unit (
  input  logic [2:0] d0_c,
  input  logic [2:0] d0b_c,
  input  logic [4:0] d1_c,
  input  logic [1:0] d1b_c,
  input  logic       agb1,
  input  logic       agbb1,
  input  logic       alb1,
  output logic       lda,
  output logic       ldab,
  output logic       ldb,
  output logic       n0,
  output logic       n1,
  output logic       sub,
  output logic       swap
);
  // garbage outputs of the gates (P and R)
  logic [9:0] gp, gr;
  logic cmp_ne, t_n1, t_n0;

  // AND: A = x, B = 0, C = y -> Q = x & y
  fredkin_gate u_ldab (.a(d1b_c[0]), .b(1'b0), .c(d0b_c[0]), .p(gp[0]), .q(ldab), .r(gr[0]));
  fredkin_gate u_sub  (.a(d1_c[0]),  .b(1'b0), .c(d0b_c[1]), .p(gp[1]), .q(sub),  .r(gr[1]));
  fredkin_gate u_swap (.a(d1_c[1]),  .b(1'b0), .c(d0_c[0]),  .p(gp[2]), .q(swap), .r(gr[2]));
  fredkin_gate u_ldb  (.a(d1_c[2]),  .b(1'b0), .c(d0_c[1]),  .p(gp[3]), .q(ldb),  .r(gr[3]));
  // buffer: A = x, B = 0, C = 1 -> Q = x
  fredkin_gate u_lda  (.a(d1_c[3]),  .b(1'b0), .c(1'b1),     .p(gp[4]), .q(lda),  .r(gr[4]));

  // n1 = d0 & (d1 | agb | alb); OR: A = x, B = y, C = 1 -> Q = x | y
  fredkin_gate u_ne   (.a(agb1),     .b(alb1),   .c(1'b1),   .p(gp[5]), .q(cmp_ne), .r(gr[5]));
  fredkin_gate u_n1or (.a(d1_c[4]),  .b(cmp_ne), .c(1'b1),   .p(gp[6]), .q(t_n1),   .r(gr[6]));
  fredkin_gate u_n1   (.a(d0_c[2]),  .b(1'b0),   .c(t_n1),   .p(gp[7]), .q(n1),     .r(gr[7]));

  // n0 = ~d0 | (~d1 & ~agb)
  fredkin_gate u_n0an (.a(d1b_c[1]), .b(1'b0),   .c(agbb1),  .p(gp[8]), .q(t_n0),   .r(gr[8]));
  fredkin_gate u_n0   (.a(d0b_c[2]), .b(t_n0),   .c(1'b1),   .p(gp[9]), .q(n0),     .r(gr[9]));
endmodule
