// Top level of the reversible-logic circuit set. Three independent circuits
// stand side by side, each with its own ports:
//   rev_rca       RCA_WIDTH-bit ripple-carry adder of TSG gates
//   wallace_mult  MUL_N x MUL_N Wallace tree multiplier (Toffoli partial
//                 products, TSG and Peres reduction, TSG final adder)
//   control_unit  control unit of an 8-bit GCD processor (reversible D
//                 flip-flops, Feynman fan-out, Fredkin logic)
// The adder and the multiplier are combinational. The control unit is
// clocked on the rising edge of clk with a level-sensitive reset; its
// datapath (operand registers, subtractor, comparator) is not part of this
// design, so its comparison inputs agb, alb come in and its control outputs
// go out as ports. The circuit set, the 4-bit adder and the 8 x 8 multiplier
// follow the described design.
module rev_logic_top #(
  parameter int unsigned RCA_WIDTH = 4,
  parameter int unsigned MUL_N     = 8
) (
  // ripple-carry adder
  input  logic [RCA_WIDTH-1:0] rca_a,
  input  logic [RCA_WIDTH-1:0] rca_b,
  input  logic                 rca_cin,
  output logic [RCA_WIDTH-1:0] rca_sum,
  output logic                 rca_cout,
  // Wallace tree multiplier
  input  logic [MUL_N-1:0]     mul_a,
  input  logic [MUL_N-1:0]     mul_b,
  output logic [2*MUL_N-1:0]   mul_p,
  // GCD control unit
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 agb,
  input  logic                 alb,
  output logic                 lda,
  output logic                 ldab,
  output logic                 ldb,
  output logic                 sub,
  output logic                 swap
);
  rev_rca #(.WIDTH(RCA_WIDTH)) u_rca (
    .a(rca_a), .b(rca_b), .cin(rca_cin), .sum(rca_sum), .cout(rca_cout)
  );

  wallace_mult #(.N(MUL_N)) u_mult (
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

  control_unit u_cu (
    .clk(clk), .reset(reset), .agb(agb), .alb(alb),
    .lda(lda), .ldab(ldab), .ldb(ldb), .sub(sub), .swap(swap)
  );
endmodule
