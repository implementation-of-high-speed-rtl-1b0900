// Master-slave edge-triggered D flip-flop from two reversible D latches.
// The master latch sees the clock directly and is transparent while it is
// low; its clock pass-through output is inverted to clock the slave, which is
// therefore transparent while the clock is high. The master output feeds the
// slave input, so q takes the value d had just before the rising clock edge
// and holds it for the rest of the cycle.
// Interface: clk, d in; q out. Timing: rising-edge triggered, no reset (the
// reset is added one level up, in rev_dff). The two latches and the inverter
// on the slave clock follow the described flip-flop.
module edge_ff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic m_clk_o, m_d_o, m_q;
  logic s_clk, s_clk_o, s_d_o;

  d_latch u_master (.clk(clk), .d(d), .clk_o(m_clk_o), .d_o(m_d_o), .q_o(m_q));

  assign s_clk = ~m_clk_o;

  d_latch u_slave (.clk(s_clk), .d(m_q), .clk_o(s_clk_o), .d_o(s_d_o), .q_o(q));
endmodule
