// Reversible D latch: a Fredkin gate steering between the input and a
// level-sensitive storage node.
// The storage node takes d while clk is low and holds while clk is high. The
// Fredkin gate has the clock as its control, d on B and the stored value on
// C, so its Q output, the latch output q_o, is d while clk is low
// (transparent) and the stored value while clk is high. Its P output hands
// the clock on (clk_o), so a following stage can use the clock without a
// second load on the clock wire; its R output (d_o) is the gate's other,
// swapped output and is not needed by the flip-flop.
// The latch is intended: it is the storage element of the master-slave flip
// flop and synthesis reports it as a latch. The Fredkin-based latch and its
// clk_o, d_o, q_o outputs follow the described design; the clock polarity
// and the pin use are this design's own, chosen so that a latch pair with an
// inverted slave clock forms a rising-edge flip-flop. The storage node is a
// separate variable rather than a loop through the gate, so that the
// netlist holds no combinational cycle.
module d_latch (
  input  logic clk,
  input  logic d,
  output logic clk_o,
  output logic d_o,
  output logic q_o
);
  logic stored;

  always_latch begin
    if (!clk) stored = d;
  end

  fredkin_gate u_fr (
    .a(clk), .b(d), .c(stored),
    .p(clk_o), .q(q_o), .r(d_o)
  );
endmodule
