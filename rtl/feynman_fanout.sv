// K copies of one signal from a chain of K-1 Feynman gates with B = 0.
// Each gate passes its input on P to the next gate and puts a copy on Q, so
// no wire drives more than one gate input. y[K-1] is the P output of the
// last gate. Combinational; K = 1 is a plain wire.
module feynman_fanout #(
  parameter int unsigned K = 2
) (
  input  logic         x,
  output logic [K-1:0] y
);
  logic [K-1:0] chain;
  assign chain[0] = x;
  for (genvar k = 0; k + 1 < K; k++) begin : g_copy
    feynman_gate u_fn (.a(chain[k]), .b(1'b0), .p(chain[k+1]), .q(y[k]));
  end
  assign y[K-1] = chain[K-1];
endmodule
