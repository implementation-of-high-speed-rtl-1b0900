// Reversible Wallace tree multiplier: unsigned N x N -> 2N bits.
// It works in the three Wallace steps:
//  1. Every bit pair a[i], b[j] is ANDed by a Toffoli gate (C input 0); the
//     partial product carries weight i + j and is placed in column i + j.
//     The gates' pass-through outputs hand a[i] along its row and b[j]
//     along its column, so no signal drives more than one gate input.
//  2. Reduction layers shrink every column to at most two bits. In each layer
//     a column of height h is cut into groups of three, each summed by a TSG
//     gate used as a full adder; a leftover pair goes to a Peres gate used as
//     a half adder, a leftover single bit passes to the next layer. Sums stay
//     in the column, carries move one column up. Layers repeat until no
//     column holds more than two bits (four layers for N = 8).
//  3. The two remaining rows are added by the TSG ripple-carry adder, 2N
//     bits wide, with carry in 0.
// The column heights of every layer are worked out at elaboration by
// constant functions, so the tree is built for any N >= 2. A carry out of the
// top column would weigh 2^(2N) and is always 0 for a product of two N-bit
// numbers, so it is dropped. Interface: a, b (N bits); p (2N bits). Purely
// combinational. The 8 x 8 size, the gate types and the three steps follow
// the described multiplier; the exact grouping of bits in each layer is this
// design's own (the standard Wallace rule).
module wallace_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int W    = 2 * N;  // product columns
  localparam int HMAX = N + 2;  // bound on any column height in any layer

  // Height of column c before layer s (s = 0: the partial products).
  function automatic int col_height(input int s, input int c);
    int h  [0:W-1];
    int nh [0:W-1];
    for (int k = 0; k < W; k++) begin
      if (k <= 2 * N - 2) h[k] = ((k < N) ? k : (2 * N - 2 - k)) + 1;
      else                h[k] = 0;
    end
    for (int st = 0; st < s; st++) begin
      for (int k = 0; k < W; k++) begin
        nh[k] = h[k] / 3 + ((h[k] % 3 != 0) ? 1 : 0);
        if (k > 0) nh[k] += h[k-1] / 3 + ((h[k-1] % 3 == 2) ? 1 : 0);
      end
      h = nh;
    end
    return h[c];
  endfunction

  // Number of reduction layers needed to bring every column to <= 2 bits.
  function automatic int num_layers();
    int s;
    int mx;
    s = 0;
    forever begin
      mx = 0;
      for (int k = 0; k < W; k++)
        if (col_height(s, k) > mx) mx = col_height(s, k);
      if (mx <= 2) break;
      s++;
    end
    return s;
  endfunction

  localparam int NL = num_layers();

  // pp[c][k]: bit k of column c of the partial products. Each layer reads
  // its input array (cur) and drives its own output array (nxt).
  logic pp [0:W-1][0:HMAX-1];

  // ---- step 1: partial products, one Toffoli gate each -------------------
  // The gates form an N x N grid. Gate (i, j) gets a[i] from the P output of
  // gate (i, j-1) and b[j] from the Q output of gate (i-1, j), so every
  // operand bit and every gate output drives exactly one gate input.
  for (genvar i = 0; i < N; i++) begin : g_pp_i
    for (genvar j = 0; j < N; j++) begin : g_pp_j
      localparam int C  = i + j;
      localparam int LO = (C > N - 1) ? C - (N - 1) : 0;
      logic a_in, b_in;    // a[i] and b[j] as they arrive at this gate
      logic a_out, b_out;  // the same bits handed on by this gate
      if (j == 0) begin : g_a0
        assign a_in = a[i];
      end else begin : g_a
        assign a_in = g_pp_i[i].g_pp_j[j-1].a_out;
      end
      if (i == 0) begin : g_b0
        assign b_in = b[j];
      end else begin : g_b
        assign b_in = g_pp_i[i-1].g_pp_j[j].b_out;
      end
      toffoli_gate u_tf (
        .a(a_in), .b(b_in), .c(1'b0),
        .p(a_out), .q(b_out), .r(pp[C][i-LO])
      );
    end
  end
  for (genvar c = 0; c < W; c++) begin : g_pp_tie
    for (genvar k = col_height(0, c); k < HMAX; k++) begin : g_k
      assign pp[c][k] = 1'b0;
    end
  end

  // ---- step 2: reduction layers ------------------------------------------
  for (genvar s = 0; s < NL; s++) begin : g_layer
    logic cur [0:W-1][0:HMAX-1];
    logic nxt [0:W-1][0:HMAX-1];
    if (s == 0) begin : g_in0
      assign cur = pp;
    end else begin : g_in
      assign cur = g_layer[s-1].nxt;
    end
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H     = col_height(s, c);
      localparam int NFA   = H / 3;
      localparam int NHA   = (H % 3 == 2) ? 1 : 0;
      localparam int NPASS = (H % 3 == 1) ? 1 : 0;
      // where this column's carries land in column c+1 of the next layer
      localparam int HU    = (c + 1 < W) ? col_height(s, c + 1) : 0;
      localparam int COFF  = HU / 3 + ((HU % 3 != 0) ? 1 : 0);
      localparam int HN    = col_height(s + 1, c);

      for (genvar f = 0; f < NFA; f++) begin : g_fa
        logic carry;
        tsg_gate u_fa (
          .a(cur[c][3*f]), .b(cur[c][3*f+1]), .c(1'b0),
          .d(cur[c][3*f+2]),
          .p(), .q(), .r(nxt[c][f]), .s(carry)
        );
        if (c + 1 < W) begin : g_up
          assign nxt[c+1][COFF+f] = carry;
        end
      end
      if (NHA == 1) begin : g_ha
        logic carry;
        peres_gate u_ha (
          .a(cur[c][3*NFA]), .b(cur[c][3*NFA+1]), .c(1'b0),
          .p(), .q(nxt[c][NFA]), .r(carry)
        );
        if (c + 1 < W) begin : g_up
          assign nxt[c+1][COFF+NFA] = carry;
        end
      end
      if (NPASS == 1) begin : g_pass
        assign nxt[c][NFA] = cur[c][3*NFA];
      end
      for (genvar k = HN; k < HMAX; k++) begin : g_tie
        assign nxt[c][k] = 1'b0;
      end
    end
  end

  // ---- step 3: final two rows through the TSG ripple-carry adder ---------
  logic last [0:W-1][0:HMAX-1];
  if (NL == 0) begin : g_last0
    assign last = pp;
  end else begin : g_last
    assign last = g_layer[NL-1].nxt;
  end

  logic [W-1:0] row_x, row_y;
  for (genvar c = 0; c < W; c++) begin : g_rows
    assign row_x[c] = last[c][0];
    assign row_y[c] = last[c][1];
  end

  rev_rca #(.WIDTH(W)) u_final (
    .a(row_x), .b(row_y), .cin(1'b0), .sum(p), .cout()
  );
endmodule
