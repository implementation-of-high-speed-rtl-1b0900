# Reversible-logic adder, Wallace multiplier and GCD control unit

A reversible gate maps its inputs to its outputs one to one: no input
pattern is lost, so the circuit could in principle run backwards and,
in theory, dissipates no energy from erasing information. This RTL
builds three ordinary digital circuits only out of such gates:

- a **4-bit ripple-carry adder** made of TSG gates,
- an **8 x 8 unsigned Wallace tree multiplier** made of Toffoli, Peres
  and TSG gates,
- the **control unit of an 8-bit GCD processor** (Euclid's
  subtract-compare-swap method) made of reversible D flip-flops,
  Feynman gates and Fredkin gates.

Every gate is a small SystemVerilog module with the gate's exact
input-to-output mapping, and the larger circuits are written as netlists
of those modules. The result synthesizes and simulates like any other RTL.
It is a functional model of the reversible structure. It does not model
energy, and it gives no speed advantage over conventional logic.

The three circuits share nothing. `rev_logic_top` places them side by
side, and each keeps its own ports.

## The gates

| module         | inputs  | outputs                                                  | used as |
|----------------|---------|----------------------------------------------------------|---------|
| `feynman_gate` | A B     | P = A, Q = A ^ B                                         | copy (B = 0), invert (B = 1) |
| `fredkin_gate` | A B C   | P = A; Q, R = B, C when A = 0 and C, B when A = 1        | AND (B = 0: Q = A & C), OR (C = 1: Q = A \| B), multiplexer |
| `toffoli_gate` | A B C   | P = A, Q = B, R = AB ^ C                                 | AND (C = 0) |
| `peres_gate`   | A B C   | P = A, Q = A ^ B, R = AB ^ C                             | half adder (C = 0) |
| `tsg_gate`     | A B C D | P = A, Q = A ^ B, R = A ^ B ^ D, S = (A ^ B)D ^ AB ^ C    | full adder (C = 0: R = sum, S = carry) |

Outputs that a circuit does not need are "garbage outputs". They stay
unconnected. This is the cost of reversibility, and lint reports these
pins as empty connections.

The Fredkin gate is the controlled swap, so its R output is A'C ^ AB,
the mirror of Q. The TSG carry output S is (A ^ B)·D ^ AB ^ C, which makes
the gate a full adder. A reference vector for it is a=1 b=0 c=0 d=1,
which gives p=1 q=1 r=0 s=1.

## Ripple-carry adder (`rev_rca`)

Stage *i* is one TSG gate with A = a[i], B = b[i], C = 0 and D = the
incoming carry. R is sum[i] and S carries into the next stage. So each
stage puts one gate on the carry path. `WIDTH` defaults to 4, and any
width can be built: the multiplier uses a 16-bit instance as its final
adder.

## Wallace tree multiplier (`wallace_mult`)

This is the part with the most machinery. It follows the three Wallace
steps.

1. **Partial products.** An N x N grid of Toffoli gates forms
   a[i] & b[j] into column i + j. Each gate hands its A input on through
   P to the next gate in its row, and its B input on through Q to the next
   gate in its column. So a[i] and b[j] each enter the grid once, and
   every signal in the multiplier drives exactly one gate input. That is
   the fan-out-of-one rule of reversible circuits.
2. **Reduction layers.** In every layer, each column is split into groups
   of three bits. A TSG full adder sums each group. A leftover pair goes to
   a Peres half adder, and a leftover single bit passes straight through.
   Sums stay in their column and carries move one column up. Layers repeat
   until no column holds more than two bits: 8 → 6 → 4 → 3 → 2, so four
   layers for N = 8.
3. **Final addition.** The two remaining rows are added by the TSG
   ripple-carry adder, 2N bits wide, with carry in 0.

The column heights of each layer come from two constant functions,
`col_height(s, c)` and `num_layers()`, which replay the rule above at
elaboration. Each generate block reads them to decide how many gates to
place and where its carries land in the next layer. The tree therefore
builds for any `N` ≥ 2. Each layer reads one array (`cur`) and drives
another (`nxt`), so the netlist has no false combinational loops. A
carry out of the top column would weigh 2^(2N). The product of two N-bit
numbers never produces one, so it is dropped.

Departures from the multiplier as originally drawn:

- Which bits are grouped together in each layer follows the standard
  Wallace rule. The original drawing's exact arrangement, which ends in a
  row of Peres and TSG gates, is not reproduced gate for gate.
- The final adder is the reversible TSG ripple adder, not a conventional
  adder.

The product is the same in both cases. The testbench checks all 65536
products.

## GCD control unit (`control_unit`)

The GCD processor holds operands A and B in a datapath. The datapath
reports `agb` (A > B) and `alb` (A < B). The control unit drives it with
five signals.

| state (d1 d0) | meaning | outputs          | next state |
|---------------|---------|------------------|------------|
| INIT (00)     | load operands | `ldab`     | CMP |
| CMP  (01)     | compare | none             | SUB if A > B, SWAP if A < B, CMP if A = B |
| SUB  (10)     | A ← A − B | `sub`, `lda`   | CMP |
| SWAP (11)     | A ↔ B   | `swap`, `lda`, `ldb` | SUB |

The unit comes to rest in CMP with A = B, and A then holds the GCD. A
subtraction costs two cycles (SUB, CMP) and a swap one more. The worst
8-bit case, (255, 1), takes 508 cycles. There is no done output. The end
shows as CMP with both comparison inputs low. The state assignment, the
transitions and the output meanings are this design's own, worked out
from the subtract-compare-swap algorithm. The structure and the port names
are those of the original block diagram.

It is built in three parts:

- **`ff_unit`**: two flip-flops with binary state encoding. Each flip-flop
  (`rev_dff`) is a master-slave pair of reversible latches (`edge_ff`,
  `d_latch`). The pair is followed by a Fredkin gate that applies the
  reset and a Feynman gate (B = 1) that gives the true and complement
  outputs.
- **`regen_unit`**: Feynman gates, chained by the helper `feynman_fanout`,
  make one copy of each state or status bit for each gate input that
  needs it. Counts: d0 ×3, ~d0 ×3, d1 ×5, ~d1 ×2, agb plus its
  complement, alb ×1.
- **`op_unit`**: ten Fredkin gates, used as AND, OR or buffer, compute:

  ```
  ldab = ~d1 & ~d0     sub = d1 & ~d0     swap = ldb = d1 & d0     lda = d1
  n1   = d0 & (d1 | agb | alb)
  n0   = ~d0 | (~d1 & ~agb)
  ```

The copy counts follow these equations. The original block diagram
prints other widths, for equations it does not state.

### Latches, clocking and reset

These are the points to understand before reusing the control unit.

- **Latch polarity.** `d_latch` is transparent while its clock is low. The
  master sees `clk` and the slave sees the inverted clock, which is handed
  on through the master's Fredkin pass-through output. So `rev_dff` is a
  rising-edge flip-flop. Synthesis infers four latches (two per
  flip-flop) and no flip-flops.
- **Loop warnings.** Lint and synthesis report a combinational loop: the
  state logic feeds back through the two latches. The master and slave
  are never transparent at the same time, so the loop is never open. The
  warning stands because the storage is made of latches.
- **Reset.** Reset works on the output side. While `reset` is high, the
  flip-flop outputs read 0 at once, so the unit sits in INIT and asserts
  `ldab`. What the logic computes from INIT (CMP) is stored at every
  rising edge. When `reset` falls, the unit is in CMP. So to start a
  computation:
  1. Present the operands.
  2. Hold `reset` high across at least one rising edge. The datapath must
     load on `ldab` during that time.
  3. Release `reset`.
- **Inputs.** `agb` and `alb` must never both be high. An assertion checks
  this.
- **Zero operands.** An operand of zero makes the algorithm loop forever,
  as subtract-compare-swap does. Supply nonzero operands.
- **Fan-out.** `clk` and `reset` each drive both flip-flops.

The datapath itself (registers, subtractor, comparator) is not part of
this RTL. `tb/gcd_datapath_model.sv` is a behavioural 8-bit model for the
testbenches. It updates on the falling clock edge, which keeps it clear of
the control unit's rising-edge state change in simulation.

## Files

- `rtl/rev_pkg.sv`: state enum `gcd_state_e`.
- Gates: `feynman_gate`, `fredkin_gate`, `toffoli_gate`, `peres_gate`,
  `tsg_gate`.
- Arithmetic: `rev_rca`, `wallace_mult`.
- Control unit: `d_latch`, `edge_ff`, `rev_dff`, `ff_unit`,
  `feynman_fanout`, `regen_unit`, `op_unit`, `control_unit`.
- Top level: `rev_logic_top` (parameters `RCA_WIDTH` = 4, `MUL_N` = 8).
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends
  by printing `TB_RESULT checks=N failures=M`.

## Simulating

Compile any testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rev_pkg.sv tb/tb_rev_logic_top.sv --top-module tb_rev_logic_top
./obj_dir/Vtb_rev_logic_top
```

What the testbenches check:

- **Gates.** Every gate is checked exhaustively against its mapping and
  for being a permutation of its input patterns.
- **Adder.** All 512 input cases of the 4-bit adder, plus random cases of
  a 16-bit adder.
- **Multiplier.** All products of the 8 x 8 multiplier and of a 4 x 4
  instance.
- **Latches and flip-flops.** The latch, flip-flop and reset behaviour at
  phase level.
- **Control unit.** The control unit is run in closed loop with the
  datapath model against a reference state machine. This covers 66
  operand pairs. For each pair the GCD is compared with Euclid's
  remainder method, and the cycle count with two cycles per subtraction
  plus one per swap.
- **Top level.** `tb_rev_logic_top` runs all three circuits at their
  default sizes. It also checks that each of these happens at least once:
  adder carry out, a product wider than 8 bits, operand load, subtract,
  swap, and finish.

## Where this departs from the original description

- The adder is 4 bits wide, as in the main description and its figure.
  One passage speaks of an 8-bit adder; for that, set
  `rev_rca #(.WIDTH(8))`.
- The reduction grouping and the final adder of the multiplier (see
  above).
- The GCD state machine, its equations, the reset behaviour and the
  copy counts are this design's own.
- The original claims that the reversible adder and multiplier are faster
  and use less power than conventional ones. Nothing here models timing
  or power. As RTL, these circuits synthesize to ordinary logic.
