// Shared types of the reversible GCD control unit.
// The control unit keeps its state in two flip-flops with binary encoding,
// state = {d1, d0}. The four states and their codes are this design's own
// choice; the number of flip-flops and the binary encoding follow the
// described control unit.
package rev_pkg;
  typedef enum logic [1:0] {
    ST_INIT = 2'b00,  // load both operands (ldab)
    ST_CMP  = 2'b01,  // compare; stay here once A == B
    ST_SUB  = 2'b10,  // A <= A - B (sub, lda)
    ST_SWAP = 2'b11   // A <-> B (swap, lda, ldb)
  } gcd_state_e;
endpackage
