// Shared definitions for the circular BIST chain with state skipping.
//
// Every cell of the chain is steered by two control bits, T1 and T2, that are
// common to the whole chain. The four combinations select the four modes of
// the chain; the encoding below ({T1,T2}) is the one the cell's gating
// implies: T1 enables the functional input Z and the skip input, T2 enables
// the chain input from the preceding cell.
//
//   {T1,T2} = 00  Reset   every flip-flop loads 0
//   {T1,T2} = 01  Shift   every flip-flop loads its predecessor's output
//   {T1,T2} = 10  Normal  every flip-flop loads its functional input Z
//   {T1,T2} = 11  BIST    every flip-flop loads Z xor predecessor xor skip
package cbist_pkg;

  typedef enum logic [1:0] {
    MODE_RESET  = 2'b00,
    MODE_SHIFT  = 2'b01,
    MODE_NORMAL = 2'b10,
    MODE_BIST   = 2'b11
  } mode_e;

endpackage
