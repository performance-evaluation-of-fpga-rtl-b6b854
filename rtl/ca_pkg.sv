// ca_pkg: types and helpers shared by the cellular-automaton accelerator.
//
// The accelerator runs one of two two-dimensional cellular automata: Conway's
// Game of Life (one bit per cell) and the HPP lattice gas (four bits per cell,
// one per particle direction).  The rule is a compile-time choice; the cell
// state width follows from it.  Memory words are 16 bits wide, so a word holds
// k = 16 Life cells or k = 4 HPP sites.
package ca_pkg;

  typedef enum logic [0:0] {
    RULE_LIFE = 1'b0,
    RULE_HPP  = 1'b1
  } rule_e;

  // Bits of state per cell for a rule.
  function automatic int unsigned state_bits(rule_e rule);
    return (rule == RULE_HPP) ? 4 : 1;
  endfunction

  // HPP site encoding: one bit per particle, named by its direction of motion
  // (rows grow downwards, columns grow to the right).
  localparam int unsigned HPP_W = 0;  // moving left  (towards lower column)
  localparam int unsigned HPP_S = 1;  // moving down  (towards higher row)
  localparam int unsigned HPP_E = 2;  // moving right (towards higher column)
  localparam int unsigned HPP_N = 3;  // moving up    (towards lower row)

  // Index of the three columns of a neighbourhood row.
  localparam int unsigned COL_L = 0;
  localparam int unsigned COL_M = 1;
  localparam int unsigned COL_R = 2;

endpackage
