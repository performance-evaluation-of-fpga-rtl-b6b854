// hpp_rule: next state of one site of the HPP lattice gas.
//
// Combinational.  A site holds four particle bits, one per direction of motion
// (see ca_pkg: bit 0 left, bit 1 down, bit 2 right, bit 3 up).  One time step
// is a streaming step followed by a collision step:
//   streaming - each particle moves one site along its direction, so the site
//               gathers the left-mover of its right neighbour, the down-mover
//               of the site above, the right-mover of its left neighbour and
//               the up-mover of the site below;
//   collision - a head-on pair (left+right only, or up+down only) turns by 90
//               degrees; every other configuration passes unchanged.
// Mass and momentum are conserved by construction.
// The bit coding and the two collision rules are those of the published HPP
// engine; the gathering logic is this design's own.
module hpp_rule
  import ca_pkg::*;
(
  input  logic [3:0] up,     // site above (lower row index)
  input  logic [3:0] down,   // site below
  input  logic [3:0] left,   // site in the left column
  input  logic [3:0] right,  // site in the right column
  output logic [3:0] next
);

  logic [3:0] gathered;

  always_comb begin
    gathered        = '0;
    gathered[HPP_W] = right[HPP_W];
    gathered[HPP_S] = up[HPP_S];
    gathered[HPP_E] = left[HPP_E];
    gathered[HPP_N] = down[HPP_N];
    unique case (gathered)
      4'b0101: next = 4'b1010;   // left+right -> up+down
      4'b1010: next = 4'b0101;   // up+down    -> left+right
      default: next = gathered;
    endcase
  end

endmodule
