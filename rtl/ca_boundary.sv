// ca_boundary: boundary conditions at the top and bottom edge of a plane.
//
// A compute block works on a plane w*k cells tall.  Its first lane takes its
// upper neighbours from the last lane of the previous word, and its last lane
// takes its lower neighbours from the first lane of the next word.  For the
// top word of a plane column there is no previous word (and no next word for
// the bottom one), so this unit substitutes the boundary state bc_state for
// all three cells of that row.  Combinational.
//
// Which state the edge cells see only affects the rows that the overlap of
// neighbouring planes discards, so any value gives correct lattice results;
// it is a run-time input (an all-dead / empty edge is the usual choice).
// The published design shows boundary-condition logic above the first and
// below the last PE; this multiplexer and the run-time state are this
// design's reading of it.
module ca_boundary #(
  parameter int unsigned SW = 1  // bits per cell
) (
  input  logic                top,        // middle word is the plane's first
  input  logic                bot,        // middle word is the plane's last
  input  logic [SW-1:0]       bc_state,   // state assumed outside the plane
  input  logic [2:0][SW-1:0]  above_in,   // last lane of the previous word
  input  logic [2:0][SW-1:0]  below_in,   // first lane of the next word
  output logic [2:0][SW-1:0]  above_out,  // row above lane 0
  output logic [2:0][SW-1:0]  below_out   // row below lane k-1
);

  always_comb begin
    above_out = top ? {3{bc_state}} : above_in;
    below_out = bot ? {3{bc_state}} : below_in;
  end

endmodule
