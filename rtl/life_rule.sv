// life_rule: next-state function of one Game of Life cell.
//
// Combinational.  The inputs are the three rows of the cell's 3x3 Moore
// neighbourhood, each as {right, middle, left} (bit 0 = left column); the
// centre cell is mid_row[1].  A live cell with two or three live neighbours
// stays alive, a dead cell with exactly three live neighbours is born, every
// other cell is dead in the next generation (Conway's B3/S23 rule, which the
// accelerator is built for).  The neighbour count is a small adder tree.
// The rule is the standard one; the adder-tree form is this design's choice.
module life_rule (
  input  logic [2:0] up_row,   // row above the cell
  input  logic [2:0] mid_row,  // the cell's own row
  input  logic [2:0] dn_row,   // row below the cell
  output logic       next      // state in the next generation
);

  logic [3:0] count;

  always_comb begin
    count = 4'(up_row[0]) + 4'(up_row[1]) + 4'(up_row[2])
          + 4'(mid_row[0])                + 4'(mid_row[2])
          + 4'(dn_row[0])  + 4'(dn_row[1]) + 4'(dn_row[2]);
    next = (count == 4'd3) || (mid_row[1] && count == 4'd2);
  end

endmodule
