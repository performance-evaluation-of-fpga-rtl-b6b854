// ca_pe: processing element, one cell lane of a compute block.
//
// A compute block reads k cells per memory word; this PE owns lane j of every
// word.  The words of a computational plane arrive column by column, w words
// per column, so a lane sees the cells of rows j, k+j, 2k+j, ... of each
// column in turn.  The PE keeps them in a shift chain that advances once per
// word (adv): the newest stage belongs to the right column, the stages w and
// 2w further on to the middle and left columns.  With the newest word being
// row word r+1 of the right column, the chain exposes three taps per column:
//   tap_next : row word r+1 (stages 0, w, 2w)
//   tap_cur  : row word r   (stages 1, w+1, 2w+1)
//   tap_prev : row word r-1 (stages 2, w+2, 2w+2)
// tap_cur goes to the neighbouring PEs ("data to upper/lower PE"); tap_prev
// and tap_next are used only by the first and last lane of the block, whose
// vertical neighbours sit in the previous or next word.  The next state of the
// middle-column cell of row word r is computed combinationally from tap_cur
// and the rows supplied from above (up) and below (dn).
//
// The right and middle column registers are w stages each; the left one only
// needs its first three stages, since no later stage is ever read, so the
// chain is 2w+3 stages long.  The chain has no reset: the compute block tags
// every word with a valid bit.  Output dout is combinational from the chain.
// Three column shift registers feeding a next-state unit, with rows exchanged
// with the neighbouring PEs, follow the published PE; the single 2w+3 stage
// chain and the previous/next-word taps are this design's own.
module ca_pe
  import ca_pkg::*;
#(
  parameter rule_e       RULE = RULE_LIFE,
  parameter int unsigned SW   = state_bits(RULE),  // bits per cell
  parameter int unsigned W    = 9                  // words per plane column
) (
  input  logic                 clk,
  input  logic                 adv,       // shift in din
  input  logic [SW-1:0]        din,       // this lane of the incoming word
  output logic [2:0][SW-1:0]   tap_prev,  // {right, middle, left}, row word r-1
  output logic [2:0][SW-1:0]   tap_cur,   // row word r
  output logic [2:0][SW-1:0]   tap_next,  // row word r+1
  input  logic [2:0][SW-1:0]   up,        // row above the computed cell
  input  logic [2:0][SW-1:0]   dn,        // row below the computed cell
  output logic [SW-1:0]        dout       // next state of the middle cell
);

  localparam int unsigned DEPTH = 2 * W + 3;

  logic [SW-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (adv) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    tap_next[COL_R] = sr[0];
    tap_next[COL_M] = sr[W];
    tap_next[COL_L] = sr[2*W];
    tap_cur[COL_R]  = sr[1];
    tap_cur[COL_M]  = sr[W+1];
    tap_cur[COL_L]  = sr[2*W+1];
    tap_prev[COL_R] = sr[2];
    tap_prev[COL_M] = sr[W+2];
    tap_prev[COL_L] = sr[2*W+2];
  end

  if (RULE == RULE_LIFE) begin : g_life
    life_rule u_rule (
      .up_row  ({up[COL_R][0],      up[COL_M][0],      up[COL_L][0]}),
      .mid_row ({tap_cur[COL_R][0], tap_cur[COL_M][0], tap_cur[COL_L][0]}),
      .dn_row  ({dn[COL_R][0],      dn[COL_M][0],      dn[COL_L][0]}),
      .next    (dout[0])
    );
  end else begin : g_hpp
    hpp_rule u_rule (
      .up    (up[COL_M]),
      .down  (dn[COL_M]),
      .left  (tap_cur[COL_L]),
      .right (tap_cur[COL_R]),
      .next  (dout)
    );
  end

endmodule
