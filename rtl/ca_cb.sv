// ca_cb: compute block, one generation of the pipeline.
//
// A compute block holds k processing elements, one per cell of a 16-bit
// memory word, and computes one generation of a computational plane that is w
// words (w*k cells) tall.  Words stream in column by column, w words per
// column, one word per adv strobe.  Each word carries a tag: a valid bit and
// its row-word index within the plane column (0 = top).  The tag travels
// through a chain of the same depth as the PEs' data chains, and the block
// emits, for every incoming word, the next state of the word that sits in the
// middle column at row word r while row word r+1 of the right column has
// just arrived: a fixed delay of w+1 words.
//
// PE j takes its upper row from PE j-1 and its lower row from PE j+1 (same
// word).  PE 0 takes it from PE k-1 of the previous word and PE k-1 from PE 0
// of the next word, through ca_boundary, which substitutes the boundary state
// at the top and bottom of the plane.  The top and bottom rows therefore come
// out wrong, the loss that overlapping planes make up for.
//
// out_valid is set only when the middle word and the words in the same row of
// the left and right columns are all valid, so the first and last column of a
// stream produce nothing: a stream of c columns yields c-2 columns.  clear
// drops all tags, to start a new plane.  Outputs are combinational from the
// chains; the next block registers them on its own adv.
// k PEs per block, one cell lane each, and the loss of the two edge rows per
// block follow the published design; the word layout (k vertically adjacent
// cells per word), the tags and the w+1 delay are this design's choices.
module ca_cb
  import ca_pkg::*;
#(
  parameter rule_e       RULE = RULE_LIFE,
  parameter int unsigned SW   = state_bits(RULE),  // bits per cell
  parameter int unsigned K    = 16,                // cells per memory word
  parameter int unsigned W    = 9,                 // words per plane column
  localparam int unsigned RW  = (W > 1) ? $clog2(W) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,        // advance by one word
  input  logic             clear,      // drop all tags (start of a plane)
  input  logic [SW-1:0]    bc_state,   // cell state assumed outside the plane
  input  logic             in_valid,
  input  logic [RW-1:0]    in_row,     // row word within the plane column
  input  logic [K*SW-1:0]  in_data,    // lane j in bits [j*SW +: SW]
  output logic             out_valid,
  output logic [RW-1:0]    out_row,
  output logic [K*SW-1:0]  out_data    // next generation of the middle word
);

  localparam int unsigned DEPTH = 2 * W + 3;

  // Tag chain.
  logic          vld [DEPTH];
  logic [RW-1:0] row [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
    end else if (adv) begin
      vld[0] <= in_valid;
      for (int i = 1; i < DEPTH; i++) vld[i] <= vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      row[0] <= in_row;
      for (int i = 1; i < DEPTH; i++) row[i] <= row[i-1];
    end
  end

  logic top, bot;
  assign out_row   = row[W+1];
  assign out_valid = vld[W+1] && vld[1] && vld[2*W+1];
  assign top       = (row[W+1] == '0);
  assign bot       = (row[W+1] == RW'(W - 1));

  // Processing elements and their vertical links.
  logic [2:0][SW-1:0] tap_prev [K];
  logic [2:0][SW-1:0] tap_cur  [K];
  logic [2:0][SW-1:0] tap_next [K];
  logic [2:0][SW-1:0] up       [K];
  logic [2:0][SW-1:0] dn       [K];
  logic [2:0][SW-1:0] above, below;

  ca_boundary #(.SW(SW)) u_bc (
    .top       (top),
    .bot       (bot),
    .bc_state  (bc_state),
    .above_in  (tap_prev[K-1]),
    .below_in  (tap_next[0]),
    .above_out (above),
    .below_out (below)
  );

  for (genvar j = 0; j < K; j++) begin : g_pe
    if (j == 0) begin : g_up_edge
      assign up[j] = above;
    end else begin : g_up_in
      assign up[j] = tap_cur[j-1];
    end
    if (j == K - 1) begin : g_dn_edge
      assign dn[j] = below;
    end else begin : g_dn_in
      assign dn[j] = tap_cur[j+1];
    end

    ca_pe #(.RULE(RULE), .SW(SW), .W(W)) u_pe (
      .clk      (clk),
      .adv      (adv),
      .din      (in_data[j*SW +: SW]),
      .tap_prev (tap_prev[j]),
      .tap_cur  (tap_cur[j]),
      .tap_next (tap_next[j]),
      .up       (up[j]),
      .dn       (dn[j]),
      .dout     (out_data[j*SW +: SW])
    );
  end

endmodule
