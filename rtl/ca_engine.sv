// ca_engine: the CA compute engine, n compute blocks in a pipeline.
//
// Block 1 takes the word stream read from the source memory bank (generation
// G); each block feeds the next, so block n emits generation G+n, which is
// written to the destination bank.  One pass of the lattice through the
// engine (a sweep) thus advances it by n generations.  All blocks advance
// together on adv, so the engine reads k cells and writes k cells per word
// time while it holds n*k cells under computation.
//
// Each block delays the stream by w+1 words and its input register adds one
// more, so the word leaving block n entered block 1 n*(w+2)-1 advances
// earlier.  Each block drops the first and last column of its stream, so a
// stream of c columns leaves as c-2n columns.  Interface as ca_cb.
// The pipeline of n blocks follows the published design; the latency figure
// is this implementation's.
module ca_engine
  import ca_pkg::*;
#(
  parameter rule_e       RULE = RULE_LIFE,
  parameter int unsigned SW   = state_bits(RULE),  // bits per cell
  parameter int unsigned K    = 16,                // cells per memory word
  parameter int unsigned N    = 16,                // compute blocks
  parameter int unsigned W    = 9,                 // words per plane column
  localparam int unsigned RW  = (W > 1) ? $clog2(W) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  logic             clear,
  input  logic [SW-1:0]    bc_state,
  input  logic             in_valid,
  input  logic [RW-1:0]    in_row,
  input  logic [K*SW-1:0]  in_data,
  output logic             out_valid,
  output logic [RW-1:0]    out_row,
  output logic [K*SW-1:0]  out_data
);

  logic            v [N+1];
  logic [RW-1:0]   r [N+1];
  logic [K*SW-1:0] d [N+1];

  assign v[0] = in_valid;
  assign r[0] = in_row;
  assign d[0] = in_data;

  for (genvar i = 0; i < N; i++) begin : g_cb
    ca_cb #(.RULE(RULE), .SW(SW), .K(K), .W(W)) u_cb (
      .clk       (clk),
      .rst_n     (rst_n),
      .adv       (adv),
      .clear     (clear),
      .bc_state  (bc_state),
      .in_valid  (v[i]),
      .in_row    (r[i]),
      .in_data   (d[i]),
      .out_valid (v[i+1]),
      .out_row   (r[i+1]),
      .out_data  (d[i+1])
    );
  end

  assign out_valid = v[N];
  assign out_row   = r[N];
  assign out_data  = d[N];

endmodule
