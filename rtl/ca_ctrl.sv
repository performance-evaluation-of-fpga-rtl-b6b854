// ca_ctrl: control block of the accelerator.
//
// Sequences the memory traffic of the compute engine.  The lattice is x
// columns by y rows; it is stored column-major, one 16-bit word per k
// vertically adjacent cells: address = column * (y/k) + row_word.  Since the
// engine holds only w words of a column, the lattice is swept in horizontal
// computational planes, each w words tall.  Every compute block spoils one
// row at each plane edge, so after n blocks the outer ceil(n/k) words at each
// edge (the margin NMW) are wrong: a plane writes back only its inner
// S = w - 2*NMW words, and consecutive planes start S words apart, overlapping
// by 2*NMW words.  There are M = ceil((y/k)/S) planes per sweep; rows wrap
// around, so the lattice is periodic in y, and the last plane may rewrite
// words of the first with the same values.
//
// For each plane the engine is streamed x+2n columns: all x columns, then the
// first 2n again, so that columns wrap (periodic in x) and every column of
// the output has both neighbours at every generation.  The columns leaving
// the engine are stream columns n .. x+n-1, i.e. lattice columns n, ..., x-1,
// 0, ..., n-1, which the write column counter follows.
//
// Memory banks A and B share their address pins, so a word time is two
// clocks: a read cycle (RD: address the source bank, the engine takes the
// word at the clock edge) and a write cycle (WR: write the engine's output
// word, if valid and inside the written window, to the destination bank).  A
// plane ends with its last write; a sweep ends after M planes; then the bank
// roles swap.  After `sweeps` sweeps (n generations each) done pulses and
// result_bank names the bank holding the result.
//
// Cycle count: a plane takes 1 + 2*A clocks with A = w*(x+2n) + 2n - NMW - 1
// word times, a sweep M*(1 + 2*A) + 1 clocks.
// Planes overlapping by the lost edge rows, re-reading 2n columns, two clocks
// per word and swapping the banks every sweep follow the published design.
// The address map, the rounding of the margin to whole words, the row wrap
// and the exact cycle sequence are this design's own.
module ca_ctrl #(
  parameter int unsigned X   = 1024,  // lattice columns
  parameter int unsigned Y   = 1024,  // lattice rows
  parameter int unsigned K   = 16,    // cells per memory word
  parameter int unsigned N   = 16,    // compute blocks in the engine
  parameter int unsigned W   = 9,     // words per plane column
  parameter int unsigned AW  = 18,    // memory address width
  parameter int unsigned GW  = 16,    // width of the sweep count
  localparam int unsigned RW = (W > 1) ? $clog2(W) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // command
  input  logic           start,        // sampled while idle
  input  logic [GW-1:0]  sweeps,       // sweeps to run (n generations each)
  output logic           busy,
  output logic           done,         // one-cycle pulse at the end
  output logic           src_bank,     // 0: A is source, 1: B is source
  // engine
  output logic           eng_adv,
  output logic           eng_clear,
  output logic           eng_in_valid,
  output logic [RW-1:0]  eng_in_row,
  input  logic           eng_out_valid,
  input  logic [RW-1:0]  eng_out_row,
  // memory
  output logic           mem_rd,       // read source bank at mem_addr
  output logic           mem_wr,       // write destination bank at mem_addr
  output logic [AW-1:0]  mem_addr
);

  localparam int unsigned YW   = Y / K;                 // words per column
  localparam int unsigned NMW  = (N + K - 1) / K;       // margin words
  localparam int unsigned S    = W - 2 * NMW;           // written words
  localparam int unsigned M    = (YW + S - 1) / S;      // planes per sweep
  localparam int unsigned COLS = X + 2 * N;             // stream columns
  localparam int unsigned WPP  = X * S;                 // writes per plane
  localparam int unsigned CW   = $clog2(COLS + 1);
  localparam int unsigned XW   = $clog2(X);
  localparam int unsigned YB   = $clog2(YW);
  localparam int unsigned PW   = $clog2(M + 1);
  localparam int unsigned WCW  = $clog2(WPP + 1);
  localparam int unsigned BASE0 = YW - NMW;

  if (Y % K != 0 || W < 2 * NMW + 1 || W > YW || X * YW > (1 << AW)) begin : g_bad
    $error("ca_ctrl: unsupported lattice/engine parameters");
  end

  typedef enum logic [2:0] {S_IDLE, S_PLANE, S_RD, S_WR, S_SWEEP} state_e;
  state_e state;

  logic [GW-1:0]  sweeps_r, sweep_cnt;
  logic [PW-1:0]  plane;
  logic [YB-1:0]  base;
  logic [CW-1:0]  rd_ci;
  logic [XW-1:0]  rd_col, wr_col;
  logic [RW-1:0]  rd_r;
  logic [YB-1:0]  rd_word;
  logic [WCW-1:0] wr_cnt;

  logic           rd_active, wr_hit, plane_end;
  logic [YB:0]    wr_sum;
  logic [YB-1:0]  wr_word;

  always_comb begin
    rd_active = (rd_ci < CW'(COLS));
    wr_sum    = {1'b0, base} + (YB+1)'(eng_out_row);
    wr_word   = (wr_sum >= (YB+1)'(YW)) ? YB'(wr_sum - (YB+1)'(YW)) : YB'(wr_sum);
    wr_hit    = (state == S_WR) && eng_out_valid
             && (eng_out_row >= RW'(NMW)) && (eng_out_row <= RW'(W - NMW - 1));
    plane_end = wr_hit && (wr_cnt == WCW'(WPP - 1));

    busy         = (state != S_IDLE);
    eng_clear    = (state == S_PLANE);
    eng_adv      = (state == S_RD);
    eng_in_valid = rd_active;
    eng_in_row   = rd_r;
    mem_rd       = (state == S_RD) && rd_active;
    mem_wr       = wr_hit;
    if (state == S_WR) mem_addr = AW'(wr_col) * AW'(YW) + AW'(wr_word);
    else               mem_addr = AW'(rd_col) * AW'(YW) + AW'(rd_word);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      src_bank  <= 1'b0;
      sweeps_r  <= '0;
      sweep_cnt <= '0;
      plane     <= '0;
      base      <= '0;
      rd_ci     <= '0;
      rd_col    <= '0;
      rd_r      <= '0;
      rd_word   <= '0;
      wr_col    <= '0;
      wr_cnt    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            src_bank  <= 1'b0;
            sweeps_r  <= sweeps;
            sweep_cnt <= '0;
            plane     <= '0;
            base      <= YB'(BASE0);
            if (sweeps == '0) done  <= 1'b1;
            else              state <= S_PLANE;
          end
        end
        S_PLANE: begin
          rd_ci   <= '0;
          rd_col  <= '0;
          rd_r    <= '0;
          rd_word <= base;
          wr_col  <= XW'(N % X);
          wr_cnt  <= '0;
          state   <= S_RD;
        end
        S_RD: begin
          if (rd_active) begin
            if (rd_r == RW'(W - 1)) begin
              rd_r    <= '0;
              rd_ci   <= rd_ci + 1'b1;
              rd_col  <= (rd_col == XW'(X - 1)) ? '0 : rd_col + 1'b1;
              rd_word <= base;
            end else begin
              rd_r    <= rd_r + 1'b1;
              rd_word <= (rd_word == YB'(YW - 1)) ? '0 : rd_word + 1'b1;
            end
          end
          state <= S_WR;
        end
        S_WR: begin
          if (wr_hit) wr_cnt <= wr_cnt + 1'b1;
          if (eng_out_valid && eng_out_row == RW'(W - 1))
            wr_col <= (wr_col == XW'(X - 1)) ? '0 : wr_col + 1'b1;
          if (plane_end) begin
            if (plane == PW'(M - 1)) begin
              state <= S_SWEEP;
            end else begin
              plane <= plane + 1'b1;
              base  <= (32'(base) + S >= YW) ? YB'(32'(base) + S - YW) : YB'(32'(base) + S);
              state <= S_PLANE;
            end
          end else begin
            state <= S_RD;
          end
        end
        S_SWEEP: begin
          src_bank <= ~src_bank;
          plane    <= '0;
          base     <= YB'(BASE0);
          if (sweep_cnt == sweeps_r - 1'b1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            sweep_cnt <= sweep_cnt + 1'b1;
            state     <= S_PLANE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The shared address bus carries one access per cycle.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(mem_rd && mem_wr));

endmodule
