// engine_harness: streams one random computational plane through a compute
// block (USE_CB) or a compute engine and checks every word that comes out.
//
// The plane is C columns by W*K rows.  It is fed column by column, W words
// per column, with random gaps between adv strobes.  The expected result is
// computed here cell by cell: N generations of the rule on the plane, with
// the boundary state above the top row and below the bottom row, each
// generation losing its first and last column.  Checked per output word: its
// data, its row tag, and the number of advances since the same word entered
// (N*(W+2)-1).  At the end the number of output words must be (C-2N)*W.
module engine_harness
  import ca_pkg::*;
#(
  parameter rule_e RULE   = RULE_LIFE,
  parameter int    K      = 4,
  parameter int    N      = 3,
  parameter int    W      = 5,
  parameter int    C      = 12,
  parameter bit    USE_CB = 1'b0,
  parameter logic [3:0] BC = 4'h0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int SW = state_bits(RULE);
  localparam int H  = W * K;
  localparam int RW = (W > 1) ? $clog2(W) : 1;

  logic adv, clear, in_valid, out_valid;
  logic [RW-1:0] in_row, out_row;
  logic [K*SW-1:0] in_data, out_data;
  logic [SW-1:0] bc_state;

  if (USE_CB) begin : g_cb
    ca_cb #(.RULE(RULE), .K(K), .W(W)) dut (.*);
  end else begin : g_eng
    ca_engine #(.RULE(RULE), .K(K), .N(N), .W(W)) dut (.*);
  end

  logic [SW-1:0] gen [N+1][C][H];

  function automatic logic [3:0] cell_at(int g, int c, int y);
    if (y < 0 || y >= H) return 4'(bc_state);
    return 4'(gen[g][c][y]);
  endfunction

  task automatic compute_ref();
    for (int g = 1; g <= N; g++)
      for (int c = g; c < C - g; c++)
        for (int y = 0; y < H; y++) begin
          if (RULE == RULE_LIFE) begin
            int n = 0;
            for (int dc = -1; dc <= 1; dc++)
              for (int dy = -1; dy <= 1; dy++)
                if (dc != 0 || dy != 0) n += int'(cell_at(g-1, c+dc, y+dy) != 0);
            gen[g][c][y] = SW'((cell_at(g-1, c, y) != 0) ? (n == 2 || n == 3) : (n == 3));
          end else begin
            logic [3:0] a, rt, lt, ab, bl;
            rt = cell_at(g-1, c+1, y);
            lt = cell_at(g-1, c-1, y);
            ab = cell_at(g-1, c, y-1);
            bl = cell_at(g-1, c, y+1);
            a = {bl[3], lt[2], ab[1], rt[0]};  // arrivals, streaming step
            if (a == 4'b0101) a = 4'b1010;
            else if (a == 4'b1010) a = 4'b0101;
            gen[g][c][y] = SW'(a);
          end
        end
  endtask

  initial begin
    int n_adv, n_out, oc;
    int in_time [C*W];
    checks = 0; failures = 0; finished = 0;
    adv = 0; clear = 0; in_valid = 0; in_row = '0; in_data = '0;
    bc_state = SW'(BC);
    for (int c = 0; c < C; c++)
      for (int y = 0; y < H; y++) gen[0][c][y] = SW'($urandom);
    compute_ref();
    @(posedge rst_n);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    n_adv = 0; n_out = 0; oc = 0;
    while (n_adv < C * W + N * (W + 2) + 4) begin
      @(negedge clk);
      adv = ($urandom % 3) != 0;
      if (n_adv < C * W) begin
        automatic int c = n_adv / W, r = n_adv % W;
        in_valid = 1;
        in_row   = RW'(r);
        for (int j = 0; j < K; j++) in_data[j*SW +: SW] = gen[0][c][r*K + j];
      end else begin
        in_valid = 0;
        in_row   = '0;
        in_data  = K*SW'($urandom);
      end
      @(posedge clk);
      if (adv) begin
        if (n_adv < C * W) in_time[n_adv] = n_adv;
        n_adv++;
        #1;
        if (out_valid) begin
          automatic int r = int'(out_row);
          automatic int c = oc + N;
          automatic int idx = c * W + r;
          checks++;
          if (c >= C - N) failures++;
          else begin
            for (int j = 0; j < K; j++)
              if (out_data[j*SW +: SW] !== gen[N][c][r*K + j]) begin
                failures++;
                if (failures < 8)
                  $display("mismatch col %0d row %0d: got %h exp %h",
                           c, r*K + j, out_data[j*SW +: SW], gen[N][c][r*K + j]);
              end
            // latency in advances
            checks++;
            if ((n_adv - 1) - in_time[idx] != N * (W + 2) - 1) failures++;
          end
          n_out++;
          if (r == W - 1) oc++;
        end
      end
    end
    checks++;
    if (n_out != (C - 2 * N) * W) begin
      failures++;
      $display("output words %0d, expected %0d", n_out, (C - 2 * N) * W);
    end
    finished = 1;
  end
endmodule
