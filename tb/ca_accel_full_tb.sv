// ca_accel_full_tb: one complete run of the accelerator at its default size:
// the Game of Life on a 1024 x 1024 torus with 16 compute blocks, 9-word
// planes and k = 16 cells per word, for 32 sweeps = 512 generations.  The
// lattice is loaded and read back through the host port; the result is
// compared word by word with a reference computed here.  Also checks the
// cycle count and that every mechanism happened (see top_harness).
module ca_accel_full_tb;
  import ca_pkg::*;
  localparam rule_e RULE = RULE_LIFE;
  localparam int K = 16, X = 1024, Y = 1024, N = 16, W = 9;
  localparam int SWEEPS = 32;
  int checks, failures;
  bit finished;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int SW   = state_bits(RULE);
  localparam int DW   = K * SW;
  localparam int AW   = 18;
  localparam int YW   = Y / K;
  localparam int NMW  = (N + K - 1) / K;
  localparam int S    = W - 2 * NMW;
  localparam int M    = (YW + S - 1) / S;
  localparam int A    = W * (X + 2 * N) + 2 * N - NMW - 1;
  localparam longint CYC = longint'(SWEEPS) * (longint'(M) * (1 + 2 * longint'(A)) + 1);

  logic rst_n, start, busy, done, result_bank;
  logic [15:0] sweeps;
  logic [SW-1:0] bc_state;
  logic host_ready, host_req, host_we, host_bank, host_rvalid;
  logic [AW-1:0] host_addr;
  logic [DW-1:0] host_wdata, host_rdata;
  logic [AW-1:0] sram_addr;
  logic sram_oe_n, sram_we_n;
  logic [1:0] sram_ce_n, sram_dq_oe;
  logic [1:0][DW-1:0] sram_dout, sram_din;

  ca_accel_top dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_mem
    sram_model #(.AW(AW), .DW(DW)) u_mem (
      .clk, .addr(sram_addr), .ce_n(sram_ce_n[b]), .oe_n(sram_oe_n),
      .we_n(sram_we_n), .dq_oe(sram_dq_oe[b]), .wdata(sram_dout[b]),
      .rdata(sram_din[b]));
  end

  // Reference lattice, ping-pong.
  logic [3:0] lat [2][Y][X];
  int collisions = 0;

  task automatic step(int src);
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) begin
        automatic int yu = (y + Y - 1) % Y, yd = (y + 1) % Y;
        automatic int xl = (x + X - 1) % X, xr = (x + 1) % X;
        if (RULE == RULE_LIFE) begin
          automatic int n = int'(lat[src][yu][xl][0]) + int'(lat[src][yu][x][0])
                          + int'(lat[src][yu][xr][0]) + int'(lat[src][y][xl][0])
                          + int'(lat[src][y][xr][0]) + int'(lat[src][yd][xl][0])
                          + int'(lat[src][yd][x][0]) + int'(lat[src][yd][xr][0]);
          lat[1-src][y][x] = {3'b0, lat[src][y][x][0] ? (n == 2 || n == 3) : (n == 3)};
        end else begin
          automatic logic [3:0] a = {lat[src][yd][x][3], lat[src][y][xl][2],
                                     lat[src][yu][x][1], lat[src][y][xr][0]};
          if (a == 4'b0101)      begin a = 4'b1010; collisions++; end
          else if (a == 4'b1010) begin a = 4'b0101; collisions++; end
          lat[1-src][y][x] = a;
        end
      end
  endtask

  function automatic logic [DW-1:0] pack(int src, int col, int rw);
    logic [DW-1:0] v;
    for (int j = 0; j < K; j++) v[j*SW +: SW] = SW'(lat[src][rw*K + j][col]);
    return v;
  endfunction

  // Mechanism counters.
  int n_plane = 0, n_swap = 0, n_reread = 0, n_ywrap = 0, n_edge = 0, n_margin = 0;
  int n_hwr = 0, n_hrd = 0;
  longint busy_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (dut.u_ctrl.eng_clear) n_plane++;
    if (int'(dut.u_ctrl.state) == 4) n_swap++;
    if (dut.u_ctrl.mem_rd && dut.u_ctrl.rd_ci >= X) n_reread++;
    if (dut.u_ctrl.mem_rd && dut.u_ctrl.rd_r != 0 && dut.u_ctrl.rd_word == 0) n_ywrap++;
    if (dut.u_engine.g_cb[0].u_cb.out_valid && (dut.u_engine.g_cb[0].u_cb.top
        || dut.u_engine.g_cb[0].u_cb.bot) && dut.u_ctrl.eng_adv) n_edge++;
    if (int'(dut.u_ctrl.state) == 3 && dut.u_ctrl.eng_out_valid && !dut.u_ctrl.mem_wr) n_margin++;
    if (host_req && host_we && host_ready) n_hwr++;
    if (host_rvalid) n_hrd++;
  end

  task automatic check_mech(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", name);
    end
  endtask

  initial begin
    int cur;
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; start = 0; sweeps = 16'(SWEEPS); bc_state = '0;
    host_req = 0; host_we = 0; host_bank = 0; host_addr = '0; host_wdata = '0;
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) lat[0][y][x] = 4'($urandom) & ((RULE == RULE_LIFE) ? 4'h1 : 4'hf);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // load bank A, and fill bank B with a marker
    for (int b = 0; b < 2; b++)
      for (int c = 0; c < X; c++)
        for (int rw = 0; rw < YW; rw++) begin
          @(negedge clk);
          host_req = 1; host_we = 1; host_bank = 1'(b);
          host_addr = AW'(c * YW + rw);
          host_wdata = (b == 0) ? pack(0, c, rw) : DW'('h5a5a);
        end
    @(negedge clk); host_req = 0; host_we = 0;
    // run
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cur = 0;
    for (int g = 0; g < SWEEPS * N; g++) begin step(cur); cur = 1 - cur; end
    fork
      begin wait (done); end
      begin
        @(negedge clk);
        // a host access while the engine runs must be refused
        checks++;
        if (host_ready) failures++;
      end
    join
    @(negedge clk);
    checks++;
    if (busy_cycles != CYC) begin
      failures++;
      $display("busy cycles %0d, expected %0d", busy_cycles, CYC);
    end
    checks++;
    if (result_bank != 1'(SWEEPS % 2)) failures++;
    // read back
    for (int c = 0; c < X; c++)
      for (int rw = 0; rw < YW; rw++) begin
        @(negedge clk);
        host_req = 1; host_we = 0; host_bank = result_bank; host_addr = AW'(c * YW + rw);
        @(negedge clk);
        host_req = 0;
        checks++;
        if (!host_rvalid || host_rdata !== pack(cur, c, rw)) begin
          failures++;
          if (failures < 8) $display("word col %0d rw %0d: got %h exp %h", c, rw, host_rdata, pack(cur, c, rw));
        end
      end
    check_mech("plane change", n_plane > 1 ? 1 : 0);
    check_mech("bank swap", n_swap);
    check_mech("column re-read", n_reread);
    check_mech("row wrap", n_ywrap);
    check_mech("plane edge boundary", n_edge);
    check_mech("margin word dropped", n_margin);
    check_mech("host write", n_hwr);
    check_mech("host read", n_hrd);
    if (RULE == RULE_HPP) check_mech("collision", collisions);
    $display("planes=%0d swaps=%0d reread=%0d ywrap=%0d edge=%0d margin=%0d hw=%0d hr=%0d coll=%0d cycles=%0d",
             n_plane, n_swap, n_reread, n_ywrap, n_edge, n_margin, n_hwr, n_hrd, collisions, busy_cycles);
    finished = 1;
  end

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
