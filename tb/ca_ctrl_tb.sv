// ca_ctrl_tb: control block driving a real engine (Life, k=16) on a small
// lattice, with simple bank arrays in place of the SRAM.
// Checked: the read address sequence of the first plane (all columns, then
// the first 2n again, rows from the plane base with wrap), read and write
// counts per sweep, that every destination word is written in every sweep
// and no source word is, the cycle count, done and result_bank, and the
// final lattice against SWEEPS*N Life generations on the X x Y torus
// computed here (this catches words written to the wrong column or row).
module ca_ctrl_tb;
  localparam int X = 20, Y = 96, K = 16, N = 2, W = 4, AW = 18, SWEEPS = 2;
  localparam int YW = Y / K, NMW = (N + K - 1) / K, S = W - 2 * NMW;
  localparam int M = (YW + S - 1) / S;
  localparam int A = W * (X + 2 * N) + 2 * N - NMW - 1;
  localparam int RW = $clog2(W);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, src_bank;
  logic [15:0] sweeps;
  logic eng_adv, eng_clear, eng_in_valid, eng_out_valid, mem_rd, mem_wr;
  logic [RW-1:0] eng_in_row, eng_out_row;
  logic [AW-1:0] mem_addr;
  logic [15:0] rdata, wdata;

  ca_ctrl #(.X(X), .Y(Y), .K(K), .N(N), .W(W), .AW(AW)) dut (.*);
  ca_engine #(.K(K), .N(N), .W(W)) u_eng (
    .clk, .rst_n, .adv(eng_adv), .clear(eng_clear), .bc_state(1'b0),
    .in_valid(eng_in_valid), .in_row(eng_in_row), .in_data(rdata),
    .out_valid(eng_out_valid), .out_row(eng_out_row), .out_data(wdata));

  logic [15:0] bank [2][X*YW];
  int wr_hits [X*YW];
  int n_rd = 0, n_wr = 0, sweep_no = 0, plane_no = 0, rd_idx = 0;
  longint busy_cycles = 0;

  assign rdata = bank[src_bank][mem_addr];

  bit lat [2][Y][X];

  task automatic life_step(int src);
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) begin
        automatic int n = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (dx != 0 || dy != 0) n += int'(lat[src][(y + dy + Y) % Y][(x + dx + X) % X]);
        lat[1-src][y][x] = lat[src][y][x] ? (n == 2 || n == 3) : (n == 3);
      end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (eng_clear) begin
      if (plane_no > 0 && plane_no % M == 0) begin
        // a sweep has ended
        for (int i = 0; i < X * YW; i++) begin
          checks++;
          if (wr_hits[i] == 0) failures++;
          wr_hits[i] = 0;
        end
      end
      plane_no++;
    end
    checks++;
    if (mem_rd && mem_wr) failures++;
    if (mem_rd) begin
      n_rd++;
      if (plane_no == 1) begin
        automatic int col = (rd_idx / W) % X;
        automatic int rw  = ((YW - NMW) + rd_idx % W) % YW;
        checks++;
        if (mem_addr != AW'(col * YW + rw)) begin
          failures++;
          $display("read %0d: addr %0d, expected %0d", rd_idx, mem_addr, col * YW + rw);
        end
        rd_idx++;
      end
    end
    if (mem_wr) begin
      n_wr++;
      bank[~src_bank][mem_addr] <= wdata;
      if (mem_addr < X * YW) wr_hits[mem_addr]++;
      else failures++;
    end
  end

  initial begin
    start = 0; sweeps = 16'(SWEEPS);
    for (int i = 0; i < X * YW; i++) begin
      bank[0][i] = 16'($urandom); bank[1][i] = '0; wr_hits[i] = 0;
      for (int j = 0; j < K; j++) lat[0][(i % YW) * K + j][i / YW] = bank[0][i][j];
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < X * YW; i++) begin
      checks++;
      if (wr_hits[i] == 0) failures++;
    end
    checks++;
    if (rd_idx != (X + 2 * N) * W) begin failures++; $display("plane reads %0d", rd_idx); end
    checks++;
    if (n_rd != SWEEPS * M * (X + 2 * N) * W) begin failures++; $display("reads %0d", n_rd); end
    checks++;
    if (n_wr != SWEEPS * M * X * S) begin failures++; $display("writes %0d", n_wr); end
    checks++;
    if (busy_cycles != SWEEPS * (M * (1 + 2 * A) + 1)) begin
      failures++; $display("cycles %0d", busy_cycles);
    end
    checks++;
    if (src_bank != 1'(SWEEPS % 2) || busy) failures++;
    for (int g = 0; g < SWEEPS * N; g++) life_step(g % 2);
    for (int i = 0; i < X * YW; i++) begin
      logic [15:0] e;
      for (int j = 0; j < K; j++) e[j] = lat[(SWEEPS * N) % 2][(i % YW) * K + j][i / YW];
      checks++;
      if (bank[src_bank][i] !== e) begin
        failures++;
        if (failures < 8) $display("word %0d: got %h exp %h", i, bank[src_bank][i], e);
      end
    end
    // zero sweeps: done at once, nothing touched
    @(negedge clk); sweeps = 0; start = 1; @(negedge clk); start = 0;
    checks++;
    if (!done || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
