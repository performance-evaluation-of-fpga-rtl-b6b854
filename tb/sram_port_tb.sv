// sram_port_tb: bus ownership and pin encoding of the SRAM port.
// Random engine and host requests are applied; the expected pin values and
// returned data are worked out here from the port's rules, with two
// behavioural SRAM banks on the pins.
module sram_port_tb;
  localparam int AW = 10, DW = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ce_busy, ce_src_bank, ce_rd, ce_wr, host_ready, host_req, host_we, host_bank, host_rvalid;
  logic [AW-1:0] ce_addr, host_addr, sram_addr;
  logic [DW-1:0] ce_wdata, ce_rdata, host_wdata, host_rdata;
  logic sram_oe_n, sram_we_n;
  logic [1:0] sram_ce_n, sram_dq_oe;
  logic [1:0][DW-1:0] sram_dout, sram_din;

  sram_port #(.AW(AW), .DW(DW)) dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_mem
    sram_model #(.AW(AW), .DW(DW)) u_mem (
      .clk, .addr(sram_addr), .ce_n(sram_ce_n[b]), .oe_n(sram_oe_n), .we_n(sram_we_n),
      .dq_oe(sram_dq_oe[b]), .wdata(sram_dout[b]), .rdata(sram_din[b]));
  end

  logic [DW-1:0] ref_mem [2][2**AW];
  logic exp_rvalid;
  logic [DW-1:0] exp_rdata;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ce_rd = 0, n_ce_wr = 0, n_h_rd = 0, n_h_wr = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 2**AW; i++) begin
        ref_mem[b][i] = DW'($urandom);
        if (b == 0) g_mem[0].u_mem.poke(i, ref_mem[b][i]);
        else        g_mem[1].u_mem.poke(i, ref_mem[b][i]);
      end
    {ce_busy, ce_src_bank, ce_rd, ce_wr, host_req, host_we, host_bank} = '0;
    ce_addr = '0; host_addr = '0; ce_wdata = '0; host_wdata = '0;
    exp_rvalid = 0; exp_rdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic bank, rd, wr;
      logic [AW-1:0] addr;
      logic [DW-1:0] wd;
      @(negedge clk);
      ce_busy = ($urandom % 2) == 1;
      ce_src_bank = 1'($urandom);
      ce_rd = 1'($urandom); ce_wr = !ce_rd && ($urandom % 2 == 1);
      ce_addr = AW'($urandom); ce_wdata = DW'($urandom);
      host_req = 1'($urandom); host_we = 1'($urandom); host_bank = 1'($urandom);
      host_addr = AW'($urandom); host_wdata = DW'($urandom);
      #1;
      // expected ownership
      if (ce_busy) begin
        rd = ce_rd; wr = ce_wr; addr = ce_addr; wd = ce_wdata;
        bank = ce_wr ? !ce_src_bank : ce_src_bank;
      end else begin
        rd = host_req && !host_we; wr = host_req && host_we; addr = host_addr; wd = host_wdata;
        bank = host_bank;
      end
      checks++;
      if (host_ready != !ce_busy) begin failures++; $display("t=%0d ready wrong", t); end
      checks++;
      if ((rd || wr) && (sram_addr != addr || sram_oe_n != !rd || sram_we_n != !wr
          || sram_ce_n[bank] != 1'b0 || sram_ce_n[!bank] != 1'b1
          || sram_dq_oe != (wr ? (2'b01 << bank) : 2'b00))) begin
        failures++;
        if (failures < 8) $display("t=%0d pins wrong", t);
      end
      if (!(rd || wr)) begin
        checks++;
        if (sram_ce_n != 2'b11 || !sram_oe_n || !sram_we_n) begin failures++; $display("t=%0d idle pins wrong", t); end
      end
      if (ce_busy && ce_rd) begin
        checks++; n_ce_rd++;
        if (ce_rdata !== ref_mem[ce_src_bank][ce_addr]) begin failures++; $display("t=%0d engine read wrong", t); end
      end
      if (ce_busy && ce_wr) n_ce_wr++;
      if (!ce_busy && rd) n_h_rd++;
      if (!ce_busy && wr) n_h_wr++;
      // host read data of the previous cycle
      checks++;
      if (host_rvalid != exp_rvalid || (exp_rvalid && host_rdata !== exp_rdata)) begin
        failures++;
        if (failures < 8) $display("t=%0d host read wrong", t);
      end
      exp_rvalid = !ce_busy && rd;
      if (exp_rvalid) exp_rdata = ref_mem[bank][addr];
      @(posedge clk);
      if (wr) ref_mem[bank][addr] = wd;
    end
    // final content of both banks, after the last write has landed
    #1;
    for (int i = 0; i < 2**AW; i++) begin
      checks++;
      if (g_mem[0].u_mem.peek(i) !== ref_mem[0][i] || g_mem[1].u_mem.peek(i) !== ref_mem[1][i]) begin
        failures++;
        $display("bank word %0d wrong", i);
      end
    end
    checks++;
    if (n_ce_rd == 0 || n_ce_wr == 0 || n_h_rd == 0 || n_h_wr == 0) begin
      failures++;
      $display("access counts %0d %0d %0d %0d", n_ce_rd, n_ce_wr, n_h_rd, n_h_wr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
