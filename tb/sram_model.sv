// sram_model: behavioural model of one external asynchronous SRAM bank
// (16-bit words, 2**AW words; 256K x 16 = 512 KB by default).  Not
// synthesizable logic of the accelerator: it stands for the board's SRAM chip
// in simulation.
//
// Read is asynchronous: with ce_n and oe_n low, rdata shows mem[addr] in the
// same cycle (zero when not selected).  A write takes place at the rising
// clock edge that ends a cycle in which ce_n and we_n are low, with wdata
// driven (dq_oe).  peek/poke give the testbench direct access.
module sram_model #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          dq_oe,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];
  int unsigned   n_writes = 0;
  int unsigned   n_reads  = 0;

  assign rdata = (!ce_n && !oe_n) ? mem[addr] : '0;

  always @(posedge clk) begin
    if (!ce_n && !we_n && dq_oe) begin
      mem[addr] <= wdata;
      n_writes  <= n_writes + 1;
    end
    if (!ce_n && !oe_n) n_reads <= n_reads + 1;
  end

  function automatic logic [DW-1:0] peek(int unsigned a);
    return mem[a];
  endfunction

  function automatic void poke(int unsigned a, logic [DW-1:0] v);
    mem[a] = v;
  endfunction

endmodule
