// sram_port: connects the two external SRAM banks to the engine or the host.
//
// Banks A (index 0) and B (index 1) are asynchronous 16-bit SRAMs that share
// their address, output-enable and write-enable pins and have a chip enable
// and a data bus each.  So a cycle can carry one access only: a read of one
// bank or a write of one bank.
//
// While the engine runs (ce_busy), its controller owns the bus: ce_rd reads
// the source bank (ce_src_bank) and returns the word combinationally on
// ce_rdata, to be registered by the engine at the clock edge; ce_wr writes
// ce_wdata into the other bank.  While the engine is idle the host interface
// (the soft-core processor that loads and unloads the lattice) owns the bus:
// host_req with host_we writes host_wdata, without it reads, into/from bank
// host_bank at host_addr, one access per cycle; read data appears on
// host_rdata one cycle later with host_rvalid.  host_ready is low while the
// engine runs, and requests are then ignored.
//
// The data pins are split into a driven value (sram_dout), its enable
// (sram_dq_oe) and the value read back (sram_din); the bidirectional pad
// itself is outside this module.  Write enable is held low for the whole
// write cycle.  Active-low SRAM controls as on the board's chips.
// Shared address pins and one access per cycle follow the original board;
// the host arbitration and the split data pins are this design's choices.
module sram_port #(
  parameter int unsigned AW = 18,  // SRAM address width
  parameter int unsigned DW = 16   // SRAM data width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // engine side
  input  logic                 ce_busy,
  input  logic                 ce_src_bank,
  input  logic                 ce_rd,
  input  logic                 ce_wr,
  input  logic [AW-1:0]        ce_addr,
  input  logic [DW-1:0]        ce_wdata,
  output logic [DW-1:0]        ce_rdata,
  // host side
  output logic                 host_ready,
  input  logic                 host_req,
  input  logic                 host_we,
  input  logic                 host_bank,
  input  logic [AW-1:0]        host_addr,
  input  logic [DW-1:0]        host_wdata,
  output logic [DW-1:0]        host_rdata,
  output logic                 host_rvalid,
  // SRAM pins
  output logic [AW-1:0]        sram_addr,
  output logic                 sram_oe_n,
  output logic                 sram_we_n,
  output logic [1:0]           sram_ce_n,
  output logic [1:0][DW-1:0]   sram_dout,
  output logic [1:0]           sram_dq_oe,
  input  logic [1:0][DW-1:0]   sram_din
);

  logic rd, wr, bank;
  logic host_rd;

  always_comb begin
    host_ready = !ce_busy;
    host_rd    = host_ready && host_req && !host_we;
    if (ce_busy) begin
      rd        = ce_rd;
      wr        = ce_wr;
      bank      = ce_wr ? ~ce_src_bank : ce_src_bank;
      sram_addr = ce_addr;
      sram_dout = {2{ce_wdata}};
    end else begin
      rd        = host_rd;
      wr        = host_req && host_we;
      bank      = host_bank;
      sram_addr = host_addr;
      sram_dout = {2{host_wdata}};
    end
    sram_oe_n  = !rd;
    sram_we_n  = !wr;
    sram_ce_n  = 2'b11;
    sram_dq_oe = 2'b00;
    if (rd || wr) sram_ce_n[bank] = 1'b0;
    if (wr)       sram_dq_oe[bank] = 1'b1;
    ce_rdata   = sram_din[ce_src_bank];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rdata  <= '0;
      host_rvalid <= 1'b0;
    end else begin
      host_rvalid <= host_rd;
      if (host_rd) host_rdata <= sram_din[host_bank];
    end
  end

  // One access per cycle on the shared pins.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(ce_busy && ce_rd && ce_wr));

endmodule
