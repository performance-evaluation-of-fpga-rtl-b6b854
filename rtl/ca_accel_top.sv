// ca_accel_top: FPGA side of a pipelined two-dimensional cellular-automaton
// accelerator with two alternating memory banks.
//
// The lattice (default 1024 x 1024 cells, periodic in both directions) lives
// in external SRAM bank A.  On start, the control block streams it through a
// compute engine of n pipelined compute blocks, each computing one generation,
// and writes the result, n generations later, to bank B; the next sweep reads
// B and writes A, and so on, `sweeps` times.  A sweep covers the lattice in
// overlapping horizontal planes w words tall (see ca_ctrl).  Every word time
// is two clocks, one read and one write, since the banks share address pins.
//
// The rule is chosen by RULE: Game of Life (1 bit/cell, k = 16 cells/word) or
// HPP lattice gas (4 bits/cell, k = 4 sites/word).  Defaults are the Life
// configuration built on a Spartan-3 starter board: n = 16, w = 9.
//
// Host ports: a simple one-access-per-cycle memory port for loading and
// reading back the lattice while the engine is idle, plus start / sweeps /
// busy / done / result_bank.  In the original system a PicoBlaze soft core
// drives these ports and talks to the PC over a serial line.  SRAM pins as in
// sram_port.  bc_state is the cell state assumed beyond a plane's top and
// bottom edge; it never reaches a written cell (see ca_boundary).
// The structure (two banks, engine, control block, processor port) follows
// the published design; port lists and widths are this design's.
module ca_accel_top
  import ca_pkg::*;
#(
  parameter rule_e       RULE = RULE_LIFE,
  parameter int unsigned SW   = state_bits(RULE),  // bits per cell
  parameter int unsigned K    = 16 / SW,           // cells per 16-bit word
  parameter int unsigned X    = 1024,              // lattice columns
  parameter int unsigned Y    = 1024,              // lattice rows
  parameter int unsigned N    = 16,                // compute blocks
  parameter int unsigned W    = 9,                 // words per plane column
  parameter int unsigned AW   = 18,                // SRAM address width
  parameter int unsigned GW   = 16,                // sweep count width
  localparam int unsigned DW  = K * SW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command / status
  input  logic                 start,
  input  logic [GW-1:0]        sweeps,
  input  logic [SW-1:0]        bc_state,
  output logic                 busy,
  output logic                 done,
  output logic                 result_bank,
  // host memory port
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

  localparam int unsigned RW = (W > 1) ? $clog2(W) : 1;

  logic          eng_adv, eng_clear, eng_in_valid, eng_out_valid;
  logic [RW-1:0] eng_in_row, eng_out_row;
  logic [DW-1:0] eng_in_data, eng_out_data;
  logic          mem_rd, mem_wr, src_bank;
  logic [AW-1:0] mem_addr;

  ca_ctrl #(.X(X), .Y(Y), .K(K), .N(N), .W(W), .AW(AW), .GW(GW)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .sweeps        (sweeps),
    .busy          (busy),
    .done          (done),
    .src_bank      (src_bank),
    .eng_adv       (eng_adv),
    .eng_clear     (eng_clear),
    .eng_in_valid  (eng_in_valid),
    .eng_in_row    (eng_in_row),
    .eng_out_valid (eng_out_valid),
    .eng_out_row   (eng_out_row),
    .mem_rd        (mem_rd),
    .mem_wr        (mem_wr),
    .mem_addr      (mem_addr)
  );

  ca_engine #(.RULE(RULE), .SW(SW), .K(K), .N(N), .W(W)) u_engine (
    .clk       (clk),
    .rst_n     (rst_n),
    .adv       (eng_adv),
    .clear     (eng_clear),
    .bc_state  (bc_state),
    .in_valid  (eng_in_valid),
    .in_row    (eng_in_row),
    .in_data   (eng_in_data),
    .out_valid (eng_out_valid),
    .out_row   (eng_out_row),
    .out_data  (eng_out_data)
  );

  sram_port #(.AW(AW), .DW(DW)) u_sram (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce_busy     (busy),
    .ce_src_bank (src_bank),
    .ce_rd       (mem_rd),
    .ce_wr       (mem_wr),
    .ce_addr     (mem_addr),
    .ce_wdata    (eng_out_data),
    .ce_rdata    (eng_in_data),
    .host_ready  (host_ready),
    .host_req    (host_req),
    .host_we     (host_we),
    .host_bank   (host_bank),
    .host_addr   (host_addr),
    .host_wdata  (host_wdata),
    .host_rdata  (host_rdata),
    .host_rvalid (host_rvalid),
    .sram_addr   (sram_addr),
    .sram_oe_n   (sram_oe_n),
    .sram_we_n   (sram_we_n),
    .sram_ce_n   (sram_ce_n),
    .sram_dout   (sram_dout),
    .sram_dq_oe  (sram_dq_oe),
    .sram_din    (sram_din)
  );

  assign result_bank = src_bank;

endmodule
