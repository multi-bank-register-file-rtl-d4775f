// hma_regfile: 12-port multi-bank register file (second hierarchy level).
//
// Instead of 128 registers in 12-port cells, the file is split into 4
// banks of 32 registers in cheap 2-port cells. Every read port carries a
// port enable, a 2-bit bank address and a 5-bit row address (register
// number = bank * 32 + row); every write port the same plus a 32-bit word.
// Two access conflict managers (one for the 8 read ports, one for the 4
// write ports) let at most one port per side into each bank per cycle;
// a port that loses is blocked (rd_blocked / wr_blocked, same cycle) and
// is not served: its requester must retry. Reads and writes use completely
// separate paths down to the cells, so a bank can serve one read and one
// write in the same cycle.
//
// Timing: requests are presented in a cycle; at the rising edge that ends
// it, granted writes are done and granted reads captured. The read word of
// a granted port appears on rd_data with rd_valid high in the next cycle
// (one cycle latency, one access per port per cycle). A read of a register
// written in the same cycle returns the old value. In the source chip the
// clock-low half of the cycle does bank decoding, conflict management and
// port conversion while the bit lines precharge, and the clock-high half
// the array access; this model keeps that to one access per clock. Bank
// count, ports, sizes and structure follow the source; the lowest-port-wins
// priority and the old-value read order are this design's own choices.
module hma_regfile #(
  parameter int unsigned NUM_BANKS     = rf_pkg::NUM_BANKS,
  parameter int unsigned REGS_PER_BANK = rf_pkg::REGS_PER_BANK,
  parameter int unsigned DATA_W        = rf_pkg::DATA_W,
  parameter int unsigned RD_PORTS      = rf_pkg::RD_PORTS,
  parameter int unsigned WR_PORTS      = rf_pkg::WR_PORTS,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned ROW_W  = (REGS_PER_BANK > 1) ? $clog2(REGS_PER_BANK) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // read ports
  input  logic [RD_PORTS-1:0]             rd_en,
  input  logic [RD_PORTS-1:0][BANK_W-1:0] rd_bank,
  input  logic [RD_PORTS-1:0][ROW_W-1:0]  rd_row,
  output logic [RD_PORTS-1:0]             rd_blocked,
  output logic [RD_PORTS-1:0]             rd_valid,
  output logic [RD_PORTS-1:0][DATA_W-1:0] rd_data,
  // write ports
  input  logic [WR_PORTS-1:0]             wr_en,
  input  logic [WR_PORTS-1:0][BANK_W-1:0] wr_bank,
  input  logic [WR_PORTS-1:0][ROW_W-1:0]  wr_row,
  input  logic [WR_PORTS-1:0][DATA_W-1:0] wr_data,
  output logic [WR_PORTS-1:0]             wr_blocked
);
  logic [NUM_BANKS-1:0][RD_PORTS-1:0]             rd_sel;
  logic [NUM_BANKS-1:0][WR_PORTS-1:0]             wr_sel;
  logic [NUM_BANKS-1:0][RD_PORTS-1:0]             bank_rd_valid;
  logic [NUM_BANKS-1:0][RD_PORTS-1:0][DATA_W-1:0] bank_rd_data;
  logic [RD_PORTS-1:0] rd_granted;
  logic [WR_PORTS-1:0] wr_granted;
  logic [NUM_BANKS-1:0] rd_busy, wr_busy;

  access_conflict_manager #(.NUM_PORTS(RD_PORTS), .NUM_BANKS(NUM_BANKS)) u_acm_rd (
    .port_en(rd_en), .port_bank(rd_bank),
    .granted(rd_granted), .blocked(rd_blocked), .bank_sel(rd_sel), .bank_busy(rd_busy)
  );

  access_conflict_manager #(.NUM_PORTS(WR_PORTS), .NUM_BANKS(NUM_BANKS)) u_acm_wr (
    .port_en(wr_en), .port_bank(wr_bank),
    .granted(wr_granted), .blocked(wr_blocked), .bank_sel(wr_sel), .bank_busy(wr_busy)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    hma_bank #(
      .REGS_PER_BANK(REGS_PER_BANK), .DATA_W(DATA_W),
      .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
    ) u_bank (
      .clk, .rst_n,
      .rd_sel(rd_sel[b]), .rd_row(rd_row), .rd_valid(bank_rd_valid[b]), .rd_data(bank_rd_data[b]),
      .wr_sel(wr_sel[b]), .wr_row(wr_row), .wr_data(wr_data)
    );
  end

  read_unit #(.NUM_BANKS(NUM_BANKS), .RD_PORTS(RD_PORTS), .DATA_W(DATA_W)) u_read_unit (
    .bank_valid(bank_rd_valid), .bank_data(bank_rd_data),
    .port_valid(rd_valid), .port_data(rd_data)
  );
endmodule
