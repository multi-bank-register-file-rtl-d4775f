// hma_bank: one bank of the multi-bank register file (first hierarchy level).
//
// A bank stores 32 registers of 32 bits in 2-port cells (one read and one
// write port) and is reached by all 8 read and all 4 write ports of the
// register file through a 1-to-8 read-port converter and a 1-to-4
// write-port converter. The Bank Select vectors from the two access
// conflict managers (rd_sel, wr_sel, one-hot or zero) say which port, if
// any, the bank serves on each side in this cycle.
//
// Timing: row addresses and selects are applied in a cycle; the write is
// done and the read word captured at the rising edge that ends it. The read
// word then appears on rd_data of the selected port, with its rd_valid bit,
// for the following cycle. A read and a write of the same row in the same
// cycle return the old word. The structure (converters, decoders, 2-port
// cells) follows the source design; the read-during-write order is this
// design's own choice.
module hma_bank #(
  parameter int unsigned REGS_PER_BANK = rf_pkg::REGS_PER_BANK,
  parameter int unsigned DATA_W        = rf_pkg::DATA_W,
  parameter int unsigned RD_PORTS      = rf_pkg::RD_PORTS,
  parameter int unsigned WR_PORTS      = rf_pkg::WR_PORTS,
  localparam int unsigned ROW_W = (REGS_PER_BANK > 1) ? $clog2(REGS_PER_BANK) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [RD_PORTS-1:0]             rd_sel,
  input  logic [RD_PORTS-1:0][ROW_W-1:0]  rd_row,
  output logic [RD_PORTS-1:0]             rd_valid,
  output logic [RD_PORTS-1:0][DATA_W-1:0] rd_data,
  input  logic [WR_PORTS-1:0]             wr_sel,
  input  logic [WR_PORTS-1:0][ROW_W-1:0]  wr_row,
  input  logic [WR_PORTS-1:0][DATA_W-1:0] wr_data
);
  logic              arr_re, arr_we;
  logic [ROW_W-1:0]  arr_raddr, arr_waddr;
  logic [DATA_W-1:0] arr_rdata, arr_wdata;

  read_port_converter #(.NUM_PORTS(RD_PORTS), .ADDR_W(ROW_W), .DATA_W(DATA_W)) u_rpc (
    .clk, .rst_n,
    .sel(rd_sel), .port_addr(rd_row), .bank_re(arr_re), .bank_addr(arr_raddr),
    .bank_data(arr_rdata), .port_valid(rd_valid), .port_data(rd_data)
  );

  write_port_converter #(.NUM_PORTS(WR_PORTS), .ADDR_W(ROW_W), .DATA_W(DATA_W)) u_wpc (
    .sel(wr_sel), .port_addr(wr_row), .port_data(wr_data),
    .bank_we(arr_we), .bank_addr(arr_waddr), .bank_data(arr_wdata)
  );

  sram_2port #(.DEPTH(REGS_PER_BANK), .DATA_W(DATA_W)) u_cells (
    .clk, .rst_n,
    .re(arr_re), .raddr(arr_raddr), .rdata(arr_rdata),
    .we(arr_we), .waddr(arr_waddr), .wdata(arr_wdata)
  );
endmodule
