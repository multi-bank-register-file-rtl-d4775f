// mbrf_top: register access subsystem of a 4-issue out-of-order processor
// built around a multi-bank register file.
//
// A 12-port register file in 12-port cells is large and slow. Here the 128
// x 32-bit file is split into 4 banks of cheap 2-port cells, each reached
// by all 8 read and 4 write ports through port converters (hma_regfile).
// Two ports that want the same bank in the same cycle would conflict; the
// register access scheduler in front of the file avoids that:
//   bank_aware_rename - renames the 4 instructions of a group so that their
//                       destinations lie in different banks;
//   read_queue        - holds operand reads and issues at most one per bank
//                       per cycle, out of order, combining reads of the same
//                       register and forwarding values still in the write
//                       queue;
//   write_queue       - holds results and writes at most one per bank per
//                       cycle, out of order.
// The processor around it (decode, reservation stations, execution units,
// commit) is not part of this design: the rename group, the operand read
// lanes with their responses, the result lanes and the commit-time release
// of physical registers are ports of this module, and so are per-lane event
// signals that show when a read was issued, combined, forwarded, deferred
// by a bank conflict or served out of order.
//
// Timing: renaming is combinational with state updated at the rising edge.
// A read request accepted at an edge is answered on its lane at the
// earliest two edges later (one cycle in the queue, one in the register
// file); a result accepted at an edge is written at the earliest one edge
// later and can be forwarded to reads from the cycle after it is accepted.
// The split into rename, queues and the banked file follows the source
// design; queue depth, tags and handshakes are this design's own choices.
module mbrf_top #(
  parameter int unsigned NUM_BANKS     = rf_pkg::NUM_BANKS,
  parameter int unsigned REGS_PER_BANK = rf_pkg::REGS_PER_BANK,
  parameter int unsigned DATA_W        = rf_pkg::DATA_W,
  parameter int unsigned RD_PORTS      = rf_pkg::RD_PORTS,
  parameter int unsigned WR_PORTS      = rf_pkg::WR_PORTS,
  parameter int unsigned QUEUE_DEPTH   = rf_pkg::QUEUE_DEPTH,
  parameter int unsigned TAG_W         = rf_pkg::TAG_W,
  parameter int unsigned GROUP         = 4,
  parameter int unsigned ARCH_REGS     = rf_pkg::ARCH_REGS,
  localparam int unsigned ARCH_W = (ARCH_REGS > 1) ? $clog2(ARCH_REGS) : 1,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned ROW_W  = (REGS_PER_BANK > 1) ? $clog2(REGS_PER_BANK) : 1,
  localparam int unsigned REG_W  = BANK_W + ROW_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // rename group (from decode)
  input  logic                              ren_valid,
  output logic                              ren_ready,
  input  logic [GROUP-1:0]                  dst_valid,
  input  logic [GROUP-1:0][ARCH_W-1:0]      dst_arch,
  input  logic [GROUP-1:0][1:0][ARCH_W-1:0] src_arch,
  output logic [GROUP-1:0][REG_W-1:0]       dst_phys,
  output logic [GROUP-1:0][REG_W-1:0]       old_phys,
  output logic [GROUP-1:0][1:0][REG_W-1:0]  src_phys,
  input  logic [GROUP-1:0]                  free_valid,
  input  logic [GROUP-1:0][REG_W-1:0]       free_phys,
  // operand read lanes (from the reservation stations)
  input  logic [RD_PORTS-1:0]               rd_req_valid,
  input  logic [RD_PORTS-1:0][REG_W-1:0]    rd_req_reg,
  input  logic [RD_PORTS-1:0][TAG_W-1:0]    rd_req_tag,
  output logic [RD_PORTS-1:0]               rd_req_ready,
  output logic [RD_PORTS-1:0]               rd_resp_valid,
  output logic [RD_PORTS-1:0][TAG_W-1:0]    rd_resp_tag,
  output logic [RD_PORTS-1:0][DATA_W-1:0]   rd_resp_data,
  // result lanes (from the execution units)
  input  logic [WR_PORTS-1:0]               wr_req_valid,
  input  logic [WR_PORTS-1:0][REG_W-1:0]    wr_req_reg,
  input  logic [WR_PORTS-1:0][DATA_W-1:0]   wr_req_data,
  output logic [WR_PORTS-1:0]               wr_req_ready,
  // events
  output logic [RD_PORTS-1:0]               ev_rd_issue,
  output logic [RD_PORTS-1:0]               ev_rd_combine,
  output logic [RD_PORTS-1:0]               ev_rd_forward,
  output logic [RD_PORTS-1:0]               ev_rd_deferred,
  output logic [RD_PORTS-1:0]               ev_rd_ooo,
  output logic [WR_PORTS-1:0]               ev_wr_deferred,
  output logic [WR_PORTS-1:0]               ev_wr_ooo
);
  localparam int unsigned FWD_N = WR_PORTS * QUEUE_DEPTH;

  logic [RD_PORTS-1:0]             rf_rd_en, rf_rd_blocked, rf_rd_valid;
  logic [RD_PORTS-1:0][BANK_W-1:0] rf_rd_bank;
  logic [RD_PORTS-1:0][ROW_W-1:0]  rf_rd_row;
  logic [RD_PORTS-1:0][DATA_W-1:0] rf_rd_data;
  logic [WR_PORTS-1:0]             rf_wr_en, rf_wr_blocked;
  logic [WR_PORTS-1:0][BANK_W-1:0] rf_wr_bank;
  logic [WR_PORTS-1:0][ROW_W-1:0]  rf_wr_row;
  logic [WR_PORTS-1:0][DATA_W-1:0] rf_wr_data;
  logic [FWD_N-1:0]                pend_valid;
  logic [FWD_N-1:0][REG_W-1:0]     pend_reg;
  logic [FWD_N-1:0][DATA_W-1:0]    pend_data;

  bank_aware_rename #(
    .GROUP(GROUP), .ARCH_REGS(ARCH_REGS), .NUM_BANKS(NUM_BANKS), .REGS_PER_BANK(REGS_PER_BANK)
  ) u_rename (
    .clk, .rst_n, .ren_valid, .ren_ready, .dst_valid, .dst_arch, .src_arch,
    .dst_phys, .old_phys, .src_phys, .free_valid, .free_phys
  );

  read_queue #(
    .RD_PORTS(RD_PORTS), .DEPTH(QUEUE_DEPTH), .NUM_BANKS(NUM_BANKS),
    .REGS_PER_BANK(REGS_PER_BANK), .DATA_W(DATA_W), .TAG_W(TAG_W), .FWD_N(FWD_N)
  ) u_read_queue (
    .clk, .rst_n,
    .in_valid(rd_req_valid), .in_reg(rd_req_reg), .in_tag(rd_req_tag), .in_ready(rd_req_ready),
    .resp_valid(rd_resp_valid), .resp_tag(rd_resp_tag), .resp_data(rd_resp_data),
    .rf_rd_en, .rf_rd_bank, .rf_rd_row, .rf_rd_blocked, .rf_rd_valid, .rf_rd_data,
    .fwd_valid(pend_valid), .fwd_reg(pend_reg), .fwd_data(pend_data),
    .ev_issue(ev_rd_issue), .ev_combine(ev_rd_combine), .ev_forward(ev_rd_forward),
    .ev_deferred(ev_rd_deferred), .ev_ooo(ev_rd_ooo)
  );

  write_queue #(
    .WR_PORTS(WR_PORTS), .DEPTH(QUEUE_DEPTH), .NUM_BANKS(NUM_BANKS),
    .REGS_PER_BANK(REGS_PER_BANK), .DATA_W(DATA_W)
  ) u_write_queue (
    .clk, .rst_n,
    .in_valid(wr_req_valid), .in_reg(wr_req_reg), .in_data(wr_req_data), .in_ready(wr_req_ready),
    .rf_wr_en, .rf_wr_bank, .rf_wr_row, .rf_wr_data, .rf_wr_blocked,
    .pend_valid, .pend_reg, .pend_data,
    .ev_deferred(ev_wr_deferred), .ev_ooo(ev_wr_ooo)
  );

  hma_regfile #(
    .NUM_BANKS(NUM_BANKS), .REGS_PER_BANK(REGS_PER_BANK), .DATA_W(DATA_W),
    .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
  ) u_regfile (
    .clk, .rst_n,
    .rd_en(rf_rd_en), .rd_bank(rf_rd_bank), .rd_row(rf_rd_row),
    .rd_blocked(rf_rd_blocked), .rd_valid(rf_rd_valid), .rd_data(rf_rd_data),
    .wr_en(rf_wr_en), .wr_bank(rf_wr_bank), .wr_row(rf_wr_row), .wr_data(rf_wr_data),
    .wr_blocked(rf_wr_blocked)
  );
endmodule
