// write_queue: write half of the register access queue.
//
// Results to be written into the multi-bank register file arrive on the
// WR_PORTS write lanes (one per register-file write port). Each lane has a
// small queue of DEPTH entries kept in arrival order. Every cycle the
// lanes, in order from lane 0, each pick the oldest entry whose bank no
// earlier lane has taken this cycle, and send it to the register file on
// their own write port. So at most one write goes to a bank per cycle, and
// the access conflict manager of the register file never has to block a
// write: a write whose bank is busy just waits in the queue while younger
// writes to free banks go ahead (out-of-order register access).
//
// All queued entries are visible on pend_* so that reads of a register
// whose new value is still waiting here can be forwarded from the queue.
// Events: ev_deferred[p] = lane p held back its oldest entry because its
// bank was taken; ev_ooo[p] = lane p wrote a younger entry past it.
//
// Timing: an entry accepted at a rising edge (in_valid & in_ready) can be
// written at the next one. in_ready is low while the lane's queue is full.
// Queueing and conflict avoidance follow the source design; the per-lane
// organisation, DEPTH, lane order and the ready/valid handshake are this
// design's own choices. Writes to the same register must not be queued
// twice at once (renaming guarantees that a physical register has one
// producer).
module write_queue #(
  parameter int unsigned WR_PORTS      = rf_pkg::WR_PORTS,
  parameter int unsigned DEPTH         = rf_pkg::QUEUE_DEPTH,
  parameter int unsigned NUM_BANKS     = rf_pkg::NUM_BANKS,
  parameter int unsigned REGS_PER_BANK = rf_pkg::REGS_PER_BANK,
  parameter int unsigned DATA_W        = rf_pkg::DATA_W,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned ROW_W  = (REGS_PER_BANK > 1) ? $clog2(REGS_PER_BANK) : 1,
  localparam int unsigned REG_W  = BANK_W + ROW_W,
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1),
  localparam int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // result lanes
  input  logic [WR_PORTS-1:0]                   in_valid,
  input  logic [WR_PORTS-1:0][REG_W-1:0]        in_reg,
  input  logic [WR_PORTS-1:0][DATA_W-1:0]       in_data,
  output logic [WR_PORTS-1:0]                   in_ready,
  // register-file write ports
  output logic [WR_PORTS-1:0]                   rf_wr_en,
  output logic [WR_PORTS-1:0][BANK_W-1:0]       rf_wr_bank,
  output logic [WR_PORTS-1:0][ROW_W-1:0]        rf_wr_row,
  output logic [WR_PORTS-1:0][DATA_W-1:0]       rf_wr_data,
  input  logic [WR_PORTS-1:0]                   rf_wr_blocked,
  // queued writes, for forwarding
  output logic [WR_PORTS*DEPTH-1:0]             pend_valid,
  output logic [WR_PORTS*DEPTH-1:0][REG_W-1:0]  pend_reg,
  output logic [WR_PORTS*DEPTH-1:0][DATA_W-1:0] pend_data,
  // events
  output logic [WR_PORTS-1:0]                   ev_deferred,
  output logic [WR_PORTS-1:0]                   ev_ooo
);
  typedef struct packed {
    logic [REG_W-1:0]  rnum;
    logic [DATA_W-1:0] data;
  } wq_entry_t;

  wq_entry_t [WR_PORTS-1:0][DEPTH-1:0] q, q_n;
  logic [WR_PORTS-1:0][CNT_W-1:0]      cnt, cnt_n;
  logic [WR_PORTS-1:0]                 found;
  logic [WR_PORTS-1:0][IDX_W-1:0]      idx;
  logic [NUM_BANKS-1:0]                claimed;

  // bank number of every queued entry
  logic [WR_PORTS-1:0][DEPTH-1:0][BANK_W-1:0] ebank;
  always_comb
    for (int unsigned p = 0; p < WR_PORTS; p++)
      for (int unsigned i = 0; i < DEPTH; i++)
        ebank[p][i] = q[p][i].rnum[REG_W-1 -: BANK_W];

  // Pick, lane by lane, the oldest entry whose bank is still free.
  always_comb begin
    claimed     = '0;
    found       = '0;
    idx         = '0;
    ev_deferred = '0;
    ev_ooo      = '0;
    for (int unsigned p = 0; p < WR_PORTS; p++) begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        if (!found[p] && i < cnt[p] && !claimed[ebank[p][i]]) begin
          found[p]                       = 1'b1;
          idx[p]                         = IDX_W'(i);
          claimed[ebank[p][i]] = 1'b1;
        end
      end
      ev_deferred[p] = (cnt[p] != '0) && !(found[p] && idx[p] == '0);
      ev_ooo[p]      = found[p] && idx[p] != '0;
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < WR_PORTS; p++) begin
      rf_wr_en[p]   = found[p];
      rf_wr_bank[p] = q[p][idx[p]].rnum[REG_W-1 -: BANK_W];
      rf_wr_row[p]  = q[p][idx[p]].rnum[ROW_W-1:0];
      rf_wr_data[p] = q[p][idx[p]].data;
      in_ready[p]   = cnt[p] < CNT_W'(DEPTH);
    end
  end

  // Remove the written entry (shifting younger ones down), then append.
  always_comb begin
    q_n   = q;
    cnt_n = cnt;
    for (int unsigned p = 0; p < WR_PORTS; p++) begin
      if (found[p] && !rf_wr_blocked[p]) begin
        for (int unsigned i = 0; i < DEPTH - 1; i++)
          if (i >= idx[p]) q_n[p][i] = q[p][i+1];
        cnt_n[p] = cnt[p] - 1'b1;
      end
      if (in_valid[p] && in_ready[p]) begin
        q_n[p][cnt_n[p][IDX_W-1:0]] = '{rnum: in_reg[p], data: in_data[p]};
        cnt_n[p] = cnt_n[p] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      cnt <= '0;
    end else begin
      q   <= q_n;
      cnt <= cnt_n;
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < WR_PORTS; p++)
      for (int unsigned i = 0; i < DEPTH; i++) begin
        pend_valid[p*DEPTH+i] = i < cnt[p];
        pend_reg[p*DEPTH+i]   = q[p][i].rnum;
        pend_data[p*DEPTH+i]  = q[p][i].data;
      end
  end

  // The queue keeps writes conflict-free, so the register file never blocks one.
  assert property (@(posedge clk) disable iff (!rst_n) (rf_wr_en & rf_wr_blocked) == '0);
endmodule
