// read_queue: read half of the register access queue.
//
// Operand reads for the multi-bank register file arrive on RD_PORTS read
// lanes (one per register-file read port), each with a tag that names the
// consumer. Each lane holds up to DEPTH requests in arrival order. Every
// cycle the lanes, in order from lane 0, each pick their oldest request
// that can be served now, in one of three ways:
//   forward  - the register's new value is still waiting in the write
//              queue (pend_*): the value is taken from there, no bank used;
//   issue    - its bank is not yet used this cycle: the lane reads it on its
//              own register-file read port;
//   combine  - another lane already reads the same register this cycle: the
//              lane takes a copy of that lane's read word, no bank used.
// A request whose bank is taken by a different register waits while
// younger ones go ahead (out-of-order register access), so the register
// file sees at most one read per bank per cycle and never blocks a read.
//
// Timing: a request accepted at a rising edge can be picked in the next
// cycle; the response (resp_valid, resp_tag, resp_data) comes on the same
// lane one cycle after it was picked, the register file's read latency.
// Each lane answers at most one request per cycle; in_ready is low while
// its queue is full. Events per lane and cycle: ev_issue, ev_combine,
// ev_forward, ev_deferred (oldest request held back by a bank conflict)
// and ev_ooo (a younger request served past it).
//
// Queueing, combining and forwarding are the access-reduction methods of
// the source design; lanes, DEPTH, lane order, the tag and the handshake
// are this design's own choices. A read must be queued only after the
// write of the value it needs has been queued or done, and no write of a
// register may be queued while an older read of its previous value waits
// (both hold for a renamed instruction stream).
module read_queue #(
  parameter int unsigned RD_PORTS      = rf_pkg::RD_PORTS,
  parameter int unsigned DEPTH         = rf_pkg::QUEUE_DEPTH,
  parameter int unsigned NUM_BANKS     = rf_pkg::NUM_BANKS,
  parameter int unsigned REGS_PER_BANK = rf_pkg::REGS_PER_BANK,
  parameter int unsigned DATA_W        = rf_pkg::DATA_W,
  parameter int unsigned TAG_W         = rf_pkg::TAG_W,
  parameter int unsigned FWD_N         = rf_pkg::WR_PORTS * rf_pkg::QUEUE_DEPTH,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned ROW_W  = (REGS_PER_BANK > 1) ? $clog2(REGS_PER_BANK) : 1,
  localparam int unsigned REG_W  = BANK_W + ROW_W,
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1),
  localparam int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PORT_W = (RD_PORTS > 1) ? $clog2(RD_PORTS) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // request lanes
  input  logic [RD_PORTS-1:0]             in_valid,
  input  logic [RD_PORTS-1:0][REG_W-1:0]  in_reg,
  input  logic [RD_PORTS-1:0][TAG_W-1:0]  in_tag,
  output logic [RD_PORTS-1:0]             in_ready,
  // responses
  output logic [RD_PORTS-1:0]             resp_valid,
  output logic [RD_PORTS-1:0][TAG_W-1:0]  resp_tag,
  output logic [RD_PORTS-1:0][DATA_W-1:0] resp_data,
  // register-file read ports
  output logic [RD_PORTS-1:0]             rf_rd_en,
  output logic [RD_PORTS-1:0][BANK_W-1:0] rf_rd_bank,
  output logic [RD_PORTS-1:0][ROW_W-1:0]  rf_rd_row,
  input  logic [RD_PORTS-1:0]             rf_rd_blocked,
  input  logic [RD_PORTS-1:0]             rf_rd_valid,
  input  logic [RD_PORTS-1:0][DATA_W-1:0] rf_rd_data,
  // writes still queued, for forwarding
  input  logic [FWD_N-1:0]                fwd_valid,
  input  logic [FWD_N-1:0][REG_W-1:0]     fwd_reg,
  input  logic [FWD_N-1:0][DATA_W-1:0]    fwd_data,
  // events
  output logic [RD_PORTS-1:0]             ev_issue,
  output logic [RD_PORTS-1:0]             ev_combine,
  output logic [RD_PORTS-1:0]             ev_forward,
  output logic [RD_PORTS-1:0]             ev_deferred,
  output logic [RD_PORTS-1:0]             ev_ooo
);
  typedef struct packed {
    logic [REG_W-1:0] rnum;
    logic [TAG_W-1:0] tag;
  } rq_entry_t;

  typedef enum logic [1:0] {PICK_NONE, PICK_ISSUE, PICK_COMBINE, PICK_FORWARD} pick_e;

  rq_entry_t [RD_PORTS-1:0][DEPTH-1:0] q, q_n;
  logic [RD_PORTS-1:0][CNT_W-1:0]      cnt, cnt_n;

  pick_e [RD_PORTS-1:0]                pick;
  logic  [RD_PORTS-1:0][IDX_W-1:0]     idx;
  logic  [RD_PORTS-1:0][PORT_W-1:0]    src;       // lane whose read word is used
  logic  [RD_PORTS-1:0][DATA_W-1:0]    fdata;     // forwarded word
  logic  [RD_PORTS-1:0]                fire;
  logic  [NUM_BANKS-1:0]               claimed;
  logic  [NUM_BANKS-1:0][REG_W-1:0]    claim_reg;
  logic  [NUM_BANKS-1:0][PORT_W-1:0]   claim_port;

  // response stage
  logic  [RD_PORTS-1:0]                rsp_v_q, rsp_fwd_q;
  logic  [RD_PORTS-1:0][TAG_W-1:0]     rsp_tag_q;
  logic  [RD_PORTS-1:0][PORT_W-1:0]    rsp_src_q;
  logic  [RD_PORTS-1:0][DATA_W-1:0]    rsp_fdata_q;

  always_comb begin
    logic             hit;
    logic [DATA_W-1:0] hdata;
    logic [REG_W-1:0]  r;
    logic [BANK_W-1:0] b;
    r          = '0;
    b          = '0;
    hit        = 1'b0;
    hdata      = '0;
    claimed    = '0;
    claim_reg  = '0;
    claim_port = '0;
    pick       = '{default: PICK_NONE};
    idx        = '0;
    src        = '0;
    fdata      = '0;
    for (int unsigned p = 0; p < RD_PORTS; p++) begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        if (pick[p] == PICK_NONE && i < cnt[p]) begin
          r     = q[p][i].rnum;
          b     = r[REG_W-1 -: BANK_W];
          hit   = 1'b0;
          hdata = '0;
          for (int unsigned j = 0; j < FWD_N; j++)
            if (!hit && fwd_valid[j] && fwd_reg[j] == r) begin
              hit   = 1'b1;
              hdata = fwd_data[j];
            end
          if (hit) begin
            pick[p]  = PICK_FORWARD;
            idx[p]   = IDX_W'(i);
            fdata[p] = hdata;
          end else if (!claimed[b]) begin
            pick[p]       = PICK_ISSUE;
            idx[p]        = IDX_W'(i);
            src[p]        = PORT_W'(p);
            claimed[b]    = 1'b1;
            claim_reg[b]  = r;
            claim_port[b] = PORT_W'(p);
          end else if (claim_reg[b] == r) begin
            pick[p] = PICK_COMBINE;
            idx[p]  = IDX_W'(i);
            src[p]  = claim_port[b];
          end
        end
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < RD_PORTS; p++) begin
      rf_rd_en[p]   = pick[p] == PICK_ISSUE;
      rf_rd_bank[p] = q[p][idx[p]].rnum[REG_W-1 -: BANK_W];
      rf_rd_row[p]  = q[p][idx[p]].rnum[ROW_W-1:0];
      // an issue or combine completes only if the lane that reads was not blocked
      fire[p]       = (pick[p] == PICK_FORWARD) ||
                      (pick[p] != PICK_NONE && !rf_rd_blocked[src[p]]);
      in_ready[p]   = cnt[p] < CNT_W'(DEPTH);
      ev_issue[p]    = fire[p] && pick[p] == PICK_ISSUE;
      ev_combine[p]  = fire[p] && pick[p] == PICK_COMBINE;
      ev_forward[p]  = fire[p] && pick[p] == PICK_FORWARD;
      ev_ooo[p]      = fire[p] && idx[p] != '0;
      ev_deferred[p] = (cnt[p] != '0) && !(fire[p] && idx[p] == '0);
    end
  end

  always_comb begin
    q_n   = q;
    cnt_n = cnt;
    for (int unsigned p = 0; p < RD_PORTS; p++) begin
      if (fire[p]) begin
        for (int unsigned i = 0; i < DEPTH - 1; i++)
          if (i >= idx[p]) q_n[p][i] = q[p][i+1];
        cnt_n[p] = cnt[p] - 1'b1;
      end
      if (in_valid[p] && in_ready[p]) begin
        q_n[p][cnt_n[p][IDX_W-1:0]] = '{rnum: in_reg[p], tag: in_tag[p]};
        cnt_n[p] = cnt_n[p] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q           <= '0;
      cnt         <= '0;
      rsp_v_q     <= '0;
      rsp_fwd_q   <= '0;
      rsp_tag_q   <= '0;
      rsp_src_q   <= '0;
      rsp_fdata_q <= '0;
    end else begin
      q   <= q_n;
      cnt <= cnt_n;
      for (int unsigned p = 0; p < RD_PORTS; p++) begin
        rsp_v_q[p]     <= fire[p];
        rsp_fwd_q[p]   <= pick[p] == PICK_FORWARD;
        rsp_tag_q[p]   <= q[p][idx[p]].tag;
        rsp_src_q[p]   <= src[p];
        rsp_fdata_q[p] <= fdata[p];
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < RD_PORTS; p++) begin
      resp_valid[p] = rsp_v_q[p];
      resp_tag[p]   = rsp_tag_q[p];
      resp_data[p]  = rsp_fwd_q[p] ? rsp_fdata_q[p] : rf_rd_data[rsp_src_q[p]];
    end
  end

  // The queue keeps reads conflict-free, and a read word is there when used.
  assert property (@(posedge clk) disable iff (!rst_n) (rf_rd_en & rf_rd_blocked) == '0);
  for (genvar p = 0; p < RD_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     (rsp_v_q[p] && !rsp_fwd_q[p]) |-> rf_rd_valid[rsp_src_q[p]]);
  end
endmodule
