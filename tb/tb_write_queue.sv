// tb_write_queue: random results on the 4 lanes against a reference model
// of the per-lane queues. Every cycle it predicts in_ready, which queued
// entry each lane writes (oldest one whose bank no earlier lane took), the
// visible pending entries and the deferral / out-of-order events, and
// compares them with the block. At the end the queues must drain, and bank
// conflicts, out-of-order writes and full queues must all have occurred.
module tb_write_queue;
  localparam int WP = 4, D = 4;
  typedef struct { logic [6:0] r; logic [31:0] d; } ent_t;
  logic clk = 0, rst_n = 0;
  logic [WP-1:0]         in_valid, in_ready;
  logic [WP-1:0][6:0]    in_reg;
  logic [WP-1:0][31:0]   in_data;
  logic [WP-1:0]         rf_wr_en, rf_wr_blocked;
  logic [WP-1:0][1:0]    rf_wr_bank;
  logic [WP-1:0][4:0]    rf_wr_row;
  logic [WP-1:0][31:0]   rf_wr_data;
  logic [WP*D-1:0]       pend_valid;
  logic [WP*D-1:0][6:0]  pend_reg;
  logic [WP*D-1:0][31:0] pend_data;
  logic [WP-1:0]         ev_deferred, ev_ooo;
  ent_t mq [WP][$];
  int checks = 0, failures = 0, n_def = 0, n_ooo = 0, n_full = 0, n_wr = 0, n_in = 0;

  write_queue dut (.*);

  always #5 clk = ~clk;

  task automatic cycle(input int load);
    int pick [WP];
    logic [3:0] claimed;
    @(negedge clk);
    for (int p = 0; p < WP; p++) begin
      in_valid[p] = ($urandom_range(99) < load);
      in_reg[p] = 7'($urandom); in_data[p] = $urandom;
    end
    #1;
    claimed = '0;
    for (int p = 0; p < WP; p++) begin
      pick[p] = -1;
      for (int i = 0; i < mq[p].size(); i++)
        if (pick[p] < 0 && !claimed[mq[p][i].r[6:5]]) begin pick[p] = i; claimed[mq[p][i].r[6:5]] = 1; end
      checks++;
      if (in_ready[p] !== (mq[p].size() < D)) begin failures++; $display("FAIL ready lane %0d", p); end
      if (mq[p].size() == D) n_full++;
      checks++;
      if (rf_wr_en[p] !== (pick[p] >= 0)) begin
        failures++; $display("FAIL lane %0d en %b exp pick %0d", p, rf_wr_en[p], pick[p]);
      end else if (pick[p] >= 0) begin
        checks++;
        if ({rf_wr_bank[p], rf_wr_row[p]} !== mq[p][pick[p]].r || rf_wr_data[p] !== mq[p][pick[p]].d) begin
          failures++; $display("FAIL lane %0d write r%0d=%h exp r%0d=%h", p, {rf_wr_bank[p], rf_wr_row[p]},
                               rf_wr_data[p], mq[p][pick[p]].r, mq[p][pick[p]].d);
        end
      end
      checks++;
      if (ev_deferred[p] !== (mq[p].size() > 0 && pick[p] != 0) || ev_ooo[p] !== (pick[p] > 0)) begin
        failures++; $display("FAIL lane %0d events", p);
      end
      for (int i = 0; i < D; i++) begin
        checks++;
        if (pend_valid[p*D+i] !== (i < mq[p].size()) ||
            (i < mq[p].size() && (pend_reg[p*D+i] !== mq[p][i].r || pend_data[p*D+i] !== mq[p][i].d))) begin
          failures++; $display("FAIL lane %0d pending entry %0d", p, i);
        end
      end
      if (ev_deferred[p]) n_def++;
      if (ev_ooo[p]) n_ooo++;
    end
    @(posedge clk);
    for (int p = 0; p < WP; p++) begin
      logic acc;
      acc = in_valid[p] && mq[p].size() < D;
      if (pick[p] >= 0) begin mq[p].delete(pick[p]); n_wr++; end
      if (acc) begin mq[p].push_back('{r: in_reg[p], d: in_data[p]}); n_in++; end
    end
  endtask

  initial begin
    in_valid = '0; in_reg = '0; in_data = '0; rf_wr_blocked = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) cycle((n / 500) % 2 == 0 ? 90 : 40);
    for (int n = 0; n < 40; n++) cycle(0);
    for (int p = 0; p < WP; p++) begin
      checks++;
      if (mq[p].size() != 0) begin failures++; $display("FAIL lane %0d not drained", p); end
    end
    checks++;
    if (n_def == 0 || n_ooo == 0 || n_full == 0 || n_wr != n_in) begin
      failures++; $display("FAIL coverage def=%0d ooo=%0d full=%0d wr=%0d in=%0d", n_def, n_ooo, n_full, n_wr, n_in);
    end
    $display("writes %0d deferred %0d out-of-order %0d full %0d", n_wr, n_def, n_ooo, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
