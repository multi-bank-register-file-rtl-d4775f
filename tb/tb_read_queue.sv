// tb_read_queue: random operand reads on the 8 lanes, with a behavioural
// register file (one-cycle read latency) and a random set of writes still
// queued for forwarding. A reference model of the per-lane queues predicts,
// every cycle, which request each lane serves and how (forward, issue on
// its own read port, or combine with another lane's read of the same
// register), the read-port requests, in_ready and the events; one cycle
// later it checks each response's tag and word. Also checks that no two
// read ports address the same bank, that a lone request is answered two
// clocks after it is accepted, and that every mechanism occurred.
module tb_read_queue;
  localparam int RP = 8, D = 4, FN = 16;
  typedef struct { logic [6:0] r; logic [5:0] t; } ent_t;
  logic clk = 0, rst_n = 0;
  logic [RP-1:0]         in_valid, in_ready, resp_valid;
  logic [RP-1:0][6:0]    in_reg;
  logic [RP-1:0][5:0]    in_tag, resp_tag;
  logic [RP-1:0][31:0]   resp_data;
  logic [RP-1:0]         rf_rd_en, rf_rd_blocked, rf_rd_valid;
  logic [RP-1:0][1:0]    rf_rd_bank;
  logic [RP-1:0][4:0]    rf_rd_row;
  logic [RP-1:0][31:0]   rf_rd_data;
  logic [FN-1:0]         fwd_valid;
  logic [FN-1:0][6:0]    fwd_reg;
  logic [FN-1:0][31:0]   fwd_data;
  logic [RP-1:0]         ev_issue, ev_combine, ev_forward, ev_deferred, ev_ooo;
  logic [31:0] mem [128];
  ent_t mq [RP][$];
  logic [RP-1:0]       exp_v;
  logic [RP-1:0][5:0]  exp_t;
  logic [RP-1:0][31:0] exp_d;
  int checks = 0, failures = 0;
  int n_iss = 0, n_comb = 0, n_fwd = 0, n_def = 0, n_ooo = 0, n_in = 0, n_out = 0;

  read_queue dut (.*);

  always #5 clk = ~clk;

  // behavioural register file
  always_ff @(posedge clk) begin
    for (int p = 0; p < RP; p++) begin
      rf_rd_valid[p] <= rf_rd_en[p];
      rf_rd_data[p]  <= rf_rd_en[p] ? mem[{rf_rd_bank[p], rf_rd_row[p]}] : 32'h0;
    end
  end

  task automatic cycle(input int load, input int fwd_load);
    int pick [RP]; int kind [RP];   // kind 1 issue, 2 combine, 3 forward
    logic [3:0] claimed; logic [3:0][6:0] creg; logic [3:0] seen;
    logic [RP-1:0] nv; logic [RP-1:0][5:0] nt; logic [RP-1:0][31:0] nd;
    @(negedge clk);
    // responses to last cycle's picks
    for (int p = 0; p < RP; p++) begin
      checks++;
      if (resp_valid[p] !== exp_v[p] || (exp_v[p] && (resp_tag[p] !== exp_t[p] || resp_data[p] !== exp_d[p]))) begin
        failures++; $display("FAIL lane %0d resp v=%b t=%0d d=%h exp v=%b t=%0d d=%h", p, resp_valid[p],
                             resp_tag[p], resp_data[p], exp_v[p], exp_t[p], exp_d[p]);
      end
      if (resp_valid[p]) n_out++;
    end
    for (int p = 0; p < RP; p++) begin
      in_valid[p] = ($urandom_range(99) < load);
      in_reg[p] = ($urandom_range(3) == 0) ? 7'($urandom_range(7)) : 7'($urandom);  // some reuse
      in_tag[p] = 6'($urandom);
    end
    for (int j = 0; j < FN; j++) begin
      fwd_valid[j] = ($urandom_range(99) < fwd_load);
      fwd_reg[j] = 7'($urandom); fwd_data[j] = $urandom;
    end
    #1;
    claimed = '0; creg = '0; nv = '0; nt = '0; nd = '0;
    for (int p = 0; p < RP; p++) begin
      pick[p] = -1; kind[p] = 0;
      for (int i = 0; i < mq[p].size(); i++) begin
        if (pick[p] < 0) begin
          int hit; logic [6:0] r;
          r = mq[p][i].r; hit = -1;
          for (int j = 0; j < FN; j++) if (hit < 0 && fwd_valid[j] && fwd_reg[j] == r) hit = j;
          if (hit >= 0) begin pick[p] = i; kind[p] = 3; nd[p] = fwd_data[hit]; end
          else if (!claimed[r[6:5]]) begin
            pick[p] = i; kind[p] = 1; claimed[r[6:5]] = 1; creg[r[6:5]] = r; nd[p] = mem[r];
          end else if (creg[r[6:5]] == r) begin pick[p] = i; kind[p] = 2; nd[p] = mem[r]; end
        end
      end
      if (pick[p] >= 0) begin nv[p] = 1; nt[p] = mq[p][pick[p]].t; end
      checks++;
      if (in_ready[p] !== (mq[p].size() < D) || rf_rd_en[p] !== (kind[p] == 1) ||
          (kind[p] == 1 && {rf_rd_bank[p], rf_rd_row[p]} !== mq[p][pick[p]].r)) begin
        failures++; $display("FAIL lane %0d pick: en=%b r=%0d exp kind %0d", p, rf_rd_en[p],
                             {rf_rd_bank[p], rf_rd_row[p]}, kind[p]);
      end
      checks++;
      if (ev_issue[p] !== (kind[p] == 1) || ev_combine[p] !== (kind[p] == 2) || ev_forward[p] !== (kind[p] == 3) ||
          ev_ooo[p] !== (pick[p] > 0) || ev_deferred[p] !== (mq[p].size() > 0 && pick[p] != 0)) begin
        failures++; $display("FAIL lane %0d events", p);
      end
      n_iss += int'(kind[p] == 1); n_comb += int'(kind[p] == 2); n_fwd += int'(kind[p] == 3);
      n_ooo += int'(pick[p] > 0); n_def += int'(mq[p].size() > 0 && pick[p] != 0);
    end
    seen = '0;
    for (int p = 0; p < RP; p++)
      if (rf_rd_en[p]) begin
        checks++;
        if (seen[rf_rd_bank[p]]) begin failures++; $display("FAIL two reads of bank %0d", rf_rd_bank[p]); end
        seen[rf_rd_bank[p]] = 1;
      end
    @(posedge clk);
    exp_v = nv; exp_t = nt; exp_d = nd;
    for (int p = 0; p < RP; p++) begin
      logic acc;
      acc = in_valid[p] && mq[p].size() < D;
      if (pick[p] >= 0) mq[p].delete(pick[p]);
      if (acc) begin mq[p].push_back('{r: in_reg[p], t: in_tag[p]}); n_in++; end
    end
  endtask

  initial begin
    in_valid = '0; in_reg = '0; in_tag = '0; rf_rd_blocked = '0; fwd_valid = '0; fwd_reg = '0; fwd_data = '0;
    exp_v = '0; exp_t = '0; exp_d = '0;
    for (int r = 0; r < 128; r++) mem[r] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: one request on lane 3, accepted at edge 0, answered after edge 2
    @(negedge clk);
    in_valid = 8'b0000_1000; in_reg[3] = 7'd77; in_tag[3] = 6'd9;
    @(posedge clk);
    @(negedge clk); in_valid = '0;
    checks++;
    if (resp_valid != '0) begin failures++; $display("FAIL answer after one clock"); end
    @(posedge clk); #1;
    checks++;
    if (resp_valid !== 8'b0000_1000 || resp_tag[3] !== 6'd9 || resp_data[3] !== mem[77]) begin
      failures++; $display("FAIL latency: v=%b t=%0d d=%h", resp_valid, resp_tag[3], resp_data[3]);
    end
    @(negedge clk);
    for (int n = 0; n < 3000; n++) cycle((n / 500) % 2 == 0 ? 85 : 30, (n / 250) % 2 == 0 ? 0 : 3);
    for (int n = 0; n < 40; n++) cycle(0, 0);
    checks++;
    if (n_iss == 0 || n_comb == 0 || n_fwd == 0 || n_def == 0 || n_ooo == 0 || n_in != n_out) begin
      failures++; $display("FAIL coverage iss=%0d comb=%0d fwd=%0d def=%0d ooo=%0d in=%0d out=%0d",
                           n_iss, n_comb, n_fwd, n_def, n_ooo, n_in, n_out);
    end
    $display("reads %0d: issued %0d combined %0d forwarded %0d, deferred %0d, out-of-order %0d",
             n_out, n_iss, n_comb, n_fwd, n_def, n_ooo);
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
