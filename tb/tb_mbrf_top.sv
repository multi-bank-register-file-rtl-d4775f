// tb_mbrf_top: end-to-end run of the register access subsystem at its
// default size (4 banks x 32 x 32 bit, 8 read and 4 write lanes).
//
// The testbench plays the processor around it. It first loads the 32
// architectural registers through the write lanes, arranged so that all
// four lanes aim at the same bank in each cycle. Then it runs a program
// of NGROUPS groups of 4 instructions: each group is renamed, its 8 source
// operands are requested on the 8 read lanes in the same cycle as the
// previous group's 4 results are handed to the write lanes, and every
// operand that comes back is compared with a reference model of the
// architectural registers. Each result is a function of the operands the
// testbench received, so a wrong word propagates. Replaced physical
// registers are released one group later. At the end every architectural
// register is read back through the map table and checked, and renaming
// then continues without releases until a group has to wait.
//
// Mechanisms counted, each of which must occur: reads issued to a bank,
// combined reads, forwarded reads, reads deferred by a bank conflict, reads
// served out of order, the same two for writes, and rename stalls. Checks
// the two-clock latency of a read request in an otherwise idle cycle.
module tb_mbrf_top;
  localparam int G = 4, RP = 8, WP = 4, NGROUPS = 300;
  logic clk = 0, rst_n = 0;
  logic ren_valid, ren_ready;
  logic [G-1:0] dst_valid, free_valid;
  logic [G-1:0][4:0] dst_arch;
  logic [G-1:0][1:0][4:0] src_arch;
  logic [G-1:0][6:0] dst_phys, old_phys, free_phys;
  logic [G-1:0][1:0][6:0] src_phys;
  logic [RP-1:0] rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [RP-1:0][6:0] rd_req_reg;
  logic [RP-1:0][5:0] rd_req_tag, rd_resp_tag;
  logic [RP-1:0][31:0] rd_resp_data;
  logic [WP-1:0] wr_req_valid, wr_req_ready;
  logic [WP-1:0][6:0] wr_req_reg;
  logic [WP-1:0][31:0] wr_req_data;
  logic [RP-1:0] ev_rd_issue, ev_rd_combine, ev_rd_forward, ev_rd_deferred, ev_rd_ooo;
  logic [WP-1:0] ev_wr_deferred, ev_wr_ooo;

  logic [31:0] arch_val [32];
  int checks = 0, failures = 0, cyc = 0;
  int n_iss = 0, n_comb = 0, n_fwd = 0, n_rdef = 0, n_rooo = 0, n_wdef = 0, n_wooo = 0, n_stall = 0;

  mbrf_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_iss  += $countones(ev_rd_issue);
    n_comb += $countones(ev_rd_combine);
    n_fwd  += $countones(ev_rd_forward);
    n_rdef += $countones(ev_rd_deferred);
    n_rooo += $countones(ev_rd_ooo);
    n_wdef += $countones(ev_wr_deferred);
    n_wooo += $countones(ev_wr_ooo);
    if (ren_valid && !ren_ready) n_stall++;
  end

  // read-back checker: responses matched by tag, in any order
  logic [31:0] exp_by_tag [32];
  bit seen [32];
  int nresp = 0;
  bit rb_active = 0;
  always @(posedge clk) if (rb_active) begin
    #1;
    for (int p = 0; p < RP; p++)
      if (rd_resp_valid[p]) begin
        int t; t = int'(rd_resp_tag[p]);
        checks++;
        if (t >= 32 || seen[t % 32] || rd_resp_data[p] !== exp_by_tag[t % 32]) begin
          failures++; $display("FAIL read-back tag %0d data %h", t, rd_resp_data[p]);
        end
        seen[t % 32] = 1; nresp++;
      end
  end

  function automatic logic [31:0] alu(logic [31:0] a, logic [31:0] b, int grp, int slot);
    return (a + {b[18:0], b[31:19]}) ^ (32'(grp) * 32'h9E37_79B9 + 32'(slot));
  endfunction

  // Collect the responses of the 8 lanes (one request each) and check them.
  task automatic collect(input logic [RP-1:0] want, input logic [RP-1:0][31:0] exp,
                         input logic [RP-1:0][5:0] etag, output logic [RP-1:0][31:0] got);
    logic [RP-1:0] pending;
    int guard;
    pending = want; guard = 0; got = '0;
    while (pending != '0 && guard < 50) begin
      @(posedge clk); #1;
      for (int p = 0; p < RP; p++)
        if (rd_resp_valid[p]) begin
          checks++;
          if (!pending[p] || rd_resp_tag[p] !== etag[p] || rd_resp_data[p] !== exp[p]) begin
            failures++;
            $display("FAIL lane %0d: tag %0d/%0d data %h exp %h", p, rd_resp_tag[p], etag[p], rd_resp_data[p], exp[p]);
          end
          got[p] = rd_resp_data[p];
          pending[p] = 0;
        end
      guard++;
    end
    checks++;
    if (pending != '0) begin failures++; $display("FAIL lanes %b never answered", pending); end
  endtask

  initial begin
    logic [WP-1:0][6:0]  pw_reg;
    logic [WP-1:0][31:0] pw_data;
    logic [WP-1:0]       pw_v;
    logic [G-1:0][6:0]   pf_phys;
    logic [G-1:0]        pf_v;
    logic [RP-1:0][31:0] exp, got;
    logic [RP-1:0][5:0]  etag;
    ren_valid = 0; dst_valid = '0; dst_arch = '0; src_arch = '0; free_valid = '0; free_phys = '0;
    rd_req_valid = '0; rd_req_reg = '0; rd_req_tag = '0;
    wr_req_valid = '0; wr_req_reg = '0; wr_req_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. load the architectural registers; at reset r(i) lives in bank i mod 4,
    //    row i / 4. Lane l writes r(8l) .. r(8l + 7), so the lanes compete for banks.
    for (int a = 0; a < 32; a++) arch_val[a] = $urandom;
    begin
      // lane 0 writes banks 0,0,1,1,..., lane 1 banks 0,1,0,1,...: lane 1's
      // oldest entry waits for bank 0 while a younger one goes to bank 1
      int ord0 [8] = '{0, 4, 1, 5, 2, 6, 3, 7};
      int ord1 [8] = '{0, 1, 4, 5, 2, 3, 6, 7};
      int step [WP];
      for (int l = 0; l < WP; l++) step[l] = 0;
      while (step[0] < 8 || step[1] < 8 || step[2] < 8 || step[3] < 8) begin
        @(negedge clk);
        for (int l = 0; l < WP; l++) begin
          int a; a = 8 * l + ((l == 1) ? ord1[step[l] % 8] : ord0[step[l] % 8]);
          wr_req_valid[l] = step[l] < 8;
          wr_req_reg[l] = {2'(a % 4), 5'(a / 4)}; wr_req_data[l] = arch_val[a % 32];
        end
        @(posedge clk);
        for (int l = 0; l < WP; l++) if (wr_req_valid[l] && wr_req_ready[l]) step[l]++;
      end
    end
    @(negedge clk); wr_req_valid = '0;
    repeat (12) @(negedge clk);

    // 2. read latency: one request alone is answered two clocks later
    rd_req_valid = 8'b1; rd_req_reg[0] = 7'd5; rd_req_tag[0] = 6'd33;   // r(20): bank 0, row 5
    @(posedge clk); @(negedge clk); rd_req_valid = '0;
    checks++;
    if (rd_resp_valid != '0) begin failures++; $display("FAIL answered after one clock"); end
    @(posedge clk); #1;
    checks++;
    if (rd_resp_valid !== 8'b1 || rd_resp_tag[0] !== 6'd33 || rd_resp_data[0] !== arch_val[20]) begin
      failures++; $display("FAIL latency v=%b d=%h exp %h", rd_resp_valid, rd_resp_data[0], arch_val[20]);
    end

    // 3. the program
    pw_v = '0; pw_reg = '0; pw_data = '0; pf_v = '0; pf_phys = '0;
    for (int grp = 0; grp < NGROUPS; grp++) begin
      logic [G-1:0][6:0] dp, op; logic [G-1:0][1:0][6:0] sp;
      logic [G-1:0] dv; logic [G-1:0][4:0] da; logic [G-1:0][1:0][4:0] sa;
      // instructions: sources never written earlier in the same group
      for (int g = 0; g < G; g++) begin
        dv[g] = ($urandom_range(7) != 0);
        da[g] = 5'($urandom);
        for (int s = 0; s < 2; s++) begin
          bit clash;
          do begin
            sa[g][s] = ($urandom_range(2) == 0) ? 5'($urandom_range(5)) : 5'($urandom);
            clash = 0;
            for (int j = 0; j < g; j++) if (dv[j] && da[j] == sa[g][s]) clash = 1;
          end while (clash);
        end
      end
      // rename, releasing the previous group's replaced registers
      @(negedge clk);
      ren_valid = 1; dst_valid = dv; dst_arch = da; src_arch = sa;
      free_valid = pf_v; free_phys = pf_phys;
      #1;
      checks++;
      if (!ren_ready) begin failures++; $display("FAIL rename stalled in group %0d", grp); end
      dp = dst_phys; op = old_phys; sp = src_phys;
      @(posedge clk);
      @(negedge clk);
      ren_valid = 0; free_valid = '0;
      // operands of this group together with the results of the last one
      for (int g = 0; g < G; g++)
        for (int s = 0; s < 2; s++) begin
          int p; p = 2 * g + s;
          rd_req_valid[p] = 1; rd_req_reg[p] = sp[g][s];
          etag[p] = {3'(grp), 3'(p)}; rd_req_tag[p] = etag[p];
          exp[p] = arch_val[sa[g][s]];
        end
      wr_req_valid = pw_v; wr_req_reg = pw_reg; wr_req_data = pw_data;
      #1;
      checks++;
      if (rd_req_ready != '1 || (wr_req_ready & pw_v) != pw_v) begin
        failures++; $display("FAIL lanes not ready in group %0d", grp);
      end
      @(posedge clk);
      @(negedge clk);
      rd_req_valid = '0; wr_req_valid = '0;
      collect('1, exp, etag, got);
      // execute: results from the operands received, in program order
      pw_v = '0; pf_v = '0;
      for (int g = 0; g < G; g++)
        if (dv[g]) begin
          logic [31:0] r;
          r = alu(got[2*g], got[2*g+1], grp, g);
          arch_val[da[g]] = r;
          pw_v[g] = 1; pw_reg[g] = dp[g]; pw_data[g] = r;
          pf_v[g] = 1; pf_phys[g] = op[g];
        end
    end
    // last results, then read every architectural register back
    @(negedge clk);
    wr_req_valid = pw_v; wr_req_reg = pw_reg; wr_req_data = pw_data;
    free_valid = pf_v; free_phys = pf_phys;
    @(posedge clk); @(negedge clk);
    wr_req_valid = '0; free_valid = '0;
    repeat (4) @(negedge clk);
    // all 32 read-back requests are queued at once (4 per lane), so lanes
    // wait on bank conflicts and serve younger requests first
    begin
      int guard;
      nresp = 0; rb_active = 1;
      for (int q = 0; q < 4; q++) begin
        logic [G-1:0][1:0][6:0] sp;
        @(negedge clk);
        ren_valid = 0; dst_valid = '0;
        for (int g = 0; g < G; g++) for (int s = 0; s < 2; s++) src_arch[g][s] = 5'(4 * (2 * g + s) + (q + 2 * g + s) % 4);
        #1 sp = src_phys;
        for (int p = 0; p < RP; p++) begin
          int a; a = 4 * p + (q + p) % 4;
          rd_req_valid[p] = 1; rd_req_reg[p] = sp[p / 2][p % 2];
          rd_req_tag[p] = 6'(a); exp_by_tag[a] = arch_val[a]; seen[a] = 0;
        end
        checks++;
        if (rd_req_ready != '1) begin failures++; $display("FAIL read lanes full in read-back"); end
        @(posedge clk);
      end
      @(negedge clk);
      rd_req_valid = '0;
      guard = 0;
      while (nresp < 32 && guard < 100) begin
        @(posedge clk);
        guard++;
      end
      repeat (2) @(posedge clk);
      rb_active = 0;
      checks++;
      if (nresp != 32) begin failures++; $display("FAIL read-back got %0d of 32", nresp); end
    end
    // 4. rename without releases until a group must wait
    for (int n = 0; n < 40 && n_stall == 0; n++) begin
      @(negedge clk);
      ren_valid = 1; dst_valid = '1;
      for (int g = 0; g < G; g++) dst_arch[g] = 5'($urandom);
      @(posedge clk);
    end
    @(negedge clk); ren_valid = 0;

    $display("cycles %0d; reads issued %0d combined %0d forwarded %0d deferred %0d out-of-order %0d",
             cyc, n_iss, n_comb, n_fwd, n_rdef, n_rooo);
    $display("writes deferred %0d out-of-order %0d; rename stalls %0d", n_wdef, n_wooo, n_stall);
    checks++; if (n_iss == 0)  begin failures++; $display("FAIL no bank read"); end
    checks++; if (n_comb == 0) begin failures++; $display("FAIL no combined read"); end
    checks++; if (n_fwd == 0)  begin failures++; $display("FAIL no forwarded read"); end
    checks++; if (n_rdef == 0) begin failures++; $display("FAIL no deferred read"); end
    checks++; if (n_rooo == 0) begin failures++; $display("FAIL no out-of-order read"); end
    checks++; if (n_wdef == 0) begin failures++; $display("FAIL no deferred write"); end
    checks++; if (n_wooo == 0) begin failures++; $display("FAIL no out-of-order write"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no rename stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
