// tb_bank_aware_rename: random rename groups of 4 instructions, with the
// replaced physical registers released a few at a time (and, in some
// phases, not at all, so that banks run out). A reference model of the map
// table, the per-bank free lists and the rotating start bank predicts
// ren_ready, every destination's physical register (bank (start + k) mod 4
// first, then the next banks with a free register, lowest free row), the
// replaced mappings and the source mappings, including sources written by
// an earlier instruction of the same group. Counts stalls and groups whose
// destinations all went to their first-choice bank.
module tb_bank_aware_rename;
  localparam int G = 4, NB = 4, RPB = 32, AR = 32;
  logic clk = 0, rst_n = 0;
  logic ren_valid, ren_ready;
  logic [G-1:0] dst_valid, free_valid;
  logic [G-1:0][4:0] dst_arch;
  logic [G-1:0][1:0][4:0] src_arch;
  logic [G-1:0][6:0] dst_phys, old_phys, free_phys;
  logic [G-1:0][1:0][6:0] src_phys;
  logic [6:0] map [AR];
  logic [NB-1:0][RPB-1:0] freel;
  logic [1:0] start;
  logic [6:0] pool [$];
  int checks = 0, failures = 0, n_stall = 0, n_ren = 0, n_fallback = 0;

  bank_aware_rename dut (.*);

  always #5 clk = ~clk;

  task automatic cycle(input bit allow_free);
    logic [G-1:0][6:0] ep, eo; logic [G-1:0][1:0][6:0] es;
    logic [NB-1:0] used; int nd, nfb; bit ok;
    logic [6:0] tmap [AR];
    @(negedge clk);
    ren_valid = ($urandom_range(9) != 0);
    for (int g = 0; g < G; g++) begin
      dst_valid[g] = ($urandom_range(3) != 0);
      dst_arch[g] = 5'($urandom);
      src_arch[g][0] = 5'($urandom); src_arch[g][1] = 5'($urandom);
    end
    free_valid = '0;
    for (int g = 0; g < G; g++)
      if (allow_free && pool.size() > 0 && $urandom_range(1)) begin
        free_valid[g] = 1; free_phys[g] = pool.pop_front();
      end
    #1;
    // reference allocation
    used = '0; nd = 0; ok = 1; ep = '0; nfb = 0;
    for (int g = 0; g < G; g++)
      if (dst_valid[g]) begin
        int got; got = -1;
        for (int t = 0; t < NB; t++) begin
          int b; b = (int'(start) + nd + t) % NB;
          if (got < 0 && !used[b] && freel[b] != '0) got = b;
        end
        if (got < 0) ok = 0;
        else begin
          int row; row = -1;
          for (int r = RPB - 1; r >= 0; r--) if (freel[got][r]) row = r;
          used[got] = 1; ep[g] = {2'(got), 5'(row)};
          if (got != (int'(start) + nd) % NB) nfb++;
        end
        nd++;
      end
    for (int a = 0; a < AR; a++) tmap[a] = map[a];
    for (int g = 0; g < G; g++) begin
      es[g][0] = tmap[src_arch[g][0]]; es[g][1] = tmap[src_arch[g][1]];
      eo[g] = tmap[dst_arch[g]];
      if (dst_valid[g]) tmap[dst_arch[g]] = ep[g];
    end
    checks++;
    if (ren_ready !== ok) begin failures++; $display("FAIL ready %b exp %b", ren_ready, ok); end
    if (ok) begin
      for (int g = 0; g < G; g++) begin
        checks++;
        if ((dst_valid[g] && (dst_phys[g] !== ep[g] || old_phys[g] !== eo[g])) ||
            src_phys[g] !== es[g]) begin
          failures++; $display("FAIL slot %0d: dst %0d/%0d old %0d/%0d src %0d,%0d/%0d,%0d", g, dst_phys[g], ep[g],
                               old_phys[g], eo[g], src_phys[g][0], src_phys[g][1], es[g][0], es[g][1]);
        end
      end
    end
    @(posedge clk);
    for (int g = 0; g < G; g++) if (free_valid[g]) freel[free_phys[g][6:5]][free_phys[g][4:0]] = 1;
    if (ren_valid && ok) begin
      n_ren++;
      if (nfb > 0) n_fallback++;
      for (int g = 0; g < G; g++)
        if (dst_valid[g]) begin
          freel[ep[g][6:5]][ep[g][4:0]] = 0;
          pool.push_back(eo[g]);
        end
      for (int a = 0; a < AR; a++) map[a] = tmap[a];
      start = start + 2'(nd);
    end
    if (ren_valid && !ok) n_stall++;
  endtask

  initial begin
    ren_valid = 0; dst_valid = '0; dst_arch = '0; src_arch = '0; free_valid = '0; free_phys = '0;
    freel = '1; start = 0;
    for (int a = 0; a < AR; a++) begin
      map[a] = {2'(a % NB), 5'(a / NB)};
      freel[a % NB][a / NB] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) cycle((n / 400) % 2 == 0);
    checks++;
    if (n_stall == 0 || n_ren < 1000 || n_fallback == 0) begin
      failures++; $display("FAIL coverage: renamed %0d stalls %0d fallback %0d", n_ren, n_stall, n_fallback);
    end
    $display("groups renamed %0d, stalled %0d, with a fallback bank %0d", n_ren, n_stall, n_fallback);
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
