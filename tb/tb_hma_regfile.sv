// tb_hma_regfile: fills all 128 registers through the 4 write ports, then
// drives random reads and writes on all 12 ports. A reference model of the
// file and of the lowest-port-wins bank arbitration predicts, every cycle,
// which ports are blocked, and, one cycle later, which read ports return a
// word and what word (the value before that cycle's writes). Counts bank
// conflicts on both sides and checks that some occurred.
module tb_hma_regfile;
  localparam int NB = 4, RPB = 32, RP = 8, WP = 4;
  logic clk = 0, rst_n = 0;
  logic [RP-1:0]       rd_en, rd_blocked, rd_valid;
  logic [RP-1:0][1:0]  rd_bank;
  logic [RP-1:0][4:0]  rd_row;
  logic [RP-1:0][31:0] rd_data;
  logic [WP-1:0]       wr_en, wr_blocked;
  logic [WP-1:0][1:0]  wr_bank;
  logic [WP-1:0][4:0]  wr_row;
  logic [WP-1:0][31:0] wr_data;
  logic [31:0] ref_mem [NB*RPB];
  logic [RP-1:0]       exp_valid;
  logic [RP-1:0][31:0] exp_data;
  int checks = 0, failures = 0, rd_conflicts = 0, wr_conflicts = 0;

  hma_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    rd_en = '0; rd_bank = '0; rd_row = '0; wr_en = '0; wr_bank = '0; wr_row = '0; wr_data = '0;
    exp_valid = '0; exp_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill: port p writes bank p, one row per cycle, no conflicts
    for (int r = 0; r < RPB; r++) begin
      @(negedge clk);
      wr_en = '1;
      for (int p = 0; p < WP; p++) begin
        wr_bank[p] = 2'(p); wr_row[p] = 5'(r); wr_data[p] = $urandom;
        ref_mem[p*RPB + r] = wr_data[p];
      end
      #1;
      checks++;
      if (wr_blocked !== '0) begin failures++; $display("FAIL fill blocked %b", wr_blocked); end
    end
    @(negedge clk); wr_en = '0;
    for (int n = 0; n < 3000; n++) begin
      logic [RP-1:0] eb_r; logic [WP-1:0] eb_w; logic [NB-1:0] taken;
      @(negedge clk);
      // results of the previous cycle's reads
      checks++;
      if (rd_valid !== exp_valid) begin
        failures++; $display("FAIL rd_valid %b exp %b", rd_valid, exp_valid);
      end
      for (int p = 0; p < RP; p++)
        if (exp_valid[p]) begin
          checks++;
          if (rd_data[p] !== exp_data[p]) begin
            failures++; $display("FAIL port %0d data %h exp %h", p, rd_data[p], exp_data[p]);
          end
        end
      // new requests
      for (int p = 0; p < RP; p++) begin
        rd_en[p] = ($urandom_range(99) < 50); rd_bank[p] = 2'($urandom); rd_row[p] = 5'($urandom);
      end
      for (int p = 0; p < WP; p++) begin
        wr_en[p] = ($urandom_range(99) < 40); wr_bank[p] = 2'($urandom); wr_row[p] = 5'($urandom);
        wr_data[p] = $urandom;
      end
      // reference arbitration
      eb_r = '0; taken = '0; exp_valid = '0;
      for (int p = 0; p < RP; p++)
        if (rd_en[p]) begin
          if (taken[rd_bank[p]]) eb_r[p] = 1;
          else begin
            taken[rd_bank[p]] = 1; exp_valid[p] = 1;
            exp_data[p] = ref_mem[rd_bank[p]*RPB + rd_row[p]];
          end
        end
      eb_w = '0; taken = '0;
      for (int p = 0; p < WP; p++)
        if (wr_en[p]) begin
          if (taken[wr_bank[p]]) eb_w[p] = 1; else taken[wr_bank[p]] = 1;
        end
      rd_conflicts += $countones(eb_r);
      wr_conflicts += $countones(eb_w);
      #1;
      checks++;
      if (rd_blocked !== eb_r || wr_blocked !== eb_w) begin
        failures++; $display("FAIL blocked rd %b/%b wr %b/%b", rd_blocked, eb_r, wr_blocked, eb_w);
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++)
        if (wr_en[p] && !eb_w[p]) ref_mem[wr_bank[p]*RPB + wr_row[p]] = wr_data[p];
    end
    checks++;
    if (rd_conflicts == 0 || wr_conflicts == 0) begin
      failures++; $display("FAIL no conflicts exercised");
    end
    $display("read conflicts %0d, write conflicts %0d", rd_conflicts, wr_conflicts);
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
