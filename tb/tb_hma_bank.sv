// tb_hma_bank: drives one bank with random one-hot Bank Select vectors on
// its 8 read and 4 write ports. Fills the 32 rows first, then checks every
// read against a reference array: the word comes one cycle later, on the
// selected port only, and is the value before a same-cycle write.
module tb_hma_bank;
  localparam int RP = 8, WP = 4;
  logic clk = 0, rst_n = 0;
  logic [RP-1:0]       rd_sel, rd_valid;
  logic [RP-1:0][4:0]  rd_row;
  logic [RP-1:0][31:0] rd_data;
  logic [WP-1:0]       wr_sel;
  logic [WP-1:0][4:0]  wr_row;
  logic [WP-1:0][31:0] wr_data;
  logic [31:0] ref_mem [32];
  int exp_port;
  logic [31:0] exp_word;
  int checks = 0, failures = 0;

  hma_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    rd_sel = '0; rd_row = '0; wr_sel = '0; wr_row = '0; wr_data = '0; exp_port = RP; exp_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 32; r++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(WP - 1);
      wr_sel = WP'(1) << k;
      for (int p = 0; p < WP; p++) begin wr_row[p] = 5'($urandom); wr_data[p] = $urandom; end
      wr_row[k] = 5'(r);
      ref_mem[r] = wr_data[k];
    end
    for (int n = 0; n < 2000; n++) begin
      int kr, kw;
      @(negedge clk);
      for (int p = 0; p < RP; p++) begin
        checks++;
        if (rd_valid[p] !== (p == exp_port) || (p == exp_port && rd_data[p] !== exp_word) ||
            (p != exp_port && rd_data[p] !== '0)) begin
          failures++; $display("FAIL port %0d (exp port %0d): v=%b d=%h exp %h", p, exp_port, rd_valid[p], rd_data[p], exp_word);
        end
      end
      kr = $urandom_range(RP);  kw = $urandom_range(WP);
      rd_sel = (kr == RP) ? '0 : RP'(1) << kr;
      wr_sel = (kw == WP) ? '0 : WP'(1) << kw;
      for (int p = 0; p < RP; p++) rd_row[p] = 5'($urandom);
      for (int p = 0; p < WP; p++) begin wr_row[p] = 5'($urandom); wr_data[p] = $urandom; end
      if (kr != RP && kw != WP && n % 4 == 0) wr_row[kw] = rd_row[kr];
      exp_port = kr;
      if (kr != RP) exp_word = ref_mem[rd_row[kr]];
      @(posedge clk);
      if (kw != WP) ref_mem[wr_row[kw]] = wr_data[kw];
    end
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
