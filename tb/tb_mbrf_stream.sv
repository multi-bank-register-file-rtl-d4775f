// tb_mbrf_stream: sustained traffic through the whole subsystem at its
// default size. After loading all 128 physical registers, every read lane
// offers a request in most cycles (random registers whose number is not
// 3 mod 4, which are only read) while every write lane streams results
// into registers 3 mod 4 of its own bank. Requests are held until
// accepted, so read queues fill and in_ready back-pressure occurs (the
// write lanes, one bank each, keep up). Each response is matched by its
// tag to the request's register and checked; afterwards the written registers are read
// back and compared with the last value written. Prints the reads served
// per cycle; the bound on it is 4 distinct bank reads plus combined copies.
module tb_mbrf_stream;
  localparam int RP = 8, WP = 4, NCYC = 3000;
  logic clk = 0, rst_n = 0;
  logic ren_valid, ren_ready;
  logic [3:0] dst_valid, free_valid;
  logic [3:0][4:0] dst_arch;
  logic [3:0][1:0][4:0] src_arch;
  logic [3:0][6:0] dst_phys, old_phys, free_phys;
  logic [3:0][1:0][6:0] src_phys;
  logic [RP-1:0] rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [RP-1:0][6:0] rd_req_reg;
  logic [RP-1:0][5:0] rd_req_tag, rd_resp_tag;
  logic [RP-1:0][31:0] rd_resp_data;
  logic [WP-1:0] wr_req_valid, wr_req_ready;
  logic [WP-1:0][6:0] wr_req_reg;
  logic [WP-1:0][31:0] wr_req_data;
  logic [RP-1:0] ev_rd_issue, ev_rd_combine, ev_rd_forward, ev_rd_deferred, ev_rd_ooo;
  logic [WP-1:0] ev_wr_deferred, ev_wr_ooo;

  logic [31:0] val [128];
  logic [31:0] exp_by_tag [64];   // tag = {lane, 3-bit sequence}
  bit          out_by_tag [64];
  int checks = 0, failures = 0, n_req = 0, n_resp = 0, n_bp = 0, n_wbp = 0, n_wr = 0;
  bit streaming = 0;

  mbrf_top dut (.*);

  always #5 clk = ~clk;

  // response checker
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int p = 0; p < RP; p++)
      if (rd_resp_valid[p]) begin
        int t; t = int'(rd_resp_tag[p]);
        checks++;
        if (t / 8 != p || !out_by_tag[t] || rd_resp_data[p] !== exp_by_tag[t]) begin
          failures++; $display("FAIL lane %0d tag %0d data %h exp %h", p, t, rd_resp_data[p], exp_by_tag[t]);
        end
        out_by_tag[t] = 0;
        n_resp++;
      end
  end

  initial begin
    int seq [RP];
    int stream_cycles;
    logic [RP-1:0] rd_acc;
    logic [WP-1:0] wr_acc;
    ren_valid = 0; dst_valid = '0; dst_arch = '0; src_arch = '0; free_valid = '0; free_phys = '0;
    rd_req_valid = '0; rd_req_reg = '0; rd_req_tag = '0;
    wr_req_valid = '0; wr_req_reg = '0; wr_req_data = '0;
    for (int t = 0; t < 64; t++) begin out_by_tag[t] = 0; exp_by_tag[t] = '0; end
    for (int p = 0; p < RP; p++) seq[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load: lane l fills bank l, one row per cycle
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      for (int l = 0; l < WP; l++) begin
        int a; a = 32 * l + r;
        val[a] = $urandom;
        wr_req_valid[l] = 1; wr_req_reg[l] = 7'(a); wr_req_data[l] = val[a];
      end
      @(posedge clk);
      checks++;
      if (wr_req_ready != '1) begin failures++; $display("FAIL load back-pressure"); end
    end
    @(negedge clk); wr_req_valid = '0;
    repeat (4) @(negedge clk);

    // stream
    stream_cycles = 0;
    rd_acc = '0; wr_acc = '0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      // accepted requests leave the lanes (never changed at the sampling edge)
      rd_req_valid = rd_req_valid & ~rd_acc; wr_req_valid = wr_req_valid & ~wr_acc;
      rd_acc = '0; wr_acc = '0;
      for (int p = 0; p < RP; p++)
        if (!rd_req_valid[p] && $urandom_range(99) < 90) begin
          int t; t = 8 * p + seq[p];
          if (!out_by_tag[t]) begin
            logic [6:0] r;
            r = ($urandom_range(3) == 0) ? 7'(4 * $urandom_range(1) + $urandom_range(2))
                                         : 7'(4 * $urandom_range(31) + $urandom_range(2));
            rd_req_valid[p] = 1; rd_req_reg[p] = r; rd_req_tag[p] = 6'(t);
          end
        end
      for (int l = 0; l < WP; l++)
        if (!wr_req_valid[l] && $urandom_range(99) < 70) begin
          // lane l owns registers 32l + 4k + 3 (bank l): two writes of one
          // register are then always on one lane, where they stay in order
          wr_req_valid[l] = 1; wr_req_reg[l] = 7'(32 * l + 4 * $urandom_range(7) + 3);
          wr_req_data[l] = $urandom;
        end
      #1;
      for (int p = 0; p < RP; p++) if (rd_req_valid[p] && !rd_req_ready[p]) n_bp++;
      for (int l = 0; l < WP; l++) if (wr_req_valid[l] && !wr_req_ready[l]) n_wbp++;
      @(posedge clk);
      stream_cycles++;
      for (int p = 0; p < RP; p++)
        if (rd_req_valid[p] && rd_req_ready[p]) begin
          int t; t = int'(rd_req_tag[p]);
          exp_by_tag[t] = val[rd_req_reg[p]]; out_by_tag[t] = 1;
          seq[p] = (seq[p] + 1) % 8; n_req++;
          rd_acc[p] = 1;
        end
      for (int l = 0; l < WP; l++)
        if (wr_req_valid[l] && wr_req_ready[l]) begin
          val[wr_req_reg[l]] = wr_req_data[l]; n_wr++;
          wr_acc[l] = 1;
        end
    end
    @(negedge clk); rd_req_valid = '0; wr_req_valid = '0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_resp != n_req) begin failures++; $display("FAIL %0d requests, %0d responses", n_req, n_resp); end
    // read back the written registers (4k + 3), 8 per round
    for (int a = 3; a < 128; a += 32) begin
      @(negedge clk);
      for (int p = 0; p < RP; p++) begin
        int t, r; t = 8 * p + seq[p]; r = a + 4 * p;
        rd_req_valid[p] = 1; rd_req_reg[p] = 7'(r); rd_req_tag[p] = 6'(t);
        exp_by_tag[t] = val[r]; out_by_tag[t] = 1; seq[p] = (seq[p] + 1) % 8;
      end
      @(posedge clk); @(negedge clk); rd_req_valid = '0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (n_bp == 0) begin failures++; $display("FAIL no read back-pressure"); end
    $display("streamed %0d cycles: %0d reads (%0d.%02d per cycle), %0d writes; lanes held by a full queue: %0d read, %0d write",
             stream_cycles, n_req, n_req / stream_cycles, (n_req * 100 / stream_cycles) % 100, n_wr, n_bp, n_wbp);
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
