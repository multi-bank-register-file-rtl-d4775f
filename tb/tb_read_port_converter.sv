// tb_read_port_converter: random one-hot or empty selects; the bank read
// enable and row address must follow the selected port in the same cycle,
// and the bank's word must come back, one clock later, on that port only.
module tb_read_port_converter;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] sel;
  logic [NP-1:0][4:0] port_addr;
  logic bank_re;
  logic [4:0] bank_addr;
  logic [31:0] bank_data;
  logic [NP-1:0] port_valid;
  logic [NP-1:0][31:0] port_data;
  int checks = 0, failures = 0;
  int prev_k;

  read_port_converter dut (.*);

  always #5 clk = ~clk;

  initial begin
    sel = '0; port_addr = '0; bank_data = '0; prev_k = NP;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int k;
      @(negedge clk);
      // new address-half request, and the bank's word for the previous one
      k = $urandom_range(NP);
      sel = (k == NP) ? '0 : NP'(1) << k;
      for (int p = 0; p < NP; p++) port_addr[p] = 5'($urandom);
      bank_data = $urandom;
      #1;
      checks++;
      if (bank_re !== (k != NP) || (k != NP && bank_addr !== port_addr[k])) begin
        failures++; $display("FAIL addr port %0d: re=%b addr=%h", k, bank_re, bank_addr);
      end
      // data half: the port selected in the previous cycle gets the word
      checks++;
      if (prev_k == NP) begin
        if (port_valid !== '0 || port_data !== '0) begin failures++; $display("FAIL data with no select"); end
      end else begin
        for (int p = 0; p < NP; p++) begin
          logic [31:0] exp;
          exp = (p == prev_k) ? bank_data : '0;
          if (port_valid[p] !== (p == prev_k) || port_data[p] !== exp) begin
            failures++;
            $display("FAIL data port %0d (selected %0d): v=%b d=%h", p, prev_k, port_valid[p], port_data[p]);
          end
        end
      end
      prev_k = k;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
