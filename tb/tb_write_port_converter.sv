// tb_write_port_converter: random one-hot or empty selects with random
// addresses and data; the bank-side write enable, address and data must be
// those of the selected port.
module tb_write_port_converter;
  localparam int NP = 4;
  logic [NP-1:0] sel;
  logic [NP-1:0][4:0]  port_addr;
  logic [NP-1:0][31:0] port_data;
  logic bank_we;
  logic [4:0] bank_addr;
  logic [31:0] bank_data;
  int checks = 0, failures = 0;

  write_port_converter dut (.*);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int k;
      k = $urandom_range(NP);            // NP means no port selected
      sel = (k == NP) ? '0 : NP'(1) << k;
      for (int p = 0; p < NP; p++) begin port_addr[p] = 5'($urandom); port_data[p] = $urandom; end
      #1;
      checks++;
      if (k == NP) begin
        if (bank_we !== 1'b0) begin failures++; $display("FAIL we with no select"); end
      end else if (bank_we !== 1'b1 || bank_addr !== port_addr[k] || bank_data !== port_data[k]) begin
        failures++;
        $display("FAIL port %0d: we=%b addr=%h/%h data=%h/%h", k, bank_we, bank_addr, port_addr[k],
                 bank_data, port_data[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
