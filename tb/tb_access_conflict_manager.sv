// tb_access_conflict_manager: random port enables and bank addresses on the
// 8-port read-side configuration; every cycle the grant, Port Blocking and
// Bank Select outputs are compared with a reference that serves, per bank,
// the lowest-numbered enabled port. Also a directed case with three ports
// on one bank and one alone.
module tb_access_conflict_manager;
  localparam int NP = 8, NB = 4;
  logic [NP-1:0]         port_en;
  logic [NP-1:0][1:0]    port_bank;
  logic [NP-1:0]         granted, blocked;
  logic [NB-1:0][NP-1:0] bank_sel;
  logic [NB-1:0]         bank_busy;
  int checks = 0, failures = 0;

  access_conflict_manager dut (.*);

  task automatic check_one();
    logic [NP-1:0] eg, eb;
    logic [NB-1:0][NP-1:0] es;
    logic [NB-1:0] taken;
    eg = '0; eb = '0; es = '0; taken = '0;
    for (int p = 0; p < NP; p++)
      if (port_en[p]) begin
        if (taken[port_bank[p]]) eb[p] = 1;
        else begin taken[port_bank[p]] = 1; eg[p] = 1; es[port_bank[p]][p] = 1; end
      end
    checks++;
    if (granted !== eg || blocked !== eb || bank_sel !== es || bank_busy !== taken) begin
      failures++;
      $display("FAIL en=%b bank=%h: granted=%b/%b blocked=%b/%b sel=%h/%h",
               port_en, port_bank, granted, eg, blocked, eb, bank_sel, es);
    end
  endtask

  initial begin
    // ports 1, 3 and 6 want bank 2, port 4 wants bank 0
    port_en = 8'b0101_1010;
    port_bank = '0;
    port_bank[1] = 2; port_bank[3] = 2; port_bank[6] = 2; port_bank[4] = 0;
    #1;
    checks++;
    if (granted !== 8'b0001_0010 || blocked !== 8'b0100_1000) begin
      failures++; $display("FAIL directed: granted=%b blocked=%b", granted, blocked);
    end
    check_one();
    for (int n = 0; n < 2000; n++) begin
      port_en = 8'($urandom);
      for (int p = 0; p < NP; p++) port_bank[p] = 2'($urandom);
      #1 check_one();
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
