// tb_read_unit: each read port is given its word by at most one random
// bank (others drive zero); the unit must hand each port that word and
// valid bit.
module tb_read_unit;
  localparam int NB = 4, NP = 8;
  logic [NB-1:0][NP-1:0]       bank_valid;
  logic [NB-1:0][NP-1:0][31:0] bank_data;
  logic [NP-1:0]               port_valid;
  logic [NP-1:0][31:0]         port_data;
  int checks = 0, failures = 0;

  read_unit dut (.*);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int src [NP];
      logic [31:0] w [NP];
      bank_valid = '0; bank_data = '0;
      for (int p = 0; p < NP; p++) begin
        src[p] = $urandom_range(NB);     // NB means not served
        w[p] = $urandom;
        if (src[p] != NB) begin bank_valid[src[p]][p] = 1; bank_data[src[p]][p] = w[p]; end
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (port_valid[p] !== (src[p] != NB) || port_data[p] !== ((src[p] != NB) ? w[p] : 32'h0)) begin
          failures++; $display("FAIL port %0d bank %0d: v=%b d=%h exp %h", p, src[p], port_valid[p], port_data[p], w[p]);
        end
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
