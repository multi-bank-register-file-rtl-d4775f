// tb_sram_2port: fills the 32 x 32 array, then runs random simultaneous
// reads and writes against a reference array. Checks the one-cycle read
// latency, that a read of the row written in the same cycle returns the old
// word, and that rdata holds while no read is enabled.
module tb_sram_2port;
  logic clk = 0, rst_n = 0;
  logic re, we;
  logic [4:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic [31:0] ref_mem [32];
  logic [31:0] exp;
  logic exp_valid;
  int checks = 0, failures = 0;

  sram_2port dut (.*);

  always #5 clk = ~clk;

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0; exp = 0; exp_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL read: got %h exp %h", rdata, exp); end
      end
      re = 1'($urandom); we = 1'($urandom);
      raddr = 5'($urandom);
      waddr = (n % 5 == 0) ? raddr : 5'($urandom);
      wdata = $urandom;
      if (re) exp = ref_mem[raddr];     // old word even if written now
      exp_valid = 1;
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
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
