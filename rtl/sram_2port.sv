// sram_2port: the cell array of one bank, 32 words of 32 bits built from
// 2-port cells that have one read and one write port.
//
// The read and write paths are fully separate, as in the source design:
// each has its own row decoder (here the array index) and its own word
// lines. One read and one write can take place in the same clock.
//
// Timing: the row address and enable are set up during the clock-low
// phase (while the bit lines are precharged); the word line fires at the
// rising edge and the read word is available right after that edge, in
// rdata, until the next read. A write is done at the rising edge. A read of
// the row being written in the same cycle returns the old word (the read
// bit line is evaluated from the cell before the write settles): this
// ordering is this design's own choice. The array has no reset, like an
// SRAM; rdata resets to zero.
module sram_2port #(
  parameter int unsigned DEPTH  = rf_pkg::REGS_PER_BANK,
  parameter int unsigned DATA_W = rf_pkg::DATA_W,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end
endmodule
