// access_conflict_manager: bank selector and access conflict manager of one
// side (read or write) of the multi-bank register file.
//
// Each bank is built from 2-port cells, so it can serve one read and one
// write per clock. Every port that is enabled (port_en) names the bank it
// wants (port_bank). For every bank this block picks one of the ports that
// want it and raises that port's bit in the bank's Bank Select vector
// (bank_sel); every other port that wants the same bank gets Port Blocking
// (blocked) and is not served in this cycle. The pick is a fixed priority:
// the lowest-numbered port wins. The priority order is this design's own
// choice; the source material shows the block and its PB/BS outputs but not
// its arbitration rule.
//
// Purely combinational: in the chip it works in the clock-low phase, next
// to the bank decoders, while the bit lines are precharged. The read side
// uses NUM_PORTS = 8, the write side NUM_PORTS = 4.
module access_conflict_manager #(
  parameter int unsigned NUM_PORTS = rf_pkg::RD_PORTS,
  parameter int unsigned NUM_BANKS = rf_pkg::NUM_BANKS,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic [NUM_PORTS-1:0]              port_en,
  input  logic [NUM_PORTS-1:0][BANK_W-1:0]  port_bank,
  output logic [NUM_PORTS-1:0]              granted,   // port is served this cycle
  output logic [NUM_PORTS-1:0]              blocked,   // Port Blocking (PB)
  output logic [NUM_BANKS-1:0][NUM_PORTS-1:0] bank_sel, // Bank Select (BS), one-hot or zero
  output logic [NUM_BANKS-1:0]              bank_busy  // bank has a selected port
);
  always_comb begin
    bank_sel  = '0;
    bank_busy = '0;
    granted   = '0;
    blocked   = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      if (port_en[p]) begin
        if (bank_busy[port_bank[p]]) begin
          blocked[p] = 1'b1;
        end else begin
          bank_busy[port_bank[p]]   = 1'b1;
          bank_sel[port_bank[p]][p] = 1'b1;
          granted[p]                = 1'b1;
        end
      end
    end
  end

  // At most one port per bank, and every enabled port is either served or blocked.
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_chk
    always_comb assert ($onehot0(bank_sel[b]));
  end
  always_comb assert ((granted | blocked) == port_en && (granted & blocked) == '0);
endmodule
