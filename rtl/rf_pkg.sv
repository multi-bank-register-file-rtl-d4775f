// rf_pkg: sizes shared by the modules of the multi-bank register file.
//
// The register file holds 128 registers of 32 bits in 4 banks of 32 words,
// reached through 8 read and 4 write ports. A register number is 7 bits:
// the upper 2 bits are the bank, the lower 5 bits the row inside the bank,
// so bank 0 holds R0..R31, bank 1 R32..R63, bank 2 R64..R95 and bank 3
// R96..R127. All these numbers are those of the published test chip; the
// queue depth and the tag width are this design's own choices.
package rf_pkg;
  localparam int unsigned NUM_BANKS     = 4;
  localparam int unsigned REGS_PER_BANK = 32;
  localparam int unsigned DATA_W        = 32;
  localparam int unsigned RD_PORTS      = 8;
  localparam int unsigned WR_PORTS      = 4;
  localparam int unsigned BANK_W        = $clog2(NUM_BANKS);      // 2-bit bank address
  localparam int unsigned ROW_W         = $clog2(REGS_PER_BANK);  // 5-bit address
  // register number = {bank, row}: BANK_W + ROW_W = 7 bits
  // Register access queue (own choice: not sized in the source material).
  localparam int unsigned QUEUE_DEPTH   = 4;
  localparam int unsigned TAG_W         = 6;
  // Architectural registers of the MIPS instruction set renamed onto the file.
  localparam int unsigned ARCH_REGS     = 32;
endpackage
