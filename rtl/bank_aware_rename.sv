// bank_aware_rename: register renaming that takes the bank structure of the
// multi-bank register file into account.
//
// The processor renames a group of GROUP instructions per cycle (4, its
// fetch width). Each instruction may write one architectural register and
// read up to two. A map table gives the physical register (7-bit number:
// bank, row) that holds each architectural register; a free bitmap per bank
// lists the physical registers not in use.
//
// Bank rule: the destinations renamed in one cycle get physical registers
// in different banks, and the bank the first of them tries rotates from
// group to group. Instructions renamed together tend to finish together,
// so their results can then be written in the same cycle without a bank
// conflict, and later reads are spread over the banks. The k-th
// destination of a group tries bank (start + k) mod NUM_BANKS first and
// then the following banks, skipping banks already used by the group or
// without a free register; it takes the lowest free row of that bank. If a
// destination finds no bank, the whole group waits (ren_ready low). A group
// may therefore hold at most NUM_BANKS destinations.
//
// Sources see the renaming of earlier instructions of the same group.
// old_phys gives the mapping each destination replaces; the processor
// returns it on free_* when the instruction commits. At reset architectural
// register i maps to bank i mod NUM_BANKS, row i / NUM_BANKS, and every
// other physical register is free.
//
// Timing: combinational lookup; the map table and free lists change at the
// rising edge when ren_valid && ren_ready. The source design states only
// that renaming considers the bank structure; the allocation rule above,
// the reset mapping and the interface are this design's own choices.
module bank_aware_rename #(
  parameter int unsigned GROUP         = 4,
  parameter int unsigned ARCH_REGS     = rf_pkg::ARCH_REGS,
  parameter int unsigned NUM_BANKS     = rf_pkg::NUM_BANKS,
  parameter int unsigned REGS_PER_BANK = rf_pkg::REGS_PER_BANK,
  localparam int unsigned ARCH_W = (ARCH_REGS > 1) ? $clog2(ARCH_REGS) : 1,
  localparam int unsigned BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned ROW_W  = (REGS_PER_BANK > 1) ? $clog2(REGS_PER_BANK) : 1,
  localparam int unsigned REG_W  = BANK_W + ROW_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // rename group
  input  logic                              ren_valid,
  output logic                              ren_ready,
  input  logic [GROUP-1:0]                  dst_valid,
  input  logic [GROUP-1:0][ARCH_W-1:0]      dst_arch,
  input  logic [GROUP-1:0][1:0][ARCH_W-1:0] src_arch,
  output logic [GROUP-1:0][REG_W-1:0]       dst_phys,
  output logic [GROUP-1:0][REG_W-1:0]       old_phys,
  output logic [GROUP-1:0][1:0][REG_W-1:0]  src_phys,
  // release of physical registers at commit
  input  logic [GROUP-1:0]                  free_valid,
  input  logic [GROUP-1:0][REG_W-1:0]       free_phys
);
  logic [ARCH_REGS-1:0][REG_W-1:0]         map_q;
  logic [NUM_BANKS-1:0][REGS_PER_BANK-1:0] free_q, free_n;
  logic [BANK_W-1:0]                       start_q;
  logic [BANK_W:0]                         ndst;
  logic                                    all_found;

  // Bank choice and allocation for the group.
  always_comb begin
    logic [NUM_BANKS-1:0] used;
    logic                 got;
    logic [BANK_W-1:0]    bank, try_bank;
    logic [ROW_W-1:0]     row;
    logic [BANK_W:0]      k;
    used      = '0;
    k         = '0;
    all_found = 1'b1;
    dst_phys  = '0;
    bank      = '0;
    try_bank  = '0;
    row       = '0;
    got       = 1'b0;
    for (int unsigned g = 0; g < GROUP; g++) begin
      if (dst_valid[g]) begin
        got = 1'b0;
        for (int unsigned t = 0; t < NUM_BANKS; t++) begin
          try_bank = BANK_W'((32'(start_q) + 32'(k) + t) % NUM_BANKS);
          if (!got && !used[try_bank] && free_q[try_bank] != '0) begin
            got  = 1'b1;
            bank = try_bank;
          end
        end
        row = '0;
        for (int r = REGS_PER_BANK - 1; r >= 0; r--)
          if (free_q[bank][r]) row = ROW_W'(r);
        if (got) used[bank] = 1'b1;
        else     all_found  = 1'b0;
        dst_phys[g] = {bank, row};
        k = k + 1'b1;
      end
    end
    ndst      = k;
    ren_ready = all_found;
  end

  // Map lookups, seeing earlier destinations of the same group.
  always_comb begin
    for (int unsigned g = 0; g < GROUP; g++) begin
      old_phys[g] = map_q[dst_arch[g]];
      for (int unsigned s = 0; s < 2; s++)
        src_phys[g][s] = map_q[src_arch[g][s]];
      for (int unsigned j = 0; j < g; j++) begin
        if (dst_valid[j] && dst_arch[j] == dst_arch[g]) old_phys[g] = dst_phys[j];
        for (int unsigned s = 0; s < 2; s++)
          if (dst_valid[j] && dst_arch[j] == src_arch[g][s]) src_phys[g][s] = dst_phys[j];
      end
    end
  end

  always_comb begin
    free_n = free_q;
    for (int unsigned g = 0; g < GROUP; g++)
      if (free_valid[g])
        free_n[free_phys[g][REG_W-1 -: BANK_W]][free_phys[g][ROW_W-1:0]] = 1'b1;
    if (ren_valid && ren_ready)
      for (int unsigned g = 0; g < GROUP; g++)
        if (dst_valid[g])
          free_n[dst_phys[g][REG_W-1 -: BANK_W]][dst_phys[g][ROW_W-1:0]] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < ARCH_REGS; a++)
        map_q[a] <= {BANK_W'(a % NUM_BANKS), ROW_W'(a / NUM_BANKS)};
      free_q <= '1;
      for (int unsigned a = 0; a < ARCH_REGS; a++)
        free_q[a % NUM_BANKS][a / NUM_BANKS] <= 1'b0;
      start_q <= '0;
    end else begin
      free_q <= free_n;
      if (ren_valid && ren_ready) begin
        for (int unsigned g = 0; g < GROUP; g++)
          if (dst_valid[g]) map_q[dst_arch[g]] <= dst_phys[g];
        start_q <= start_q + BANK_W'(ndst);
      end
    end
  end

  // Physical registers of one group lie in different banks.
  for (genvar i = 0; i < GROUP; i++) begin : g_chk
    for (genvar j = i + 1; j < GROUP; j++) begin : g_pair
      assert property (@(posedge clk) disable iff (!rst_n)
        (ren_valid && ren_ready && dst_valid[i] && dst_valid[j]) |->
          dst_phys[i][REG_W-1 -: BANK_W] != dst_phys[j][REG_W-1 -: BANK_W]);
    end
  end
endmodule
