# Multi-bank register file with register access scheduling

A processor that issues several instructions per cycle needs a register file
with many ports: a 4-issue machine reads up to 8 operands and writes up to 4
results per clock. A file made of 12-port storage cells grows quickly in area,
delay and power as ports are added, because every port needs its own word line
and bit lines through every cell.

This design keeps the 12 ports (8 read, 4 write) and the 128 x 32-bit capacity,
but builds the storage from four banks of cheap 2-port cells (one read port and
one write port per cell). Each bank is reachable from all 12 ports through
*port converters*, so any port can reach any register. The price is the
**bank conflict**: a bank can serve only one read and one write per clock, so
two reads of different registers in the same bank cannot both happen in one
cycle. The design deals with conflicts at two levels:

1. In the register file itself, an **access conflict manager** per side lets
   one port into each bank and *blocks* the others for that cycle.
2. In front of the file, a **register access scheduler** arranges the
   accesses so that blocking is never needed: it renames registers so that
   results produced together land in different banks, queues reads and writes
   and sends them out of order around busy banks, merges reads of the same
   register into one bank access, and hands out values that are still waiting
   to be written without touching a bank at all.

The organisation, sizes and the list of scheduling methods follow a published
multi-bank register-file design (a 0.2 um CMOS test chip of the banked file was
reported at 640 MHz in simulation and 417 MHz measured, in about a quarter of
the area of a conventional 12-port file, with an average cycle-count penalty of
about 5 % on SPECint2000 when the scheduling methods are used). The published
material describes the scheduler only by what it does; its internal structure
here is this design's own, and is called out below wherever it is.

## Registers and banks

| quantity | value |
|---|---|
| registers | 128 x 32 bit (4 Kbit) |
| banks | 4 x 32 registers (1 Kbit each) |
| ports | 8 read, 4 write |
| register number | 7 bits = 2-bit bank, 5-bit row |

Register `R` lives in bank `R / 32`, row `R % 32`: bank 0 holds R0..R31,
bank 1 R32..R63, and so on. All sizes are parameters; their defaults are in
`rtl/rf_pkg.sv`.

## The banked register file (`hma_regfile`)

The file is a two-level hierarchy. It can also be used on its own, without
the scheduler, by a requester that retries blocked ports.

**Second level** (`hma_regfile`). Every port carries a port enable, a 2-bit bank
address and a 5-bit row address (plus 32 data bits on a write port). Two
`access_conflict_manager` instances, one for the 8 read ports and one for the 4
write ports, look at which bank each enabled port wants. For every bank they
raise one bit of a *Bank Select* vector for the winning port; the other ports
aiming at that bank get *Port Blocking* (`rd_blocked` / `wr_blocked`, in the
same cycle) and are simply not served: the requester must try again. The
winner is the lowest-numbered port (the arbitration rule is this design's
choice). A `read_unit` collects the words coming out of the four banks and
steers each to its port.

**First level** (`hma_bank`, one per bank). A `read_port_converter` picks the row
address of the selected read port, and one cycle later returns the read word
to that port only. A `write_port_converter` picks the address and data of the
selected write port. Between them sits `sram_2port`, 32 words with separate
read and write decoders. Read and write paths are separate all the way down
to the cells, so a bank does one read and one write every clock.

**Timing.** Requests are presented during a cycle; at the rising edge that
ends it, granted writes are performed and granted reads are captured. The word
appears on `rd_data` with `rd_valid` high in the following cycle: one cycle of
latency, one access per port per cycle. A read of a register written in the
same cycle returns the old value (this order is a choice of this design).

In silicon, the same clock cycle is split in two halves: while the clock is
low, bank decoding, conflict management and the address half of the port
conversion take place while the bit lines precharge ("hidden precharge"); while
it is high, the word line fires and data flows out. That circuit technique has
no logic function of its own; its effect, a full access per clock, is what the
RTL models.

## Avoiding conflicts: the register access scheduler

`mbrf_top` puts three blocks in front of the file. They are the part of the
design that needs most care, because the guarantees they give depend on rules
the surrounding processor has to follow.

### Bank-aware renaming (`bank_aware_rename`)

Each cycle a group of 4 instructions is renamed (each with up to one
destination and two sources, 32 architectural registers). The map table gives
the physical register of every architectural register; one free bitmap per bank
lists unused physical registers.

The destinations of one group get physical registers **in different banks**.
The k-th destination of the group first tries bank `(start + k) mod 4`, then the
following banks, skipping banks already used by the group or with no free
register, and takes the lowest free row. `start` advances by the number of
destinations each group, so allocation rotates over the banks. Because
instructions renamed together tend to finish together, their results can then
be written in one cycle without a write conflict, and later reads spread over
the banks. If a destination finds no bank, the whole group waits (`ren_ready`
low).

Sources of an instruction see the renaming done by earlier instructions of the
same group. `old_phys` reports the mapping each destination replaces; the
processor hands it back on `free_*` when the instruction commits. At reset
architectural register `i` maps to bank `i mod 4`, row `i / 4`; every other
physical register is free. The exact rule is this design's choice: the source
only states that renaming considers the bank structure.

### Write queue (`write_queue`)

Results arrive on 4 result lanes, one per write port. Each lane has a queue
(default 4 entries) in arrival order. Every cycle, lane 0 first, each lane
writes its **oldest entry whose bank no earlier lane has taken this cycle**.
A write whose bank is busy waits while younger writes to free banks go ahead.
So the file never sees two writes to one bank, and never blocks a write.

### Read queue (`read_queue`)

Operand reads arrive on 8 read lanes, one per read port, each with a 6-bit tag
naming the consumer. Each lane queues up to 4 requests. Every cycle, lane 0
first, each lane serves its oldest request that can be served now, in one of
three ways:

- **forward** - the register has a write still waiting in the write queue: the
  value is taken from there and no bank is used;
- **issue** - the register's bank is not yet used this cycle: the lane reads it
  through its own read port;
- **combine** - another lane already reads the same register this cycle: the
  lane takes a copy of that read word, no extra bank access.

A request whose bank is taken by a *different* register waits while younger
requests go ahead. The answer (`resp_valid`, `resp_tag`, `resp_data`) comes on
the same lane one cycle after the request is served; each lane answers at most
once per cycle. Answers on a lane may come back in a different order than the
requests went in; the tag tells them apart.

### Rules for the processor

The queues keep values correct only if the instruction stream is renamed, which
`bank_aware_rename` provides, and if the processor:

- queues a read only once the write of the value it needs has been queued (or
  done), e.g. by sending the read from a reservation station whose operand is
  ready; a read and the write it depends on may be queued in the same cycle;
- does not release a physical register (`free_*`) while a read of it is still
  queued, and never has two writes to one register queued at once.

### Latency through the subsystem

A read request accepted at a rising edge is answered at the earliest two edges
later (one cycle in the queue, one in the file). A result accepted at an edge
can be forwarded to reads served in the next cycle and is written into its bank
at the end of that cycle at the earliest.

## Interface of `mbrf_top`

| group | signals | connects to |
|---|---|---|
| rename | `ren_valid`, `ren_ready`, `dst_valid`, `dst_arch`, `src_arch`, `dst_phys`, `old_phys`, `src_phys` | decode |
| release | `free_valid`, `free_phys` | commit |
| reads | `rd_req_valid/reg/tag/ready`, `rd_resp_valid/tag/data` | reservation stations, execution units |
| writes | `wr_req_valid/reg/data/ready` | execution units |
| events | `ev_rd_issue/combine/forward/deferred/ooo`, `ev_wr_deferred/ooo` | performance counters |

All handshakes are valid/ready: a request moves at a rising edge where both are
high; `ready` is low only while the lane's queue is full. Reset is active-low
(`rst_n`) and asynchronous for control state; the register cells are not reset.

## What is and is not here

Built as RTL: the banked file (conflict managers, port converters, 2-port bank
arrays, read unit) and the scheduler (bank-aware renaming, read and write
queues with combining, forwarding and out-of-order service).

Not built: the processor the file was designed for (a 4-way out-of-order
machine with the MIPS R10000 instruction set: fetch and decode, reservation
stations, integer and address units, load/store unit, unified cache), and the
transistor-level parts of the chip (sense amplifiers, word-line and I/O
drivers, the precharge circuits). Their place is taken by ports of `mbrf_top`.

Own choices, beyond what the source specifies: lowest-port-wins arbitration;
old-value read during a same-cycle write; one queue per port with 4 entries;
6-bit tags; the lane order of the scheduler; the bank-allocation rule and reset
map of the renamer; valid/ready handshakes; the reset style. The queue depth
and tag width are in `rf_pkg`; the rest are local to their modules.

The published evaluation, the cycle count of SPECint2000 programs, needs the
whole processor and cannot be reproduced with this subsystem alone.

## Files

| file | contents |
|---|---|
| `rtl/rf_pkg.sv` | sizes shared by all modules |
| `rtl/access_conflict_manager.sv` | per-bank arbitration, Port Blocking, Bank Select |
| `rtl/read_port_converter.sv`, `rtl/write_port_converter.sv` | 1-to-8 / 1-to-4 port converters of a bank |
| `rtl/sram_2port.sv` | 32 x 32 array with one read and one write port |
| `rtl/hma_bank.sv` | one bank |
| `rtl/read_unit.sv` | second-level read data path |
| `rtl/hma_regfile.sv` | the 12-port, 4-bank register file |
| `rtl/bank_aware_rename.sv` | renaming with bank-aware allocation |
| `rtl/read_queue.sv`, `rtl/write_queue.sv` | register access queues |
| `rtl/mbrf_top.sv` | scheduler and file together |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_mbrf_stream.sv` | sustained-traffic test of `mbrf_top` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_mbrf_top \
    -y rtl +libext+.sv rtl/rf_pkg.sv tb/tb_mbrf_top.sv
./obj_dir/Vtb_mbrf_top
```

Replace `mbrf_top` by any other module name to run its testbench. Lint a module
with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/rf_pkg.sv rtl/<module>.sv`.

What the testbenches check:

- `tb_mbrf_top` runs at the default size. It loads all architectural
  registers, runs 300 groups of 4 random instructions whose results depend
  on the operands received, reads all registers back with 4 requests queued
  per lane, and finally renames without releases until a group must wait.
  Every operand is compared with a reference model. It also checks the
  two-clock read latency, and that issued, combined, forwarded, deferred
  and out-of-order reads, deferred and out-of-order writes, and rename
  stalls all occur.
- `tb_mbrf_stream` keeps all lanes busy for 3000 cycles at the default size.
  Reads of registers that are not being written run alongside a steady
  stream of writes. The read queues fill up and push back. Every answer is
  checked by its tag, and the written registers are read back at the end.
  With random registers it serves about 3.5 reads per cycle. The limit is
  4 bank reads per cycle, plus combined copies.
- `tb_hma_regfile` drives random traffic on all 12 ports. It checks blocking
  in the same cycle, and data and valid one cycle later, against a model.
- `tb_read_queue`, `tb_write_queue` and `tb_bank_aware_rename` compare every
  decision of the block with a cycle-level reference model.
- The remaining testbenches drive the leaf blocks with random stimulus and
  compare every output with a model. This catches a wrong select, a wrong
  priority or a wrong latency.

The design's own assertions (`--assert`) check that the conflict managers
select at most one port per bank, and that the queues never send the file an
access it would block. They also check that a read word is present when a
queued read uses it, and that one rename group never puts two destinations in
one bank.
