# SoCDMMU + crossbar: memory and bus subsystem for a multiprocessor SoC

A multiprocessor system-on-chip with a large global on-chip memory has two problems.
It must share that memory among the processors at run time, quickly and with a bounded
delay. It must also let several processors use different memory banks at the same time
instead of queuing on one bus. This RTL solves both with two hardware units, placed
between the processing elements (PEs) and the memory banks:

* **SoCDMMU** (SoC Dynamic Memory Management Unit). The global memory is cut into
  equal pieces called *G_blocks*. On request, a PE receives a *page* of one or more
  G_blocks, which it later gives back. Every global-memory access of a PE uses a
  *virtual* address, and the unit converts it to the physical address of the G_block
  behind it. Allocation and release take a fixed, data-independent number of clock
  cycles.
* **MxN crossbar (Xbar)**. It is built from N identical *Mx1 switches*, one per memory
  bank. Each switch decides which of the M PEs may use its bank. Up to min(M, N)
  transfers run concurrently, one per bank.

```
   PE0      PE1      PE2      PE3         (PE wrappers -> generic bus: pe_* ports)
    |        |        |        |
 +--v--------v--------v--------v--+
 |            SoCDMMU              |  command register per PE, scheduler, allocation
 |  addr conv  addr conv  ...      |  unit, allocation table, one address converter/PE
 +--+--------+--------+--------+--+
    |  prev_* (physical requests of all PEs, broadcast to every switch)
 +--v--------v--------v--------v--+
 | Mx1 sw 0 | Mx1 sw 1 | Mx1 sw 2 | Mx1 sw 3 |   xbar
 +----+-----+----+-----+----+-----+----+-----+
      |          |          |          |       mem_* ports
    bank 0     bank 1     bank 2     bank 3    (2, 2, 4, 8 MB in the default build)
```

The top module is `dxgt_soc` (SoCDMMU + crossbar). The memory banks, their controllers,
the processors and the processors' bus wrappers are not part of the RTL. Their buses are
the top's ports. The testbenches use a behavioural memory model, `tb/sram_model.sv`.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `M` (`P` inside the SoCDMMU) | 4 | PEs |
| `N` | 4 | memory banks (crossbar outputs) |
| `MEM_AW` | 21, 21, 22, 23 | address bits of banks 0..3 (2, 2, 4, 8 MB) |
| `MEM_BASE` | 0, 2 MB, 4 MB, 8 MB | physical base of banks 0..3 |
| `G` | 256 | G_blocks in the 16 MB global memory |
| `BLK_AW` | 16 | log2 of the G_block size (64 KB) |
| `ADDR_W` / `DATA_W` | 32 / 64 | PE address width and width of every data bus |
| `PE_DW` | 64, 64, 32, 32 | data width of PEs 0..3 (two 64-bit and two 32-bit processors) |
| `SCH` | `SCH_FCFS` | command scheduling: first come first served, or `SCH_PRIORITY` |
| `CMD_ADDR` | `32'hF000_0000` | address of the SoCDMMU command/status register |
| `INIT_BLOCKS` | all 0 | G_blocks each PE owns from reset (see below) |
| `USE_SOCDMMU` | 1 | 0 builds the subsystem without the SoCDMMU (see below) |

Each memory bank must start at a multiple of its own size. The default layout meets
this: banks of 2, 2, 4 and 8 MB in ascending order.

## The crossbar

### One Mx1 switch

Every switch receives the requests of all M PEs (`prev_req`, `prev_addr`, `prev_wdata`,
`prev_re`, `prev_we`, `prev_be`). It contains:

* **comparator** (`addr_comp`). It raises `mem_req[i]` when PE i is requesting and its
  physical address falls inside this bank. Only the address bits above the bank's size
  are compared, which is why banks must be size-aligned.
* **arbiter** (`rr_arbiter`). This round-robin arbiter raises exactly one `mem_on[i]`.
* **switches**, all steered by `mem_on`:
  * the address bus switch (it passes the low `MEM_AW` bits, the offset inside the
    bank);
  * the data bus switch (write data to the bank, read data back to the granted PE
    only);
  * the wire switches for the read strobe, the write strobe and the byte selects;
  * the `wire_ta` switch, which returns the bank's transfer acknowledge to the granted
    PE.

All of this is combinational except the arbiter's small state.

### Handshake and timing

A requester raises its request together with its address, strobe, byte selects and
write data. It holds all of them until it sees its transfer acknowledge (`ta`). The
transfer ends in the cycle in which the bank's `mem_ta` is high. In the next cycle the
requester may drop its request or present a new one.

The grant is combinational. A request therefore reaches the bank in the cycle it is
raised. With the one-cycle memory model, a transfer takes 2 cycles (request, acknowledge):

```
 cycle        0          1          2
 pe_req   ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
 mem_on   ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____   (combinational from the request)
 mem_re   ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
 mem_ta   ______________/‾‾‾‾‾‾‾‾‾‾\____   read data valid here
```

**Round robin.** Once a PE is granted, the grant is *locked* until `mem_ta`, so a
higher-priority newcomer cannot take the bus mid-transfer. When the transfer ends, the
search pointer moves to the PE after the one just served. After reset the search starts
at PE 0. A waiting PE is therefore served before M further transfers end on that bank.

Example: PE 0 and PE 3 both address bank 0, PE 1 addresses bank 2 and PE 2 addresses
bank 1. In the first cycle, bank 0 grants PE 0, bank 1 grants PE 2 and bank 2 grants
PE 1, giving three concurrent transfers. PE 3 gets bank 0 right after PE 0. `tb_xbar`
checks exactly this sequence.

### MxN assembly

`xbar` instantiates N `mx1_switch`es in a generate loop, giving bank n the width
`MEM_AW[n]` and the base `MEM_BASE[n]`. A PE's address selects one bank, so at most one
switch answers a PE. The per-switch acknowledges and read data are simply ORed. Banks
are numbered in the order they are attached, and bank 0 starts at physical address 0.

**Mixed data widths.** Every data bus is `DATA_W` (64) bits wide, but each PE has its
own width `PE_DW[i]`. A narrower PE sits on the low byte lanes. In front of the switches
the crossbar clears a narrow PE's write data and byte selects above its width, and it
clears the read data it returns above that width. So a 32-bit PE reads and writes the
low half of a 64-bit memory word, and never changes the upper half. A 64-bit PE sees the
whole word, including what a 32-bit PE wrote into the low half. `tb_xbar` checks this
directly, and `tb_dxgt_soc` checks it against the memory model.

## The SoCDMMU

### Memory model seen by a PE

Each PE has a private *virtual window* at address 0, as large as the whole global
memory (`G · 2**BLK_AW` bytes, 16 MB by default):

* virtual address bits [23:16] give the virtual G_block (in general the log2 `G` bits
  above bit `BLK_AW`);
* bits [15:0] give the offset inside it (in general bits [`BLK_AW`-1:0]).

The PE's **address converter** holds one entry per virtual G_block: a valid bit and the
physical G_block number. A mapped access leaves the SoCDMMU with the physical address
`{physical G_block, offset}` and goes on to the crossbar in the same cycle (no added
latency). The unit answers two kinds of access itself, one cycle later, with `pe_err`
set and no memory access:

* an access to an unmapped virtual G_block;
* an access outside the window (other than the command register).

Pages need not be physically contiguous. Consecutive virtual G_blocks may map to any
physical G_blocks, which avoids external fragmentation at G_block granularity.

### Command register

Each PE sees one register at `CMD_ADDR`. Writing it issues a command, and reading it
returns that PE's status. The layouts are in `rtl/dxgt_pkg.sv`:

```
command  [31:28] opcode  1 = ALLOC, 2 = FREE
         [27:16] count   G_blocks in the page
         [11:0]  vblock  first virtual G_block of the page
status   [31] busy   [30] done   [29] error   [11:0] free G_blocks (low 12 bits)
```

`dxgt_pkg::make_cmd(op, count, vblock)` builds a command word.

* **ALLOC** maps virtual G_blocks `vblock .. vblock+count-1` of the calling PE. Each one
  takes the lowest-numbered free physical G_block.
* **FREE** returns the G_blocks behind those virtual G_blocks. Unmapped ones are
  skipped.

An ALLOC is refused (error bit set, nothing changed) in any of these cases:

* the count is 0;
* the page runs past the window;
* fewer than `count` G_blocks are free;
* any target virtual G_block is already mapped.

An unknown opcode is also refused.

The command write is acknowledged one cycle after it is made, and `busy` rises. The PE
then polls the status word until `busy` drops. A PE can have one command outstanding.
If it writes a second command while the first is busy, the write is simply not
acknowledged until the first command has finished.

### Pages that exist from reset

`INIT_BLOCKS[i]` gives PE i a page of that many G_blocks at reset, mapped at its virtual
G_blocks 0 and upward. The physical G_blocks are handed out consecutively from G_block 0
in PE order: PE 0 first, then PE 1, and so on. Such a page behaves like any other and can
be freed with FREE. `tb_socdmmu_init` checks this mode.

### Scheduling and execution

Commands from different PEs are queued in `dmmu_scheduler`:

* `SCH_FCFS` (default): an age matrix serves the PE whose command arrived first.
  Commands that arrive in the same cycle are served in PE-number order.
* `SCH_PRIORITY`: the lowest pending PE number always wins.

`alloc_unit` executes one command at a time and handles one G_block per clock:

| command | cycles from pick-up to the `done` pulse |
|---|---|
| ALLOC, accepted | 2·count + 1 (check every target entry, then map one per cycle) |
| FREE | count + 1 |
| refused by the size, count or opcode checks | 1 |

The times depend only on the count, never on the state of memory. This is what makes
the allocator deterministic. The lowest free G_block comes from a priority encoder in
`alloc_table`, which also keeps each G_block's owner and a running free count. The
`done` pulse clears the PE's `busy` bit and sets `done` and `error`.

### Building without the SoCDMMU

With `USE_SOCDMMU = 0` the SoCDMMU is left out. PE addresses are then physical and go
straight to the crossbar. An access that falls in no bank is answered at once, with
`pe_ta` and `pe_err` in the same cycle. The allocator's observation outputs read zero.
The crossbar, its timing and the data widths are unchanged. There is no option to leave
out the crossbar instead: without it, how PEs reach the banks would have to be designed
anew.

## Files

| file | contents |
|---|---|
| `rtl/dxgt_pkg.sv` | command/status encoding, scheduler enum, `make_cmd` |
| `rtl/dxgt_soc.sv` | top: SoCDMMU + crossbar |
| `rtl/socdmmu.sv` | SoCDMMU: command port, fault answers, wiring of the parts below |
| `rtl/dmmu_scheduler.sv`, `rtl/alloc_unit.sv`, `rtl/alloc_table.sv`, `rtl/addr_converter.sv` | SoCDMMU parts |
| `rtl/xbar.sv`, `rtl/mx1_switch.sv` | crossbar and one switch |
| `rtl/addr_comp.sv`, `rtl/rr_arbiter.sv`, `rtl/addr_bus_switch.sv`, `rtl/data_bus_switch.sv`, `rtl/wire_switch.sv`, `rtl/wire_ta_switch.sv` | switch parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_socdmmu_init.sv` | SoCDMMU with pages assigned at reset |
| `tb/tb_dxgt_soc_direct.sv` | the top built without the SoCDMMU |
| `tb/tb_dxgt_soc_g128.sv` | the top with 128 G_blocks of 128 KB and four 32-bit PEs |
| `tb/tb_size_sweep.sv`, `tb/mx1_sweep_point.sv`, `tb/socdmmu_sweep_point.sv` | Mx1 switch at 2, 4, 8, 12 PEs; SoCDMMU at 2/128, 4/256, 8/512, 12/1024 PEs/G_blocks |
| `tb/sram_model.sv` | behavioural memory bank (sparse storage, `WAIT` extra cycles) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself. A
watchdog counts a failure if the testbench hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -yrtl -ytb \
    rtl/dxgt_pkg.sv tb/tb_dxgt_soc.sv --top-module tb_dxgt_soc -o sim
./obj_dir/sim
```

Replace `tb_dxgt_soc` with any other testbench. `tb_dxgt_soc` runs the top at its
default parameters, and `+OPS=<n>` sets the number of random accesses per PE (default
300). It checks the following:

* FCFS ordering of staggered commands (PE 2, then PE 3, then PE 0 and PE 1 together,
  served 2, 3, 0, 1, which a fixed-priority scheduler would not do);
* the whole memory allocated, then a refused request;
* concurrent traffic of all four PEs, checked against a shadow memory, with three PEs
  sharing the 8 MB bank so that arbitration conflicts occur while other banks run in
  parallel;
* a FREE, followed by faults on the freed page;
* a stalled second command;
* reuse of the freed G_blocks.
* a 64-bit write by a 32-bit PE that must leave the upper half of the memory word
  unchanged.

It prints how often each of these happened and fails if any of them never happened.
`tb_size_sweep` runs the Mx1 switch with 2, 4, 8 and 12 PEs, and the SoCDMMU with
2 PEs and 128 G_blocks up to 12 PEs and 1024 G_blocks. At each size it checks the
grant, routing and fairness bound of the switch, and the allocation order, command
spacing, address conversion and release of the SoCDMMU.
The other testbenches check each block against a reference model: a round-robin model
for the arbiter, an arrival-order queue for the scheduler, and a bit-vector allocation
model, including exact command times, for the allocation unit.

## Where this RTL makes its own choices

The block structure follows a published description of the design:

* the Mx1 switch's comparator, round-robin arbiter and five switches;
* the crossbar built as N such switches;
* the SoCDMMU's allocation unit, allocation table, per-PE address converter and FCFS or
  priority scheduler;
* the 4-PE, 4-bank, 16 MB, 256-G_block example system with 2/2/4/8 MB banks, 32-bit
  addresses, two 64-bit and two 32-bit PEs.

The following are this implementation's own choices, because the description does not
fix them:

* The bus handshake (hold until `ta`), the combinational grant with lock-until-`ta`, and
  round robin restarting after the last served PE.
* The split of the two-way data bus into separate write and read buses. The byte
  selects, which the source mentions but does not draw, run through a third wire
  switch.
* The bank placement: ascending physical addresses in attachment order, each bank
  aligned to its size.
* The whole command interface: register address, opcodes, word layouts, polling, and
  stalling a second command. The original unit's command set is richer and is not
  reproduced.
* The virtual window of each PE, the G_block size (16 MB / 256 = 64 KB), and error
  answers for unmapped accesses.
* The lowest-free-first allocation policy, the check pass before mapping, the
  same-cycle FCFS tie rule, and the fixed-priority order of the alternative scheduler.
* Storage of the allocation table and address converters in flip-flops, so that reset
  clears them. In silicon these would be mostly memory arrays.
* Which PEs are the 32-bit ones (PE 2 and PE 3), and the placement of a narrow PE on
  the low byte lanes of the 64-bit buses.
* Where pages given at reset are placed (`INIT_BLOCKS`).

Not built: the processors and their bus wrappers, the memory controllers and memory
macros, and the rest of the SoC around this subsystem. Every memory bank here has one
port, and each crossbar output serves one bank. Banks with several ports, where two
outputs would share one address range, are not supported: the comparators would then
grant one PE on two outputs at once. Nor can a G_block be mapped into two PEs at once: each
allocated G_block has one owner and one virtual position in that owner's window.

The original flow produced each configuration with a Verilog preprocessor. Here the same
choices are SystemVerilog parameters and generate loops: `M`, `N`, `G`, the bank sizes,
and `SCH` in place of the preprocessor's scheduler switch.

## Changing the configuration

* For a different number of PEs or banks, set `M`, `N`, `MEM_AW`, `MEM_BASE` (one entry
  per bank, entry n = bank n) and `MAX_AW` (the largest `MEM_AW`) on `dxgt_soc`.
  With a different `M`, also set `PE_DW` (one entry per PE, each a multiple of 8 and at
  most `DATA_W`).
* Keep `G · 2**BLK_AW` equal to the total memory, and keep every bank size-aligned.
  For example, `G = 128` with `BLK_AW = 17` divides the same 16 MB into 128 KB G_blocks;
  `tb_dxgt_soc_g128` runs that setting.
* The command fields are 12 bits wide, so `G` up to 2048 is addressable.
* Going from 256 to 1024 G_blocks grows the converters (M · G · (log2 G + 1) flip-flops)
  and the free-block priority encoder linearly.
