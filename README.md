# Hardware-assisted translation cache manager for dynamic binary translation

A dynamic binary translator (DBT) runs a program compiled for one
instruction set (here an Intel 8051) on another (here an Arm Cortex-M3) by
translating it one basic block at a time. Each translated block is stored
in a region of the host's RAM called the translation cache (TCache). Before
running a block, the translator must find out whether it is already
translated and, if so, where the translation starts. On a small
microcontroller, doing that lookup in software is costly. A linked list
gets slower as the TCache fills. A hash table costs a hash computation on
every lookup.

This RTL moves that lookup into a small memory-mapped peripheral. It keeps
a fixed-size table of pairs:

    source PC of a basic block  ->  start address of its translation

It answers a query in one clock cycle, however many blocks are cached. The
software keeps everything else:

- the translated code itself,
- the allocation of TCache space,
- the eviction policy: a full flush when the TCache memory is full.

The peripheral is an AMBA 3 AHB-Lite slave meant for the FPGA fabric of a
microcontroller-plus-FPGA SoC.

## The idea: a circular table with no software fall-back

The table is a small fully associative cache:

- a CAM holds the source PCs, with one valid bit per entry;
- a RAM holds the matching target addresses.

A hit returns the target address straight away. A miss returns
`0x00000000`. That value can never be a real translation address, because
the TCache is never placed at address 0. The valid bits stop stale entries
from giving false hits after power-up or after a flush.

The TCache memory can hold a varying number of translated blocks, but the
table has a fixed number of entries. Other designs put a software hash
table behind the hardware table for the blocks that do not fit. This one
does not. New entries are written round-robin:

- An insertion index walks through the table.
- After the last entry it wraps to entry 0.
- From then on, each new block overwrites the oldest entry.

When software looks up a block whose entry was overwritten, it gets a miss,
even though the translation is still in TCache memory. The software then
translates the block again. This "false miss" is the price of dropping the
software fall-back. The reasoning is that old entries are seldom needed
again. The translator also flushes the whole TCache when its memory fills
up, which clears the table too.

Size the table to match the TCache. For the benchmarks this design was
tuned on, the typical number of translated blocks per TCache fill gives:

| TCache size | table entries (`ENTRIES`) |
|-------------|---------------------------|
| 4 KB        | 32                        |
| 8 KB        | 64                        |
| 16 KB       | 128                       |
| 32 KB       | 256 (default)             |

## Structure

```
tcache_hw_manager                  top: AHB-Lite slave port only
├── tcache_ahb_regs                register interface, no wait states
└── tcache_lut                     the look-up table
    ├── tcache_circ_index          insertion index, wraps modulo ENTRIES
    ├── tcache_cam                 source PCs + valid bits, priority match
    └── tcache_ram                 target addresses, asynchronous read
tcache_pkg                         widths, register map, AHB constants
```

Default widths:

- Source PC (`SRC_W`): 16 bits, the width of an 8051 program counter.
- Target address (`TGT_W`): 32 bits.

One table entry is therefore 49 bits: 16 + 32 + 1 valid bit. At 256
entries, synthesis gives 12288 bits of table storage plus the 256 valid
bits and about 90 other flip-flops. The reference FPGA implementation was
reported at about 13,100 flip-flops for 256 entries. Its flip-flop count
grows by exactly 49 per entry from size to size, which is where the widths
above come from.

## Register map (word offsets from the peripheral base)

| offset | name         | write                                               | read                                   |
|--------|--------------|-----------------------------------------------------|----------------------------------------|
| 0x0    | QUERY/RESULT | source PC to look up (low `SRC_W` bits)             | target address of last lookup, 0 = miss |
| 0x4    | SRC_NEW      | source PC of the next entry                         | last value written                     |
| 0x8    | TGT_NEW      | target address; inserts (SRC_NEW, this) as an entry | last value written                     |
| 0xC    | CTRL         | bit 0 = 1: flush (all entries invalid, index to 0)  | 0                                      |

The slave accepts only word transfers, and an assertion checks this.
Upper address bits are not decoded; the bus decoder selects the slave with
`HSEL`. `HREADYOUT` is always 1 and `HRESP` always OKAY.

The software protocol for one block is:

```
write QUERY <- pc ; read QUERY -> t
if t != 0 : run the translation at t
else      : if TCache memory is full: write CTRL <- 1, free all space
            translate pc to address a
            write SRC_NEW <- pc ; write TGT_NEW <- a
```

## Timing

- **Lookup.** The CAM search runs during the data phase of the QUERY
  write, on `HWDATA`. Its result is registered at the end of that cycle. A
  QUERY read whose address phase overlaps the write's data phase therefore
  returns the new result. A write-then-read pair takes three AHB cycles:
  write address phase, write data phase (the one-cycle lookup), read data
  phase.
- **Processor overhead.** The processor's own bus path adds its latency on
  top of those three cycles. On the reference system, one query took about
  5 clock cycles in total. That count depends on the SoC's bus bridges,
  which are not part of this RTL.
- **Insert and flush.** Each takes effect at the end of the data phase of
  the TGT_NEW or CTRL write.
- **Result register.** It holds its value until the next query. A flush or
  a reset clears it to 0.
- **Reset.** `HRESETn` is asynchronous and active low. It clears every
  valid bit, the insertion index and the registers. The table's key and
  address words are not reset; they are only read behind a set valid bit.

## Choices made here, not taken from the original description

These parts are this RTL's own:

- The register map above.
- The zero-wait-state slave, and registering the lookup result.
- The widths, inferred as described under Structure.
- If two valid entries hold the same source PC, the lowest index wins.
  Software only inserts a block after it missed, so this does not happen in
  normal use.
- A flush wins over an insertion in the same cycle.
- A query in the same cycle as an insertion sees the table as it was
  before the insertion. Over the bus this cannot happen anyway.

Not included:

- the translation software;
- the TCache memory and its space management, which are software in this
  scheme;
- the host processor;
- a bus-sniffer extension, mentioned only as future work.

## Files and simulation

- `rtl/` — one module or package per file.
  `tcache_pkg.sv` must be compiled first.
- `tb/` — one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
  - `tb_tcache_hw_manager` runs the top at its default size (256 entries,
    32 KB TCache). It drives the peripheral over AHB-Lite through
    `tcache_dbt_sw`, a model of the translation software running a looping
    synthetic guest program. Every lookup result is compared against a
    reference table. The test requires each of these to happen at least
    once: hits, cold misses, false misses after the index wrapped,
    insertions, index wraps, memory-full flushes, and a reset that empties
    the table.
  - `tb_tcache_sizes` runs the four TCache/table size pairs side by side
    and prints hit rates for each.
  - `ahb_master_tasks.svh` holds the AHB-Lite master tasks the bus-level
    testbenches share.

Example with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/tcache_pkg.sv \
    tb/tb_tcache_hw_manager.sv --top-module tb_tcache_hw_manager -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each finishes in well
under a second.

To change the table size, set `ENTRIES` on `tcache_hw_manager`. Any size of
2 or more works; sizes that are not powers of two also work. The CAM
compare and its priority encoder grow linearly with `ENTRIES` and form the
longest combinational path (from `HWDATA` to the result register). Check
timing at large sizes.
