# A pipelined, cached, branch-predicting Hack computer

Hack is the 16-bit teaching computer from the Nand2Tetris course. It has two
registers, A and D, a 32K-word instruction ROM and a 24K-word data memory.
Its one real instruction computes an ALU function of D and A (or of D and the
memory word at address A). It can write the result to A, D and/or memory, and
it can jump to the ROM address held in A. In the textbook form, every
instruction completes in one cycle.

This design gives Hack the costs of a more realistic machine and then adds
the usual techniques to hide them:

* Main memory takes 14 cycles to read and 15 to write. The ALU takes 3
  cycles. A jump takes 4 to 10 cycles.
* The work is split into a four-stage pipeline.
* Operands are forwarded from the write-back stage.
* A jump's register write runs in parallel with the jump itself.
* Outcomes are predicted by a gshare predictor. Targets come from a
  branch-target buffer with 2-bit confidence counters.
* Memory is reached through two small set-associative caches: one for reads
  and one for writes.

The numbers (latencies, table sizes, cache geometry) are the ones of the
configuration this design follows: a 16-entry gshare, a 32-entry FIFO
target buffer with 2-bit counters, and 16-line 2-way FIFO caches.

All RTL is SystemVerilog-2017 and synthesizable. Every module has a
self-checking testbench. A reference model of the instruction set checks the
whole computer instruction by instruction.

## Instruction set

The ISA is standard 16-bit Hack, unchanged:

* `0vvvvvvvvvvvvvvv` (A-instruction) loads the 15-bit constant into A.
* `111a cccccc ddd jjj` (C-instruction) does the following:
  * `a` picks A or M (memory at A) as the ALU's y input.
  * `cccccc` are the ALU controls zx, nx, zy, ny, f, no.
  * `ddd` chooses the destinations A, D and M.
  * `jjj` chooses the jump condition from the result's sign and zero flags.

`hack_pkg::decode` breaks a word into these fields.

## Memory map

| Address       | Contents                                  |
|---------------|-------------------------------------------|
| 0 - 16383     | general RAM                               |
| 16384 - 24575 | screen map: 512x256 pixels, 32 words per row, bit c%16 of word r*32+c/16 |
| 24576         | keyboard: code of the key held, 0 for none |
| above 24576   | reads 0, writes ignored                   |

`hack_memory` builds the map from two `hack_ram` banks and the `kbd` input.
It has one read port and one write port, so the reader and the writer can
work in the same cycle. The screen bank has a second read port,
`screen_addr`/`screen_data`, that a display controller can scan.

The ROM (`hack_rom`) is loaded through `prog_we`/`prog_addr`/`prog_data`
while reset is held. This stands in for the plug-in program cartridge of the
original machine.

## Pipeline stages and their costs

`hack_cpu` has four stages. Each holds at most one instruction.

| Stage | Work | Cycles |
|-------|------|--------|
| IF  | read ROM[PC] and advance the PC | 1 |
| ID  | decode; predict jumps | 1, longer while waiting (below) |
| EXE, A-instruction | produce the constant | 1 |
| EXE, C-instruction | operand fetch, then compute | 1 + 3 when the operands are A or D; 1 + 3 on an M hit; 14 + 3 on an M miss |
| WB, jump part | no jump / unconditional / conditional not taken / conditional taken | 0 / 4 / 6 / 10 |
| WB, write part | write A or D / write M (hit) / write M (miss) | 1 / 1 / 15 |

The two parts of WB run in parallel. The instruction retires when the slower
part finishes. So a `D;JGT` retires after 6 or 10 cycles in WB, not after
6 + 1 or 10 + 1. An instruction with no destination and no jump spends one
cycle in WB.

With every instruction spending at least four cycles in EXE, the pipeline
overlaps fetch, decode and write-back with computation. The steady-state cost
of a run of register-only C-instructions is one instruction per 4 cycles.

## Hazards and forwarding

An instruction in ID waits when it reads a register (A, D, or M through A)
that the instruction in EXE will write. It also waits when it writes M while
EXE writes A. Each such cycle is counted as a hazard stall.

It does not wait for WB. The operand unit (`hack_operand_unit`) takes A and
D straight from the WB result when WB is writing them. It does the same for
M when WB stores to exactly the address being read. So a dependent instruction
is held only until its producer moves from EXE to WB.

A jump uses A as its target, and is treated as a reader of A for this
purpose. The target it uses is the A value it saw in operand fetch.

Stores to the keyboard register or to unmapped addresses are dropped by the
memory map, so they are never forwarded.

Reads go through the reader memory unit and writes through the writer, so a
read in EXE and a write in WB never compete for one port. A read can never
overtake a pending write to the same address: EXE cannot start that read
until the store is in WB, and then the data is forwarded. An assertion in
`hack_cpu` checks this.

## Jumps, prediction and flushes

Jumps are predicted as they move from IF to ID (`hack_decode_unit`):

* Unconditional jumps are always predicted taken.
* Conditional jumps use `hack_gshare`: a table of 16 two-bit saturating
  counters. It is indexed by the low PC bits XOR a 4-bit global history of
  recent outcomes. The newest outcome enters history bit 0.
* The target comes from `hack_target_pred`, a fully associative 32-entry
  buffer.
  * Each entry holds a jump address, a target and a 2-bit confidence counter.
  * An address that is not in the buffer predicts target 0 and is added,
    evicting entries first in, first out.
  * A correct target raises the counter.
  * A wrong target lowers it. The target is only replaced once the counter has
    fallen to 1 or below, and the counter then restarts at 1.

A jump predicted taken sends the PC to the predicted target, and the word
already fetched behind it is dropped. This is a *half flush*. Instructions
behind a jump wait in ID until the jump has resolved in WB, so a wrong path
never reaches EXE.

When the jump resolves, the predictors are trained:

* The gshare table learns the outcome of each conditional jump, using the
  index it predicted with.
* The buffer learns the target of each taken jump.

If the outcome or the target was wrong, IF and ID are cleared and fetch
restarts at the right address (A or the next word) in the next cycle. This is
a *flush*.

## Caches and memory units

`hack_mem_unit` puts a `hack_cache` in front of main memory:

* A hit completes in the cycle it is requested.
* A read miss takes 14 cycles and a write miss 15.
* A miss fills the line.

The cache is write-allocate and write-through: every store reaches main
memory in its last cycle, so memory is always current.

`hack_cache` is set associative. The defaults are 16 lines in 8 sets of 2
ways, one word per line, with a per-set FIFO pointer choosing the victim. The
keyboard and unmapped addresses are never cached, because the keyboard
changes without a store.

The computer has two memory units. Each store made by the writer also
updates the reader's cache if that cache holds the word, so the two caches
never disagree.

## Module list

| Module | Role |
|--------|------|
| `hack_pkg` | widths, memory-map constants, instruction decode, jump condition, event and counter structs |
| `hack_computer` | top: ROM, CPU, reader and writer memory units, memory map, event counters |
| `hack_cpu` | the four-stage control unit |
| `hack_decode_unit` | decode plus outcome and target prediction |
| `hack_gshare` | outcome predictor |
| `hack_target_pred` | target predictor |
| `hack_operand_unit` | A/D/M forwarding from WB |
| `hack_wb_unit` | A and D registers; the store to memory; when the write part of WB is finished |
| `hack_alu`, `hack_alu_unit` | combinational Hack ALU; the 3-cycle compute stage around it |
| `hack_jump_unit` | jump decision and its 4/6/10-cycle timing |
| `hack_mem_unit`, `hack_cache` | cached memory access |
| `hack_memory`, `hack_ram` | memory map and RAM banks |
| `hack_rom`, `hack_pc` | instruction memory; a reset/load/increment program counter |

All timing and size parameters are on `hack_computer`:

* `CACHE_LINES`, `CACHE_WAYS`
* `RD_LAT`, `WR_LAT`
* `ALU_LAT`
* `OUT_SIZE` (gshare entries)
* `TGT_ENTRIES`

Setting `CACHE_LINES`/`CACHE_WAYS`, or changing a latency, gives the
other points of the design space.

## Top-level interface

| Port | Meaning |
|------|---------|
| `clk`, `rst` | clock; synchronous active-high reset (PC 0, pipeline empty, A = D = 0, caches and predictors empty; memory contents kept) |
| `prog_we`, `prog_addr`, `prog_data` | ROM load |
| `kbd` | keyboard code |
| `screen_addr`, `screen_data` | screen-map read port |
| `retire`, `retire_pc`, `retire_instr`, `a_reg`, `d_reg` | one pulse per finished instruction, with A and D after it |
| `mem_we`, `mem_waddr`, `mem_wdata` | every data-memory store |
| `perf` | 32-bit counters: see below |

`perf` counts:

* cycles and retired instructions;
* resolved and mispredicted jumps, flushes and half flushes;
* A, D and M forwards;
* hazard-stall cycles;
* cycles in which a jump and a memory write ran together;
* reader and writer hits and misses.

## Verification

Every module has a testbench `tb/tb_<module>.sv`. Each one:

* compares the module against values computed independently in the
  testbench;
* checks cycle counts wherever a latency is specified;
* stops itself with a watchdog;
* ends by printing `TB_RESULT checks=N failures=M`.

`tb_hack_cpu` runs the CPU against fixed-latency memory: every access takes
the full 14 or 15 cycles. It runs a test program and 20 random programs, and
checks every retired instruction, A and D, and the final memory against the
reference model in `tb/hack_ref_pkg.sv`. It also checks the gap between
retirements for each kind of instruction.

`tb_hack_computer` runs the whole computer at its default parameters. It
runs two assembled programs from `tb/hack_progs_pkg.sv`:

* a loop sum, array fill and keyboard read;
* a subroutine called from two sites, which returns through an indirect jump.

It then runs six random 300-instruction programs. Every retired PC, every A
and D value and every store is compared with the reference model. The test
fails if any of these never happened: flush, half flush, A/D/M forwarding,
hazard stall, jump/write overlap, and hits and misses in both caches.

Measured at the defaults:

| Program | Cycles | Instructions | CPI | Mispredicted / jumps | Reader hit/miss | Writer hit/miss |
|---------|-------:|-------------:|----:|---------------------:|----------------:|----------------:|
| loop sum and array fill | 5179 | 1066 | 4.86 | 16 / 101 | 331 / 50 | 197 / 50 |
| subroutine calls        | 1537 |  351 | 4.38 | 34 / 50  |  64 / 7  |  57 / 10 |
| random programs (each)  | ~2200 | ~260 | 7.3 - 8.7 | ~25 / ~32 | low hit rate (scattered addresses) | |

`tb_hack_workloads` runs benchmark-style kernels from
`tb/hack_workloads_pkg.sv`, again at the defaults. Each run is checked
against the reference model and against results the testbench computes
itself. There is one kernel for each micro benchmark the machine's source
measured, except the boot benchmark, which needs the compiled operating
system:

| Kernel | Cycles | Instructions | CPI | Base-machine CPI | Speedup | Mispredicted / jumps | Reader hits | Writer hits |
|--------|-------:|-------------:|----:|-----:|----:|---------------------:|------------:|------------:|
| loop, 10000 iterations     |   250102 |   60008 | 4.17 | 16.00 | 3.84 | 8 / 10001      | 100% | 100% |
| array fill, 10000 words    |   497607 |   90010 | 5.53 | 15.67 | 2.83 | 8 / 10001      | 100% | 62%  |
| 7 functions x 1000 calls   |   639262 |  213012 | 3.00 | 12.69 | 4.23 | 22 / 15001     | 100% | 100% |
| fib(23), head recursion    | 13940794 | 4219440 | 3.30 | 12.62 | 3.82 | 54829 / 278206 | 97%  | 96%  |
| fib(23), tail recursion    |     4267 |    1082 | 3.94 | 12.67 | 3.21 | 7 / 73         | 89%  | 81%  |
| 20-clause if chain x 10000 |  3545947 |  995832 | 3.56 |  9.00 | 2.53 | 15982 / 160553 | 100% | 100% |
| arithmetic loop x 10000    |   710102 |  220008 | 3.23 | 15.27 | 4.73 | 8 / 10001      | 100% | 100% |
| read all 24576 data words  |  1317933 |  270342 | 4.88 | 13.73 | 2.82 | 8 / 24577      | 72%  | 100% |
| write 22527 data words     |  1191186 |  225276 | 5.29 | 12.10 | 2.29 | 8 / 22528      | 100% | 47%  |
| read 2048, write 22527, read keyboard | 1301036 | 247808 | 5.25 | 12.25 | 2.33 | 14 / 24576 | 96% | 51% |
| 100 objects: alloc, method call, free | 62191 | 12917 | 4.81 | 13.03 | 2.71 | 13 / 801 | 75% | 75% |
| draw 100 'Z' glyphs        |    89263 |   18670 | 4.78 | 10.41 | 2.18 | 63 / 351       | 65%  | 52%  |

The *base machine* is the same computer without a pipeline, caches,
forwarding or prediction. It runs one instruction at a time through every
stage at the costs listed under *Pipeline stages and their costs*, with every
memory access taking the full 14 or 15 cycles. The testbench counts its cycles
from the same instruction stream.

The CPI can fall below 4 because an A-instruction spends only one cycle in
EXE. The misses are the array walks: each new word misses once.

To simulate one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hack_pkg.sv \
  $(ls rtl/hack_*.sv | grep -v hack_pkg) tb/hack_*_pkg.sv \
  tb/tb_hack_workloads.sv --top-module tb_hack_workloads -Mdir obj
obj/Vtb_hack_workloads
```

Replace the testbench name to run another one. The workload run takes about
20 seconds; every other testbench finishes in about a second.

## Where this design departs from its source

* **16-bit only.** The source's measurements used a 32-bit variant of the
  machine. Its compiled benchmark programs (about 42,000 to 54,000 words as
  first built) overflow the 32K ROM. Software optimisation brings the smaller
  ones under 32K, but not the largest. The 32-bit variant's instruction
  encoding is not defined, so this design keeps the 16-bit ISA. The testbench
  programs are small hand-written kernels of the same shape as the benchmarks.
* **Restart after a flush.** The source lets EXE and WB drain before
  fetching again. Here fetch restarts in the very next cycle: only the
  resolving jump is in flight, and it is in WB.
* **Jump dependency on A.** The source's stall rules do not list a jump's
  use of A as its target. Here it counts as a use of A.
* **Minimum of one cycle per stage.** The source gives some sub-stages a cost
  of 0. Here every stage holds an instruction for at least one cycle.
* **Unspecified details.** The source leaves these open, and they are this
  design's choices:
  * predictor counters reset to 1 (weakly not taken);
  * write policy, coherence between the two caches, and no caching of the
    keyboard;
  * behaviour of unmapped addresses;
  * reset of anything other than the PC.
* **One configuration.** Only the fully optimised configuration is built:
  * no unpipelined control unit;
  * no static, direct-mapped or fully associative cache;
  * no LIFO or least/most-recent replacement;
  * no other outcome predictors (never/always taken, local, global).

  Most of these are a parameter or a small module away. For example,
  `CACHE_WAYS = CACHE_LINES` gives a fully associative FIFO cache, and
  `CACHE_WAYS = 1` a direct-mapped one.
* **Keyboard address in the memory benchmark.** The source's memory-access
  benchmark ends by reading address 24575 as the keyboard. In this memory map
  24575 is the last screen word and the keyboard is at 24576, so the
  matching kernel reads 24576.
* **Gates.** The gate-level construction of the ALU, registers and RAM from
  NAND gates is written with ordinary operators and registers.
