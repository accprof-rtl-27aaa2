# Offloaded call-graph profiling IP

Instrumenting an application to profile it disturbs the very numbers it
measures. The code that keeps the profile (a call-graph array, a stack of
active calls, the bookkeeping around them) runs on the same processor. It
evicts cache lines and TLB entries that the performance counters then count
against the application. This IP moves that bookkeeping into FPGA fabric next
to the processor. Each profiled function only reads its performance counters
and stores the values to a few memory-mapped registers. The IP builds the call
graph in its own block RAM, where the application's caches never see it.

The RTL here is the FPGA side of such a profiler, for a processor/FPGA SoC
such as the Zynq UltraScale+ MPSoC. Nothing in it is vendor-specific. The
compiler pass that inserts the instrumentation, the operating system that maps
the registers into the application, and the processor's PMU are software or
existing silicon, and are not part of this code.

## What software does

Every profiled function is instrumented at two points:

* **Prologue.** The function sets up and resets its performance counters.
  Then it writes one 64-bit *metadata word*: the IDs of the six counted events
  (one byte each) and its own function ID (one byte, non-zero).
* **Epilogue.** The function writes seven 64-bit counts: processor cycles and
  the six events. Then it writes a metadata word with function ID 0.

If a profiled function calls another profiled function, the callee's
prologue resets the counters. The caller's instrumentation therefore saves
its counts before such a call and restores them after it. That is purely a
software matter; the IP only ever sees prologue and epilogue records.

## How the call graph is built

The IP keeps three things:

* the **call-graph RAM**: one 64-byte *chunk* per call, allocated in call
  order;
* a **next-free register**, pointing at the next unused chunk;
* a **stack of active calls**. Each stack entry holds the chunk index of an
  active call and that call's level in the call tree.

The function ID in the metadata word decides which sequence runs:

* **Prologue (function ID > 0).** The caller of the new call is always the
  call on top of the stack, so a peek gives its level without searching the
  RAM. The new call's level is the caller's level + 1, or 1 if the stack is
  empty. The metadata word, with the level placed in its top byte, is written
  to word 0 of the next free chunk. That chunk's index and the level are
  pushed, and the next-free register advances by one chunk.
* **Epilogue (function ID = 0).** The stack is popped. All callees of a
  function return before it does, so the top entry is the chunk of the call
  now ending. The seven counts go to words 1..7 of that chunk.

The result is a flat array, in call order, of records that each carry their
level. A parent/child tree can be rebuilt from it in one pass: a chunk's
parent is the nearest earlier chunk one level up. Example (function IDs
A..F):

```
A            chunk 0  level 1
  C          chunk 1  level 2
    D        chunk 2  level 3
B            chunk 3  level 1
  E          chunk 4  level 2
  F          chunk 5  level 2
```

### Chunk layout (64 bytes, eight 64-bit words)

| word | contents |
|------|----------|
| 0 | metadata: bytes 0..5 event IDs, byte 6 function ID, byte 7 level |
| 1 | processor cycles |
| 2..7 | counts of events 1..6 |

Software writes the metadata word with byte 7 unused; the hardware fills in
the level.

## Register map (AXI4-Lite, 64-bit data, byte addresses)

| address | name | access |
|---------|------|--------|
| 0x00 | cycles | R/W |
| 0x08..0x30 | event counts 1..6 | R/W |
| 0x38 | metadata (writing it starts a prologue or epilogue) | R/W |
| 0x40 | status | R |
| 0x20000 + 64·n + 8·w | word w of call-graph chunk n | R |

Status word: [15:0] chunks used, [31:16] stack depth, [32] stack underflow,
[33] stack overflow, [34] RAM full, [63] busy. The error bits are sticky
until reset. Writes to the status word or the RAM window, and accesses to
unmapped registers, get an SLVERR response. Byte strobes are honoured.

The address width is `$clog2(ENTRIES*8) + 4` bits (18 at the defaults). The
RAM window is the upper half of that space.

## Timing

* A prologue completes in the cycle after its metadata write.
* An epilogue takes that cycle plus seven more, one RAM word per cycle. The
  IP is busy during those cycles. Any write that arrives meanwhile is held on
  the bus (AWREADY/WREADY low) until the counts are stored, so the
  application never has to poll. Reads are not held. Software that reads the
  graph right after the last epilogue should wait until the busy bit is 0.
* Reads take one cycle from address to data, for registers and RAM alike.
* One clock, synchronous active-low reset. Reset empties the stack, clears
  the next-free register and the error flags, and zeroes the registers. The
  RAM itself is not cleared; the used count says which chunks are valid.

## Limits and error cases

| default | value | where it comes from |
|---------|-------|---------------------|
| `ENTRIES` | 2048 chunks = 128 KiB | sized for about 2000 calls of 64 bytes |
| `STACK_DEPTH` | 255 | the largest level a one-byte level field can hold |

* **RAM full.** A prologue that finds no free chunk writes nothing and sets
  the RAM-full flag. It still pushes a stack entry marked invalid, so the
  matching epilogue pops the right entry and its counts are discarded. Calls
  already recorded are unaffected.
* **Stack overflow.** A prologue with the stack full is dropped and sets its
  flag. The pairing of later epilogues is then off by one; the flag tells
  software the graph cannot be trusted.
* **Stack underflow.** An epilogue with an empty stack is dropped and sets
  its flag.

The profile holds one thread of execution. Calls from several threads would
interleave on the single stack.

## Departures and choices

The following follow the behaviour described for the original design:

* the eight 64-bit registers and the function-ID test between prologue and
  epilogue;
* the level rule;
* one stack entry per active call, and a 64-byte chunk per call in call
  order;
* the 128 KiB RAM size.

The original hardware was produced by high-level synthesis from C/C++ that
was never published. Everything below is this design's own choice:

* the bus is AXI4-Lite with 64-bit data;
* the sequence starts on the metadata write;
* the byte order inside the metadata word and the word order inside a chunk;
* the stack holds the chunk index together with the level, so the peek needs
  no RAM read;
* the one-word-per-cycle epilogue, with write stalls while busy;
* the status word and the read-back window;
* the error handling and its flags;
* the 255-deep stack.

The original design's reported size (about 7100 LUTs and 65 block-RAM tiles)
is not a target of this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/accprof_pkg.sv` | widths, register numbers, metadata/record/error types |
| `rtl/accprof_top.sv` | the IP: the four blocks below wired together |
| `rtl/accprof_regs.sv` | AXI4-Lite slave, eight registers, status, RAM read window |
| `rtl/accprof_ctrl.sv` | prologue/epilogue sequencer, next-free register, error flags |
| `rtl/accprof_call_stack.sv` | stack of active calls with combinational peek |
| `rtl/accprof_cg_ram.sv` | call-graph RAM, simple dual port, 1-cycle read |
| `tb/accprof_host_if.sv` | AXI4-Lite host model with prologue/epilogue tasks |
| `tb/tb_accprof_*.sv` | self-checking testbenches |

Testbenches:

* `tb_accprof_call_stack`, `tb_accprof_cg_ram`, `tb_accprof_ctrl` and
  `tb_accprof_regs` test the blocks, each against a reference model.
* `tb_accprof_top` runs the full IP at its default sizes. It covers an
  example call tree and STREAM-mod rounds, filling the RAM, overflowing and
  underflowing the stack, the bus stall and SLVERR. Every chunk is read back
  and compared.
* `tb_accprof_workloads` replays the call patterns of three benchmarks:
  - STREAM: 500 rounds of four top-level calls, 2000 chunks;
  - STREAM-mod: 285 rounds of a seven-call, three-level tree, 1995 chunks;
  - Embench: 22 single calls.

  It checks that each one fits with no error flag.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with plain
Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv rtl/accprof_pkg.sv \
  tb/tb_accprof_top.sv --top-module tb_accprof_top -Mdir obj
./obj/Vtb_accprof_top
```

Every testbench finishes in well under a second at the default sizes.
