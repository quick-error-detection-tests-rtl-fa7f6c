# Hardware load-and-check for Fast QED post-silicon tests

Bugs in the uncore of a multi-core SoC (cache controllers, memory controllers, on-chip
interconnect) can corrupt data in memory that is only read, and found to be wrong, millions
of cycles later. Quick Error Detection (QED) tests shorten that delay. The test program is
transformed so that every variable has a duplicate, every store is repeated on the
duplicate, and the two copies are compared often. Comparing them in software costs a lot of
run time. Fast QED moves the comparison into small hardware checkers. There is one checker
beside each cache memory array. It uses the array's idle cycles to read an original line
and its duplicate from the array and compare them. A mismatch raises an error flag that the
on-chip debug logic can read.

This repository holds the RTL of those checkers and of the cache arrays they sit on, laid
out as in an OpenSPARC T2-like SoC:

- 8 cores, each with a private L1 data cache of 512 entries × 16 bytes, read in 1 cycle.
  Each L1 cache has one checker.
- 8 L2 banks, each built from 16 arrays of 512 entries × 64 bytes, read in 2 cycles. Each
  array has one checker.

That makes 136 checkers, all working at the same time.

## How test memory is laid out

The test's memory allocator splits the address space into chunks of `CHUNK` bytes
(0x1000). The chunks alternate:

| chunk | holds |
|---|---|
| 0x0000–0x0FFF, 0x2000–0x2FFF, … (address bit 12 clear) | original variables |
| 0x1000–0x1FFF, 0x3000–0x3FFF, … (address bit 12 set) | duplicates ("EDDI-V" variables) |

The duplicate of the original at address A is at A + 0x1000. The smallest array holds
8 KB, so an aligned pair of chunks always falls in the same array. A checker therefore never
needs a line from another array.

The transformed program stores to the original first and then to the duplicate, in the same
order for every variable. The design relies on this ordering. It holds on strongly ordered
machines (SPARC TSO, x86). On weakly ordered machines the program adds a memory barrier after
each duplicate store.

## One PLC operation

A PLC (proactive load and check) operation checks one line. It is handled by
`plch_controller` and `plch_addr_gen`, and finished by `plch_data_reg` and `plch_comparator`:

1. Clear the operation counter `OP_cnt` and switch the array multiplexers to PLC-H mode.
   Normal loads and stores now wait in the input buffer.
2. Read the current original line A. Its tag lookup gives data and a hit flag, which go
   into the data register `READ_LAT` cycles later.
3. Read A + CHUNK as soon as the array accepts another access.
4. When that line arrives, compare it with the data register, but only if both reads hit.
   A line that is not cached is skipped (`ev_cmp_skip`), not reported.
5. Step the address generator to the next original line and return the array to normal
   mode.

The two reads are issued back to back. With no other traffic, an L1 array is read every
cycle and an L2 array every other cycle. All 512 entries of an L1 array are then checked in
512 cycles, and those of an L2 array in 1,024 cycles.

## When a checker may start

The difficult part of the design is the start rule. The checker must not report false
errors and must not crowd out the test it is checking. An operation starts only when all
of the following hold:

1. **The array is idle.** The enable of the normal request path is low (the input buffer is
   empty), and no access is still occupying the array.
2. **Enough normal traffic has passed.** `OP_cnt >= OP_cnt_min`. `OP_cnt` counts every
   normal load or store the array accepts. `OP_cnt_min` is a register (5 in the reference
   evaluation), and it sets how intrusive checking is.
3. **No original store is waiting for its duplicate.** `ST_cnt == 0`. `ST_cnt` goes up on
   every store to an original address in the programmed range, and down on every store to
   the matching duplicate address. If it is not 0, the two copies may disagree for a
   legitimate reason, and a check would raise a false error.

The checker also needs to be enabled and to have at least one original line inside its
array's window. Entering MBIST mode abandons any operation in progress. `ev_held_st` and
`ev_held_op` pulse in cycles where rule 3 or rule 2 alone kept an idle array from being
checked.

Rule 2 uses `>=`, as in the controller flowchart. With a test for equality, a checker whose
`OP_cnt` went past `OP_cnt_min` while `ST_cnt` was not 0 would never start again.
`OP_cnt` saturates.

## Address walk

The debugger programs one range of original variables, `[ORIG_LO, ORIG_HI]`, into each
checker. The address generator:

- clips the range to its array's window (`WIN_BASE`..`WIN_LAST`);
- aligns the start down to a line boundary;
- starts at the first line that lies in an original chunk;
- steps one line per operation, jumping over each duplicate chunk;
- wraps to the first line after the last.

Example: original variables in 0x6000–0x6FFF and 0x8000–0x8FFF, programmed as
`0x6000..0x8FFF`. The checker of the L2 array that caches 0x0000–0x7FFF walks only
0x6000–0x6FFF. The checker of the next array walks only 0x8000–0x8FFF.

The generator latches the line of the operation in progress. A configuration write during
an operation therefore cannot pair a line with the duplicate of a different line. A
configuration write restarts the walk at the first line. Program the ranges while the
checker is disabled.

## Blocks

| module | what it is |
|---|---|
| `fastqed_uncore` | top: 8 L1 units plus 8 `l2_bank`s, configuration decode, error and event vectors |
| `l2_bank` | 16 `plch_cache_unit`s of one L2 bank, each with its own address window |
| `plch_cache_unit` | input buffer + checker + cache array; returns load results in order |
| `plch_checker` | configuration registers, controller, address generator, data register, comparator, multiplexers, sticky error |
| `plch_controller` | `OP_cnt`, `ST_cnt`, the start rule, sequencing of the two reads |
| `plch_addr_gen` | original-line walk, duplicate address, original/duplicate classification of stores |
| `plch_data_reg` | holds the original line and its hit flag |
| `plch_comparator` | compares the two lines when both reads hit |
| `plch_mode_mux` | normal / PLC-H / MBIST selection of address, data, enable and load/store |
| `cache_array` | data, tag and valid storage with `READ_LAT` read latency, one access per `READ_LAT` cycles |
| `cache_input_buffer` | 8-entry FIFO of pending loads and stores; stalls the requester when full |
| `fastqed_pkg` | mode and configuration-register encodings, default sizes |

## Top-level interface (`fastqed_uncore`)

- `l1_req_*` / `l1_rsp_*` (one port per core) and `l2_req_*` / `l2_rsp_*` (one port per L2
  array; index = bank × 16 + array). These are valid/ready load/store ports carrying whole
  lines. Load results come back in order, `READ_LAT` cycles after the operation leaves the
  input buffer (1 for L1, 2 for L2).
- `l1_mbist_*`, `l2_mbist_*`: the memory BIST engine's side of each array's multiplexers.
  While `*_mbist_mode` is high, the BIST engine owns the array and no check runs.
- `cfg_we`, `cfg_id`, `cfg_reg`, `cfg_wdata`: a write bus that stands in for the JTAG
  debugger. Checker ids 0–7 are the L1 checkers. Id 8 + bank × 16 + array is an L2
  checker. The registers (`fastqed_pkg::cfg_reg_e`) are:
  - `ORIG_LO`, `ORIG_HI`: the original range;
  - `OP_MIN`: `OP_cnt_min`;
  - `CTRL`: bit 0 enables the checker, bit 1 clears its error flag.
- `err_sticky[135:0]` and `err_any`: which checkers have seen a mismatch. The pattern of
  flags across checkers narrows down where the corruption happened.
- `ev_*[135:0]`: one-cycle strobes per checker (operation start, comparison, skip, mismatch,
  hold by rule 3, hold by rule 2), for counters or trace.

L2 address windows: array `a` of bank `b` caches the 32 KB starting at
(16·b + a) × 0x8000. Array 0 of bank 0 caches 0x0000–0x7FFF, and the 128 arrays together
cover the low 4 MB. The crossbar outside this design is expected to route requests by
address bits 21:15.

## What is modelled, and where this RTL departs from the reference design

The checkers follow the reference description closely. The cache around them is the
simplest model that gives the checkers something real to work on:

- **Cache organisation.** Each array is direct indexed, with one tag and valid bit per
  entry. A store writes a whole line and installs its tag. Associativity, replacement, miss
  handling and refill belong to the cache controllers, which are not part of this RTL. The
  L1 line size (16 bytes) was chosen so that 512 entries make an 8 KB array.
- **Input buffers.** There is one 8-entry buffer per array. The reference gives 8 entries
  per cache, but each array here can be made busy by its own checker. The valid/ready
  handshake is this design's choice.
- **Debug access.** A plain register write bus and sticky flags replace JTAG. The register
  map and the error-clear bit are this design's own.
- **Not included.** The cores, the crossbar, the memory controllers, the MBIST controller
  and its pattern generator, and the cache controllers. The multiplexers give MBIST
  priority over PLC-H.
- **Not built: fewer checkers.** The reference also studies configurations with fewer
  checkers (16 to 120), where one checker serves several L2 arrays. Only the full
  one-per-array configuration is built.
- **Widths.** Addresses are 40 bits. `OP_cnt` and `ST_cnt` are 16 bits.

## Simulating

Each testbench in `tb/` checks itself and ends by printing `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_fastqed_uncore \
  -y rtl -y tb +libext+.sv -Irtl rtl/fastqed_pkg.sv tb/tb_fastqed_uncore.sv -o sim
./obj_dir/sim
```

Replace the top module and file to run another testbench: `tb_cache_array`,
`tb_cache_input_buffer`, `tb_plch_mode_mux`, `tb_plch_data_reg`, `tb_plch_comparator`,
`tb_plch_addr_gen`, `tb_plch_controller`, `tb_plch_checker`, `tb_plch_cache_unit` or
`tb_l2_bank`.

`tb_fastqed_uncore` runs the top at its default size: 136 checkers and 4 MB of L2 arrays.
Building it takes about three minutes, and the simulation takes under a second. The test:

- fills L1 arrays and an L2 array with original/duplicate pairs;
- measures the idle checking rate (512 cycles per L1 array, 1,024 per L2 array);
- makes each mechanism happen at least once: skip on a tag miss, hold by `ST_cnt`, hold by
  `OP_cnt_min`, input-buffer stall, MBIST mode, and mismatch;
- checks that only the checkers whose arrays hold corrupted duplicates raise their flags.

`tb_fastqed_edl` measures error detection latency. It drives one L1 unit and one L2 unit
at default sizes with test-like traffic:

- about one memory operation every 4 cycles, over 256 original lines;
- original/duplicate store pairs and loads;
- `OP_cnt_min = 5`.

In each trial, a corrupted store stands in for a cache data bug. The test reports, for each
unit, how many cycles passed before the flag rose. It requires every corruption that is not
overwritten first to be caught within 7,000 cycles. A typical run: median about 2,000–2,800
cycles, maximum about 4,800 cycles.

The lower-level testbenches use reduced sizes where that keeps them short. For example,
`tb_l2_bank` uses 4 arrays of 64 entries with 0x400-byte chunks.

## Changing it

- **Number of checkers and arrays.** `N_CORES`, `N_L2_BANKS` and `L2_ARRAYS_PER_BANK` on
  `fastqed_uncore`.
- **Array geometry.** `L1_LINE_B`, `L2_LINE_B` and `ENTRIES`. An array must hold at least
  two chunks, so that a line and its duplicate share an array.
- **Chunk size.** `CHUNK`, a power of two. It must match the test's memory allocator.
- **Read latency.** `READ_LAT` on `plch_cache_unit` and `cache_array`. The checker times its
  data-register load and its comparison from this parameter.
