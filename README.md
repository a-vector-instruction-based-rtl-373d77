# Vector-instruction RISC core for H.264 motion estimation

Motion estimation takes most of an H.264 encoder's time. It runs the same few
data-heavy kernels over and over:
- the sum of absolute differences between 4x4 pixel blocks;
- the sum of absolute Hadamard-transformed differences for sub-pel refinement;
- loading 4x4 blocks out of a picture;
- recomputing the block pointers for every candidate motion vector.

This core makes each of those kernels a single instruction executed by dedicated
hardware. It then places those instructions inside an ordinary scalar RISC core
that executes out of order (Tomasulo scheduling with reservation stations). Encoder
software keeps its structure and replaces only the hot functions with the new
instructions. The out-of-order scheduler then overlaps the vector work with the
surrounding scalar loop code, loads and stores.

The organisation follows a published architecture for a photovoltaic-plant
monitoring camera. These parts come from that architecture:
- the block set;
- the six vector instructions;
- two vector execution units;
- a general execution unit;
- three-entry load and store buffers;
- one common data bus.

This implementation's own choices are:
- the instruction encoding;
- all widths and depths not listed above;
- the memory-ordering rules;
- the exact semantics of the pointer instructions;
- the on-chip memories, which have no cache behaviour.

## Block structure

```
            host program port                       host data port
                  |                                       |
            +-----------+                           +-----------+
            |  icache   | L1 instruction SRAM       |  dcache   | L1 data SRAM, 4 banks
            +-----------+                           +-----------+
                  |                                    ^     |
            +-----------+                              |     | 4 words / read
            | imem_ctrl | fetch PC, redirect     +-------------+
            +-----------+                        | mem_buffers | load buffers 1-3
                  |                              |             | store buffers 1-3
            +-------------+                      +-------------+
            | instr_queue | FIFO, 8 entries             ^   |
            +-------------+                             |   |
                  |                                     |   |
            +---------------+   rename / read    +-------------+ +-------------+
            | ooo_scheduler |<------------------>| gen_regfile | | vec_regfile |
            +---------------+                    +-------------+ +-------------+
               |  |  |  |  issue (in order)             ^               ^
      +--------+  |  |  +--------------------+          |               |
      v           v  v                       v          |               |
 +-----------+ +-----------+ +-----------+ (to mem_buffers)             |
 |gen_exec   | |vec_exec   | |vec_exec   |                              |
 |_unit + RS | |_unit 1+RS | |_unit 2+RS |   ctrl_regs (counters, MFC)  |
 +-----------+ +-----------+ +-----------+                              |
      |             |             |            |                        |
      +-------------+------+------+------------+  result requests       |
                           v                                            |
                    +-------------+                                     |
                    | cdb_arbiter | ---- common data bus {tag, 128-bit value} --> all
                    +-------------+          stations, buffers and both register files
```

`vrisc_top` holds this structure. The package `vrisc_pkg` holds the opcodes,
the tag map and the structs that the modules share.

## The vector instructions

A vector register is 128 bits wide. It holds either one 4x4 block of 8-bit
pixels, with pixel (row r, column c) in byte `4r+c`, or four 32-bit lanes.

| Instruction | Unit | Effect | Latency |
|---|---|---|---|
| `SAD rd, vs1, vs2` (4x4SAD) | vector | `rd = sum |a - b|` over 16 pixels (0..4080) | 1 cycle |
| `SATD rd, vs1, vs2` | vector | `rd = sum |H·(A-B)·Hᵀ|`, with H the ±1 order-4 Hadamard matrix (raw sum, not halved) | 1 cycle |
| `NAC vd, vs1, vs2` | vector | integer-pel pointers (see below) | 1 cycle |
| `NAC2 vd, vs1, vs2` | vector | quarter-pel pointers (see below) | 1 cycle |
| `LD4X4 vd, rs1, rs2` (4x4RD) | load buffer | row r = 4 adjacent bytes at `rs1 + r*rs2` | 5 cycles |
| `LD4X4_2 vd, rs1, rs2` (4x4RD2) | load buffer | row r = bytes at `rs1 + r*rs2 + 4c`, c = 0..3 | 5 cycles |
| `VINS vd, vs1, rs2, lane` | vector | `vd = vs1` with 32-bit lane `lane` replaced by `rs2` | 1 cycle |
| `VEXT rd, vs1, lane` | vector | `rd = lane` of `vs1` | 1 cycle |

A latency is counted from dispatch to the result waiting for the bus. For loads it
is counted from allocation in the buffer. Each latency adds one cycle on the bus.

SAD and SATD are purely combinational. An adder tree (SAD) or two butterfly
stages and an adder tree (SATD) sit in front of the unit's result register.
Larger H.264 partitions, from 16x16 down to 8x4, come from summing 4x4 SAD
results in software.

**Pointer instructions.** Their operands follow the variables of a motion-search
inner loop:

```
vs1 lanes: 0 img_width   1 img_height   2 cand_x   3 cand_y   (signed)
vs2 lanes: 0 x           1 y            2 orig_base 3 ref_base
vd  lanes: 0 pOrig       1 pRef         2 x+4      3 y
pOrig = orig_base + 16*y + x                       (the current macroblock in a 16-byte-pitch buffer)
NAC : X = clamp(cand_x + x,   0, W-4),    Y = clamp(cand_y + y,   0, H-4)
      pRef = ref_base + Y*W + X
NAC2: X = clamp(cand_x + 4x,  0, 4W-13),  Y = clamp(cand_y + 4y,  0, 4H-13)
      pRef = ref_base + Y*4W + X                   (4x up-sampled plane, cand in 1/4 pel)
```

For sub-pel search the reference is held as a plane up-sampled four times. The
16 samples of one quarter-pel phase of a 4x4 block are then four bytes apart
within a row. Rows of that phase are `4*4W` bytes apart. `LD4X4_2` with pitch
`16W` fetches exactly those samples, and NAC2 computes its start address. The
clamp keeps every block inside the picture.

## Instruction set

Instruction word: `[31:26] opcode  [25:21] rd/vd  [20:16] rs1/vs1  [15:11] rs2/vs2  [15:0] imm16`.
Vector registers use the low 4 bits of a register field. The opcode values are
defined in `vrisc_pkg::op_e`.

| Class | Instructions |
|---|---|
| ALU | `ADD SUB AND OR XOR SLT SLL SRL` (rd, rs1, rs2); `ADDI` (rd = rs1 + simm); `LUI` (rd = imm << 16) |
| Memory | `LW rd, simm(rs1)` (any alignment); `SW rd, simm(rs1)` (aligned word; rd is the data) |
| Control | `BEQ/BNE rd, rs1, simm` and `JMP simm`, target = pc + 1 + simm (pc counts words); `HALT`; `NOP` |
| Control registers | `MFC rd, n`: 0 cycles, 1 instructions issued, 2 vector instructions issued, 3 issue-stall cycles |
| Vector | the table above |

There are 32 general registers of 32 bits. `r0` is always zero. There are 16
vector registers of 128 bits.

## How an instruction moves through the core

1. **Fetch.** `imem_ctrl` reads one word per cycle from `icache` (synchronous, one
   cycle) and pushes it with its pc into `instr_queue`. It fetches only while the
   queue has room for the new word and for the read already in flight.
2. **Issue (in order, one per cycle).** `ooo_scheduler` decodes the queue head and
   picks its station. Scalar ALU operations and MFC go to the general unit. SAD,
   SATD, NAC, NAC2, VINS and VEXT go to a vector unit, alternating between the two
   and taking the other one when the preferred one is full. Loads go to the load
   buffer and SW to the store buffer.

   Each source register returns either a value or the *tag* of the instruction
   that will produce it. A tag being broadcast on the bus in that same cycle is
   forwarded as a value. The destination register is then renamed to the tag of
   the entry just allocated, which removes write-after-read and write-after-write
   hazards. Issue stalls while the chosen station is full.
3. **Wait for operands.** Each reservation station (`res_station`, 3 entries) and
   each buffer entry snoops the common data bus every cycle. An entry captures an
   operand when the tag it waits on is broadcast.
4. **Execute.** Each unit dispatches the lowest-numbered entry whose operands are
   complete, at most one per cycle. The result goes into the unit's single result
   register. A unit dispatches only when that register is empty or is being
   granted the bus in the same cycle.
5. **Write-back.** `cdb_arbiter` grants one result register per cycle, round-robin.
   The winner's `{tag, value}` reaches every station, buffer and register file.
   A register still renamed to that tag takes the value and becomes current. If a
   newer rename of the same register happens in the same cycle, the rename wins.

An entry stays allocated until its own result has been broadcast, so a tag is
never reused while its value is still in flight. Tags are fixed per entry:

| Tags | Owner |
|---|---|
| 1-3 | general unit reservation station |
| 4-6 | vector unit 1 reservation station |
| 7-9 | vector unit 2 reservation station |
| 10-12 | load buffers |
| 0 | "value present" |

Stores produce no tag.

**Branches** are resolved in the scheduler, with no speculation. A branch waits at
the queue head until both compared registers hold values. A forwarded bus value
counts. A taken branch then loads the fetch pc, discards the read in flight and
flushes the queue. No instruction after a branch issues before the branch
resolves, so no recovery is needed. The price is a stall at every loop branch
whose counter is still being computed, which is the most common stall in the
example program.

**HALT** stays at the queue head. `done` rises once every station and buffer is
empty.

## Memory ordering in the load/store buffers

`mem_buffers` gives every memory operation a 4-bit sequence number at issue. With
at most six memory operations in flight, a modular difference is enough to tell
which of two is older. The rules are:

- **A load** may start once its address operands are present and, for every
  *older* store still in the store buffer, that store's address is known and its
  word lies outside the load's byte range. Data is not needed for this check. The
  range is `[base, base+3]` for LW and `[base, base + 3*pitch + 3*step]` for a 4x4
  load. That interval is conservative: it may hold a load back needlessly but
  never lets it read stale data. Loads start in any order among themselves.
- **Stores** write in program order, once their address and data are present and
  every *older* load has finished reading. Because nothing is speculative, a store
  writes as soon as it is allowed; there is no commit stage.

So a load can overtake a store still waiting for its data (pulse `events[2]`).
A load that depends on an older store waits for it (pulse `events[3]`) and then
reads the stored value from memory. There is no store-to-load forwarding.

**4x4 block loads** use the bank layout of `dcache`. Words are interleaved over
four banks by word address modulo 4, so one synchronous read returns the four
consecutive words starting at `addr >> 2` for any byte address. Those 16 bytes
hold one row of either load form:
- `LD4X4`: four adjacent bytes at any alignment;
- `LD4X4_2`: four bytes spaced four apart.

The load buffer issues one row read per cycle and gathers four bytes from each
returned row. It builds the 128-bit vector and places it in its result register.
From allocation to that register takes 5 cycles for a 4x4 load and 2 for LW.
Only one load is in the SRAM at a time.

## Interface of `vrisc_top`

| Port | Use |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset of all control state |
| `run` | fetch and issue enable; load memories while low |
| `host_iwr`, `host_iaddr`, `host_iwdata` | write the instruction SRAM (word address) |
| `host_dwr`, `host_drd`, `host_daddr`, `host_dwdata`, `host_drdata` | write/read the data SRAM by word address, read data one cycle later; do not use while the core accesses memory |
| `done` | HALT reached and all work finished |
| `counters[4]` | cycles (while running and not done), instructions issued, vector instructions issued (includes the 4x4 loads and the lane moves), issue-stall cycles |
| `dbg_greg`/`dbg_gval`, `dbg_vreg`/`dbg_vval` | read a register |
| `events[6:0]` | one-cycle pulses: branch stall, station-full stall, load overtook a store, load held by a store, store written, taken branch, bus contention |

The host ports stand where the second-level caches and main memory would refill
the L1 memories. Those levels are not part of this RTL.

Parameters, with defaults: `IMEM_WORDS = 1024` (4 KiB program), `DMEM_WORDS = 4096`
(16 KiB data) and `IQ_DEPTH = 8`. Station and buffer depths, and the register
counts, are set in `vrisc_pkg`.

To run a program:
1. Reset the core.
2. With `run` low, write the program and the data.
3. Raise `run` and wait for `done`.
4. Read the results back through `host_drd`.

The instructions per cycle are `counters[1] / counters[0]`.

## What is not in this RTL, and how far to trust it

- **No caches.** `icache` and `dcache` are plain SRAMs that hold the whole program
  and working set. They have no tags, misses or refill. The L2 instruction and
  data caches and the SDRAM main memory are not modelled. The 4x4RD behaviour of
  also filling a lower-level cache therefore does not apply.
- **Single issue.** One instruction issues per cycle and one result is written back
  per cycle, so the IPC can never exceed 1. The out-of-order configuration this
  architecture was evaluated in plots an IPC between 2 and 2.5 for motion
  estimation. Reaching that needs a wider issue stage and more than one result bus.
- **4x4 loads take four SRAM cycles**, not one. The compute instructions (SAD,
  SATD, NAC, NAC2) do take one cycle.
- **SATD** returns the raw Hadamard sum. It is not reused as a 4x4 DCT, although the
  same butterflies could serve one.
- **The semantics of NAC/NAC2** are defined here: lane layout, clamping, and the
  up-sampled plane for quarter-pel search. So are the up-sampled-plane reading of
  4x4RD2 and the VINS/VEXT lane moves.
- **The scalar ISA** is deliberately small. It has no multiply and no byte loads or
  stores. It is not binary-compatible with any existing processor.
- **Memory limits.** The default 16 KiB data SRAM holds:
  - the ±16-pel integer search windows of one macroblock for five reference
    frames (5 x 48 x 48 + 256 = 11776 bytes);
  - a ±2-pel quarter-pel window of one reference (80 x 80 = 6400 bytes).

  It cannot hold:
  - a whole QCIF frame (176 x 144 = 25344 bytes);
  - a fully up-sampled ±16 window (192 x 192 = 36864 bytes).

  Those must be streamed in through the host port.

Every module has a self-checking testbench. Each testbench was also run against a
deliberately broken copy of its module and reported failures. Assertions check the
handshake rules, for example no allocation into a full station and at most one bus
grant per cycle.

## Simulation

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. Build one
with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/vrisc_pkg.sv tb/tb_vrisc_top.sv \
          --top-module tb_vrisc_top -o sim
./obj_dir/sim
```

`tb_vrisc_top` runs the core at its default sizes. It loads three pictures into
data memory:
- a 16x16 macroblock;
- a 32x32 reference picture;
- a 32x32 quarter-pel plane, which is an 8x8 picture up-sampled 4x.

The program then runs a full search over 3x3 integer candidates. For each 4x4
sub-block it runs NAC, VEXT twice, two LD4X4 and SAD, accumulating the cost. Each
candidate's cost is stored and read back. The program then evaluates one
quarter-pel candidate with NAC2, LD4X4_2 and SATD.

The testbench checks:
- every cost, against its own computation;
- the instruction count read by MFC;
- the counters.

It also requires each mechanism to occur at least once:
- a branch stall;
- a full-station stall;
- a load overtaking a store;
- a load held by a store;
- a taken branch;
- bus contention;
- use of both vector units.

A typical run is about 2400 cycles for about 1830 issued instructions, an IPC near
0.75. Most of the stall cycles are loop branches waiting for their counter. This
core issues one instruction per cycle, so its IPC is bounded by 1 (see the
limits above).

`tb_me_full_search` runs the motion estimation of one 16x16 macroblock against
one reference frame, at the default sizes, in two phases:
1. **Integer full search.** Every candidate in a ±16-pel range (33 x 33 = 1089
   candidates) on a 48x48 window, with SAD as the cost.
2. **Quarter-pel refinement.** The 7 x 7 quarter-pel candidates within ±3/4 pel of
   the integer result, with SATD as the cost. They are read from an 80x80
   up-sampled copy of the 20x20 pels around the match.

The testbench does the up-sampling itself, bilinearly; the core only reads the
result. The macroblock is taken from the up-sampled plane at (+5¼, −7¼) pels,
with small noise added. The program keeps each minimum with `SLT` and a branch,
and phase 2 starts from the vector phase 1 found. The testbench repeats both
searches in software and checks the costs and the vectors: (5, −7), then
(21, −29) quarter pels. The run takes about 305,000 cycles for about 223,000
instructions (IPC ≈ 0.73). The integer phase is about 270 cycles per candidate
for 16 sub-block SADs; the refinement adds about 13,000 cycles.

The other testbenches, `tb/tb_<module>.sv`, test one module each. The datapaths
are checked against independent models: a matrix-product Hadamard for SATD,
address formulas for NAC, and a byte-array memory model for the loads. They also
check the latencies in the table above.

## Files

- `rtl/vrisc_pkg.sv`: opcodes, tag map, shared structs, encoding helpers.
- `rtl/vrisc_top.sv`: the core.
- Datapaths: `sad4x4`, `satd4x4`, `nac_unit`.
- Execution units: `res_station`, `gen_exec_unit`, `vec_exec_unit`.
- Register state: `gen_regfile`, `vec_regfile`, `ctrl_regs`.
- Memory: `mem_buffers`, `dcache`, `icache`.
- Front end: `imem_ctrl`, `instr_queue`, `ooo_scheduler`.
- Write-back: `cdb_arbiter`.
- `tb/`: one testbench per module, plus `tb_vrisc_top` (end to end) and
  `tb_me_full_search` (integer and quarter-pel search of one macroblock).
