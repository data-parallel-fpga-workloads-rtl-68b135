# VESPA: a soft vector processor in SystemVerilog

VESPA gets data-parallel performance out of an FPGA without a custom circuit
for each job. Instead of designing a dedicated datapath per application, you
run vector code on a processor whose size and features are set by
parameters:

* the number of vector lanes;
* the lane width;
* the maximum vector length;
* the width of the memory crossbar;
* the data-cache geometry;
* the prefetcher;
* which vector instructions exist at all.

A small in-order MIPS core runs the scalar code and the loop control. Vector
instructions in the same instruction stream go to a vector coprocessor. In the
coprocessor, L lanes each handle one element per cycle in a short pipeline.

Three features narrow the gap to custom hardware:

* **Wide cache line.** One data-cache line (64 bytes by default) can feed all
  lanes in one cycle through the crossbar.
* **Decoupled control pipeline.** Vector-control instructions (set length, set
  stride) execute in parallel with vector work. Loop bookkeeping then costs no
  vector cycles.
* **Sequential prefetcher.** It sizes its prefetch from the current vector
  length, so a streaming vector instruction misses at most once.

The defaults give the fastest configuration:

| Parameter | Default |
|---|---|
| Lanes L | 16 |
| Crossbar slots M (full crossbar) | 16 |
| Lane width W | 32 bits |
| Maximum vector length MVL | 64 |
| Data cache | 16 KB, direct-mapped, 64-byte lines |
| Prefetch | 8 × VL elements on each low-stride vector miss |

```
          +-----------+      +--------+--------+-- ... --+
          |  vector   |----->| lane 0 | lane 1 |  lane L-1|   (vector_lane x L)
          |  coproc   |      +--------+--------+----------+
          +-----------+             ^  per-lane element ports
             ^    |                 |
 instr +     |    +--> vmem_unit ---+--> vmem_crossbar
 rs/rt       |                              |  line <-> M slots
          +--+--------+                     v
          | scalar    |  word port   +--------------+
          | MIPS core |------------->|   dport_mux  |  one request port
          +-----------+              +--------------+
               ^                            v
          +---------+                 +------------------------+
          | icache  |                 | dcache + prefetcher    |
          +---------+                 | + dirty-line buffer    |
               |                      +------------------------+
               +---------> mem_arbiter <------+
                               |
                        DDR memory port (m_*)
```

All blocks share these conventions:

* a synchronous, active-low reset `rst_n`;
* one clock `clk`;
* one module per file in `rtl/`;
* the shared types and constants live in `rtl/vespa_pkg.sv`.

## The shared instruction stream

The scalar core fetches every instruction. Vector instructions use the MIPS
COP2 major opcode (`6'b010010`). The core does not execute them. When such an
instruction reaches the core's execute stage, the core hands it to the
coprocessor, together with the current values of its scalar registers `rs`
and `rt`. Scalar operands therefore cost nothing: an address base, a scalar
multiplier or a new vector length travels with the instruction.

The vector instruction layout is this design's own:

| bits | field |
|---|---|
| 31:26 | COP2 |
| 25:21 | `va`, or scalar `rs` (memory base, control value) |
| 20:16 | `vb`, or scalar `rt` (scalar operand) |
| 15:11 | `vd` (destination; the source of a store) |
| 10 | masked: write only the elements whose flag is set |
| 9:8 | element size of a load or store: 0 byte, 1 halfword, 2 word |
| 7 | vector-scalar form: operand b is scalar register `rt` |
| 5:0 | function (`vfunc_e` in `vespa_pkg`) |

The functions are listed below. Codes 0 to 16 are the ALU operations; their
bit numbers are also the bits of the `OP_EN` subsetting mask.

* **Arithmetic (codes 0–5):** `VADD VSUB VMUL VAND VOR VXOR`.
* **Shifts (codes 6–8):** `VSLL VSRL VSRA`.
* **Min, max, absolute value (codes 9–11):** `VMIN VMAX VABS`.
* **Saturating (codes 12–13):** `VSADD VSSUB`.
* **Compares (codes 14–15):** `VCMPEQ VCMPLT`. They write the flag register.
* **Merge (code 16):** `VMERGE`. Where the flag is set it picks b, else a.
* **Memory:** `VLD` (32) and `VST` (33). These are strided loads and stores.
  The base comes from `rs`; the stride is the one last set.
* **Control:** `VSETVL` (48) sets VL = min(rs, MVL). `VSETSTR` (49) sets the
  stride, in elements.

The scalar core runs a MIPS-I integer subset:

* loads and stores: `LW LBU SW SB`;
* immediate operations: `ADDIU SLTI SLTIU ANDI ORI XORI LUI`;
* register operations: `ADDU SUBU AND OR XOR NOR SLT SLTU`;
* shifts: `SLL SRL SRA SLLV SRLV`;
* jumps and branches: `J JAL JR BEQ BNE`;
* `BREAK`, which halts the core.

There is no branch delay slot, no multiply or divide, and no exceptions.
`tb/tb_asm_pkg.sv` has encoder functions (`r_type`, `i_type`, `br`, `vop`,
`vmem`, `vctl`, `halt`). The testbenches build their programs with them.

## Scalar core (`scalar_mips`, `bht`)

The core is a 3-stage in-order pipeline with full forwarding:

* **F (fetch)** reads the instruction cache and predicts the next PC:
  * `J` and `JAL` redirect at once;
  * `BEQ` and `BNE` follow a 1-bit branch history table of 64 entries,
    indexed by the word address.
* **D (decode)** reads the register file. The result from E is forwarded into
  it.
* **E (execute)** does all of the following:
  * computes ALU results;
  * resolves branches and updates the table;
  * accesses the data cache;
  * writes the register file;
  * issues vector instructions.

A mispredicted branch or a `JR` flushes F and D, which costs two cycles.

E stalls in three cases:

* on a data-cache miss;
* when the coprocessor's queue is full (`vready` low);
* when a scalar load or store meets `vmem_busy`.

`vmem_busy` is high while any vector load or store is queued or running. This
one rule serialises scalar and vector memory accesses, which keeps memory
sequentially consistent. All other scalar and vector work runs out of order
with respect to each other. A scalar loop can run ahead of the vector unit by
up to the queue depth.

## Vector coprocessor (`vector_coproc`)

This is the most important part of the design to understand. It has three
parts: the control pipeline, the queue, and the sequencer.

**Vector-control pipeline.** `VSETVL` and `VSETSTR` execute in the cycle they
arrive. They do not wait for vector work that is still queued or running. The
queue never holds them.

**Instruction queue.** The queue holds 4 entries by default (`QDEPTH`). Every
other vector instruction enters it together with:

* its scalar operands;
* a copy of the VL and stride in force at that moment.

That copy keeps program order correct. A loop can set the next iteration's
vector length while the previous iteration's instructions are still queued, and
each instruction still runs with its own VL. This is the decoupling that
removes loop overhead. The testbenches count `ev_ctrl_overlap`, a control
instruction that arrives while vector work is pending. In the full-size run it
happens for 59 of the 62 control instructions executed.

**Sequencer.** One vector instruction is in flight at a time.

* **ALU instruction.** It is sent to all lanes over ceil(VL/L) cycles. In group
  g, every lane works on entry g, and lane j is active when g·L + j < VL. One
  extra cycle follows to drain the two-stage lane pipeline. The cost is
  therefore ceil(VL/L) + 1 cycles after the cycle that takes the instruction
  from the queue.
* **Load or store.** It is handed to the vector memory unit, and the sequencer
  waits until the memory unit reports done.

**Where elements live.** Element e of every register is held in lane
e mod L, at entry e / L. Each lane keeps its slice of all 32 vector registers
(`MVL/L` entries each) and its slice of the flag register.

## Lanes (`vector_lane`)

Each lane is a two-stage pipeline:

1. **Stage 1** reads operands a and b. Operand b is either a vector register
   or the broadcast scalar.
2. **Stage 2** computes the result and writes it back.

A compare writes the flag bit instead of a register. A masked instruction
writes only where the flag is set. Separate ports let the memory unit write
loaded elements and read elements to store. They never collide with the ALU,
because only one instruction runs at a time.

Two parameters trim a lane down for a specific application:

* **`W`, the lane width.** It can be anything from 1 to 32 bits. Elements are
  kept in W bits; loads keep the low W bits, and stores zero-extend. At
  W = 1 an element is a two's-complement bit (0 or -1): add and subtract
  become XOR, and saturating arithmetic clamps to [-1, 0]. The lane
  testbench runs a 1-bit lane alongside the 16-bit one.
* **`OP_EN`, the per-instruction subsetting mask.** It has one bit per ALU
  operation. A cleared bit removes that operation's logic from the lane, and
  the operation then writes zero.

## Vector memory unit and crossbar (`vmem_unit`, `vmem_crossbar`)

A strided access touches VL elements, at addresses base + i·stride·size.

**Grouping (`vmem_unit`).** Each cycle the unit forms one group from the next
up to M elements. A group is the run of consecutive elements that:

* are still below VL, and
* lie in the same cache line as the first element of the group.

The unit asks the data cache for that line. When the cache acknowledges, the
unit advances past the group. The throughput depends on the access:

| Access | Elements per cycle |
|---|---|
| Unit-stride bytes or halfwords, full crossbar | up to min(M, elements per line) |
| Unit-stride 32-bit words, 64-byte line, M = 16 | 16 (one line per cycle) |
| Stride 3 on bytes | about 21 per line, capped at M |
| Large stride | 1 |

The grouping rule is this design's own. It turns "M elements of one line per
cycle" into hardware.

**Routing (`vmem_crossbar`).** The crossbar is purely combinational. Slot k of
a group carries element idx+k, which lives in lane (idx+k) mod L. Routing is
therefore a rotation by `lane_base = idx mod L`, followed by a byte selection
at each slot's offset in the line.

* **Loads:** each receiving lane gets its element, zero-extended.
* **Stores:** each slot writes its bytes into the outgoing line and sets the
  byte enables. The cache merges only the enabled bytes. If two slots hit the
  same byte (stride 0), the later element wins.

**Cost.** Reducing M below L shrinks the crossbar, at the cost of more cycles
per line.

## Data cache, prefetcher and dirty-line buffer (`dcache`, `prefetcher`)

The data cache is direct-mapped, write-back and write-allocate. Its size is
`SIZE_KB` (DD) and its line length is `LINE_B` (DW). The scalar core and the
vector unit share it through `dport_mux`, which does two things:

* it widens the core's word accesses into line accesses with byte enables;
* it passes on the prefetch hints of vector requests (VL and byte stride).

**Hits.** A hit is answered in the request's own cycle:

* `ack` is combinational;
* read data is valid with `ack`;
* a write is stored on that clock edge.

**Misses.** A miss starts a fill sequence. The sequence covers the missing line
and then `n_extra` following lines, and handles each line in turn:

* a line that is already present is skipped;
* otherwise any dirty victim is dealt with (see below), and then the line is
  read from memory.

The requester keeps its request up and is served when the whole sequence has
finished. The cache is blocking.

**How many lines to prefetch (`prefetcher`, combinational).**

* With `DPK > 0` and `DPV = 0`, every miss also fetches the next DPK lines.
* With `DPV > 0`, only vector accesses prefetch, and only low-stride ones
  (positive byte stride below one line). They fetch
  ceil(DPV · VL · stride_bytes / line) lines, which holds DPV times the current
  vector length. A strip-mined loop therefore misses at most once per
  instruction.
* With `DPV_BY_VL = 0`, `DPV` is instead a constant number of elements:
  ceil(DPV · stride_bytes / line) lines.
* In all modes the count is capped at one cache's worth minus one, so a
  sequence never evicts its own demand line.

**Dirty-line buffer.** A dirty line that a prefetched line evicts is not written
back inside the sequence. It is copied into a `WB_N`-entry buffer (2 by
default), and the sequence goes straight on to the next read.

* The buffer drains to memory while the fill machine is idle, so the cache
  keeps serving hits meanwhile.
* A new miss waits until the buffer is empty. Memory therefore never returns a
  line whose newer copy is still in the buffer.
* The dirty victim of the demand line itself is written back before its read.
  So is any victim that finds the buffer full.

## Instruction cache and memory arbiter (`icache`, `mem_arbiter`)

**Instruction cache.** It is direct-mapped and read-only: 4 KB, with lines as
wide as the memory port. A lookup is combinational. On a miss the cache latches
the missing address and reads one line. Because the address is latched, a
branch redirect during the fill is harmless.

**Arbiter.** It shares the single line-wide DDR port between the two caches:

* it grants round-robin;
* it stays locked during a read until the data has returned, so only one read
  is outstanding at a time;
* the read data bus goes to both caches, and only `rvalid` is steered;
* it sends no request while `rst_n` is low.

**Memory port.** It works as follows:

* `m_valid`, `m_we`, `m_addr` and `m_wdata` are held until `m_ready`;
* a write completes when it is accepted;
* read data comes back later, with `m_rvalid`;
* addresses are line-aligned byte addresses, and data is one line.

The DDR controller itself is not part of the RTL. `tb/ddr_model.sv` stands in
for it in simulation, with a fixed latency.

## Top level (`vespa_top`)

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `L` | 16 | vector lanes |
| `M` | 16 | crossbar slots (≤ L) |
| `W` | 32 | lane width in bits |
| `MVL` | 64 | maximum vector length (a multiple of L) |
| `DD_KB` | 16 | data-cache size, KB |
| `DW` | 64 | line size in bytes (data cache, instruction cache, memory port) |
| `DPK` | 0 | lines prefetched on every miss (used when `DPV` = 0) |
| `DPV` | 8 | vector prefetch, in multiples of VL |
| `DPV_BY_VL` | 1 | 0: `DPV` is a constant element count instead |
| `IC_B` | 4096 | instruction-cache size in bytes |
| `BHT_N` | 64 | branch-table entries |
| `QDEPTH` | 4 | vector instruction queue depth |
| `OP_EN` | all ones | vector ALU operations present |
| `RESET_PC` | 0 | first instruction address |

Ports:

* `clk` and `rst_n`;
* the memory port `m_*`;
* `halted`, which is high after `BREAK`;
* `done`, which is `halted` and the coprocessor idle;
* `vl`, the current vector length;
* `events[6:0]`, one-cycle pulses for counting. In bit order:
  * [0] branch mispredicted;
  * [1] control instruction overlapped vector work;
  * [2] vector instruction retired;
  * [3] instruction-cache miss;
  * [4] data-cache miss;
  * [5] line prefetched;
  * [6] dirty line written back.

The default build synthesises to roughly:

* 3.6 k cells, not counting memories;
* 1.8 k flip-flop bits;
* 237 k bits of memory arrays (the register files, the caches and the
  branch table).

## Benchmark kernels

`tb/tb_workloads.sv` runs five data-parallel kernels, coded by hand in the
vector instruction set above, on the default build. They show how typical
media and telecom loops map onto the design:

* **RGBCMYK** converts 300 pixels.
  * Stride-3 byte loads read the three colour planes.
  * `VXOR` with 255 inverts them.
  * Two `VMIN` give k, and three `VSUB` subtract it.
  * Four stride-4 byte stores interleave the CMYK output.
* **RGBYIQ** converts 300 pixels.
  * Vector-scalar `VMUL` uses signed constants held in scalar registers.
  * `VSRA` gives the signed I and Q results, stored as halfwords.
  * Y is stored as bytes.
* **IP_CHECKSUM** sums 1000 halfwords.
  * 64 partial sums accumulate in one vector register; the last strip is
    partial and leaves the other elements untouched.
  * A vector store writes the partial sums out.
  * A scalar subroutine, called with `JAL` and left with `JR`, adds them. The
    subroutine's loads wait for the vector store (`vmem_busy`).
  * The core folds the carries and complements the result.
* **AUTCOR** computes 16 lags over 512 16-bit samples. Each lag uses two loads
  at offset bases, a vector multiply-accumulate, and the same scalar reduction.
* **CONVEN** is a rate-1/2 convolutional encoder over 512 one-bit symbols.
  Loads at base−1, −2 and −3 supply the delayed inputs, and `VXOR` combines
  them.

Cycle counts at the default parameters (memory latency 6 cycles):

| Kernel | Size | Cycles |
|---|---|---|
| RGBCMYK | 300 pixels | 959 |
| RGBYIQ | 300 pixels | 1170 |
| IP_CHECKSUM | 1000 halfwords | 1147 |
| AUTCOR | 512 samples, 16 lags | 8480 |
| CONVEN | 512 symbols | 716 |

No vector reduction instruction exists, so every reduction ends in a 64-word
scalar loop. That loop dominates AUTCOR.

## Where this design departs from the original VESPA

This RTL describes the architecture of VESPA, but it is not the original
Verilog. The following parts are this design's own:

* **Vector instruction set.** It covers the kinds of operation VESPA supports:
  integer and fixed-point arithmetic, min/max, flag-based predication, strided
  memory access and vector-length control. It is not the full VIRAM-derived
  set. Not built:
  * reductions;
  * vector-scalar moves;
  * indexed (gather/scatter) memory access;
  * multiple flag registers;
  * MVL changes at run time.
  The encoding is new.
* **Scalar core.** It keeps the original's 3-stage pipeline, full forwarding
  and 1-bit branch history. The stage split, the integer subset and the
  2-cycle misprediction cost are choices of this design.
* **Cache timing.** Hits are same-cycle, and the cache is blocking during a
  fill sequence.
* **Dirty-line buffer.** Its depth and the drain-before-miss rule are this
  design's choices. The original only says that the dirty victims of prefetched
  lines are buffered.
* **Prefetch amount.** `DPK` counts lines and applies to every miss. `DPV`
  counts elements and applies only to low-stride vector accesses: a multiple
  of VL by default, or a constant with `DPV_BY_VL = 0`. What counts as a low
  stride (positive, below one line) is this design's choice.
* **Element format.** Element sizes are byte, halfword and word, aligned to
  their size and zero-extended.
* **Parallelism.** One vector instruction is in flight at a time. There is no
  chaining, and no overlap of vector ALU and vector memory instructions.
* **Outside the RTL.** The DDR controller and memory are external. The
  dedicated hardware circuits that VESPA is measured against are comparison
  baselines and are not part of this design.

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>`, and it has a watchdog.

To build and run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/vespa_pkg.sv tb/tb_vespa_top.sv --top-module tb_vespa_top -o sim
./obj_dir/sim
```

Replace `tb_vespa_top` with any other testbench name. `-Wno-fatal` keeps lint
warnings (unused parameters and signals) from stopping the build. Every block
is reset synchronously, so the results do not depend on the initial values the
simulator picks (for example `+verilator+rand+reset+2`).

| Testbench | What it checks |
|---|---|
| `tb_vespa_full` | The whole processor at its default parameters, no overrides. The program is an image blend over 2000 16-bit pixels (strip-mined by MVL, vector-scalar multiplies), then a scalar checksum of the result, then an RGB-to-luma filter over 600 pixels with stride-3 byte loads. All 2613 checks pass in about 9,100 cycles. Every mechanism listed below must occur. |
| `tb_workloads` | The five benchmark kernels above, at the default parameters. Every output element, checksum and lag is checked against values computed in the testbench (3143 checks). |
| `tb_vespa_top` | The same program on a reduced build: 4 lanes, M = 2, MVL 16, a 1 KB cache with 16-byte lines. It counts mispredictions, control overlap, vector retirement, both kinds of cache miss, prefetches, write-backs, buffered dirty victims, scalar accesses held by vector memory work, and queue back-pressure. It fails if any never occurs. |
| `tb_scalar_mips` | A program with forwarding, mispredicted branches, JAL/JR, byte and word accesses, and vector issue, run against stalling stand-ins. Also checks one instruction per cycle plus two cycles per misprediction, and no data access while `vmem_busy` is high. |
| `tb_bht` | Random updates and predictions against a reference table. |
| `tb_vector_coproc` | Random vector programs on 4 lanes against a reference model, through a stalling cache stand-in. Also checks the ALU timing (ceil(VL/L) + 2 cycles from acceptance to idle), control instructions accepted while work is queued, and `vmem_busy` covering queued loads. |
| `tb_vector_lane` | Every ALU operation, flags, masking, the two-cycle latency, an `OP_EN`-trimmed lane, and a 1-bit-wide lane. |
| `tb_vmem_unit` | Grouping and line addresses for many strides, sizes and vector lengths. |
| `tb_vmem_crossbar` | Load and store routing against a reference model. |
| `tb_dcache` | Random traffic against a reference memory; same-cycle hits; prefetched lines hit; the buffer is used; final memory contents. |
| `tb_prefetcher` | Line counts for the DPK mode and both DPV variants, and the cap. |
| `tb_icache` | Hits, misses, and a redirect during a fill. |
| `tb_mem_arbiter` | Round-robin grants, read locking, response routing. |

The full-size run takes a few seconds in Verilator.
