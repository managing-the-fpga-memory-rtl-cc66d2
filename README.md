# BlueVec: a soft vector co-processor for streaming from external memory

Many FPGA workloads with large data sets are limited by memory bandwidth
rather than by logic: once external memory is saturated with useful
transfers, more compute does not help. This design implements BlueVec, a
small vector co-processor attached to a 32-bit host CPU as a
custom-instruction extension. It is built to do two things well:

* **Stream from external memory in bursts.** A DDR2 interface that moves
  64 bits on both edges of a 400 MHz clock delivers 256 bits per 200 MHz
  processor cycle. BlueVec's vectors are therefore 256 bits wide, and one
  `Load` fetches a burst of consecutive vectors. The load is non-blocking,
  so the next block of data can be fetched while the current one is being
  processed.
* **Scatter updates into on-chip memory.** Each 16-bit vector lane has its
  own block RAM, addressed independently by that lane's element of an
  address vector. This fits sparse accumulations such as
  `ivalues[targets[i]] += weights[i]` in spiking-neural-network simulation.

The RTL follows the architecture described in *Managing the FPGA Memory
Wall: Custom Computing or Vector Processing?* (Naylor, Fox, Markettos and
Moore). That description gives the instruction semantics, pipeline and
latencies. It does not give the encodings, handshakes, buffer sizes or
memory depths. The choices made for those are listed in
[Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## System organisation

```
 host 0 ──custom instr──► bluevec_core 0 ──┐
 host 1 ──custom instr──► bluevec_core 1 ──┤
 host 2 ──custom instr──► bluevec_core 2 ──┼─► mem_arbiter ──► external memory (256-bit)
 host 3 ──custom instr──► bluevec_core 3 ──┘
```

`bluevec_system` is the top level: `NUM_CORES` (default 4) cores share one
external memory port. The four-core setting is the one for which the
architecture was reported to come within a factor of two of a hand-built
custom pipeline. Not included:

* the host processors (a NIOS II in the original system);
* their local memories and the network between them;
* the DDR2 controller.

Each core's custom-instruction port and the shared memory port are top-level
ports. The custom-instruction signals are packed arrays indexed by core.

Each `bluevec_core` contains:

| module | role |
|---|---|
| `vec_regfile` | 32 × 256-bit registers. Three asynchronous read ports and three prioritised write ports. |
| `vec_alu` | Lane-parallel byte/half-word/word arithmetic in the execute stage. |
| `vec_mul` | Lane-parallel multiplier, fully pipelined, 3-cycle latency. |
| `lane_local_mem` | 16 half-word block RAMs, one per half-word lane. |
| `mem_unit` | Burst-read / single-write memory master, load buffer and Commit. |
| `rec_play_mem` | Instruction memory plus sequencer for record/playback. |

Types, opcodes and the instruction record are in `bluevec_pkg`.

## Programming model

A vector is 256 bits. Depending on the instruction suffix it holds 32 bytes
(B), 16 half-words (H) or 8 words (W). Each custom instruction carries:

* three 5-bit register fields `a`, `b`, `c`;
* two 32-bit scalars `dataa`, `datab` from the host;
* an 8-bit extension field `n`: `n[6:2]` is the opcode and `n[1:0]` the
  element width (0 = B, 1 = H, 2 = W).

`bluevec_pkg::ci_ext(op, ew)` builds `n`.

| opcode | operation (per lane i) | fields used |
|---|---|---|
| `OP_NOP` 0 | nothing | – |
| `OP_ADD` 1, `OP_SUB` 2 | `vc[i] = va[i] ± vb[i]` | a, b, c |
| `OP_SHL` 3, `OP_SHR` 4 | `vc[i] = va[i] << s` / `>>> s` (arithmetic), `s = dataa[4:0]` | a, c, dataa |
| `OP_MUL` 5 | `vc[i] = low bits of va[i] × vb[i]` | a, b, c |
| `OP_CMP` 6 | `vc[i] = (va[i] <= vb[i]) ? 1 : 0` (signed) | a, b, c |
| `OP_COND` 7 | `vc[i] = vb[i] ? vc[i] : va[i]` (`a` = else, `b` = condition) | a, b, c |
| `OP_SET` 8 | `vc[i] = dataa[i] ? datab : vc[i]` (masked broadcast) | c, dataa, datab |
| `OP_INDEX` 9 | result = `va[dataa]`, sign-extended | a, dataa |
| `OP_HTOW` 10 | word i = half-word `dataa[0] ? 2i : i` of `va`, sign-extended | a, c, dataa |
| `OP_WTOH` 11 | half-words 0–7 = low halves of `va`'s words; 8–15 = those of `vb` | a, b, c |
| `OP_LDLOCAL` 12 | `vc[i] = LOCAL_i[va[i]]` (H only) | a, c |
| `OP_STLOCAL` 13 | `LOCAL_i[vb[i]] = va[i]` (H only) | a, b |
| `OP_LOAD` 14 | `v(c+k) = MEM[dataa + 32k]` for k < `datab`, visible after Commit | c, dataa, datab |
| `OP_STORE` 15 | `MEM[dataa] = va` | a, dataa |
| `OP_COMMIT` 16 | write all loaded vectors into the register file | – |
| `OP_RECORD` 17 | start recording at `dataa` / stop recording | dataa |
| `OP_PLAYBACK` 18 | issue recorded instructions `dataa .. datab-1` | dataa, datab |

Memory addresses are byte addresses, as a C pointer would give them.
Vectors are 32-byte aligned: the low five address bits are ignored.
Destination registers of a burst wrap modulo 32.

## The pipeline and when results can be read

This is the part a programmer must get right, because the hardware does not
interlock every hazard.

The host pulses `ci_start` with an instruction. The core latches it and
issues it in the next cycle, unless it has to stall (see below). The
pipeline has three stages:

```
cycle   t        t+1          t+2            t+3
        F        E            W
        fetch    execute      write back
        (issue)  ALU,         register file,
                 local RAM    Index result
        Mul ──► mult stage 1 ─► stage 2 ─► stage 3: written + forwarded
```

* **F (issue)**: the instruction reads up to three registers. Each operand
  is overridden, youngest first, by one of:
  * the result being computed in E;
  * the result held in W;
  * a product leaving the multiplier.

  Loads, stores and multiplies leave the main pipeline here.
* **E**: the lane ALU computes; the lane-local RAMs are read or written.
* **W**: the result is written to the register file. Index returns its
  scalar to the host.

The resulting rules, measured in instructions issued after the producer:

| producer | first instruction that may read the result | why |
|---|---|---|
| ALU instruction | the next one | forwarded from E |
| `LoadLocalH` | the second one (put a `NoOp` or an unrelated instruction between) | block-RAM data exists only in W |
| `Mul` | the third one (two instructions between) | 3-cycle multiplier |
| `Load` | the first one after the `Commit` | data stays in the load buffer |

Reading too early returns the older register value; no error is raised.

Host-visible completion (`ci_done` pulse):

* Ordinary instructions, `Load` and `Store` complete in their issue cycle:
  one cycle after `ci_start` when nothing stalls.
* `Index` completes three cycles after issue, with the element on
  `ci_result`.
* `Commit` completes when every loaded vector has been written.
* `Playback` completes one cycle after its last instruction has issued.
* `Record`, and any instruction captured while recording, complete one
  cycle after `ci_start`.

The host must wait for `ci_done` before it starts the next instruction. An
assertion checks this.

## Loads, Commit and stores

`mem_unit` turns each `Load` into one read burst of `datab` beats, and each
`Store` into one write. Both enter a small in-order command queue (`CMDQ`)
in the cycle they issue. They stall issue only when that queue is full.

Returned beats do not go into the register file. They go into a load
buffer, each tagged with its destination register.

`Commit` is the only blocking memory instruction. It waits until:

1. older instructions, including multiplies, have left the pipeline;
2. every requested vector has arrived.

Then it writes the buffer into the register file, one vector per cycle.

This is what allows the double-buffered loop below: the next block's loads
are issued right after a `Commit` and overlap the processing of the current
block.

The load buffer has `LDBUF` (32) entries. A load is accepted only when
space for all of its beats is reserved, so the memory never has to be
throttled on read data. As a consequence, software must `Commit` before it
has more than 32 vectors outstanding. A 33rd would stall forever.

Burst lengths are clamped to 1..`MAX_BURST` (a length of 0 is treated as
1).

## Lane-local memories and I-value accumulation

Each of the 16 half-word lanes has `LOCAL_DEPTH` (4096) 16-bit entries.
Lane i uses only the low 12 bits of half-word i of the address vector. A
read returns one cycle late.

Suppose the targets are laid out so that the target in half-word position i
of a vector is a neuron held by lane i. Then a whole vector of synaptic
updates can be applied with no conflicts:

```
Load(v8, targets, 8); Load(v16, weights, 8);          // 128 updates
loop:
  Commit;
  Load(v8, next_targets, 8); Load(v16, next_weights, 8);  // prefetch
  Playback(0, 32);    // recorded once:  for j in 0..7:
                      //   LoadLocalH(v0, v8+j); NoOp;
                      //   AddH(v0, v0, v16+j); StoreLocalH(v0, v8+j)
```

A `StoreLocalH` is written at the end of its E cycle, so a `LoadLocalH`
issued right after it sees the new value.

## Record and playback

A host cannot issue custom instructions back to back. Time-critical
sequences are therefore recorded once and replayed at one instruction per
cycle.

* `Record(x)`, while recording is off, starts recording at instruction
  address `x`.
* Every following host instruction is stored, not executed, until the next
  `Record`, which stops recording.
* `Playback(b, e)` issues entries `b .. e-1`.

Recorded instructions keep the scalar operands they were recorded with:
a sequence is a subroutine without parameters. Playback stalls only on
`Commit` and on a full memory command queue. Inside a played sequence:

* `Index` results are discarded;
* `Record` and `Playback` do nothing.

The instruction memory has `IMEM_DEPTH` (1024) entries and a registered
read. It re-reads the current entry while stalled.

## Shared memory port

The memory port is an Avalon-MM style burst master:

* `address` is a byte address;
* `read` and `write` are held until `waitrequest` is low;
* `burstcount` gives the read length;
* read data returns in order, with `readdatavalid`.

`mem_arbiter` grants the shared port round-robin, one command at a time. A
read's owner and length go into an in-order queue (`OUTQ` = 16 entries),
which steers the returning beats. No new read is granted while that queue
is full. The arbiter adds no register stage.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_CORES` | 4 | system | vector cores sharing the memory |
| `LOCAL_DEPTH` | 4096 | system, core | entries per lane-local RAM (64k I-values per core) |
| `IMEM_DEPTH` | 1024 | system, core | record/playback instruction memory |
| `LDBUF` | 32 | system, core, mem_unit | uncommitted loaded vectors |
| `MAX_BURST` | 32 | system, core, mem_unit | longest burst; sets `burstcount` width (6 bits) |
| `CMDQ` | 4 | core, mem_unit | memory command queue |
| `MUL_LAT` | 3 | core | multiplier latency (the programming rules assume 3) |

Vector width (256), lane counts and the 32-register file are fixed in
`bluevec_pkg`.

## Where this RTL makes its own choices

These points are not fixed by the published description:

* the opcode numbers and the use of `n`;
* the host handshake (latch, then issue);
* all queue and buffer sizes;
* the lane-memory and instruction-memory depths;
* the memory protocol and arbitration;
* reset behaviour;
* signed compare and sign-extending `Index`/`HtoW`;
* the two shift instructions;
* the `WtoH` operand layout;
* whether recorded instructions also execute (here they do not).

Two points deserve a note:

* **`HtoW` word i.** It takes half-word `2i` when `upper` is set and
  half-word `i` otherwise. This follows the published formula as printed.
  It may not be what was meant for the "upper" case: half-words 8–15 would
  be the natural alternative.
* **Multiplier forwarding.** The published pipeline forwards only from E
  and W. Here the multiplier output is forwarded too. This makes the stated
  rule ("wait two further cycles after a Mul") hold.

Each source file's opening comment says which parts of that block are taken
from the published design and which are this implementation's choices.

The custom accumulator pipeline that the architecture was compared against
is not included. Neither are the scalar-only multi-core configurations.

## Simulation and tests

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it establishes |
|---|---|
| `tb_vec_alu` | every ALU operation and width against an integer reference; Index for every position |
| `tb_vec_mul` | random multiplies every cycle; each result exactly 3 cycles later |
| `tb_vec_regfile` | three read and three write ports; write priority on collisions |
| `tb_lane_local_mem` | per-lane addressing; one-cycle read latency; read-after-write |
| `tb_rec_play_mem` | exact replay; N instructions in N cycles; random stalls; empty range |
| `tb_mem_unit` | burst loads and stores against a memory with random `waitrequest`; commit order and tags; buffer reservation |
| `tb_mem_arbiter` | four masters; contention; every beat to its owner; no starvation |
| `tb_bluevec_core` | see below |
| `tb_bluevec_system` | see below |

`tb_bluevec_core` runs one core through:

* burst loads and Commit;
* filling the lane memories;
* a random 300-instruction program, recorded and played back, checked
  against a reference model;
* `Index` latency.

`tb_bluevec_system` runs all four cores at the default sizes. Each core does
the double-buffered I-value accumulation loop above against one shared
memory. It checks every accumulated value. It also requires each of these
to have happened at least once:

* forwarding from E, from W and from the multiplier;
* `Commit` waiting for load data;
* burst reads, recording and playback;
* memory-queue back-pressure, `waitrequest` stalls and arbiter contention;
* stores and `Index`.

`tb_ivalue_burst` runs the same workload on one core at the default sizes,
with 1024 updates, done two ways:

* the plain loop, with single-vector loads and every instruction issued by
  the host;
* the burst-and-playback loop.

The host is modelled as issuing one instruction every three idle cycles.
The plain loop takes about 1.9 cycles per update and the burst loop about
0.5; the test requires the burst loop to be faster.

`tb/avalon_mem_model.sv` is a behavioural memory with latency and random
`waitrequest`, used only by the testbenches.

To run a testbench with Verilator 5, from the repository root (the package
is named first; `-y` finds every other module by its file name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/bluevec_pkg.sv tb/tb_bluevec_system.sv --top-module tb_bluevec_system -o sim
./obj_dir/sim
```

Substitute any other testbench name. The simulator starts uninitialised
state at random values; the design resets everything it reads, and the
lane-local and instruction memories are written before they are read.
