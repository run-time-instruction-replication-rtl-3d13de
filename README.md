# Run-time instruction replication and binding for a fault-tolerant VLIW core

A VLIW processor issues one wide bundle per cycle, but most programs leave
many of its issue slots empty. This core uses those idle slots for fault
tolerance, in hardware and while the program runs. Each operation of a
fetched bundle is copied two or three times. The copies are packed into free
slots whose functional unit (FU) is of the right kind and still healthy.
The copies' results are then compared or voted before anything is committed.
When a unit is found to be permanently broken, the binding logic stops using
it. Both the originals and the copies are then spread over the units that
remain. The program binary is never rewritten, no spare units are added,
and the compiler knows nothing about any of this.

The RTL implements the technique described in *Run-Time Instruction
Replication for Permanent and Soft Error Mitigation in VLIW Processors*. The
source describes the mechanism and its two added blocks: the Instruction
Replication and Binding unit (IRB) and the fault detector. It names the
pipeline stages and unit mix, but not the processor's instruction set,
latencies or encodings. Those parts are this design's own and are marked
as such below.

## The machine

Eight issue slots, four pipeline stages:

```
 F ──F/DC──> DC (8 decoders) ──DC/EX──> EX: IRB + 8 issue slots ──EX/M-WB──> M/WB: fault detector + write-back
 ^                                         |                                     |        |
 └──────────── fetch_stall ────────────────┘<──────────── faulty mask ───────────┘        |
 └──────────────────────────── branch redirect (at commit) ───────────────────────────────┘
```

| slot | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|------|---|---|---|---|---|---|---|---|
| units | ALU, BR | ALU, MEM | ALU, MUL | ALU, MUL | ALU | ALU, MEM | ALU, MUL | ALU, MUL |

This gives 8 ALUs, 4 multipliers, 2 memory units and 1 branch unit, the
reference configuration of the source. Each unit in a slot is a separate FU
that can fail on its own. A broken multiplier in slot 2 does not stop slot 2
from running ALU operations.

The operating mode (`mode`, a static configuration input) selects the
protection:

| `mode` | copies | on a mismatch |
|--------|--------|---------------|
| `MODE_DMR` (0) | 2 | reported (`err_detected`, `err_uncorrectable`); the operation is not committed |
| `MODE_TMR` (1) | 3 | majority of three is committed; the outvoted copy is counted against its unit |
| `MODE_DMR_REEXEC` (2) | 2 | pipeline holds, a third copy runs on another unit, majority of three commits |
| `MODE_OFF` (3) | 1 | no checking: the unprotected reference point |

## Replication and binding (`irb`)

The IRB sits at the entry of EX. Each cycle it produces one *time slot*:
an assignment of pending copies to the eight slots. A bundle whose copies
do not all fit takes further time slots. Meanwhile `fetch_stall` holds the
fetch, F/DC and DC/EX.

The binding is a single greedy pass with a fixed order:

1. Classes are served from the scarcest to the most plentiful: BR, MEM,
   MUL, then ALU.
2. Within a class, all originals are placed first, then all first replicas,
   then all second replicas. Each group goes in bundle order.
3. Each copy takes the lowest-numbered slot that is free in this time slot
   and whose unit of that class is healthy. It must also not already hold
   another copy of the same operation.
4. Rule 3's "different unit" condition is relaxed only when the class has no
   healthy unit left that the operation has not used. For example, the one
   branch unit runs both branch copies, in consecutive time slots.

Copies that find no slot stay pending for the next time slot, so whatever
fits is placed in the first time slot. Example, a bundle `ADD1 ADD2 MUL1 ADD3`
in DMR mode with the multiplier of slot 2 broken:

```
slot:      0     1     2     3     4      5      6      7
issued:  ADD1  ADD2  ADD3  MUL1  ADD1'  ADD2'  MUL1'  ADD3'     (one time slot)
```

`MUL1` leaves slot 2 for slot 3, and `ADD3` takes the freed ALU in slot 2.
No time slot is added, where re-executing the lost operation in an extra
cycle would have cost one. The same bundle needs two time slots in TMR
(12 copies), and a bundle with a branch needs two in DMR.

The IRB's outputs per slot are the *binding info*: a valid bit, the
operation's index in the bundle and the copy number. They travel with the
results through EX/M-WB to the fault detector.

## Checking and committing (`fault_detector`)

The fault detector collects results per (operation, copy) until the
bundle's last time slot arrives. Then, in one cycle, it compares or votes
every operation and commits the whole bundle: register writes, memory
accesses and a possible branch. Commit is all-or-nothing per bundle, so
VLIW bundle semantics hold even when a bundle is spread over several time
slots. Results are compared in full: the value, plus the store data or
branch target.

**Re-execution** (`MODE_DMR_REEXEC`). A duplicate mismatch is found in the
cycle the bundle's last time slot is in M/WB. In that cycle:

- the fault detector raises `replay_req` with the mismatching operations and
  the units their two copies used;
- the time slot now in EX, which belongs to the next bundle, is dropped;
- the IRB freezes its progress on that next bundle.

In the following cycle, the IRB issues a third copy of each failing
operation, on a unit neither earlier copy used. The copy is marked
`ts_reexec`. When its result arrives, the bundle commits by majority. In
that same cycle the dropped time slot is issued again. A transient error
thus costs two cycles.

**Permanent faults.** Every unit has a counter of consecutive executions in
which it was outvoted. An execution where it agrees with the majority,
or in DMR with its twin, clears the counter. When the counter reaches `PERM_THRESH` (3), the unit is
marked faulty (`perm_declared` pulses and `fu_faulty` shows it), and the IRB
never binds to it again. A plain DMR mismatch has no majority, so it blames
no unit. Units can also be declared faulty from outside through
`fu_disable`, for example from a start-up self-test. This is how the DMR
runs with known broken units are set up. `out_of_service` rises when some
class has no healthy unit left.

## Pipeline timing

- One time slot per cycle. A bundle with *k* time slots occupies EX for *k*
  cycles.
- Registers are read in EX. A bundle commits combinationally in the cycle
  its last time slot is in M/WB. The register file is write-through, so the
  next bundle, which is in EX in that same cycle, already sees the results.
  Programs therefore see no exposed latencies: every bundle can use the
  results of the previous one.
- Loads and stores access the data memory at commit, with the compared or
  voted address. A faulty memory unit can therefore never write to a wrong
  address. Loads in one bundle read memory before that bundle's stores
  write.
- A taken branch redirects the fetch at commit and clears F/DC, DC/EX and
  the time slot in EX. The penalty is three cycles.

## Operation set (this design's own)

Every operation is 32 bits: `[31:26]` opcode, `[25:20]` rd, `[19:14]` rs1,
`[13:8]` rs2 or `[13:0]` signed immediate. There are 64 registers, and r0
reads 0.

- ALU: `ADD SUB AND OR XOR SHL SHR SRA SLT SLTU CMPEQ CMPNE`, `ADDI ANDI ORI
  XORI SHLI SHRI`, `MOVI`
- MUL: `MUL MULHU MULI`
- MEM: `LDW rd, imm(rs1)` and `STW rd -> imm(rs1)`, word addressed
- BR: `BR rs1, target` (taken if rs1 ≠ 0), `BRF` (taken if rs1 = 0),
  `GOTO`; the target is an absolute bundle address

All units have a latency of one cycle. Unknown opcodes are NOPs. The
opcode numbers are in `rtl/vliw_pkg.sv`, and `tb/tb_isa_pkg.sv` has
encoder functions.

## Top-level ports (`vliw_top`)

| port | dir | meaning |
|------|-----|---------|
| `mode` | in | protection mode (table above) |
| `imem_we`, `imem_waddr`, `imem_wdata[8][32]` | in | write one bundle into the instruction memory |
| `dmem_dbg_we/addr/wdata`, `dmem_dbg_rdata` | in/out | load and inspect the data memory |
| `rf_dbg_addr`, `rf_dbg_rdata` | in/out | read a register |
| `fi_flip[slot][class]` | in | fault injection: while high, bit 0 of that unit's result is inverted (one cycle for a soft error, held for a permanent one) |
| `fu_disable[slot][class]` | in | declare a unit faulty |
| `commit_valid`, `commit_pc` | out | a bundle committed, and its address |
| `fetch_stall`, `ts_valid`, `ts_reexec`, `replay`, `redirect` | out | pipeline events |
| `err_detected`, `err_corrected`, `err_uncorrectable`, `perm_declared` | out | error events |
| `fu_faulty[slot][class]`, `out_of_service` | out | unit status |

Class indices are ALU 0, MUL 1, MEM 2 and BR 3. Parameters and their
defaults: `IMEM_DEPTH` = 1024 bundles, `DMEM_DEPTH` = 1024 words,
`PERM_THRESH` = 3. Reset is asynchronous and active low. It clears the
pipeline, the register file and the fault status, but not the memories.

## Modules

| module | role |
|--------|------|
| `vliw_pkg` | shared types: decoded operation, binding info, stage payloads, slot unit map |
| `fetch_unit` | PC and instruction memory |
| `op_decoder` | one per slot, in DC |
| `pipe_reg` | F/DC, DC/EX and EX/M-WB registers (stall and clear) |
| `irb` | replication and binding, fetch stall, re-execution issue |
| `ex_slot` | one issue slot with its units, its operand select and its fault-injection point |
| `fu_alu`, `fu_mul`, `fu_mem`, `fu_br` | the functional units |
| `regfile` | 64×32, 17 read ports and 8 write ports, write-through |
| `fault_detector` | compare, vote, commit, re-execution request, permanent-fault counters |
| `wb_stage` | memory access and register write-back of a committed bundle; contains `dmem` |
| `dmem` | data memory, two ports plus a load port |

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vliw_pkg.sv tb/tb_isa_pkg.sv rtl/*.sv tb/tb_vliw_top.sv \
    --top-module tb_vliw_top -o sim
./obj_dir/sim
```

To run another testbench, substitute its name.

- `tb_vliw_top`: the whole core at default size. A loop program (loads,
  multiply-accumulate, stores, branch) runs in every mode: fault free, with
  a unit disabled, with permanent and with transient errors injected. The
  test checks the memory results and the status outputs. It also counts each
  mechanism: stall, multi-slot bundle, branch flush, rebinding,
  re-execution, correction, detection, permanent declaration and out of
  service. A mechanism that never occurs is a failure.
- `tb_workloads`: ten kernels, each run unprotected, in DMR and in
  TMR, with 0 to 5 disabled units. They are a 4×4 matrix multiply, a
  bitwise CRC-32, an 8-tap FIR filter, a bit count, a motion-estimation
  sum of absolute differences, an 8-point DCT, an 8-point fixed-point
  FFT, a bit-serial Huffman decode, and an ADPCM encoder and decoder.
  The ADPCM kernels are written without branches, and their step table
  is a geometric series rather than the standard one. The test checks every result and prints cycle counts,
  overheads and the gain described below.
- `tb_irb`: the example binding above, time-slot counts and re-execution
  issue. It also runs 400 random legal bundles with random faults,
  checking that every copy is issued once, only to healthy capable units,
  on distinct units where possible, and within one time slot of the
  per-class lower bound.
- `tb_fault_detector`: hand-built cases for every mode and for
  re-execution, plus 600 random bundles checked against a reference model
  of the vote and of the outvote counters.
- `tb_wb_stage`, `tb_ex_slot`, `tb_fu`,
  `tb_op_decoder`, `tb_regfile`, `tb_dmem`, `tb_fetch_unit`, `tb_pipe_reg`:
  the individual blocks.

Cycle counts from `tb_workloads` at default size. N is the unprotected
run; p is the number of disabled units, added in the order MUL2, ALU4,
MEM1, MUL6, ALU0:

| kernel | N | DMR p=0..5 | TMR p=0..5 |
|--------|---|------------|------------|
| matrix_mul 4×4 | 61 | 110 126 130 178 194 194 | 159 175 179 251 283 287 |
| crc (4 words) | 914 | 1047 1047 1048 1053 1053 1053 | 1314 1314 1314 1320 1320 1320 |
| fir (8 taps, 16 outputs) | 226 | 367 401 401 545 579 579 | 508 542 542 758 826 843 |
| bcnt (16 words) | 139 | 158 166 174 195 195 195 | 202 202 202 233 241 241 |
| motion (SAD, 16 pixels) | 62 | 87 87 103 136 136 136 | 126 126 130 179 179 179 |
| dct (8 points) | 108 | 177 193 193 265 281 281 | 246 262 270 378 410 410 |
| fft (8 points) | 169 | 254 266 278 434 446 446 | 364 376 376 604 628 628 |
| huff (40 symbols) | 1047 | 1270 1270 1400 1492 1492 1493 | 1805 1805 1805 1937 1937 1937 |
| adpcm_enc (32 samples) | 1314 | 1380 1380 1413 1543 1543 1543 | 1735 1735 1735 1899 1899 1899 |
| adpcm_dec (32 codes) | 673 | 803 803 996 1061 1061 1061 | 1093 1093 1125 1224 1224 1256 |

Duplication costs far less than twice the unprotected time, and
triplication far less than three times, because the copies fill slots the
program left empty. The multiply-heavy kernels slow down sharply as
multipliers and memory units are lost. The serial, low-ILP CRC, Huffman
and ADPCM encoder kernels change little, because their idle slots absorb both the copies and the rebinding.

The testbench also estimates the gain over the simpler repair, in which
every operation bound to a faulty unit is re-executed in one added time
slot per bundle. Such a scheme needs at least twice the fault-free cycles,
so the gain is at least 1 − cycles(p) / (2·cycles(0)):

| kernel | DMR p=1..5 (%) | TMR p=1..5 (%) |
|--------|----------------|----------------|
| matrix_mul | 43 41 20 12 12 | 45 44 22 12 10 |
| crc | 50 50 50 50 50 | 50 50 50 50 50 |
| fir | 46 46 26 22 22 | 47 47 26 19 18 |
| bcnt | 48 45 39 39 39 | 50 50 43 41 41 |
| motion | 50 41 22 22 22 | 50 49 29 29 29 |
| dct | 46 46 26 21 21 | 47 46 24 17 17 |
| fft | 48 46 15 13 13 | 49 49 18 14 14 |
| huff | 50 45 42 42 42 | 50 50 47 47 47 |
| adpcm_enc | 50 49 45 45 45 | 50 50 46 46 46 |
| adpcm_dec | 50 38 34 34 34 | 50 49 45 45 43 |

## What is from the source and what is not

Taken from the source:

- the four stages;
- the 8-slot unit mix;
- the IRB's inputs and outputs: decoded bundle, mode and faulty info in;
  binding info and fetch stall out;
- the three protection modes;
- placing copies in idle slots under unit-type limits, and adding time
  slots by stalling the fetch, with whatever fits going in the first;
- rebinding originals and copies around permanently faulty units;
- re-execution on a different unit after a duplicate mismatch;
- voting in TMR;
- declaring an error permanent after repeated errors on one unit;
- "out of service" when a unit type runs out.

This design's own choices:

- **Binding order.** The greedy order above. It reproduces the source's
  example rebinding exactly. The source does not give its algorithm, and
  its fault-free example places two replicas in a different order.
- **Permanent threshold.** `PERM_THRESH` = 3. The source says only "a
  number of sequential instructions".
- **Plain DMR behaviour.** On a mismatch nothing is committed and no unit
  is blamed.
- **Commit point and timing.** All-or-nothing commit at the bundle's last
  time slot, the write-through register file and the three-cycle branch
  penalty.
- **Memory access point.** Memory is accessed at commit, not in EX.
- **Unit placement.** The placement of MUL and MEM units in slots follows
  the source's slot diagram. The branch unit is only in slot 0, because the
  configuration has a single branch unit; one diagram labels a second slot
  with BR.
- **Processor details.** The operation set, encoding, 64 registers, 32-bit
  data path, single-cycle units and memory sizes. The source evaluates on a
  VEX processor without describing it.
- **Extra ports and mode.** The test ports (`fi_flip`, `fu_disable`,
  debug ports) and `MODE_OFF`.

Not covered: protection of the register file, memories, pipeline registers
and the IRB/fault-detector logic themselves. The technique protects the
functional units only. Area and power are not evaluated. The source's
MediaBench programs cannot run on this core, because it does not execute
VEX binaries; `tb_workloads` stands in with hand-written kernels of the same ten
kinds: matrix multiply, CRC, FIR, bit count, motion estimation, DCT, FFT,
Huffman decoding, and ADPCM encoding and decoding. Their sizes are small
and chosen here, so the cycle counts show trends, not the original
programs' numbers.
