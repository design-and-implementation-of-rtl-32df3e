# RISC-V subsystems: a dual-issue front end, forwarding and single-precision FPU

This RTL builds the parts that sit between the caches and the integer ALUs
of a 32-bit, five-stage (IF, ID, EX, MEM, WB) RISC-V processor that runs two
pipelines side by side. Each cycle it fetches two instructions, and it
predicts branches from two places: the fetch stage and the decode stage.
Both pipelines decode their instruction into operands and a small internal
opcode. Operands are forwarded from the memory and write-back stages of
either pipeline. Single-precision floating-point add, subtract and multiply
run in the execute stage. Floating-point results go to their own register
file.

The blocks are:

| Module | Stage | Role |
|---|---|---|
| `next_pc_logic` | IF | PC+4 / PC+8, predicted target, memory-stage correction |
| `bpu_issue` | IF | chooses which PC the prediction unit looks up |
| `bpu` | IF | 16-entry branch target buffer |
| `operand_logic` | ID | RV32 decode, operand A/B, opcode, ID/EX register |
| `forwarding_unit` | EX | six-input bypass multiplexer with its select logic |
| `fpu` (`fp_addsub`, `fp_mul`) | EX | 00 gives zero, 01 add, 10 subtract, 11 multiply |
| `fp_regfile` | WB | 32 x 32 floating-point registers |
| `riscv_subsystems` | all | top level that wires the blocks into the two pipelines |
| `riscv_sub_pkg` | - | shared types: `fp32_t`, `op_e`, `reg_tag_t`, opcodes |

Some parts are not built here and appear as ports of the top:
- the instruction and data caches;
- the integer register file;
- the two integer ALUs and branch resolution;
- the issue logic that decides when only one instruction of a pair may go.

## Floating-point arithmetic

Both units use IEEE-754 single precision (sign, 8-bit exponent with bias
127, 23 stored mantissa bits). Both are purely combinational.

**Add/subtract (`fp_addsub`).** A subtraction flips the sign of B. The two
operands are ordered by magnitude, and the result takes the larger
operand's exponent and sign. The smaller mantissa (with its implicit 1) is
shifted right by the exponent difference. The two mantissas are then added
if the effective signs agree, and subtracted otherwise. Normalisation is one
right shift on a carry-out, or a leading-zero count and left shift after a
subtraction.

Bits shifted out are simply dropped. There are no guard, round or sticky
bits. This is deliberate: it reproduces the reference results bit for bit,
for example:
- 5.3 - 2.8 = `0x40200002` (not the correctly rounded `0x40200000`);
- 5.3 + 2.8 = `0x41019999`.

Expect errors of up to about two units in the last place compared with an
IEEE-rounded adder.

**Multiply (`fp_mul`).** The steps are:
1. a zero operand gives zero;
2. the sign is the XOR of the operand signs;
3. the mantissas are multiplied and the product truncated to 24 bits;
4. the exponent is E1 + E2 - 127;
5. one normalising shift.

The parameter `MUL_W` (13..24) sets how many leading mantissa bits go into
the multiplier.

- `MUL_W = 24` (default) is the full product the algorithm calls for.
  5.3 x 2.3 gives `0x41430A3D`.
- `MUL_W = 14` reproduces a set of published waveform products exactly:
  - 5.3 x 2.3 = `0x41430429`;
  - 8.95 x 5.78 = `0x424EE5F3`;
  - 5.3 x 2.8 = `0x416D6A29`.

  None of these matches a full 24-bit product. Keeping 14 bits of each
  mantissa is the only width that fits all three. Use this setting to match
  those numbers, not for accuracy.

**Special values.** These are this design's own choices:
- an exponent field of 0 reads as zero, so denormals are flushed;
- underflow gives +0;
- overflow gives infinity;
- NaN and infinity inputs get no special treatment;
- an exact cancellation gives +0.

## Fetch and branch prediction: how the next PC is formed

This is the most timing-sensitive part. `next_pc_logic` is a chain of
three multiplexers:

1. **PC+4 or PC+8** of the address being fetched. Normally the next pair is
   8 bytes on. When the decode stage declares a *rollback* (only the first
   of the pair could issue), the next fetch is PC+4 instead, so the second
   instruction is fetched again as the first of a new pair. The result is
   registered (`seq_q`).
2. **Predicted target**: the prediction unit's target replaces `seq_q` when
   it predicts taken.
3. **Memory-stage correction**: on `mispredict_i` the correct target
   `mem_target_i` replaces everything. This mux has the highest priority
   and acts in the same cycle.

The output `next_pc_o` is the address sent to the instruction cache. It is
also the "IF PC" that `bpu_issue` may pass to the prediction unit.

`bpu_issue` compares the opcode of the instruction held in decode with the
BRANCH opcode (`1100011`):
- on a match, the decode-stage (hold register) PC is looked up;
- otherwise, the PC being fetched is looked up.

The branch target buffer in `bpu` reads synchronously. So a lookup in cycle
*t* steers the fetch of cycle *t+1*. Here is what that means:

- **Fetch-time prediction.** Say a branch at address A is fetched in cycle
  *t*. The next fetch (*t+1*) goes to its predicted target, so no wrong
  instruction enters the pipeline.
- **Decode-stage prediction.** Say a branch was not predicted at fetch
  (for example it was the second slot, or the table missed then). It
  reaches decode in *t+1* and is looked up there. Fetch is redirected in
  *t+2*, and the pair then in decode was fetched on the wrong path, so it
  is discarded. `hold_redirect_o` flags this case.
- **Repeat suppression.** A branch predicted at fetch is also in decode one
  cycle later, where it would be looked up again. A decode-stage lookup is
  therefore ignored if, in its cycle, fetch was redirected. The redirect
  can be a prediction or a misprediction. This guard is this design's own.
- **Misprediction.** The branch is resolved outside. When it reaches the
  memory stage, the result is reported through `mispredict_i` /
  `mem_target_i`. The pair fetched in that same cycle is already the
  correct one. The instructions in decode and execute are discarded. The
  table is trained through `br_upd_*`.

The table has 16 direct-mapped entries, indexed by `pc[5:2]`. Each entry
holds a full-width tag, a target and a one-bit "taken last time" history.
Reset clears the valid bits only. The table form and size are this
design's choices.

A taken branch in the **first** slot of a pair does not squash the second
slot. Squashing it, like any other issue restriction, is left to the
external issue logic.

## Forwarding

Each execute-stage operand has its own `forwarding_unit`, a six-input mux:

| Input | Source |
|---|---|
| D0 / D1 | decode-stage value of pipeline 1 / 2 |
| D2 / D3 | memory-stage result of pipeline 1 / 2 |
| D4 / D5 | write-back-stage result of pipeline 1 / 2 |

The operand's source register is compared with the destinations in the
memory and write-back stages:
- A memory-stage match beats a write-back match, because it is the later
  instruction.
- Within one stage, pipeline 2 beats pipeline 1, since the second slot of
  a pair is the later instruction.
- With no match, the unit passes its own pipeline's decode value.

Registers are compared as `{is_fp, number}`, so `x3` and `f3` never alias.
`x0` is never forwarded.

The top uses four instances, two operands in each pipeline. The FPU shares
pipeline 1's pair with that pipeline's integer ALU. Loads are not forwarded
from the memory stage (the data arrives there), only from write-back.

The register files read through a write of the same cycle. An instruction
three stages behind its producer therefore needs no forwarding. The
external integer register file must do the same.

## Decode (`operand_logic`)

The decoded subset of RV32I/F is:
- ADD, SUB, SLL, SLT, XOR, SRL, OR, AND and their immediate forms;
- LUI;
- the six branches;
- LW, SW, FLW, FSW;
- FADD.S, FSUB.S, FMUL.S.

Anything else becomes `OP_NOP` and writes nothing. Writes to `x0` are
dropped.

The internal opcode `op_e` is 4 bits wide. FADD, FSUB and FMUL are
numbered 1, 2, 3, so `op[1:0]` is the FPU select directly.

Operand A is rs1. Operand B is rs2 for register, branch, store and FP
operations, and the immediate otherwise. For a store, B is the data, and
the address is A + `imm` (the ALU outside forms it). This lets store data
pass through forwarding like any operand.

The source tags go to the register files combinationally. The opcode,
operands, tags, immediate, funct3 and PC are registered into the ID/EX
stage.

## The top level (`riscv_subsystems`)

Parameters:
- `RESET_PC = 0`;
- `BTB_ENTRIES = 16`;
- `MUL_W = 24`.

Per cycle, the top:
- sends `fetch_pc_o` out and takes two instructions in (`instr_i[0]` for
  pipeline 1, `instr_i[1]` for pipeline 2);
- holds the pair in the IF/ID register;
- decodes, forwards and executes.

Floating-point arithmetic exists only in pipeline 1. An FP operation or FP
load placed in pipeline 2 writes nothing. The FP register file has one
write port, fed by pipeline 1.

Integer operations of both pipelines leave through `alu_*`. Their results
come back through `alu_result_i` in the same cycle. In the memory stage,
`dmem_*` presents address, store data and strobes. Read data is expected
back in the same cycle. Integer write-back leaves through `int_wb_*`, and
FP write-back is also visible on `fp_wb_*`.

Latency: an instruction fetched in cycle 0 writes its register in cycle 4.
On straight-line code, throughput is two instructions (8 bytes) per cycle.

There are no stalls, which has two consequences:
- The consumer of a load must be at least two pairs behind it.
- The two instructions of a pair must not depend on each other. The
  external issue logic is expected to split such a pair with a rollback.

## Where this departs from the source description, and what is assumed

- Only the structure of the prediction unit is given in the source: a
  predicted PC, corrected from the memory stage. The branch target buffer
  (size, one-bit history, synchronous read) is this design's.
- The decode block's reference waveform used instruction words that are not
  RISC-V encodings. The decoder here uses the standard RV32I/F encodings,
  so that waveform is not reproduced.
- The source counts three forwarding units, one per execution unit. Here one
  unit serves one operand, so there are four instances (two per pipeline).
- The rollback input only steers PC+4/PC+8. The other trigger mentioned,
  "the PC returning to the same address", is not defined further and is not
  implemented.
- The multiplier width is discussed above: it is full width by default, and
  14 bits reproduces the published products.
- Reset is synchronous and active high. It clears pipeline valid bits, the
  FP registers and the prediction table's valid bits. This is this design's
  choice.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/riscv_sub_pkg.sv tb/riscv_subsystems_tb.sv --top-module riscv_subsystems_tb
./obj_dir/Vriscv_subsystems_tb
```

Replace `riscv_subsystems_tb` with any other testbench name.

`riscv_subsystems_tb` runs the whole design at its default parameters. The
program uses FP loads, add, subtract, multiply and store, integer
arithmetic, loops with taken and not-taken branches, and two rollbacks. The
testbench checks:
- final FP and integer registers and memory;
- fetch rate and write-back latency;
- a count of each mechanism: each forwarding source, each FPU operation,
  rollbacks, both kinds of prediction, ignored repeats and mispredictions.

## How far to trust it

- The FP units are checked bit for bit against the published add, subtract,
  multiply and FPU-select values. They are also checked against a
  double-precision model on thousands of random operands, within the stated
  truncation error.
- The decode, forwarding, register file, prediction table and next-PC logic
  are each checked against independent models or hand-worked sequences.
- The pipeline has been run on one program only. Hazards the issue logic is
  expected to prevent are not detected by the datapath: a dependent pair,
  a load-use at distance one, or an FP operation in pipeline 2. Driving
  these gives wrong results silently.
- NaN, infinity and denormal handling is deliberately minimal.
