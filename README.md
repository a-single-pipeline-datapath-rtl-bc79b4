# Joinable narrow-operand datapath

Most integer operations in a 32-bit processor work on values that need far
fewer than 32 bits: the upper bits of the operands and of the result are
copies of the sign bit. This design splits the operand buses, the ALU and the
result bus into 4-bit blocks and lets **two** such narrow operations share one
ALU in the same cycle. A five-stage, single-issue MIPS-like pipeline thereby
issues two consecutive instructions at once whenever both fit into the ALU
together.

The key trick is the **turnaround** block order. The first operation occupies
ALU blocks from the bottom up in the usual order. The second occupies them from
the top down: its least significant block sits in the highest ALU block. Each
ALU block thus picks its operand from only two candidates, a 2-to-1
multiplexer, wherever the boundary between the two operations falls. No
shifter is needed to align the second operation. The cost is a carry that
runs the "wrong" way for the second operation, from higher ALU blocks to lower
ones.

The RTL is SystemVerilog-2017, synthesizable, and parameterized on block width
and ALU width. The defaults are 32-bit words, 4-bit blocks and a 40-bit ALU,
which gives 10 ALU blocks.

## Contents

- [1. How many blocks a value needs](#1-how-many-blocks-a-value-needs)
- [2. Can two operations share the ALU? The width-check](#2-can-two-operations-share-the-alu-the-width-check)
- [3. Operation swapping](#3-operation-swapping)
- [4. Turnaround operand merging](#4-turnaround-operand-merging)
- [5. The partitioned ALU and its two carry directions](#5-the-partitioned-alu-and-its-two-carry-directions)
- [6. Splitting and sign-extending the joined result](#6-splitting-and-sign-extending-the-joined-result)
- [7. The pipeline around it](#7-the-pipeline-around-it)
- [8. Parameters](#8-parameters)
- [9. Files](#9-files)
- [10. Simulating](#10-simulating)
- [11. How far it is verified](#11-how-far-it-is-verified)
- [12. Departures, choices and what is not built](#12-departures-choices-and-what-is-not-built)

## 1. How many blocks a value needs

An operation's result is only correct after sign extension if the blocks it
gets can hold the operands' significant bits **plus one spare bit**. An
addition or subtraction can grow the result by that one bit.

`jn_wdl` (width-determination logic) works per block. Block *i* (for
*i* ≥ 1) is *required* (`BR_i = 1`) unless its 4 bits **and the two top bits
of block i−1** all have the same value. Checking only one bit of the block
below would not leave room for the carry. Block 0 is always required. A
priority encoder returns the index of the highest required block. This index
is the **SBN**, the number of significant blocks minus one:

| value (32-bit)  | highest bit ≠ sign | bits needed | blocks | SBN |
|-----------------|--------------------|-------------|--------|-----|
| `0x00000001`    | 0                  | 3           | 1      | 0   |
| `0x00000005`    | 2                  | 5           | 2      | 1   |
| `0xFFFFFFF8` (−8)| 2                 | 5           | 2      | 1   |
| `0x0000FFFF`    | 15                 | 18          | 5      | 4   |
| `0x12345678`    | 28                 | 31          | 8      | 7   |

With 1-bit blocks there is no room below block 1 for the two extra bits, so
block 1 always counts as required and every value needs at least two blocks.
The register file then resets its width fields to SBN 1, not 0, so that they
match what the WDL would report for the value zero.

The SBN is not computed on the critical register-read path. The register
file (`jn_regfile`) has an extra 3-bit field per register. A WDL on each write
port fills it as a value is written. Immediates get their own WDL in decode.

## 2. Can two operations share the ALU? The width-check

`jn_wcl` runs in decode. For each instruction a comparator and a multiplexer
take the larger of its two operand SBNs. That is **RBN**, the required blocks
minus one. The pair can share the ALU when

    RBN0 + RBN1 <= M - 2        (i.e. blocks0 + blocks1 <= M, M = 10)

and when two checks on the instruction words also pass:

* **type-check** (`jn_pair_check`): both instructions use the ALU (ALU
  operations or loads, which compute their address on the ALU). Only the ALU
  and its buses are shared, so at most one of the two may use the data
  memory. Stores always issue alone in this implementation.
* **dependency check** (`jn_pair_check`): the second instruction does not
  read the register the first writes (RAW). WAR cannot happen because both
  read their operands in the same cycle. Two writes to the same register
  (WAW) do not prevent joining. When a joined pair writes one register, EX
  clears the destination of the earlier instruction, so only the later
  result is written back. The earlier instruction sits in the low slot
  unless the pair was swapped.

On success the operation boundary is RBN0: operation 0 owns ALU blocks
0..RBN0. Otherwise it is M−1, meaning operation 0 owns the whole ALU and
issues alone. The boundary is the single control word that the merging, the
ALU and the sign extension all decode.

Because the ALU is 40 bits wide while words are 32 bits, a full 32-bit
operation (8 blocks) can still be joined with an operation of up to 2 blocks.

## 3. Operation swapping

If two operations fit together, one of them needs at most half the ALU and the
other at least half. `jn_osl` always places the **wider** operation in the
low, regular-order positions. The lower half of the ALU (5 blocks, 20 bits) is
then never shared. It is built as one block, with no block boundaries,
function multiplexers or carry multiplexers inside it. This shortens the
worst-case carry path, which occurs when one operation uses the whole ALU.

```
swap     = joined and RBN1 > RBN0
low op   = swap ? op1 : op0     (regular order)
high op  = swap ? op0 : op1     (turnaround order)
boundary = joined ? M-2 - min(RBN0, RBN1) : M-1
```

The narrower operation gets exactly its blocks at the top. The wider one gets
all the rest, never fewer than M/2 blocks. Operands, ALU function and
destination register move together in one `slot_t` struct, so swapping swaps
them all. Write-back needs no bookkeeping, since each result arrives with its
own destination.

## 4. Turnaround operand merging

`jn_oml` is used twice, once for operand A and once for operand B. Its
decoder turns the boundary *b* into a select per ALU block,
`S_i = (i > b)`:

```
ALU block i :   S_i = 0  ->  block i        of the low operand
                S_i = 1  ->  block M-1-i    of the high operand

example, b = 7 (low op 8 blocks, high op 2 blocks):

ALU block      9     8     7     6     5     4 3 2 1 0
owner          hi    hi    lo    lo    lo    lo (one 20-bit block)
operand blk    h0    h1    l7    l6    l5    l4 l3 l2 l1 l0
```

Operand blocks past the 32-bit word carry the operand's sign. An operation
that gets more blocks than its word has therefore still computes a correctly
extended result.

## 5. The partitioned ALU and its two carry directions

`jn_alu` computes ADD, SUB, AND, OR and XOR. Each block above the unshared
lower half takes the function of its owner. In a layout this is the
function-select line driven from both ends and cut at the boundary. Here it is
a per-block multiplexer.

The carries run as follows:

* The low operation's carry runs **upwards**: from the lower block into block
  5, then 5→6→…
* The high operation's carry runs **downwards**: its least significant block
  is ALU block 9, so the carry goes 9→8→…→b+1. A subtraction inverts B in its
  own blocks and injects a carry-in of 1 at its least significant block
  (block 0 for the low operation, block M−1 for the high one).

A single carry chain with a multiplexer at each block input would contain a
combinational loop, although no input pattern could ever make that loop live.
The RTL therefore computes the upward and the downward chain separately, and
each block takes its carry-in from one of them. The function is the same.
`LOW_BLKS` sets the size of the unshared lower part. The default is M/2. With
`LOW_BLKS = 1` the ALU is uniformly partitioned and accepts any boundary. The
pipeline asserts every cycle that the boundary never falls inside the
unshared part.

## 6. Splitting and sign-extending the joined result

`jn_sxl` turns the 40-bit joined result into two 32-bit results. Every
output block either passes its ALU block or is filled with the owner's sign
bit:

* **Low result:** block *k* passes if *k* ≤ *b*. The sign is the MSB of ALU
  block *b*.
* **High result:** block *k* comes from ALU block M−1−*k* and passes if that
  block is above *b*. The sign is the MSB of ALU block *b*+1. When nothing is
  joined the high result is zero.

This runs at the start of MEM, so a load or store address is already a clean
32-bit word.

## 7. The pipeline around it

`jn_core` is the top level.

| stage | what happens |
|-------|--------------|
| IF  | `jn_iq` holds the next two instructions. After a single issue, entry 1 moves down and one word is fetched. After a joined issue, two new words are fetched (`jn_imem` has two read ports). |
| ID  | Two `jn_decoder`s, `jn_pair_check`, four register reads with SBNs, WDL on the immediates, `jn_wcl`. An interlock stalls decode while an instruction in EX or MEM still has to write one of entry 0's sources. If entry 1 has such a pending source, it is not joined. |
| EX  | `jn_osl` → two `jn_oml` → `jn_alu` |
| MEM | `jn_sxl`; at most one load/store accesses `jn_dmem` |
| WB  | two register writes. The register file stores the new SBNs, and a same-cycle read sees the written value. |

There is no result forwarding, so a dependent instruction waits until its
producer reaches WB. Up to two instructions issue per cycle. An instruction
writes its register at the end of its fourth cycle after entering decode.

Instruction subset (MIPS field layout): `ADDU SUBU AND OR XOR` (R-type),
`ADDIU ANDI ORI XORI LW SW` (I-type). Any other word is a no-op. There are no
branches; fetch is sequential and wraps at the end of instruction memory.

Ports of `jn_core`: program load (`imem_*`), data memory load and inspect
(`dmem_ext_*`), register inspect (`dbg_reg_*`, including the SBN field),
`id_pc`, the EX boundary, swap and join flags, and a `perf_t` struct of event
counters. The counters are cycles, retired instructions, issue cycles, joined
pairs, swapped pairs, joined pairs with a load, stalls, and refusals by type,
dependency and width.

## 8. Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `BLK_W` | 4 | block width. 4-bit blocks gave the best balance of join rate and ALU delay in the design study. |
| `ALU_W` | 40 | ALU width. Widening 32→40 bits was the chosen cost/benefit point. |
| `LOW_BLKS` (`jn_alu`) | M/2 | unshared lower ALU part, in blocks |
| `IMEM_WORDS`, `DMEM_WORDS` | 256 | memory sizes (own choice) |
| `XLEN` | 32 | word width (package constant `JN_XLEN`; the instruction set is 32-bit) |

Shared types (`uop_t`, `slot_t`, `perf_t`, `alu_op_e`) and opcodes are in
`rtl/jn_pkg.sv`.

## 9. Files

```
rtl/jn_pkg.sv         types, opcodes, default sizes
rtl/jn_core.sv        top: the pipeline
rtl/jn_iq.sv          two-entry instruction queue / fetcher
rtl/jn_imem.sv        instruction memory, two read ports
rtl/jn_decoder.sv     instruction decoder (one per slot)
rtl/jn_pair_check.sv  type-check and dependency check
rtl/jn_regfile.sv     register file with SBN fields (4R/2W)
rtl/jn_wdl.sv         width-determination logic
rtl/jn_wcl.sv         width-check logic
rtl/jn_osl.sv         operation swapping
rtl/jn_oml.sv         turnaround operand merging
rtl/jn_alu.sv         partitioned ALU
rtl/jn_sxl.sv         sign-extending logic
rtl/jn_dmem.sv        data memory
tb/tb_<module>.sv     one self-checking test bench per module
tb/tb_jn_core_sweep.sv  block-width / ALU-width sweep of the whole pipeline
tb/jn_core_harness.sv   one configuration of the sweep with its reference model
```

## 10. Simulating

Each test bench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_jn_core \
    rtl/jn_pkg.sv tb/tb_jn_core.sv
./obj_dir/Vtb_jn_core
```

`-y rtl -y tb` lets verilator find each module in the file of the same name,
so only the package and the test bench are named. Replace `tb_jn_core` with
any other `tb_jn_*` to test one unit or to run the width sweep
(`tb_jn_core_sweep`). Lint the design with
`verilator --lint-only -Wall -y rtl rtl/jn_pkg.sv rtl/jn_core.sv`. It
reports only unused signals and parameters, plus the reset that also enables
the run-time assertions.

To run your own program, write 32-bit words through `imem_we/imem_waddr/
imem_wdata` while `rst_n` is low, then release reset. Results can be read
through `dbg_reg_addr` and `dmem_ext_addr`.

## 11. How far it is verified

* Every unit test compares against a model written independently inside the
  test bench. Examples: WDL against a direct count of significant bits; ALU
  against plain arithmetic on operations the bench places itself in both
  block orders, for both the swapped and the uniform ALU; SXL, OML and WCL
  against their defining formulas.
* `tb_jn_core` runs at the default parameters in two phases.
  * Phase 1 runs 20 independent narrow additions. They must all be written
    back after 15 cycles, which means all 10 pairs joined. Issuing them one
    at a time would take 25 cycles.
  * Phase 2 is a directed sequence followed by 150 random instructions. The
    final registers, their SBN fields and all of data memory are compared
    with an instruction-at-a-time reference model.
  * The bench also checks that each mechanism happened at least once:
    joining, swapping, a load joined with an ALU operation, SUB in the
    turnaround position, a negative turnaround result, a full-width operation
    joined, a joined pair writing one register (swapped and not swapped),
    interlock stalls, and refusals by each of the three checks.
* `tb_jn_core_sweep` runs one fixed 200-instruction program (made by a
  seeded generator) on thirteen configurations. Every configuration must match
  the reference model. The program is random, not a real benchmark, so the
  counts below only show the trend. Blocks of 4 bits join as many pairs as
  1- or 2-bit blocks on this program; 8- and 16-bit blocks join fewer. The
  step from 32 to 40 bits matters most, because it lets a full 32-bit
  operation (8 blocks) join anything of up to 2 blocks. Going beyond 40 bits
  adds little here.

  | block | ALU | joined pairs | swapped | cycles |
  |------:|----:|-------------:|--------:|-------:|
  | 1  | 32 | 60 | 24 | 257 |
  | 2  | 32 | 60 | 21 | 257 |
  | 4  | 32 | 60 | 18 | 257 |
  | 8  | 32 | 57 | 11 | 259 |
  | 16 | 32 | 42 | 0  | 272 |
  | 4  | 36 | 60 | 17 | 257 |
  | 4  | 40 | 73 | 17 | 245 |
  | 4  | 44 | 73 | 17 | 245 |
  | 4  | 48 | 73 | 17 | 245 |
  | 4  | 52 | 74 | 17 | 245 |
  | 4  | 56 | 74 | 17 | 245 |
  | 4  | 60 | 74 | 17 | 245 |
  | 4  | 64 | 74 | 17 | 245 |

* Each test bench was also run against a deliberately broken copy of its
  module (for example the WDL checking only one bit of the block below, the
  ALU using the upward carry for the high operation). Each of them failed.
* Not verified: timing or area. The design's claims about delay, and about
  area compared with shift-based merging, concern gate-level and
  pass-transistor implementations and are outside what RTL simulation shows.
  Other block and ALU widths have been simulated end to end only by the
  sweep, on one random program each.

## 12. Departures, choices and what is not built

Choices made where the design description leaves things open:

* The instruction set and encoding. The design was studied on SPARC traces
  with a MIPS-like reference pipeline.
* No branches. In the reference machine they have their own adder and do not
  use the shared ALU.
* No forwarding, and the interlock that replaces it.
* Memory sizes.
* Stores never join.
* How a joined pair that writes one register is resolved: the earlier
  write is dropped.
* Reset behaviour.
* The SXL is placed at the start of MEM.
* The swap rule, including the boundary formula in section 3.

Implementation forms that differ from the circuit-level description but have
the same function:

* Pass-transistor function-select lines and operand switches are written as
  multiplexers.
* The carry-in multiplexer chain is written as two chains (section 5).
* Carry-lookahead block adders are written with `+`.
* The two blocks added by widening the ALU from 32 to 40 bits stay separate
  4-bit blocks rather than one merged block. After swapping, the narrow
  operation sits at the top of the ALU. The boundary can then still fall
  between those two blocks.
* The RBN check is written as an adder and compare.

The boundary produced by `jn_wcl` (RBN of operation 0) is not used directly.
Swapping remaps it, and `jn_osl` recomputes it from the two RBNs.

Not built:

* A six-stage variant that moves width determination, width-check, merging
  and swapping into a stage of their own, with a simplified bit-filling
  width-check.
* Clock gating of unused ALU blocks.
* Sharing of shifters or multipliers.
* Non-uniform ALU partitioning (coarser blocks above the unshared half).
