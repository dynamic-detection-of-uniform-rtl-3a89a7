# Uniform and affine vector detection in a SIMT register file

A GPU multiprocessor runs every instruction on a whole warp of 32 threads, and
every architectural register is a 32-lane vector. In practice many of those
vectors are highly regular:

* **uniform**: every lane holds the same value (loop bounds, base pointers,
  branch conditions that do not diverge);
* **affine**: lane *i* holds *x + i·y* (thread indices and the memory
  addresses computed from them, which the coalescing rules make consecutive).

Reading, moving and computing 32 copies of such a value wastes register-file
bandwidth, bus activity and ALU power. This design tags every vector register
with what is known about its contents and uses the tag to do less work:

* a uniform register is stored, read and written through **one lane**;
* an affine register is stored as its **base and stride in two lanes**;
* an operation whose result is still uniform or affine is computed on the base
  and stride by **one or two scalar processors in one cycle**, while the other
  SIMD lanes can be clock-gated; everything else goes to the full SIMD array,
  which needs two cycles per warp.

The tags are found dynamically, with no change to the instruction set: they are
seeded at kernel launch and by broadcast loads, then propagated through
arithmetic by a small table of rules.

The RTL is a small but complete SIMT multiprocessor built around that
mechanism: round-robin warp scheduling, an instruction memory, the tag array,
the 512 × 32 × 32-bit lane-enabled register file, the scalar and SIMD
execution paths, and write-back in compressed form.

## Tags and what they guarantee

Each register has a 2-bit tag (`uavec_pkg::tag_t`):

| tag | code | meaning | lanes stored |
|---|---|---|---|
| `TAG_V` | 0 | generic vector, nothing known | all 32 |
| `TAG_U` | 1 | uniform, every lane = x | lane 0 = x |
| `TAG_A` | 2 | affine, lane i = x + i·y, y a power of two | lane 0 = x, lane 1 = y |

Code 3 is unused and read as `TAG_V`. `TAG_V` is zero so that clearing the tag
array gives the safe state. The tag array for 512 registers is 1 kbit, beside a
512 kbit register file.

Strides are limited to non-negative powers of two. That is what makes the
affine-to-vector conversion cheap: `affine_expand` finds *k* = log2(y) with a
priority encoder and adds `i << k` to the base in each lane, with no multiplier.

An important invariant: **a register tagged A never has a lane that overflows.**
All lanes x + i·y, computed exactly, fit in 32 bits as unsigned numbers. The
scalar path enforces this (see *Overflow and re-issue*). So lanes 2..31 of a
U or A register in the RAM are stale and meaningless. The tag is the only thing
that tells how to read the register.

## Tag propagation

`tag_rules` gives the result tag from the operation and the tags of the first
(a) and second (b) operand:

| a op b | U,U | U,A | U,V | A,U | A,A | A,V | V,* |
|---|---|---|---|---|---|---|---|
| add | U | A | V | A | V | V | V |
| mul | U | V | V | V | V | V | V |
| shl | U | V | V | A | V | V | V |

* `mov` copies the tag of its source.
* `bcast` (a word from constant/shared memory sent to all lanes) gives U.
* Any predicated write that leaves some lanes untouched gives V.

Some entries are conservative on purpose:

* A+A is V because the sum of two power-of-two strides is generally not a power of two.
* An affine value times a uniform one is V, since the product's stride need not be a power of two either.
* U << A is V.

At kernel launch every tag is cleared to V. Then register r0 of each warp is
written as the thread index, base = warp·32, stride = 1, and tagged A.

## Life of an instruction

There is one instruction in flight at a time. Each state below takes one
register-file clock:

| state | work |
|---|---|
| SCHED | `warp_scheduler` picks the next launched, not-yet-exited warp after the last one (round-robin); fetch at that warp's PC |
| DEC | decode; read the **tag** of src1. EXIT and SETMASK finish here |
| RD1 | read src1, enabling only the lanes its tag needs (1, 2 or 32); read the tag of src2 |
| RD2 | read src2 the same way, or take the broadcast word; read the tag of dst; compute the result tag |
| RD3 | only for a partial write over a U/A destination: read the old destination |
| EXS | scalar path, 1 cycle: `scalar_unit` on base/stride. **or** |
| EXV ×2 | SIMD path: operands expanded by `affine_expand`, 8 double-pumped SPs do 16 lanes per cycle in `simd_alu` |
| WB | write the result lanes (1, 2 or the active ones) and the result tag |

Each operand's tag is read one cycle ahead of its lanes. So the extra lookup
costs nothing beyond the sequential operand reads, which GPUs do anyway to
avoid register-bank conflicts.

Cycle counts per instruction, checked by the end-to-end testbench:

| case | cycles |
|---|---|
| EXIT, SETMASK, NOP | 2 |
| predicated with no active lane (nothing written) | 4 |
| uniform/affine result on the scalar path | 6 |
| generic vector on the SIMD path | 7 |
| partial write over a U/A destination | 8 |
| affine overflow, re-issued on the SIMD path | 8 |

A launch costs 1 cycle plus 1 per warp, to write the thread-index registers.
Then 1 more cycle is spent in SCHED when no warp is left.

`sp_clk_en` shows which SPs must be clocked:

* `8'h01` for a uniform scalar operation;
* `8'h03` for an affine one (base and stride);
* `8'hff` for both SIMD cycles.

The gating cells themselves are left to the implementation.

## Partial writes

A predicated instruction writes only the lanes set in its warp's active mask.
The result is then no longer uniform or affine, so it is tagged V. What
happens to the untouched lanes depends on how the destination was stored:

* **Destination tagged V**: only the active lanes are written. The rest of the
  register already holds its real values.
* **Destination tagged U or A**: its lanes 2..31 hold stale data. The old value
  is read in RD3, expanded, and merged lane by lane in the SIMD unit. Then all
  32 lanes are written.
* **No active lane**: nothing is written and the tag is left as it was.
* **Full mask**: the instruction is treated as unpredicated and may stay U/A.

## Overflow and re-issue

Two's-complement lanes of an affine result are always correct modulo 2^32.
The risk is that a lane wrapped around, so the vector is no longer x + i·y
once it is read as a wider or differently-signed number.

`scalar_unit` therefore works out the exact value of the last lane
(x + 31·y, in 39 bits; for a shift, after shifting). Since strides are
non-negative, that lane is the largest. If it does not fit in 32 bits, `ovf`
is raised. The core then spends two more cycles running the same instruction
on the SIMD path and tags the result V.

Examples:

* Adding `0xffffff00` to the thread index re-issues for warps 8 and up.
* Shifting an address left by 20 re-issues everywhere.

Uniform results wrap uniformly and are never flagged.

## Register window and launch

The register file is split between warps when a kernel is launched. Register
*r* of warp *w* is physical register `w·rpw + r`, where `rpw` is given at
launch. The host must keep `nwarps·rpw ≤ 512`. The default configuration
allows 24 warps, for example 24 × 21 = 504 registers.

## Interface of `uavec_sm`

Parameters, with their defaults:

| parameter | default | meaning |
|---|---|---|
| `LANES` | 32 | lanes per warp |
| `XLEN` | 32 | bits per lane |
| `NUM_REGS` | 512 | vector registers |
| `NUM_WARPS` | 24 | warps |
| `NUM_SP` | 8 | scalar processors |
| `IMEM_DEPTH` | 64 | instructions |
| `TID_REG` | 0 | thread-index register |

Ports:

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `imem_we`, `imem_addr`, `imem_wdata` | in | 1, 6, `inst_t` | load the kernel |
| `launch`, `launch_nwarps`, `launch_rpw` | in | 1, 6, 8 | start a kernel when idle |
| `busy`, `done` | out | 1 | running / all warps exited |
| `wb_valid`, `wb_warp`, `wb_reg`, `wb_tag` | out | 1, 5, 8, 2 | write-back monitor |
| `wb_lanes`, `wb_data` | out | 32, 32×32 | lanes defined by this write, and their (expanded) values |
| `sp_clk_en` | out | 8 | per-SP clock enable |
| `stats` | out | `stats_t` | activity counters, cleared at launch |

The instruction word (`uavec_pkg::inst_t`, 62 bits) has these fields:

* `op`
* `pred`: write only the active lanes
* `dst`, `src1`, `src2`
* `src2_imm`: the second operand is the broadcast word
* `imm`: 32 bits

Operations:

* `ADD`, `MUL` (low 32 bits), `SHL` (by `b[4:0]`), `MOV`
* `BCAST`: imm to all lanes, tagged U
* `SETMASK`: the warp's active mask = imm
* `EXIT`

Kernels are straight-line code: there are no branches.

`stats` counts:

* instructions;
* scalar and SIMD operations, and re-issues;
* affine operands expanded for a SIMD operation;
* partial writes;
* operand reads and result writes by tag;
* register-file lanes read and written.

These are the quantities needed to measure how much register traffic the tags
save.

## Modules

| file | role |
|---|---|
| `rtl/uavec_pkg.sv` | tag, opcode, instruction and counter types |
| `rtl/tag_rules.sv` | propagation table (combinational) |
| `rtl/tag_array.sv` | 2 bits × 512 registers, clear-to-V |
| `rtl/vector_regfile.sv` | 512 × 32 × 32-bit RAM, per-lane read and write enables |
| `rtl/affine_expand.sv` | compressed operand → full vector |
| `rtl/scalar_unit.sv` | base/stride arithmetic with overflow check |
| `rtl/simd_alu.sv` | 16 lanes per cycle, 2 cycles per warp, predicated merge |
| `rtl/warp_scheduler.sv` | round-robin warp choice |
| `rtl/uavec_sm.sv` | the multiprocessor (top) |

## Simulating

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/uavec_pkg.sv tb/tb_uavec_sm.sv --top-module tb_uavec_sm -o sim
./obj_dir/sim
```

Replace `tb_uavec_sm` with any other testbench name.

* `tb_uavec_sm` runs the top at its **default size**, with no parameter
  overrides. It launches a 22-instruction kernel twice on 24 warps, with 16
  and then 21 registers per warp. It then runs twelve random kernels on
  random launch shapes. A reference model in the testbench runs the
  same kernel on full 32-lane vectors and checks every write-back: register,
  tag, lanes and values. It also checks the activity counters, the SP clock
  enables, the total cycle count, and that each mechanism happened at least
  once:
  * uniform and affine scalar operations;
  * SIMD operations;
  * affine expansion;
  * overflow re-issue;
  * both kinds of partial write;
  * a fully masked instruction;
  * warp interleaving.
* The block testbenches do the following:
  * `tb_tag_rules`: checks the table exhaustively.
  * `tb_tag_array`, `tb_vector_regfile`: compare against array models.
  * `tb_affine_expand`: compares against x + i·y computed by multiplication.
  * `tb_scalar_unit`: compares against exact 128-bit lane arithmetic, including the overflow flag.
  * `tb_simd_alu`: checks values and the two-cycle latency.
  * `tb_warp_scheduler`: checks the round-robin order.

All run in well under a second.

## Departures and limits

The tag mechanism (tags, rules, compressed storage, scalar path, overflow
re-issue, partial-write handling, launch seeding) is complete.
The multiprocessor around it is reduced to what the mechanism needs:

* **No pipelining across warps.** One instruction is in flight. A real
  multiprocessor overlaps warps. Latencies per instruction are given above.
* **Own instruction set.** Only operations with defined tag rules are
  executed. Multiply-add, which real kernels use heavily, has no rule and is
  absent. No real GPU kernel can be run.
* **Predication** is one active mask per warp, set by `SETMASK`, instead of
  predicate registers with condition codes.
* **Broadcast operands** come from the instruction's immediate field. There is
  no shared memory or constant cache.
* **Not present:**
  * memory instructions, the memory pipeline and global memory;
  * special-function units;
  * address registers;
  * the block scheduler across multiprocessors;
  * the banked register-file organisation.
* **16-bit half registers** are not supported. Tracking them correctly would
  need separate tags for the low half, the high half and the whole register,
  and rules for 16-bit operations that are not defined here.
* **Reading lanes as unsigned** in the overflow check is a choice of this
  design. So are these:
  * the lane layout of compressed registers (lane 0 base, lane 1 stride);
  * r0 as the thread-index register;
  * the tag encoding;
  * the register window `w·rpw + r`.
