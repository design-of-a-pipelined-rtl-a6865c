# Two-lane SIMD pipelined CPU with floating-point unit

This is a small in-order CPU in which every arithmetic instruction can work
on two data elements at once. Most instructions exist in a scalar form
(`adds`, `fmuls`, ...) and a double-data form (`adds2`, `fmuls2`, ...). The
double-data form drives two identical lanes with one instruction: lane 0 uses
the registers named in the instruction and lane 1 uses the next register up.

    adds2  r6, r4, r2      r6 = r4 + r2   and   r7 = r5 + r3
    lws2   r4, r2          r4 = mem[r2]   and   r5 = mem[r3]
    fdivs2 f6, f2, f4      f6 = f2 / f4   and   f7 = f3 / f5

The machine has two execution modules side by side:

* the **integer module**: two 32-bit ALUs and registers `r0..r31`, running
  the five-stage pipeline IF ID EXE MEM WB;
* the **floating-point module**: two IEEE 754 single-precision FPUs and
  registers `f0..f31`, running the six-stage pipeline IF ID E1 E2 E3 WB.

Both modules share instruction fetch and decode, and one data memory. Only
one instruction is issued per cycle. It leaves ID into either the integer
pipe or the FP pipe, except `movs`, which is finished in ID. Loads and stores of FP registers (`flws`, `fsws` and
their pair forms) use the integer pipe, because the address is computed
there; `flws` then writes the FP register file. `fi2fs` and `ff2is` convert
between integers and floats inside the FP registers. To move a value between
the two register files, store it from one and load it into the other.

The top module is `simd_cpu` (`rtl/simd_cpu.sv`).

## Instruction set and encoding

| form | fields | instructions |
|------|--------|--------------|
| R | `op[31:26] rd[25:21] rs[20:16] rt[15:11]` | `adds(2) subs(2) ands(2) ors(2) xors(2)`, FP arithmetic `fd, fs, ft` |
| I | `op[31:26] base[25:21] reg[20:16] imm[15:0]` | `lws(2) sws(2) flws(2) fsws(2)`, `movs reg, imm`, `beqs/gts rs, rt, offset` |
| J | `op[31:26] target[25:0]` | `jals` |
| – | `op[31:26] rs[25:21]` | `jrs rs` |

Opcodes are in the `opcode_e` enum in `rtl/simd_pkg.sv`. The integer
arithmetic opcodes 1–10 follow the published assembler output: for example
`adds2 r0, r2, r4` is `0x04022000`. So do `lws2` (14) and `movs` (42). All
other opcode numbers, and the layout of the I and J formats beyond `lws2`
and `movs`, are this design's own choice. Opcode 0 is a no-operation.

Semantics worth knowing:

* Double-data loads and stores use a pair of base registers:
  `lws2 r4, r2, imm` reads `mem[r2+imm]` and `mem[r3+imm]`.
* `movs rt, imm` writes the sign-extended immediate.
* `beqs`/`gts` branch when `rs == rt` or when `rs > rt` (signed). The target
  is the delay-slot address plus 4 × offset.
* `jals` jumps to the word address `target` and links `r31 = own address + 8`.
  `jrs` jumps to a register.
* Every branch and jump has **one delay slot**. The instruction after it
  always executes, taken or not.
* `r0` is an ordinary register. It is not hard-wired to zero.
* Addresses are byte addresses of 32-bit words; bits [1:0] are ignored.

## Pipeline timing and hazards

This is the part of the design that needs the most care.

    integer / memory:  IF  ID  EXE  MEM  WB
    FP arithmetic:     IF  ID  E1   E2   E3   WB
    fdivs / fsqrts:    IF  ID(ITE ...)  E1  E2  E3  WB
    movs:              IF  ID

Only IF and ID can stall. When they stall, PC and the IF/ID register hold
and a bubble goes on to EXE and E1. Nothing after ID ever stops, so each
unit in EXE..WB and E1..WB is a plain free-running pipeline.

**Forwarding (internal bypass).** ID reads the register files and then
overrides each operand with the youngest in-flight result for that register.
Each lane is checked separately, so a pair write to r6/r7 feeds a later
read of r7.

| source | forwarded from |
|--------|----------------|
| integer ALU result | EXE (combinational ALU output), MEM |
| integer load data | MEM |
| FP arithmetic result | E3 |
| FP conversion (`fi2fs`, `ff2is`) | E2 (finished in E1) and E3 |
| FP load data (`flws`) | MEM |
| anything in WB | both register files write through |
| `movs` | nothing to forward: it writes the register file at the end of ID |

**Stalls.** ID waits in the cases that forwarding cannot cover. The first
four signals come from `hazard_unit`; the top module makes the other two.

| signal | cause | length |
|--------|-------|--------|
| `stall_lw` | an integer source is being loaded by `lws`/`lws2` in EXE | 1 cycle |
| `stall_flw` | an FP operand, or `fsws` data, is being loaded by `flws` in EXE | 1 cycle |
| `stall_fpu` | an FP operation needs an FP result still in E1, or in E2 (not a conversion) | 1–2 cycles |
| `stall_fsw` | the same, for the store data of `fsws`/`fsws2` | 1–2 cycles |
| `stall_div_sqrt` | `fdivs`/`fsqrts` is iterating in ID | `NR_ITER + 1` cycles |
| (internal, no port) | `movs` targets a register that an instruction in EXE or MEM still has to write | 1–2 cycles |

**Two-stage `movs`.** `movs` is finished in ID: its immediate goes into
the integer register file through a third write port at the end of ID, and
a bubble goes on to EXE. That write port wins over the WB port, because
`movs` is always the younger instruction. An older instruction still in EXE
or MEM would write its register later and undo the `movs`, so `movs` waits
in ID until no such write is pending. The wait is the last row of the stall
table.

Branch operands are forwarded too, including from the ALU in EXE. A branch
that depends on a load in EXE waits through `stall_lw`.

**Write-back order.** `flws` reaches WB one cycle earlier in its life than an
FP operation does. So an FP operation and a `flws` issued one cycle later can
write back in the same cycle. The FP register file has four write ports (two
FPU lanes and two load lanes). The load is the younger instruction, so it
wins if both write the same register.

## Floating-point unit (`fpu`, one per lane)

All arithmetic is IEEE 754 single precision. Denormal inputs are read as
zero, results that would be denormal are flushed to zero, and the NaN
produced is always `0x7fc00000`. The unit's operation code carries the
select signals of the FPU:

* bit 0 chooses add or subtract;
* bits 2:1 choose the E3 output among adder, multiplier, divider and
  square root;
* bit 3 marks a conversion, and bit 4 gives its direction.

| unit | E1 | E2 | E3 | accuracy |
|------|----|----|----|----------|
| `fp_addsub` | order operands, align with guard/round/sticky | add/subtract | normalise, round | correctly rounded (nearest even) |
| `fp_mul` | Wallace tree → sum and carry rows | final addition | normalise, round | correctly rounded |
| `fp_div` | a × (1/b) in a Wallace tree, exponent difference | final addition | normalise, round | within 1 ulp |
| `fp_sqrt` | m′ × (1/√m′) in a Wallace tree, half exponent | final addition | normalise, round | within 1 ulp |
| `fp_cvt` | convert | (registered) | (registered) | `fi2fs` nearest even; `ff2is` truncates and saturates |

**Division and square root** use Newton-Raphson iteration, run by `nr_iter`
while the instruction is held in ID:

* Division computes `1/m` for the divisor's significand `m` in [1, 2), with
  `x ← x(2 − m·x)`.
* Square root computes `1/√m′` with `y ← y(3 − m′·y²)/2`, where
  `m′ = 1.f` or `2 × 1.f` so that the exponent left over is even.
* Both start from a 64-entry seed table. Each entry is the reciprocal (or
  reciprocal root) of an interval's midpoint, computed at elaboration.
* Each of the `NR_ITER = 3` iterations takes one cycle. The result has about
  28 correct bits and is held with 31 fraction bits.
* E1–E3 then multiply the dividend (or `m′`) by this value, round it, and
  set the exponent.

Because the reciprocal is only about 28 bits accurate, a quotient or root
can come out one unit in the last place off the correctly rounded value.

`wallace_mul` is the shared Wallace tree. It reduces the partial-product
rows in groups of three with full-adder rows until two rows remain. The
final carry-propagate addition is done in the next stage.

## Files

| file | contents |
|------|----------|
| `rtl/simd_pkg.sv` | opcodes, control bundle `ctrl_t`, hazard record `stage_t`, FPU op codes |
| `rtl/simd_cpu.sv` | top: fetch, decode, forwarding, branches, both pipelines |
| `rtl/decoder.sv`, `rtl/hazard_unit.sv` | decode and stall detection |
| `rtl/inst_mem.sv`, `rtl/data_mem.sv` | memories (1024 words each by default) |
| `rtl/int_regfile.sv`, `rtl/fp_regfile.sv` | register files |
| `rtl/int_alu.sv` | integer ALU |
| `rtl/fpu.sv`, `rtl/fp_*.sv`, `rtl/nr_iter.sv`, `rtl/wallace_mul.sv` | FPU lane and its units |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_simd_fp_workload.sv` | FP SIMD test case through the whole CPU |
| `tb/tb_simd_speedup.sv` | scalar against double-data code, cycles compared |
| `tb/tb_fp_pkg.sv` | reference float rounding used by the testbenches |

Parameters of `simd_cpu`:

| parameter | default | meaning |
|-----------|---------|---------|
| `IMEM_WORDS` | 1024 | instruction memory size |
| `DMEM_WORDS` | 1024 | data memory size |
| `NR_ITER` | 3 | Newton-Raphson iterations |

## Using it

Hold `rst_n` low and load the program and data through the host ports:

* `imem_we`, `imem_addr`, `imem_wdata` write the instruction memory;
* `host_dmem_we`, `host_dmem_addr`, `host_dmem_wdata` write the data memory
  (this port takes over lane 0's memory port).

Then release `rst_n`. Execution starts at address 0. There is no halt
instruction; end a program with `beqs r0, r0, -1`, which loops on itself.
Read the results through the `dbg_*` ports.

The status outputs are one-cycle event flags:

* the five stall signals;
* `fwd_exe`, `fwd_mem` and `fwd_fp`: a forwarded operand was used;
* `branch_taken`;
* `retire_int` and `retire_fp`: a write-back.

Simulate with Verilator, for example the whole-CPU test:

    verilator --binary --timing -Irtl -Itb rtl/simd_pkg.sv tb/tb_fp_pkg.sv \
        -y rtl tb/tb_simd_cpu.sv --top-module tb_simd_cpu
    ./obj_dir/Vtb_simd_cpu

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

`tb_simd_cpu` runs at the default parameters. It:

* sums six memory words with `lws2`/`adds2`;
* runs a loop closed by `gts`, and a `beqs` and a `jals`/`jrs` call, with
  delay slots that must execute;
* runs the FP chain that triggers every stall;
* writes with `movs` registers that an `adds` and an `lws` in flight also
  write;
* checks registers and memory;
* checks that every stall and forwarding path was used;
* checks that `stall_div_sqrt` lasts exactly `NR_ITER + 1` cycles per
  divide or square root.

`tb_simd_fp_workload` runs the pairs (8.0, 4.0) and (1.5, 1.5) through every
double-data FP instruction. In this design 8.0 / 4.0 gives exactly 2.0.

`tb_simd_speedup` adds two 32-element integer arrays twice, once with
`lws`/`adds`/`sws` per element and once with `lws2`/`adds2`/`sws2` per pair.
The double-data version takes 86 cycles against 166, a speed-up of 1.93.
It is not quite 2 because both programs share the same set-up
instructions.

## Departures and open points

* The FPU flushes denormals to zero and has no exception flags.
* `fi2fs` and `ff2is` are computed in E1 and can be forwarded from E2 on,
  so their results are ready after two execution stages. They still write
  back in WB after E3, like every FP instruction, so that each FP result has
  one fixed write-back slot. An instruction right behind a conversion that
  uses its result waits one cycle (`stall_fpu`).
* How `movs` finishes in two stages (the extra write port and the wait
  described above) is this design's own choice.
* The seed-table size, the iteration count, the fixed-point widths, and the
  use of plain multipliers inside the iteration unit are this design's own
  choices.
* The pipeline is single-issue. An integer instruction and an FP instruction
  never start in the same cycle; the parallelism comes from the two lanes.
* The memories read asynchronously, which suits FPGA distributed RAM or
  simulation. A block-RAM build would need an extra fetch/memory stage or
  synchronous-read timing.
* The host load and debug ports exist only so that a program and data can be
  loaded and results read back. They are not part of the CPU as such.
