# A five-stage pipelined ARM-subset processor

This is a small 32-bit processor for a subset of the ARM instruction set. It has
the classic five-stage pipeline: Fetch, Decode, Execute, Memory, Writeback. Each
stage works on a different instruction, so in steady state one instruction
completes per clock. Most of the design is the hazard logic that keeps that
overlap correct:

- results are forwarded to instructions that need them before they reach the
  register file;
- the pipeline stalls for one cycle when an instruction needs a value that is
  still being loaded;
- instructions fetched behind a taken branch, or behind a write to the program
  counter, are thrown away.

The design is that of a university course lab on pipelined ARM processors, in
the organisation taught by Harris & Harris: the same stage split, signal names
(`PCSrc`, `MemtoReg`, `ALUSrc`, `RegSrc`, `ImmSrc`, ...), decoder table and
hazard equations. Where that lab's design was incomplete or inconsistent, this
RTL makes its own choices. They are listed under
[Departures and design choices](#departures-and-design-choices).

## Instruction set

Every instruction has the ARM 4-bit condition field in bits 31:28 (see
[Conditional execution](#conditional-execution-and-flags)).

| Instruction | Bits 27:20 | Operation |
|---|---|---|
| `ADD Rd, Rn, Src2` | `00I 0100 0` | Rd = Rn + Src2 |
| `SUB Rd, Rn, Src2` | `00I 0010 0` | Rd = Rn - Src2 |
| `SUBS Rd, Rn, Src2` | `00I 0010 1` | Rd = Rn - Src2, set flags |
| `CMP Rn, Src2` | `00I 1010 1` | set flags from Rn - Src2 |
| `AND Rd, Rn, Rm` | `000 0000 0` | Rd = Rn & Rm |
| `ORR Rd, Rn, Rm` | `000 1100 0` | Rd = Rn \| Rm |
| `LDR Rd, [Rn, #imm12]` | `010 1100 1` | Rd = mem[Rn + imm12] |
| `STR Rd, [Rn, #imm12]` | `010 1100 0` | mem[Rn + imm12] = Rd |
| `B label` | `1010 xxxx` | PC = PC + 8 + 4 * imm24 |

- **Src2** is register Rm (bits 3:0) when I = 0. When I = 1 it is the 8-bit
  immediate in bits 7:0, *sign-extended*. So `#0xFF` means -1. ARM would
  zero-extend and rotate this immediate; this design does neither.
- **Register operands are not shifted.** Bits 11:4 are ignored.
- **Load/store offsets** are unsigned and added only. There is no pre/post
  indexing, write-back, or byte access.
- **Unknown encodings** execute as no-operations. This includes EOR, MOV,
  BL, LDRB, and AND/ORR with an immediate.
- **R15 as a source** reads as the address of the instruction plus 8, as on
  ARM.
- **R15 as a destination** (an `ADD`, `SUB`, `LDR`, ... whose Rd is 15) is a
  jump to the written value.

## Pipeline organisation

```
        Fetch          Decode             Execute                Memory        Writeback
  PC ─► imem ─► [FD] ─► decoder      [DE] ─► fwd muxes ─► ALU [EM] ─► dmem ─► [MW] ─► Result mux
                        reg_file            cond_unit            (outside)        │
                        extend              branch target ─► PC                   └─► reg_file, PC
```

- **Fetch.** The PC addresses the external instruction memory. The next PC is
  chosen in this order:
  1. the branch target from Execute, when a branch is taken;
  2. the Writeback result, when the instruction in Writeback wrote R15;
  3. PC + 4.
- **Decode** (`decoder`, `reg_file`, `extend`). The decoder turns bits 27:20
  into a control word.
  - The first read address is Rn, or R15 for a branch (`RegSrc[0]`).
  - The second read address is Rm, or Rd for a store (`RegSrc[1]`).
  - A read of R15 is replaced by PC+8. While an instruction is in Decode, that
    equals the fetch PC + 4.
- **Execute** (`alu`, `cond_unit`).
  - Each ALU operand comes from the Decode-stage read or is forwarded (see
    below).
  - The second operand may be the immediate instead.
  - The condition unit checks the condition field against the stored flags.
    A failed condition cancels the instruction's register write, memory write,
    R15 write, flag update and branch.
  - A taken branch sends its target (R15 + offset, computed by the ALU)
    straight to the PC.
- **Memory.** The ALU result is the data address. The store data is the
  forwarded second register operand.
- **Writeback.** The result is the loaded word or the ALU result. It is
  written to the register file, or to the PC for R15.

Four `pipeline_register` instances separate the stages. Each carries one packed
struct of that stage's signals (see `arm_pkg.sv`). A pipeline register can be
flushed (cleared to a bubble, whose control bits are all zero) or stalled
(held). The Fetch/Decode register also carries a valid bit, so a flushed
instruction decodes as a no-operation.

A stall has priority over a flush. This matters in one case: an instruction
that writes R15 sits in Decode, and it depends on a load in Execute. That
register is then told to flush (R15 write pending) and to stall (load-use) in
the same cycle. It must hold the instruction, or the jump would be lost.

The register file is written on the rising edge. A read of the register being
written in the same cycle returns the new value. This covers the one case that
forwarding does not: a producer in Writeback and a consumer in Decode.

## Hazards

`hazard_unit.sv` is purely combinational. It implements the equations below.

### Forwarding (no stall)

Suppose the instruction in Execute reads a register that an older
instruction, still in the pipeline, has not yet written back:

- If the instruction in Memory writes that register, Execute takes its ALU
  result (`FWD_MEM`).
- Otherwise, if the instruction in Writeback writes it, Execute takes the
  Writeback result (`FWD_WB`).

Memory is checked first because it holds the more recent value. Both ALU
operands and the store data are forwarded.

### Load-use stall (1 cycle)

A loaded word only exists at the end of Memory. So if the instruction in
Decode reads the register that a load in Execute will write:

- the PC and Decode hold for one cycle;
- Execute receives a bubble.

In the next cycle the load is in Writeback and the value is forwarded.

```
LDR R4,[R3]      F D E M W
ADD R2,R2,R4       F D D E M W      (R4 forwarded from Writeback)
```

### Taken branch (2 cycles)

Branches are predicted not taken and resolved in Execute. When a branch is
taken:

- the PC loads the target;
- the two instructions already fetched, now in Decode and Fetch, are flushed.

An untaken branch costs nothing.

### Write to R15 (4 cycles)

An instruction whose destination is R15 raises `pc_src` in Decode. While it is
in Decode, Execute or Memory (`pc_wr_pending`):

- the PC is held;
- Decode is flushed every cycle.

When the instruction reaches Writeback, the PC loads its result and Decode is
flushed once more. If the instruction's condition fails, `pc_src` is dropped in
Execute and fetching resumes at the next instruction.

### Equations

```
ldr_stall     = MemtoReg_E & (RA1_D == WA3_E | RA2_D == WA3_E)
pc_wr_pending = PCSrc_D | PCSrc_E | PCSrc_M
stall_f       = (ldr_stall | pc_wr_pending) & ~BranchTaken_E
stall_d       = ldr_stall
flush_d       = pc_wr_pending | PCSrc_W | BranchTaken_E
flush_e       = ldr_stall | BranchTaken_E
```

### Cycle count

A program runs in N + 4 cycles from reset to its last Writeback, plus:

- 1 cycle for each load-use pair;
- 2 cycles for each taken branch;
- 4 cycles for each write to R15.

The end-to-end testbench checks this count.

The load-use check compares register fields without asking whether the
instruction really reads them. So an immediate-operand instruction whose bits
3:0 happen to equal the load's destination also waits one cycle. So does a
bubble in Decode behind a load to R0. These extra stalls cost time only; they
never affect results.

## Conditional execution and flags

The flag register holds N, Z, C and V. It is updated at the end of Execute by
SUBS and CMP, and only when their own condition passes. An instruction directly
behind a compare therefore already sees the new flags, with no stall.

| Code | Name | Executes when |
|---|---|---|
| 0000 | EQ | Z |
| 0001 | NE | !Z |
| 1010 | GE | !N |
| 1011 | LT | N & !Z |
| 1100 | GT | !N & !Z |
| 1101 | LE | N \| Z |
| 1110 | AL | always |
| other | — | never |

These tests use only N and Z, as in the original design. They match ARM's
signed comparisons whenever the subtraction did not overflow. After a
comparison that overflows (for example `CMP` of 0x7FFFFFFF with -1), GE/LT/GT/LE
give the answer for the wrapped result. The ALU still computes C and V, and
they are stored, but no condition reads them.

## Interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active-high. Clears the PC (restart at 0), every pipeline register and the flags. Registers R0–R14 are not cleared. |
| `PC_Fetch` | out | 32 | instruction address |
| `Instr_Fetch` | in | 32 | instruction at `PC_Fetch`, combinational (same cycle) |
| `ALUResult_Mem` | out | 32 | data address |
| `WriteData_Mem` | out | 32 | store data |
| `MemWrite_Mem` | out | 1 | store enable. Write on the rising edge. |
| `ReadData_Mem` | in | 32 | word at `ALUResult_Mem`, combinational. It is registered into Writeback. |

The memories themselves are not part of this RTL. Both must answer within the
cycle (asynchronous read). Addresses are byte addresses of aligned words.

## Departures and design choices

The original design leaves several points open or inconsistent. This RTL
follows its structure, its control table and its hazard equations, with these
changes:

1. **Branches do not raise `PCSrc`.** The original decoder set `PCSrc` for `B`.
   It also resolves branches in Execute, but the `PCSrc`-driven fetch stall
   would block that redirect. Here `B` uses only the Execute redirect (2-cycle
   penalty). `PCSrc` marks a register write to R15, which the original decoder
   never detected.
2. **A taken branch overrides the fetch stall.** Without this, a branch
   followed directly by an R15 write would lose its target.
3. **Branch immediate.** The original `B` row selected the 12-bit immediate.
   Here it uses the 24-bit word offset, the extender's branch form.
4. **SUBS and CMP.** The original row called "CMP" decodes the SUBS encoding
   and writes Rd. It is kept as SUBS. The real CMP encoding (`00I 1010 1`) is
   decoded as well, as a subtraction that writes only flags.
5. **Flag writes.** In the original, bit 20 was the flag-write enable for
   every instruction. That bit is the L bit of LDR and part of a branch
   offset. Here only SUBS and CMP write flags, gated by their own condition.
   The flag register is an ordinary clocked register; the original wrote it
   without a clock.
6. **Stall beats flush** in a pipeline register. The original did not say
   which wins. Flush-first loses an R15 write that waits on a load.
7. **Decode bubbles** carry a valid bit. A flushed instruction is not decoded
   as the all-zero word (`ANDEQ R0,R0,R0`).
8. **Reset.** The original forced many combinational signals to zero during
   reset. Here the state elements are reset synchronously instead.
9. **Register file and ALU internals.** The original used these from earlier
   work, without giving them. Here:
   - the register file writes on the rising edge with a read bypass;
   - the ALU uses the ARM definitions of C and V.

Kept as in the original, though they differ from real ARM:

- sign-extended, unrotated 8-bit immediates;
- N/Z-only condition tests;
- no operand shifts.

## Files

| File | Contents |
|---|---|
| `rtl/arm_pkg.sv` | encodings (ALU op, immediate source, forwarding select, conditions), flag struct, control word, pipeline-column structs |
| `rtl/arm.sv` | top level: PC, stage wiring, forwarding multiplexers, next-PC logic |
| `rtl/decoder.sv` | main decoder |
| `rtl/reg_file.sv` | 16 × 32 register file with write-to-read bypass |
| `rtl/extend.sv` | immediate extender |
| `rtl/alu.sv` | ADD/SUB/AND/ORR with NZCV |
| `rtl/cond_unit.sv` | flag register and condition check |
| `rtl/hazard_unit.sv` | forwarding, stall and flush logic |
| `rtl/pipeline_register.sv` | stage register with reset, flush and stall |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/arm_random_tb.sv` | random programs checked against an instruction-level model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
cycle-count watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/arm_pkg.sv tb/arm_tb.sv --top-module arm_tb -Mdir obj_arm
./obj_arm/Varm_tb
```

Replace `arm` with `alu`, `decoder`, `reg_file`, `extend`, `cond_unit`,
`hazard_unit` or `pipeline_register` for the unit tests. The package must come
first on the command line.

`arm_tb` is a complete program run on the processor at its default
configuration. Its instruction and data memories are 64-word arrays in the
testbench. The program covers:

- a summing loop closed by `BNE`;
- a load followed immediately by a use of the loaded value;
- `ADDEQ`/`ADDNE` after `CMP`;
- AND and ORR;
- a negative immediate;
- a jump by `ADD R15`;
- `BLT` taken and `BGE` not taken;
- a jump by `LDR R15`.

The testbench checks every stored result and the cycle in which the last store
happens. It also counts each hazard mechanism (forwarding from Memory and from
Writeback, load-use stall, taken and untaken branch, cancelled conditional,
flag update, R15 write) and fails if any never occurs. Its mechanism counters
read internal signals hierarchically (`dut.fwd_a_e`, `dut.ldr_stall`, ...).

`arm_random_tb` runs 150 randomly generated programs of 89 instructions each.
Each program is also run on an instruction-level reference model written in
the testbench, which knows nothing of the pipeline. At the end, R0–R8 and every
data-memory word must agree.

The programs use:

- all data-processing instructions, with random conditions;
- loads and stores;
- conditional branches up to four words forward or back;
- forward jumps by `ADD R15, R15, #k`.

A program that the model sees looping forever is replaced before it runs.
Register numbers come from a small set, so hazards are frequent. `LDR R15` is
not generated; the directed test covers it.

To write your own program, encode instructions as in the helper functions at
the top of `arm_tb.sv` (`dpi`, `dpr`, `ldr`, `str`, `br`). Remember that all
registers start undefined: write a register before reading it.

## How far to trust it

- Each module has a self-checking testbench against an independently written
  reference. Each of these testbenches was also shown to fail on a
  deliberately broken copy of its module.
- The processor-level tests cover every instruction, every hazard path and the
  cycle count of a mixed program.
- Not covered: operand shifts, rotated immediates, byte/halfword access,
  `BL`, the other condition codes, exceptions and interrupts. None of these
  exist in the design.
