# Pseudo branches for SIMD processing elements

In a SIMD array every processing element (PE) executes the same broadcast
instruction stream, and no PE has a program counter. Data-dependent
`if-then-else` code therefore normally needs the control processor: it
evaluates the condition across the array, masks PEs, and broadcasts both
branches in turn. This RTL gives each PE enough local control to walk
through such code by itself, nested branches included, while the stream
stays the same for all PEs. Two mechanisms do this:

* **Guarded instructions.** Most instructions carry a 4-bit condition code
  (`GT_mov`, `MI_movi`, ...). It is evaluated on the PE's own ALU flags
  (N, Z, C, V). If it is false, that PE turns the instruction into a NOP.
* **Pseudo branches.** `PBR cc, tag` behaves like a forward branch. If the
  condition holds, the PE records `tag` in a 5-bit Tag Register (TReg) and
  goes to *sleep*. A sleeping PE nullifies every instruction until a
  `NOP tag` with the same tag arrives on the stream. That NOP wakes the PE
  and clears TReg. Branch targets are always NOPs, so the tag fits in
  the NOP's unused bits and the instruction word does not grow.

A sleeping PE also requests power-down of its datapath. The block is the
same one-bit Sleep/Awake flag, so skipped code costs no dynamic power.

The top level, `rc_array`, is an 8 x 8 array: eight groups of eight PEs,
each group with its own instruction stream. Up to eight different
programs run at once, and inside a group each PE takes its own path.

## How nesting works with a single tag register

A PE has only one TReg, yet branches nest. This rests on two rules:

1. A pseudo branch only acts on an **awake** PE. A sleeping PE passes over
   every pseudo branch, taken or not, so TReg keeps the outer target.
2. A NOP wakes a PE only if its tag **equals** TReg. Targets of inner
   branches that the PE skipped leave it asleep.

The region between a taken branch and its target is skipped as a whole,
whatever branches lie inside it. That is how a real forward branch
behaves. Example (each PE holds x in r1 and y in r2, and r0 = 0):

```
        cmp  r1, r0
        pbr  GE, T1        ; x >= 0: skip to T1
        cmp  r2, r0
        pbr  GE, T2        ;   y >= 0: skip to T2
        movi r5, #1        ;   x<0, y<0
        pbr  AL, T3        ;   skip the inner else
        nop  T2
        movi r5, #2        ;   x<0, y>=0
        nop  T3
        pbr  AL, T4        ; skip the outer else
        nop  T1
        movi r5, #3        ; x >= 0
        nop  T4
```

A PE with x >= 0 goes to sleep on T1 and passes over `pbr GE,T2`,
`pbr AL,T3`, `nop T2`, `nop T3` and `pbr AL,T4`. It wakes at `nop T1`.
Tags are symbolic labels in the assembly source. The assembler maps each
one to a 5-bit code and rejects duplicates; the hardware never sees an
address. Tags only need to be unique among targets that can be pending at
the same time. They may be reused afterwards: the square-root test uses tag 3 in
every step. Tag 0 is reserved: it means "nothing pending", and an idle
cycle (`instr_valid = 0`) is executed as `NOP 0`. Never put tag 0 on a
`PBR`. An assertion in `pbranch_unit` flags a sleeping PE whose TReg is 0.

## Timing

```
edge k     : context register latches instr (and data_in)
cycle k..k+1: instruction executes (decode, guard, ALU)
edge k+1   : register file, flags, RAM, data_out, TReg and Sleep/Awake update
```

* One instruction per cycle per stream, with no stalls. Each instruction
  sees the results and flags of the one before it.
* **Taken pseudo branch**: the PE is asleep from the next instruction on.
* **Matching NOP**: the PE is still asleep while the NOP executes. It is
  awake for the next instruction. The target NOP is the power-up slot:
  the NOP has no work to do, so the datapath can come back up while it
  executes.
* `data_in` is latched together with the context word. Present it in the
  same cycle as the `LDX` that reads it.
* A result is visible on `data_out` after edge k+1, i.e. two clock edges
  after its word is presented. The testbenches check this.

## Instruction set

The condition-code multiplexer, the pseudo-branch hardware and its
5-bit tags, and the guard on ALU flags are the scheme's own. The word
layout and the opcode list are this design's choice. All are in
`rtl/simd_pkg.sv`:

| bits    | field |
|---------|-------|
| [31:27] | opcode |
| [26:23] | condition (EQ NE CS CC MI PL VS VC HI LS GE LT GT LE AL NV, ARM numbering) |
| [22:19] | rd |
| [18:15] | rs1 |
| [14:11] | rs2 |
| [15:0]  | imm16 (MOVI sign-extended, MOVHI upper half) |
| [10:0]  | RAM offset (LDM, STM) |
| [4:0]   | tag (NOP, PBR) or shift amount |

| opcode | effect | condition field | flags |
|---|---|---|---|
| NOP tag | wake-up target | - | kept |
| PBR cc,tag | pseudo branch | branch condition | kept |
| ADD SUB AND OR XOR | rd = rs1 op rs2 | guard | set |
| SHL SHR ASR | rd = rs1 shifted by [4:0] | guard | set (C = last bit out) |
| CMP | flags of rs1 - rs2 | guard | set |
| MOV, MOVI, MOVHI | moves and constants | guard | kept |
| LDX | rd = data_in | guard | kept |
| LDM / STM | rd = RAM[rs1+off] / RAM[rs1+off] = rd | guard | kept |
| ADDSUB cc | cc ? rs1 - rs2 : rs1 + rs2 | selects the operation | set |
| INCDEC cc | cc ? rs1 - 1 : rs1 + 1 | selects the operation | set |

Moves and loads keep the flags. The common pattern `sub` then
`MI_movi r9,#K` then `MI_add c,r9,c` needs this: both guarded
instructions test the flags of the same `sub`. After `SUB`/`CMP`, C means
"no borrow": CS/CC/HI/LS compare unsigned and GE/LT/GT/LE compare signed.
`AddSub` and `IncDec` are named by the scheme, but their exact semantics
here (true = subtract/decrement) are assumed.

## Blocks

| module | role |
|---|---|
| `simd_pkg` | opcodes, condition codes, flag and control structs, instruction encoders |
| `guard_cond` | condition-code multiplexer over N, Z, C, V |
| `tag_reg` | 5-bit Tag Register: load on a taken branch, clear on wake-up |
| `tag_comp` | SET = NOP and (NOP tag == TReg) |
| `sleep_awake_flag` | Sleep/Awake flag, RESET = sleep, SET = wake; `power_down = ~awake` |
| `pbranch_unit` | pseudo-branch logic: TReg, comparator and flag; a branch is taken only when awake |
| `rc_decoder` | context word to control bundle |
| `rc_alu` | ALU with N, Z, C, V |
| `rc_regfile` | 16 x 32 register file, 2 read ports and 1 write port |
| `rc_ram` | 64 x 32 internal RAM, asynchronous read |
| `rc_cell` | one PE: context register, decoder, guard, pseudo-branch unit, ALU, register file, RAM |
| `rc_array` | top: `NSTREAMS` x `PES_PER_STREAM` PEs, one stream per group |

While a PE sleeps, `rc_cell` forces the ALU operands to zero, so its
datapath does not toggle in simulation or in a clock-gated netlist. The
register file, RAM, decoder and pseudo-branch logic stay active. The
register file and RAM hold results needed after wake-up. The decoder and
pseudo-branch logic must recognise the target NOP.

## Top-level interface (`rc_array`)

Parameters: `NSTREAMS = 8`, `PES_PER_STREAM = 8`, `DATA_W = 32`,
`NREGS = 16`, `RAM_WORDS = 64`. PE `p` of group `g` has index
`i = g*PES_PER_STREAM + p`.

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock, asynchronous active-low reset (all PEs awake, TReg 0, registers 0) |
| `instr[g]`, `instr_valid[g]` | 32, 1 per group | broadcast context word of group `g` |
| `data_in[i]` | `DATA_W` per PE | operand read by `LDX` |
| `data_out[i]` | `DATA_W` per PE | last value the PE wrote to its register file |
| `awake[i]`, `power_down[i]` | 1 per PE | Sleep/Awake flag and its power-down request |
| `executed[i]`, `nullified[i]`, `pbr_taken[i]`, `woke[i]` | 1 per PE | per-cycle activity, for power and debug |

The top leaves out the surrounding system: the control processor, the
context memory that holds the programs, the frame buffer, the DMA
controller, and the neighbour/express-lane network between PEs. Their
place is taken by the `instr`, `data_in` and `data_out` ports. The power
switches are also left out; `power_down` is their control.

## Where this design departs from, or adds to, the scheme

* The following are this design's choices: the datapath width (32 bits),
  16 registers, 64 RAM words, eight PEs per stream, the word layout and
  opcodes, and the choice of 16 conditions.
* The scheme's PEs read operands from neighbours through input
  multiplexers. Here each PE has one `data_in` port instead.
* The scheme powers the datapath down. Here the PE outputs a request
  and isolates the ALU operands; there are no power switches.
* The Sleep/Awake flag and TReg are registers updated at the end of the
  instruction. A sleeping PE ignores pseudo branches.

## Evaluation programs

`tb/rc_array_workloads_tb.sv` runs four data-dependent functions at the
same time on the full 64-PE array, two streams each, with no control
processor in the loop. They are checked against reference code:

| function | technique | words |
|---|---|---|
| MaxOf(x,y,z) | 2 pseudo branches | 16 |
| Line clipping (clip codes of both end points, trivial accept/reject) | guarded MI_/GT_ instructions | 39 |
| 32-bit square root | 16 steps, one pseudo branch each | 138 |
| 32 / 16-bit signed division | AddSub for the magnitudes and the sign, guarded CS_sub/CS_or steps | 238 |

Loops are unrolled because the array has no loop control. Word counts are
therefore larger than those of a looped program.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. Build any of them with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/simd_pkg.sv \
          tb/rc_array_tb.sv --top-module rc_array_tb
./obj_dir/Vrc_array_tb
```

* **Unit testbenches**: one per module (`tb/<module>_tb.sv`).
  `pbranch_unit_tb` replays a two-PE nested example step by step.
* **`rc_array_tb`**: end-to-end test at default parameters. Four kinds of
  program run concurrently. It counts every mechanism and fails if one
  never occurs: taken, not-taken and ignored pseudo branches, wake-ups,
  non-matching NOPs, executed and nullified guarded instructions, both
  directions of AddSub and IncDec, power-down, and concurrent streams.
* **`rc_array_workloads_tb`**: the evaluation programs above.

All of them run in seconds.

Everything in the testbenches is two-state. The RAM is not reset, so a
program must write a word before it reads it.
