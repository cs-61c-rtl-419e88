# MIPS-lite: a single-cycle MIPS datapath in SystemVerilog

This is a teaching-scale MIPS processor in which every instruction runs through
five steps — fetch, decode and register read, ALU, memory access, register
write — within **one long clock cycle**. Nothing is pipelined, so there are no
hazards, stalls or bypasses. Each rising clock edge retires exactly one
instruction: the PC, the register file and the data memory are updated
together at that edge, and everything between two edges is combinational.

It executes the "MIPS-lite" subset:

| Instruction | Register transfer | Encoding used |
|---|---|---|
| `addu rd,rs,rt` | R[rd] ← R[rs] + R[rt] | op 0x00, funct 0x21 |
| `subu rd,rs,rt` | R[rd] ← R[rs] − R[rt] | op 0x00, funct 0x23 |
| `ori rt,rs,imm16` | R[rt] ← R[rs] \| zero_ext(imm16) | op 0x0D |
| `lw rt,imm16(rs)` | R[rt] ← MEM[R[rs] + sign_ext(imm16)] | op 0x23 |
| `sw rt,imm16(rs)` | MEM[R[rs] + sign_ext(imm16)] ← R[rt] | op 0x2B |
| `beq rs,rt,imm16` | if R[rs] = R[rt]: PC ← PC + 4 + (sign_ext(imm16) << 2) | op 0x04 |

It also runs two instructions that appear in the standard datapath
walkthroughs: `add` (executed exactly like `addu`; overflow does not trap) and
`slti rt,rs,imm16` (R[rt] ← 1 if R[rs] < sign_ext(imm16) as signed numbers,
else 0; op 0x0A). Every other instruction word does nothing except advance the
PC, and raises the `illegal` output while it executes. Every instruction that
does not branch sets PC ← PC + 4.

The numeric opcodes and funct codes are the standard MIPS ones. The field
layout is the usual one: op in bits 31..26, rs in 25..21, rt in 20..16, then
either rd 15..11 / shamt 10..6 / funct 5..0 (R-type) or imm16 in 15..0
(I-type).

## The datapath

```
        +----+    +-------------+  rs,rt  +-----------+  R[rs]  +-----+  addr  +-------------+
  +---->| PC |--->| instruction |-------->| registers |-------->|     |------->|    data     |
  |     +----+    |   memory    |  rd/rt  | (reg_file)|  R[rt]  | ALU |        |   memory    |
  |       |       | (instr_mem) |-------->|           |--+----->|     |        | (data_mem)  |
  |       v       +-------------+  imm16  +-----------+  |  +-->|     |        +-------------+
  |     +----+          |          +---------+           |  |   +-----+          ^      |
  |     | +4 |          +--------->| imm_ext |-----------|--+      |  R[rt] -----+      |
  |     +----+                     +---------+           |         |  (store data)      |
  |       |     branch target                            +---------|------------------->|
  +--[mux]<---- PC+4+(imm<<2)                                       v                    v
                                              write back: ALU result | slt bit | load data ---> registers
```

`mips_lite_cpu` (the top) wires these blocks together:

* **`pc_unit`** holds the PC and works out the next one: PC+4, or for a taken
  `beq` the branch target PC + 4 + {sign_ext(imm16), 00}. A 2:1 mux picks
  between them. The +4 is a ripple chain of `half_adder` cells over PC[31:2],
  with a carry of 1 into bit 2.
* **`instr_mem`** is read combinationally at the PC. Bits [11:2] of the byte
  address select one of 1024 words.
* **`control`** decodes op and funct into a `ctrl_t` struct (defined in
  `mips_pkg`). Its fields are: the register destination (rd or rt), the ALU B
  source (R[rt] or the immediate), sign or zero extension, the ALU function,
  memory write, load-to-register, register write, branch, set-less-than and
  illegal.
* **`imm_ext`** zero-extends the immediate for `ori` and sign-extends it for
  everything else.
* **`reg_file`** holds 32 × 32-bit registers. It has two combinational read
  ports (rs and rt) and one write port that writes on the clock edge.
  Register 0 always reads 0, and writes to it are dropped.
* **`alu`**: see below.
* **`data_mem`** holds 1024 words, addressed by the ALU result. Reads are
  combinational and writes happen on the clock edge. Only whole words are
  accessed, the two low address bits are ignored, and addresses wrap every
  4 KiB.
* **Write back** selects what goes into the register file: the load data for
  `lw`, the less-than bit for `slti`, and the ALU result otherwise.

Which blocks each instruction uses:

| | fetch | reg read | ALU | memory | reg write |
|---|---|---|---|---|---|
| addu/add/subu | ✓ | rs, rt | add/sub | – | rd |
| ori | ✓ | rs | OR with zext(imm) | – | rt |
| slti | ✓ | rs | sub sext(imm) | – | rt ← less |
| lw | ✓ | rs | add sext(imm) | read | rt |
| sw | ✓ | rs, rt | add sext(imm) | write R[rt] | – |
| beq | ✓ | rs, rt | sub, test zero | – | – (PC) |

Of these, only `lw` uses all five steps.

## The ALU, from one-bit adders up

The ALU is built hierarchically. It is the part of the design whose structure
is closest to gate level.

0. **`half_adder`**: s = a ⊕ b, c = a·b. This is the adder for the least
   significant bit when there is no carry in. Here it is used in the PC
   incrementer.
1. **`full_adder`**: s = a ⊕ b ⊕ c_in, and c_out = majority(a, b, c_in) =
   ab + a·c_in + b·c_in.
2. **`adder_subtractor`** chains N full adders (N = 32 by default) into a
   ripple-carry adder. Each b bit first passes through an XOR with `sub`,
   which inverts it when `sub` = 1. `sub` is also the carry into bit 0. So
   `sub` = 1 computes a + ~b + 1 = a − b ("subtract is invert and add 1").
   Signed overflow is c_N ⊕ c_(N−1): the carry out of the top bit differs
   from the carry into it. c_N alone is available as `carry_out`, but it is
   the unsigned carry/borrow, not the signed overflow.
3. **`alu`** takes a two-bit select S:

   | S | R |
   |---|---|
   | 00 | A + B |
   | 01 | A − B |
   | 10 | A AND B |
   | 11 | A OR B |

   S0 drives the adder/subtractor's `sub` input. It also chooses OR over AND
   in a first mux. S1 then chooses the logic result over the arithmetic one.
   The `overflow` output comes from the adder/subtractor. This design adds a
   `zero` output (R == 0), which `beq` uses.

The ALU has no compare function. **`slti` gets one without changing the ALU.**
The ALU subtracts the sign-extended immediate, and rs < imm (signed) is
`R[31] XOR overflow`. When the subtraction overflows, the sign bit of the
difference is wrong, and the XOR corrects it. That bit, zero-extended, is
written back. The top brings the ALU's overflow out as `alu_overflow`, but
nothing traps on it.

## Interface and timing of the top

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | one instruction per rising edge |
| `rst_n` | in | 1 | synchronous, active low. Sets PC to 0 and clears all registers. Data memory is not cleared. |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 10, 32 | program-load port, one word per clock, word addressed. Use it while `rst_n` is low. |
| `pc`, `instr` | out | 32, 32 | the instruction executing in this cycle |
| `alu_overflow` | out | 1 | signed overflow of this cycle's ALU add/subtract |
| `illegal` | out | 1 | this cycle's instruction is outside the supported set |

Data-memory writes are gated by `rst_n`, so nothing is stored while the
program is being loaded. After `rst_n` rises, the instruction at address 0
executes in the first cycle. There is no halt instruction; a `beq $0,$0,-1`
makes a convenient spin loop. Parameters `IMEM_WORDS` and `DMEM_WORDS`
(default 1024 each) set the memory sizes. They must be powers of two.

## What is taken from the MIPS description and what is chosen here

Taken from the description of the datapath:

* the five steps in one cycle;
* the block structure (PC, +4, next-PC mux, instruction memory, registers,
  ALU, data memory, write-back path);
* the register transfers of the six MIPS-lite instructions;
* the walkthrough semantics of `add` and `slti`;
* the instruction field layout;
* the ALU's four functions, their select codes and its mux structure;
* the XOR-based adder/subtractor and its overflow rule;
* the half-adder and full-adder equations;
* separate instruction and data memories, which a single-cycle `lw` needs
  because it fetches and loads in the same cycle.

Chosen here, because the description leaves them open:

* the numeric opcodes (standard MIPS);
* the control signal set and its encoding;
* memory sizes (1024 words each), and plain arrays instead of caches;
* combinational memory reads;
* the program-load port;
* reset behaviour;
* register 0 hard-wired to zero;
* no exceptions: unsupported instructions become no-ops, and `add`
  overflow does not trap;
* the ALU `zero` flag;
* deriving `slti` from subtraction and overflow.

Not provided: jumps (`j`, `jal`), shifts, multiply and divide, byte and
halfword memory accesses, and any exception or interrupt mechanism.

## Files

* `rtl/mips_pkg.sv`: opcodes, ALU select enum, instruction-field structs,
  `ctrl_t`.
* `rtl/half_adder.sv`, `rtl/full_adder.sv`, `rtl/adder_subtractor.sv`,
  `rtl/alu.sv`: the arithmetic hierarchy.
* `rtl/pc_unit.sv`, `rtl/instr_mem.sv`, `rtl/control.sv`, `rtl/imm_ext.sv`,
  `rtl/reg_file.sv`, `rtl/data_mem.sv`: the other datapath blocks.
* `rtl/mips_lite_cpu.sv`: the top.
* `tb/tb_<block>.sv`: one self-checking testbench per block.

## Verification

Every testbench compares the block against values it works out on its own.
Each one ends by printing `TB_RESULT checks=<n> failures=<n>`, and each has a
watchdog.

* The arithmetic blocks are checked exhaustively (`half_adder`, `full_adder`), or with
  corner values plus thousands of random operands (`adder_subtractor`,
  `alu`). Overflow is checked against 64-bit signed arithmetic.
* The memories and the register file are checked against reference arrays.
  This includes read-before-write in the same cycle and register 0.
* `control` is checked against a table of every supported instruction, and
  against every other opcode.
* **`tb_mips_lite_cpu`** runs the top at its default sizes. First it runs a
  hand-written program of walkthrough-style instructions: `add`, `slti` with
  true, false and negative operands, `sw`/`lw` with positive and negative
  offsets, `subu`, `ori` zero extension, `beq` taken and not taken, a write to
  `$0`, and a spin loop. The final registers and memory are compared with
  values worked out by hand. Then it fills instruction memory with random
  instructions and runs 20 programs of 1000 cycles each. An instruction-set
  model in the testbench runs in lockstep with the processor. After every
  clock the testbench compares the PC (one instruction per cycle), all 32
  registers, the stored memory word, and the ALU overflow flag. It counts every
  instruction type, taken and untaken branches, overflows, writes to `$0`
  and illegal instructions, and fails if any of them never occurred.

* **`tb_walkthroughs`** runs the textbook walkthrough instructions
  (`add $r3,$r1,$r2`, `slti $r3,$r1,17`, `sw $r3,16($r1)`, `lw $r3,16($r1)`,
  `lw $t0,40($t1)`). In the cycle each one executes, it checks the values on
  the datapath: register read data, the ALU result or address, and the
  memory write enable and data. Afterwards it checks what was written. It
  runs twice, with `$r1` below and above 17.

The testbenches inspect the register file, the data memory and some
datapath nets through hierarchical references (`dut.u_rf.regs`,
`dut.u_dmem.mem`, `dut.alu_r`).

To simulate with Verilator 5, for example the whole processor:

```
verilator --binary --timing --assert rtl/mips_pkg.sv rtl/*.sv tb/tb_mips_lite_cpu.sv \
          --top-module tb_mips_lite_cpu -Mdir obj_cpu
./obj_cpu/Vtb_mips_lite_cpu
```

Replace the testbench name to run any other block's test. Lint with
`verilator --lint-only -Wall rtl/mips_pkg.sv rtl/*.sv --top-module mips_lite_cpu`.
The remaining warnings are about unused bits: the shamt field, the upper
address bits the memories ignore, and the unused `pc_plus4` output.
