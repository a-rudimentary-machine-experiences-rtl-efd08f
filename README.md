# MR — a rudimentary 16-bit teaching computer in SystemVerilog

The MR ("Máquina Rudimentaria") is a computer small enough to be understood
completely in a first course on logic design: a 16-bit, non-pipelined von
Neumann machine with 256 words of memory, eight registers, two flags and a
six-state Moore control unit. Everything in it is orthogonal: one instruction
length, one word size, an opcode always in the top two bits, and a datapath in
which every register has its own load signal driven straight from the control
unit's state. This repository is a synthesizable RTL model of that machine,
block for block as the published datapath draws it, plus self-checking
testbenches.

## Programmer's view

* Memory: 256 words x 16 bits, 8-bit addresses. Code and data share it.
* Registers R0-R7, 16 bits; R0 always reads 0. Writing R0 discards the
  value but still sets the flags, so `SUB R3, R3, R0`-style comparisons
  need no scratch register.
* Flags N (result bit 15) and Z (result is 0), set by every ALU instruction
  and by LOAD; branches and STORE leave them alone.
* No I/O, no interrupts, no halt instruction. A program ends by branching to
  itself.

| Instruction           | Effect                        |
|-----------------------|-------------------------------|
| `ADD Rs1, Rs2, Rt`    | Rt := Rs1 + Rs2               |
| `SUB Rs1, Rs2, Rt`    | Rt := Rs1 - Rs2               |
| `AND Rs1, Rs2, Rt`    | Rt := Rs1 & Rs2               |
| `ASR Rs, Rt`          | Rt := Rs >> 1 (arithmetic)    |
| `ADDI Rs, #imm, Rt`   | Rt := Rs + imm (5-bit signed) |
| `SUBI Rs, #imm, Rt`   | Rt := Rs - imm                |
| `LOAD base(Ri), Rt`   | Rt := M[base + Ri]            |
| `STORE Rs, base(Ri)`  | M[base + Ri] := Rs            |
| `BR/BEQ/BL/BLE/BNE/BGE/BG target` | branch on 1, Z, N, N∨Z, ¬Z, ¬N, ¬(N∨Z) |

Address arithmetic uses only the low 8 bits of Ri and wraps modulo 256.

### Encoding

```
 15 14 | 13 12 11 | 10  9  8 |  7  6  5 |  4  3 |  2  1  0
  1  1 |    Rt    |   Rs1    |   Rs2    |  0  0 |    OP       ALU, register
  1  1 |    Rt    |   Rs     |   immediate (5)  |    OP       ALU, immediate
  0  0 |    Rt    |   Ri     |        base_addr (8)            LOAD
  0  1 |    Rs    |   Ri     |        base_addr (8)            STORE
  1  0 |   COND   |  0  0  0 |        target_addr (8)          branch
```

OP: `ADDI 000`, `SUBI 001`, `ADD 100`, `SUB 101`, `ASR 110`, `AND 111`. OP2
chooses the second operand (1 register, 0 immediate); OP1-0 is the ALU
function. `ASR` shifts the register in the Rs2 field; put 000 in Rs1.

COND: `BR 000`, `BEQ 001`, `BL 010`, `BLE 011`, `BNE 101`, `BGE 110`,
`BG 111`. Bit 2 negates the condition that bits 1-0 select; `100` is never
taken.

The field layout and the opcodes are the published ones. The OP and COND
numbers are this implementation's choice (see "Where this RTL decides"
below). Change them in `mr_pkg` and `mr_branch_eval` if you must match an
existing assembler.

## How an instruction runs

This is the part worth reading slowly. There is one state per clock cycle,
and each state's outputs are fixed (a Moore machine). Two states do two jobs
at once, and that is what keeps the machine short on cycles.

```
          +-------------------------------------------+
          v                                           |
 reset -> FETCH ----> DECO --00x--> LOAD  ------------+
            ^          |  \--01x--> STORE ------------+
            |          |   \-11x--> ARIT  ---> DECO
            +--100-----+    \-101--> BRANCH -> DECO
```

The label on a DECO exit is {IR15, IR14, Cond}, where Cond is the branch
evaluation output.

* **FETCH**: address from PC. IR := M[PC], PC := PC + 1.
* **DECO**: the register in IR10-8 (Rs1, or Ri, or R0 for a branch) is read
  once and used twice. It goes into RA as the first ALU operand. Its low byte
  is also added to IR7-0 in ADDRAD and loaded into R@. So R@ holds the
  LOAD/STORE address, or the branch target (target + R0). Every instruction
  passes through DECO, whatever its type.
* **ARIT**: reads the register in IR7-5 as operand B (or takes the
  sign-extended IR7-3), writes the ALU result to Rt and loads N and Z.
  *In the same cycle* it fetches the next instruction from PC. So the next
  state is DECO, not FETCH.
* **LOAD**: address from R@. The memory word passes through the ALU with
  OPERATE = 0 into Rt and the flags. Then FETCH.
* **STORE**: address from R@, data from the register in IR13-11. Then FETCH.
* **BRANCH** (condition true): fetches the target word from R@ into IR and
  sets PC := R@ + 1. The +1 incrementer takes the *selected address*, not PC,
  which is what makes this possible. Then DECO.
* Condition false: DECO goes back to FETCH. PC already points past the
  branch.

Cycle counts are: ALU instructions 2, taken or untaken branches 2, LOAD and
STORE 3, plus one FETCH after reset.

Control outputs per state (`-` means the value does not matter; this RTL
drives 0 there):

| state  | Ld_RA | Ld_IR | Ld_PC | Ld_R@ | Ld_RZ | Ld_RN | WRt | R/W | PC/@ | CRs | OPERATE |
|--------|---|---|---|---|---|---|---|---|---|---|---|
| FETCH  | 0 | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 0 | - | - |
| DECO   | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | - | 1 | - |
| ARIT   | 0 | 1 | 1 | 0 | 1 | 1 | 1 | 0 | 0 | 2 | 1 |
| LOAD   | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 0 | 1 | - | 0 |
| STORE  | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 0 | - |
| BRANCH | 0 | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 1 | - | - |

## Datapath blocks

| module           | contents |
|------------------|----------|
| `mr_regfile`     | 8 x 16 registers, R0 = 0. SELREG picks the read register by CRs: 0 = IR13-11, 1 = IR10-8, 2 = IR7-5. The write register is always IR13-11, with write data from the ALU. Combinational read, clocked write. |
| `mr_arith_unit`  | RA; SELDAT selected by {OPERATE, IR2}: 3 register, 2 immediate, 1/0 memory word; 5-to-16 sign extension; the ALU; flag registers RN and RZ. |
| `mr_alu`         | OPERATE = 0 passes B. Otherwise OP1-0 selects A+B, A-B, B>>>1 or A&B. |
| `mr_branch_eval` | COND, N, Z → Cond. |
| `mr_mem_ref`     | PC, R@, ADDRAD (8-bit adder), the +1 incrementer, SELADR (PC/@). |
| `mr_datapath`    | IR plus the four parts above. |
| `mr_control`     | The state machine and output table. |
| `mr_cpu`         | Datapath + control, with a memory interface: `mem_addr`, `mem_wdata` (Min), `mem_rdata` (Mout), `mem_rw`. |
| `mr_ram`         | 256 x 16 memory: asynchronous read, write on the clock edge when `rw` = 1. |
| `mr_top`         | CPU + RAM + memory access port. |

Shared types are in `mr_pkg`: the widths, the `opcode_e`, `state_e` and
`crs_e` enums, and the `ctrl_t` struct that carries all control signals. The
CPU has two assertions: a memory write is always addressed through R@, and
a register write always comes with a flag update.

### Timing contract of the memory

The CPU presents an address and expects the data in the same cycle (FETCH,
LOAD and BRANCH each take one cycle). A synchronous-read RAM will not work
without an extra state. Writes happen at the rising edge of the STORE cycle.

### The top and its access port

The MR itself has no I/O. To get programs in and results out, `mr_top` adds a
memory access port, which is not part of the original machine:

1. Hold `rst` = 1 and set `ext_en` = 1.
2. Write words with `ext_addr`, `ext_wdata` and `ext_we` = 1, one per clock.
3. Set `ext_en` = 0 and release `rst`. Execution starts at address 0.
4. To read back, assert `rst` and `ext_en` again. `ext_rdata` shows the
   addressed word combinationally.

`state` and `pc` are observation outputs.

Reset is synchronous and active high. It clears PC, R@, IR, RA, the flags and
all registers, and enters FETCH. Memory contents are kept.

## Where this RTL decides

The published description leaves these points open, or states them only
indirectly:

* **Numeric codes for OP and COND.** Only the field positions are defined,
  so the codes above are a choice. SELDAT's numbering (input 3 = register,
  input 2 = immediate, selected by {OPERATE, OP2}) fixes OP2 = 1 as the
  register form. The ALU function numbering within OP1-0 is free.
* **BG.** BG is the complement of BLE, ¬(N∨Z).
* **ASR.** The instruction is listed as `ASR Rs, Rt` without saying which
  field holds Rs. Here it is the Rs2 field, shifted as operand B, with the
  sign kept.
* **LOAD through the ALU.** LOAD loads the flags, and its OPERATE is 0. So the
  ALU is modelled as passing operand B unchanged when OPERATE = 0. That is
  how the memory word reaches Rt.
* **Register file ports.** SELREG addresses the *read* port and IR13-11 the
  *write* port. The control table requires this: STORE reads IR13-11 with
  CRs = 0, and LOAD writes without caring about CRs.
* **Don't-care outputs** are 0.
* **Other unspecified details.** Reset values, the state encoding, modulo-256
  wrap of address sums, and the memory timing above are also this RTL's
  choices.

Not modelled: the original graphical simulator and assembler, which are
software. The testbench package contains a minimal assembler
(`mr_asm_pkg`).

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
ends with a `TB_RESULT checks=… failures=…` line and has a cycle watchdog.

* `tb_mr_alu`, `tb_mr_branch_eval`: exhaustive or corner-plus-random checks
  against integer reference arithmetic and the condition table.
* `tb_mr_regfile`, `tb_mr_arith_unit`, `tb_mr_mem_ref`, `tb_mr_ram`: random
  stimulus against small models. These include R0, sign extension, the
  address wrap, and PC := R@ + 1.
* `tb_mr_control`: every state's outputs against the table, and every
  transition.
* `tb_mr_datapath`: the testbench plays the control unit. It runs random
  programs one instruction at a time and compares against an
  instruction-level model (`mr_asm_pkg::mr_iss`).
* `tb_mr_cpu`, `tb_mr_top`: whole programs from reset to halt. They compare
  registers, flags, all of memory and the exact cycle count with the model.
  `tb_mr_top` runs a shift-and-add multiply, an indexed array sum, a test of
  every branch condition both taken and not taken, and 25 random programs. It
  counts each mechanism (every state, every ALU op, every branch outcome,
  writes to R0, negative immediates, address wrap) and fails if one never
  occurs. It uses the machine at its full size.

The instruction-level model is written from the instruction set, not from
the RTL. It encodes the same OP and COND choices, so it cannot catch a
disagreement with some other MR assembler.

### Running a test with Verilator

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mr_pkg.sv tb/mr_asm_pkg.sv tb/tb_mr_top.sv --top-module tb_mr_top
./obj_dir/Vtb_mr_top
```

Replace `tb_mr_top` with any other testbench name. All of them finish in
well under a second.

### Writing your own program

The simplest route is the helpers in `tb/mr_asm_pkg.sv`: `ADD(rt, rs1, rs2)`,
`ADDI(rt, rs, imm)`, `LOAD(rt, base, ri)`, `STORE(rs, base, ri)`,
`BRC(cond, target)`, and so on. Fill a `word_t prog[256]` with them and load it
through the access port as `tb_mr_top` does. End the program with
`BRC(C_BR, <its own address>)`.
