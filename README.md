# A microprogrammed 16-bit CPU and a four-format instruction decoder

This is a small, classic teaching machine. A CPU does not need a hard-wired
state machine for every machine instruction. It can instead run a program of
its own: **microcode**. Each microinstruction is a wide word of control bits.
It says which registers go onto the buses, what the ALU and shifter do, which
muxes pick what, which registers load, and where to go next. Machine
instructions are *interpreted*: a microcoded fetch loop reads each
instruction, jumps to the microcode routine for its op-code, and that routine
carries out the operation one register transfer at a time.

Two separate pieces of hardware are included. They stand side by side in
`top`:

1. **`mic_cpu`**, the microprogrammed CPU. It has a three-bus 16-bit
   datapath, a 256-word writable control store, and a microsequencer with
   conditional jumps on the ALU's N and Z flags.
2. **`isa_decoder` + `isa_regfile` + `agu`**, the front end of a
   register/memory instruction set. It has four instruction formats (A–D, 16 to 41 bits long) and memory
   operands addressed as base register + 10-bit displacement.

The two are not connected. Their instruction widths do not match: the CPU has
a 16-bit IR, while three of the four ISA formats are longer.

---

## 1. The datapath

```
             C bus                 A bus          B bus
               |   +-----------+     |              |
               +-->| Register  |---->|              |
               |   |   Set     |------------------->|
               |   +-----------+     |              |
          +--------+            +---------+    +---------+
 MDR ---->| C MUX  |            | A LATCH |    | B LATCH |
  ^  \    +--------+            +---------+    +---------+
  |   \        ^                +---------+         |
  |    `------------------------>  A MUX  |         |
  |            |                +---------+         |
  |            |                      \    ALU     /
  +----(C bus) |                       \----------/
               |                            |
 MAR <- MAR MUX <--- C bus, B latch       SHIFT
               |                            |
               +---------- C bus -----------+
```

* The **register set** (`regset`) has two combinational read ports that
  drive the A and B buses. It has one clocked write port, fed by the C MUX.
  Registers are named by 5-bit codes (section 3).
* The **A latch** loads the A bus only when the microinstruction's ALATCH bit
  is 1. Otherwise it keeps its value, so a value latched in one
  microinstruction can be reused in a later one. The **B latch** loads every
  microcycle.
* The **A MUX** feeds the ALU's left input from the A latch (0) or from the
  MDR (1). The right input is always the B latch.
* The **ALU** (`alu`) has four operations: 00 pass A, 01 A+B, 10 A AND B,
  11 NOT A. It sets **N** (result negative, its top bit) and **Z** (result
  zero). The flags come from the ALU output, before the shifter.
* The **shifter** (`shifter`) has four settings: 00 pass, 01 logical shift
  right by one, 10 shift left by one, 11 rotate left by one. Its output is
  the **C bus**. It exists so that microcode can run multiply and divide
  loops.
* The **C MUX** chooses what is written back into the register set: the
  C bus (0) or the MDR (1).
* The **MAR** loads through the **MAR MUX**, either from the C bus (0) or
  from the B latch (1). The B input lets the fetch step send the PC to
  memory while the ALU increments it.
* The **MDR** loads from the C bus when MDR = 1, or from memory when RD = 1.
  It is the data of a memory write. Setting RD and MDR together is illegal,
  and so is setting RD and WR together. Both rules are checked by assertions
  in `datapath`.

## 2. The microinstruction (38 bits)

| bits  | field  | meaning |
|-------|--------|---------|
| 37    | AMUX   | 0 A latch, 1 MDR |
| 36    | CMUX   | 0 C bus, 1 MDR |
| 35    | MARMUX | 0 C bus, 1 B bus |
| 34:33 | COND   | 00 next, 01 jump if N, 10 jump if Z, 11 jump always |
| 32:31 | ALU    | 00 pass A, 01 ADD, 10 AND, 11 NOT A |
| 30:29 | SHFT   | 00 none, 01 SHR, 10 SHL, 11 rotate left |
| 28    | MAR    | load MAR |
| 27    | MDR    | load MDR from the C bus |
| 26    | ALATCH | 1 A latch loads the A bus, 0 it holds |
| 25    | RD     | memory read into MDR |
| 24    | WR     | memory write of MDR |
| 23    | DISP   | next micro-address = {IR[15:10], 2'b00} |
| 22:18 | A      | register onto the A bus |
| 17:13 | B      | register onto the B bus |
| 12:8  | C      | register written from the C MUX |
| 7:0   | ADDR   | jump target |

The word is the packed struct `mic_pkg::uinstr_t`. The order of the
classical fields (muxes, COND, ALU, SHFT, MAR, MDR, A, B, C, address)
follows the lecture design this machine is based on. **ALATCH, RD, WR and
DISP were added in this design.** The lecture's bit budget lists the A-latch
bit but leaves it out of its worked table. Memory strobes and op-code dispatch are needed for the machine to do
anything, but the lecture gives them no encoding.

There is no register-write enable. The register named by C is written in
every microinstruction. To write nothing, name a code that is not a
register, normally `10000` (constant 0).

Two worked examples:

* **Instruction fetch**: MAR ← PC and PC ← PC + 1 in a single
  microinstruction. A = `10001` (+1), B = `11111` (PC), ALU add, MARMUX = 1,
  MAR = 1, C = `11111`, ALATCH = 1. The word is `38'h89447FF00`.
* **R4 ← R1 AND R2**: A = 1, B = 2, C = 4, ALU = AND, ALATCH = 1. The word
  is `38'h104044400`.

## 3. Register codes

| code          | register |
|---------------|----------|
| 00000–01111   | R0–R15 (general purpose, 16 bits) |
| 10000         | constant 0 (read only) |
| 10001         | constant +1 (read only) |
| 10010–11101   | unused: read 0, writes ignored |
| 11110         | IR |
| 11111         | PC |

A write to a constant or an unused code is ignored. Reset clears every
register, so the PC starts at 0.

## 4. Timing: the microcycle

Each microinstruction takes **three clocks**. `microsequencer` steps through
them as `phase`:

| phase      | what happens at the end of the clock |
|------------|--------------------------------------|
| `PH_FETCH` | MIR ← control_store[MPC] |
| `PH_READ`  | A latch ← A bus (if ALATCH), B latch ← B bus |
| `PH_EXEC`  | register C ← C MUX; MAR, MDR load; memory strobed; MPC ← next address |

Within `PH_EXEC`, the ALU and shifter work on the latched values, so a
microinstruction can read a register and write it back in the same microcycle
(PC ← PC + 1). `mem_rd` and `mem_wr` are high for that one clock only. They
use MAR and MDR as they stood at the start of the microinstruction, so:

* an address loaded into MAR is used by the *next* microinstruction;
* read data reaches the MDR at the end of the RD microinstruction, so
  microcode can use it from the microinstruction after that.

Memory must answer a read in the same clock; there are no wait states.

**Next micro-address.** DISP = 1 gives `{IR[15:10], 2'b00}`. Otherwise the
jump is taken when COND = 11, or COND = 01 and N, or COND = 10 and Z. A taken
jump goes to ADDR; if not taken, MPC + 1. N and Z are those of the ALU in the
same microinstruction. With DISP, each value of the six top IR bits (two
format bits and four op bits, as in a 16-bit format-B word) owns a group of
four microinstructions. A longer routine jumps out of its group.

## 5. Using the CPU

Ports of `mic_cpu` (and of `top`):

* `cs_we`, `cs_waddr`, `cs_wdata`: write one microinstruction per clock into
  the control store. Hold `run` low while doing this. The control store has
  no reset and no built-in program.
* `run`: 1 runs the microcode; 0 freezes the sequencer.
* `mem_addr` (MAR), `mem_wdata` (MDR), `mem_rd`, `mem_wr`, `mem_rdata`: the
  system bus to external memory.
* `upc`, `ucycle_done` (the execute clock), `ujump` (jump taken in that
  clock), `pc`, `ir`: observation.
* `rst_n`: synchronous, active low.

The microprogram is software. `tb/ucode_pkg.sv` holds a demonstration
microprogram of 73 words and helper functions for building
microinstructions. It interprets a small accumulator machine: R0 is the
accumulator, and an instruction is `{2'b01, op[3:0], x[9:0]}`. It provides
load, store, add, AND, jump, jump-if-zero, jump-if-negative, NOT, rotate,
HALT, a **shift-and-add multiply** and a **restoring shift-and-subtract
divide**. Subtraction is A + NOT B + 1, since the ALU has no subtract.

Its first 14 microinstructions build the address mask 0x03FF in R15 from the
constant +1 (ten left shifts, then NOT, +1, NOT). Then comes the fetch loop
at 0x10:

```
0x10  MAR <- PC; PC <- PC + 1      (the fetch word above)
0x11  RD
0x12  IR <- MDR                    (CMUX = 1, C = IR)
0x13  DISP                         -> 0x40 + 4*op
```

## 6. The four-format instruction decoder

Every instruction begins with two format bits, then an op-code, then 5-bit
register fields (R1, R2, base registers B2, B3) and 10-bit displacements
(D2, D3):

| format | layout (MSB first)                      | bits | op-codes used |
|--------|-----------------------------------------|------|---------------|
| A      | `00` Op6 R1 B2 D2                       | 28   | 48 of 64 |
| B      | `01` Op4 R1 R2                          | 16   | 16 of 16 |
| C      | `10` Op7 R1 R2 B3 D3                    | 34   | 96 of 128 |
| D      | `11` Op4 R1 B2 D2 B3 D3                 | 41   | 16 of 16 |

`isa_decoder` takes the instruction left-aligned in a 41-bit window, with
the format bits at 40:39; bits past the instruction's end are ignored. It
returns:

* the fields, with 0 for fields the format lacks;
* the length in bits;
* an operation class;
* the number of the operation within its class;
* an illegal flag for unused op-codes.

Op-codes are assigned in this order:

| format | op-codes | class |
|--------|----------|-------|
| A | 0–7 | Mem ← R1 |
| A | 8–15 | R1 ← Mem |
| A | 16–47 | R1 ← R1 OP Mem |
| A | 48–63 | illegal |
| B | 0–15 | R1 ← R1 OP R2 |
| C | 0–31 | R2 ← R1 OP Mem |
| C | 32–95 | Mem ← R1 OP R2 |
| C | 96–127 | illegal |
| D | 0–15 | Mem2 ← R1 OP Mem1 |

`isa_regfile` holds the ISA's 32 general registers of 16 bits. It has four
read ports, for R1, R2, B2 and B3, so that all register operands of one
instruction are read at once. It has one write port.

`agu` forms base + zero-extended displacement, modulo 2^16. `top` uses two of
them, for the B2/D2 and B3/D3 operands. For the instruction on `isa_insn`,
`top` therefore gives, within the same clock:

* the decoded fields;
* the values of R1 and R2;
* both memory-operand addresses.

No execution unit for this ISA is built.

## 7. Where this design makes its own choices

The following were chosen for this design. They are the first things to
revisit when adapting it:

* **16 general registers in the CPU, 32 in the ISA.** The CPU follows its
  register-code map, which has sixteen. The ISA register file has the 32
  that its 5-bit register fields address.
* **Three-clock microcycle**, with a single-cycle memory (no wait states).
* **RD, WR and DISP bits**, and the dispatch address `{IR[15:10],2'b00}`.
* **B latch** with no control bit; it loads every microcycle.
* **MDR source.** The MDR takes the shifter output (C bus), before the
  C MUX.
* **Shift code 11** rotates left.
* **Register writes.** There is no write-enable bit; writing to a constant
  code is a no-op.
* **Writable control store** with an external load port.
* **ISA decoder.** Instructions are left-aligned in a 41-bit window.
  Op-codes are assigned to classes in table order. Displacements are
  unsigned, and addresses are 16 bits. The ISA register file has four read
  ports and one write port.
* **Reset.** It is synchronous and active low. It clears all CPU state
  except the control store.

## 8. Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_alu`, `tb_shifter`, `tb_agu` | random operands against reference arithmetic |
| `tb_regset` | random reads and writes of all 32 codes against a model |
| `tb_control_store` | all 256 words written and read back |
| `tb_microsequencer` | phase order; MIR contents; next address for every jump code and dispatch, with random N/Z; run = 0 hold; reset |
| `tb_datapath` | 3000 random microinstructions against a register-transfer model; the fetch word; R4 ← R1 AND R2; A-latch hold; memory write |
| `tb_isa_decoder` | 4000 random instructions of all formats, packed independently |
| `tb_isa_regfile` | random writes and four-port reads against a model; reset |
| `tb_mic_cpu` | 8 multiplies and 8 divides in microcode; first IR load after exactly 17 microcycles (51 clocks) |
| `tb_top` | the whole design at default sizes; see below |

`tb_top` runs a 20-word accumulator program to its HALT and checks the
memory results. It also counts every mechanism and fails any that never
occurred:

* all four ALU codes and all four shift codes;
* jump on N and on Z, both taken and not taken, and the unconditional jump;
* dispatch;
* both inputs of each mux;
* an A-latch hold;
* MDR loads, memory reads and writes.

It checks that every microinstruction took 3 clocks. Finally it fills the
ISA register file and decodes one instruction of each format. For each it
checks the fields, the operand values and the addresses.

Running a testbench with plain Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mic_pkg.sv rtl/isa_pkg.sv tb/ucode_pkg.sv tb/tb_top.sv --top-module tb_top
./obj_dir/Vtb_top
```

For another testbench, replace `tb_top` in both places. `tb/ucode_pkg.sv` is
needed only by `tb_top` and `tb_mic_cpu`. `tb/mem_model.sv` is the
behavioural main memory used by those two.
