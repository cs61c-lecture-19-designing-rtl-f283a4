# MIPS-lite single-cycle CPU

A processor in which every instruction finishes in one long clock cycle.
All five stages of an instruction run combinationally inside that cycle:
instruction fetch, decode and register read, ALU, memory, and register write.
On the rising edge the PC, the destination register and the data-memory word
(for a store) are all updated at once. The clock period therefore has to
cover the slowest instruction, a load. The load path runs through
instruction memory, the register file, the ALU and data memory, then back to
the register-file input.

The processor runs a six-instruction subset of MIPS, called MIPS-lite:

| Instruction | Register transfer (PC ← PC + 4 unless stated) |
|---|---|
| `addu rd, rs, rt` | R[rd] ← R[rs] + R[rt] |
| `subu rd, rs, rt` | R[rd] ← R[rs] − R[rt] |
| `ori rt, rs, imm16` | R[rt] ← R[rs] \| ZeroExt(imm16) |
| `lw rt, imm16(rs)` | R[rt] ← M[R[rs] + SignExt(imm16)] |
| `sw rt, imm16(rs)` | M[R[rs] + SignExt(imm16)] ← R[rt] |
| `beq rs, rt, imm16` | if R[rs] = R[rt]: PC ← PC + 4 + SignExt(imm16)·4 |

Instructions are 32 bits wide. They use the MIPS R-format
(op, rs, rt, rd, shamt, funct) and I-format (op, rs, rt, imm16) fields, with
the standard MIPS opcode and funct numbers:

| Instruction | op | funct |
|---|---|---|
| ADDU | 0x00 | 0x21 |
| SUBU | 0x00 | 0x23 |
| ORI | 0x0D | – |
| LW | 0x23 | – |
| SW | 0x2B | – |
| BEQ | 0x04 | – |

## How the datapath is put together

```
            +--------------------- instruction fetch unit ---------------------+
            |  PC reg --> imem[PC] --> instr                                    |
            |    ^  \--> +4 adder --> PC+4 --+--> mux(nPC_sel) --> PC reg       |
            |    |        SignExt(imm)<<2 --> adder --/                         |
            +---------------------------------------------------------------------+
instr[25:21]=Ra --> +----------+ busA ------------------------> +-----+
instr[20:16]=Rb --> | register | busB --+--> mux(ALUSrc) -----> | ALU | --> result --+--> dmem addr
Rw = mux(RegDst:    |  file    |        |        ^              +-----+   zero=Equal |
     rt | rd)  ---> | 32 x 32  |        |   extender(ExtOp)                          |
busW ------------>  +----------+        +--> dmem Data In (MemWr)        dmem Data Out
  ^                                                                                  |
  +----------------- mux(MemtoReg: ALU result | dmem Data Out) <---------------------+
```

There are two kinds of element:

* **Combinational**: the adders, the multiplexers, the extender and the ALU.
* **Storage**: the PC register, the register file and the two memories.

The storage elements behave alike. Reads are combinational: an address goes
in and the data comes out after the access time, with no clock involved.
Writes happen only on the rising clock edge and only when the element's
write enable is set. This is why a single edge can retire an instruction.
Within the cycle, the datapath computes the new PC, the result and the store
data from the old state. The edge then commits all of them together.

## Control

`mips_lite_control` is purely combinational. Its inputs are the opcode, the
funct field and the `Equal` condition from the datapath. It drives these
control points:

| | nPC_sel | RegWr | RegDst | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg |
|---|---|---|---|---|---|---|---|---|
| ADDU | 0 | 1 | rd | – | busB | ADD | 0 | ALU |
| SUBU | 0 | 1 | rd | – | busB | SUB | 0 | ALU |
| ORI | 0 | 1 | rt | zero | imm | OR | 0 | ALU |
| LW | 0 | 1 | rt | sign | imm | ADD | 0 | mem |
| SW | 0 | 0 | – | sign | imm | ADD | 1 | – |
| BEQ | Equal | 0 | – | – | busB | SUB | 0 | – |

`Equal` is the ALU's zero flag. During BEQ the ALU computes R[rs] − R[rt], so
the flag is set exactly when the two registers are equal. No separate
comparator is needed.

An opcode or funct outside the subset writes nothing and advances the PC
by 4.

## Modules

Each module lives in `rtl/<name>.sv`. The shared types live in
`rtl/mips_lite_pkg.sv`: the opcode enum, the ALU operation enum and the
`ctrl_t` struct of control points.

| Module | Role |
|---|---|
| `mips_lite_cpu` | Top level: the controller plus the datapath |
| `mips_lite_datapath` | Fetch unit, register file, extender, ALU, data memory and the three multiplexers |
| `mips_lite_control` | Decoder that produces the control points |
| `instruction_fetch_unit` | PC register, instruction memory, PC+4 adder, branch-target adder and next-PC multiplexer |
| `register_file` | 32 × 32-bit registers with two combinational read ports and one clocked write port; register 0 reads as zero |
| `alu` | Add, subtract and OR, plus a zero flag |
| `adder_subtractor` | Ripple chain of `full_adder` cells; XOR gates invert B and the subtract bit is the carry-in |
| `full_adder` | One-bit full adder |
| `adder` | N-bit adder with carry in and out |
| `mux2` | N-bit 2-to-1 multiplexer |
| `extender` | Zero or sign extension of imm16 |
| `we_register` | N-bit register with write enable and synchronous reset |
| `ideal_memory` | Word memory with combinational read and clocked write; byte addressed, the two low address bits ignored |

## Top-level interface and timing

`mips_lite_cpu` has three parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `IMEM_AW` | 10 | log2 of the instruction-memory size in words (1024 words) |
| `DMEM_AW` | 10 | log2 of the data-memory size in words (1024 words) |
| `RESET_PC` | 0 | PC value after reset |

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | The only clock; everything updates on its rising edge |
| `rst` | in | 1 | Synchronous reset, active high. Sets PC ← RESET_PC and blocks register and memory writes |
| `load_we`, `load_addr`, `load_data` | in | 1, 32, 32 | Write one program word per cycle into instruction memory at byte address `load_addr`. Use only while `rst` is held; an assertion checks this |
| `pc`, `instr` | out | 32, 32 | The instruction being executed in the current cycle |

To use the CPU:

1. Hold `rst` high and load the program.
2. Release `rst`. The instruction at `RESET_PC` executes in the first cycle.
3. After that, exactly one instruction completes per clock.

Data memory starts cleared. The general registers are not reset, so
software must initialise them, for example with `ori rX, $0, value`.

A program can stop itself with `beq $0, $0, -1`, which branches to itself.

## Choices this design makes

The CPU follows the register transfers, the storage-element behaviour and the
datapath structure described above. The following points are choices made
here rather than requirements:

* **Opcode encoding:** the standard MIPS opcode and funct numbers.
* **ALU control:** a 2-bit `ALUctr` encoding.
* **Branch condition:** `Equal` comes from the ALU zero flag, and the
  controller turns it into `nPC_sel`.
* **Memories:** separate instruction and data memories of 1024 words each.
  They use byte addresses; the two low address bits are ignored and higher
  bits wrap around.
* **Register 0:** hard-wired to zero, as MIPS `$zero` is.
* **Reset and program loading:** the reset and the load port were added so
  the CPU can be started and tested.
* **Undefined instructions:** anything outside the subset behaves as a no-op.
* **Adders:** the ALU adds and subtracts with a ripple adder-subtractor built
  from one-bit full adders. The two PC adders are written as plain `+`.

Not included:

* jumps (J-format);
* AND and set-less-than in the ALU;
* multi-cycle or pipelined operation;
* caches.

## Testbenches

Every module in `tb/` is self-checking. Each one compares the design against
values it works out independently and ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_mips_lite_cpu` is the end-to-end test, at the default sizes. It
  generates a program of about 1000 instructions and loads it through the
  load port. It then runs the program against an instruction-level reference
  model written in the testbench. The program has three parts:
  * a register-initialisation prologue;
  * a counted loop closed by a backward BEQ;
  * a random mix of all six instructions. Loads and stores use positive and
    negative offsets, and BEQs are forward, some taken and some not.

  Checks:
  * every cycle, that the PC and the instruction match the model, which also
    proves one instruction per clock;
  * after every edge, all 31 writable registers and any data word that was
    stored;
  * at the end, the whole data memory.

  It also counts how often each mechanism occurred, and fails if any count is
  zero. The mechanisms are: each instruction type, taken and untaken
  branches, backward branches, negative offsets, ORI immediates with bit 15
  set, discarded writes to `$0`, and loads of previously stored data.
* `tb_mips_lite_datapath` runs a hand-assembled 16-instruction program with
  hand-worked expected values. The testbench itself drives the control
  points.
* The remaining testbenches cover the unit blocks one by one, with corner
  cases and random vectors.

`tb/mips_asm_pkg.sv` holds the small instruction assemblers the CPU-level
testbenches use.

Run any testbench with plain Verilator from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_lite_pkg.sv \
    tb/mips_asm_pkg.sv tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu -Mdir obj
./obj/Vtb_mips_lite_cpu
```

Verilator finds the other modules through `-Irtl`, by file name. The CPU
test simulates about 2000 clock cycles, most of them program loading, and
finishes in well under a second.
