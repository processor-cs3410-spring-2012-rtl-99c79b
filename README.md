# A single-cycle MIPS computer

This is a 32-bit MIPS processor that runs each instruction in one clock
cycle. On every clock edge the PC moves to the next instruction. In between,
the instruction is fetched, decoded and executed, memory is read or written,
and the result goes back to the register file. There is no pipeline, no
forwarding and no stalls. The design shows the whole datapath in its
simplest form: every instruction takes exactly one cycle, so N instructions
take N cycles.

The processor has its own program memory and its own data memory, a
Harvard organisation. That lets an instruction fetch and a load or store
happen in the same cycle.

## Block map

```
             +------------------------------ pc_unit -------------------------------+
             |  PC --+--> +4 --> PC+4 --+--> +4 --> PC+8 (link value for JAL)       |
             |       |                  +--> + (offset<<2) --> branch target        |
             |       |                  +--> PC+4[31:28] || target || 00 --> jump   |
             |       +<-- mux(PC+4, branch, jump, R[rs]) <-- pc_sel                 |
             +---------------------------------------------------------------------+
                     | pc
                 prog_mem ---> inst ---> control ---> ra, rb, ctrl, pc_sel
                                           ^  ^
                               eq (=?) ----+  +---- cmp (R[rs] vs 0)
                                     branch_cmp
 regfile: A = R[rs] ----------------------------------------> ALU a, branch_cmp, JR target
          B = R[rt] --+--> mux(B, imm_ext(imm)) ------------> ALU b
                      +--> data memory write data
          inst[10:6] or 16 (mux) ---------------------------> ALU shamt
 ALU result --> data_mem addr --> word --> load_ext --> mux(ALU, load, PC+8) --> regfile W
```

| Module | What it is |
|---|---|
| `mips_system` | Top: CPU, program memory, data memory |
| `mips_cpu` | The datapath; instantiates the blocks below |
| `pc_unit` | PC register, the two "+4" adders, branch adder, jump concatenation, next-PC mux |
| `control` | Instruction decoder and next-PC selection |
| `regfile` | 32 x 32-bit registers, r0 always zero, write on the falling edge |
| `alu` | add, sub, and, or, xor, nor, slt, and shifts by a separate shift amount |
| `imm_ext` | 16-to-32-bit sign or zero extension |
| `branch_cmp` | `eq` (R[rs] == R[rt]) and a zero test of R[rs] (<0, >=0, <=0, >0) |
| `load_ext` | picks a byte or halfword out of the loaded word and extends it |
| `prog_mem` | word-read instruction memory with a loading port |
| `data_mem` | byte-addressed data memory with enable and a 2-bit control code |
| `mips_pkg` | opcodes, function codes, enums and the `ctrl_t` control word |

## Clocking: why the register file writes on the falling edge

There is one clock. The parts of the machine act at different points of it:

* **Rising edge.** The PC takes the next address. The data memory performs a
  store.
* **During the first half of the cycle.** The program memory, the register
  read ports, the ALU, the branch comparators and the data-memory read all
  settle. They are all combinational.
* **Falling edge.** The register file writes the result, if the
  instruction writes a register.

Writing the register file in the middle of the cycle is a deliberate
choice. It lets the register file be a plain edge-triggered array whose
write lands before the next instruction reads it. The cost is that only half
a cycle is left for fetch, decode, execute, memory and writeback to settle.

Once the register is written, its new value can flow back through the read
ports for the rest of the cycle. This does no harm, because of how the
instruction set is built. An instruction that writes a register never uses
a register to pick the next PC, and never stores to memory. JAL writes r31,
but its target comes from the instruction. Branches, JR and stores read
registers, but write none. So everything sampled at the rising edge comes
from values that were stable before the falling edge.

Reset is synchronous and active high:

* the PC returns to `RESET_PC` (0);
* all registers clear on the falling edge while `rst` is high;
* the data memory is not written while `rst` is high.

## Instruction set

All encodings are the standard MIPS32 ones. Branch and jump offsets count
in words.

| Class | Instructions | Notes |
|---|---|---|
| R-type arithmetic | ADDU, SUBU, ADD, SUB, AND, OR, XOR, NOR, SLT | ADD/SUB do not trap on overflow |
| Shifts | SLL, SRL, SRA | shift R[rt] by `shamt` (bits 10:6); SRL fills with zeros, SRA with the sign |
| Immediates | ADDIU, ADDI, SLTI, ANDI, ORI, XORI, LUI | ANDI/ORI/XORI zero-extend; the rest sign-extend. LUI is done in the ALU as a left shift by 16 of the zero-extended immediate |
| Loads | LW, LH, LHU, LB, LBU | address = R[rs] + sign-extended offset |
| Stores | SW, SH, SB | same address calculation |
| Branches | BEQ, BNE, BLTZ, BGEZ, BLEZ, BGTZ | target = PC + 4 + (offset << 2) |
| Jumps | J, JAL, JR | J/JAL target = PC+4[31:28] \|\| target \|\| 00; JAL writes PC + 8 into r31 |

Any other encoding raises the `illegal` output and does nothing, working
as a no-op.

### Departures from a standard MIPS

* **No delay slots.** A taken branch or jump goes straight to its target.
  JAL still writes PC + 8 into r31, the value a delayed-branch MIPS uses.
  So `jr r31` returns to the second word after the JAL, and the word right
  after a JAL is never executed on return. Code for this machine puts a
  NOP, or data, there.
* **No exceptions.** There is no overflow trap, no alignment trap and no
  coprocessor 0. For a halfword or word access, the low address bits are
  ignored.
* **Shifts** take their operand from rt, as in MIPS, and the rs field is
  ignored. The variable shifts (SLLV, SRLV, SRAV), multiply, divide and
  HI/LO are not implemented.
* **Memories repeat.** Each memory holds 2^16 bytes by default. Its address
  is taken modulo that size. For example, a jump to 0xdecafe00 fetches from
  offset 0xfe00.

### What comes from the reference datapath and what was added

The block structure follows the single-cycle datapath taught in Cornell's
CS3410 "Processor" lecture (Spring 2012). That covers:

* the two "+4" adders giving PC + 4 and PC + 8;
* the branch adder and the `||` jump concatenation;
* the four-input PC mux;
* `=?` and `cmp` feeding control;
* the `ext` unit;
* the shift-amount/16 mux used for LUI;
* the register-file write mux;
* the falling-edge register write;
* the memory enable and 2-bit control code.

The following are this design's own choices:

* the memory sizes and the program-loading port;
* reset behaviour and the `illegal` flag;
* the `load_ext` unit after the memory;
* leaving out delay slots and traps;
* the encodings the lecture does not print: J, ADDI/ADDIU, SLTI, ANDI, ORI,
  XORI, ADD, SUB and AND, all taken from MIPS32.

The lecture lists MIPS both as little and as big endian; this design is
little endian. Its SRA row names rs as the source, while its encoding and the
other shift rows use rt; rt is used.

## Memory interface and encodings

The data memory has an enable `E` and a 2-bit control code `mc`:

| mc | Operation | Bytes touched |
|---|---|---|
| 00 | read word (address bits 1:0 ignored) | none written |
| 01 | write byte | `din[7:0]` to the addressed byte |
| 10 | write halfword | `din[15:0]` to bytes 0-1 or 2-3 of the word |
| 11 | write word | all four bytes |

The memory is little endian: byte address 4k+0 holds bits 7:0 of word k.
The memory only reads whole words. `load_ext` then picks the byte
`word[8*a +: 8]` or the halfword `word[16*a[1] +: 16]`, where `a` is the
low two address bits, and sign- or zero-extends it. `dout` is zero when the
memory is not reading.

The program memory always reads words. It ignores bits 1:0 of the PC. It
has a second, write-only port (`load_we`, `load_addr`, `load_data`). A test
harness uses it to load a program while `rst` is held.

### Control word

`control` decodes each instruction into a `ctrl_t` struct (see `mips_pkg`):

| Field | Meaning |
|---|---|
| `reg_we`, `rw` | register write enable and index: rd for R-type, rt for I-type, 31 for JAL |
| `alu_op` | ALU operation |
| `alu_b_imm` | ALU operand B is the extended immediate instead of R[rt] |
| `imm_zero` | zero-extend the immediate instead of sign-extending it |
| `shamt_16` | shift by 16 (used by LUI) |
| `mem_en`, `mc` | data-memory enable and code |
| `load_kind` | which part of the loaded word to use, and how to extend it |
| `wb_sel` | write back the ALU result, the loaded value or PC + 8 |
| `br_kind`, `cmp_op` | which comparator outcome decides a branch |
| `jump`, `jr` | jump kind |
| `illegal` | unimplemented encoding |

The next-PC select (`pc_sel`) is worked out from these fields and from the
`eq` and `cmp` outcomes. It picks PC + 4, the branch target, the jump
target or R[rs].

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `mips_system` | `IMEM_ADDR_W` | 16 | program memory is 2^IMEM_ADDR_W bytes |
| `mips_system` | `DMEM_ADDR_W` | 16 | data memory is 2^DMEM_ADDR_W bytes |
| `mips_system`, `mips_cpu`, `pc_unit` | `RESET_PC` | 0 | address of the first instruction |
| `regfile` | `WIDTH`, `NREGS` | 32, 32 | register width and count |
| `alu` | `WIDTH` | 32 | data width |

The architecture allows up to 32 address bits. Memories of 64 KiB keep
simulation and synthesis quick. Raise `IMEM_ADDR_W` or `DMEM_ADDR_W` for
more space.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against values worked out independently. At the end it prints
`TB_RESULT checks=N failures=M`, and it stops itself with a watchdog if the
simulation hangs.

| Testbench | What it covers |
|---|---|
| `tb_regfile` | random writes and reads against a model, r0 stays zero, write happens at the falling edge and not before |
| `tb_alu` | every operation, edge operands and random operands |
| `tb_imm_ext` | all 2^16 immediates, both modes |
| `tb_branch_cmp` | all four zero tests and equality, edge and random values |
| `tb_load_ext` | every load kind at every byte offset |
| `tb_data_mem` | byte, halfword and word writes against a byte-array model, lane isolation, enable |
| `tb_pc_unit` | next-PC for every select, reset, PC + 8 |
| `tb_prog_mem` | loading port and fetch |
| `tb_control` | every implemented opcode and function, with eq/cmp combinations, plus unknown encodings |
| `tb_mips_cpu` | the core with behavioural memories, checked instruction by instruction against a reference model |
| `tb_mips_system` | the whole computer at default parameters (see below) |

`tb/mips_asm_pkg.sv` holds an assembler made of encoder functions, an
instruction-level reference model (`mips_ref`) and a program generator
(`prog_builder`).

`tb_mips_system` loads the program through the loading port. It then runs
the core in lockstep with the reference model, comparing each register
write, store and next PC. When the program finishes, it checks the final
memory contents. The program has two parts:

1. A series of small hand-written examples with results worked out by hand:
   * a loop `for (i = 0; i < 10; i++)`;
   * `A[12] = h + A[8]`;
   * a little-endian layout test with SB/LB;
   * building 0xdeadbeef with LUI/ORI, and multiplying by 8 with a shift;
   * `if (i == j) ... else ...` taken both ways;
   * a subroutine call with JAL/JR;
   * a jump through a register to 0xdecafe00 or 0xabcd1234, which runs
     through the wrap-around of the 64 KiB program memory.
2. About 3000 instructions of random code, including random branches and
   jumps.

It counts how often each instruction, mechanism and event occurs: every
instruction, taken and not-taken branches, backward branches, writes to r0
and PC wrap-around. Any that never happened is reported as a failure. It also
checks that the run takes one cycle per instruction.

### Simulating

With Verilator 5, from the top of the tree. `-y` lets Verilator find each
module in the file of the same name. The two packages are named first.

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_mips_system.sv \
    --top-module tb_mips_system
./obj_dir/Vtb_mips_system
```

A unit testbench builds the same way, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/mips_pkg.sv tb/tb_alu.sv --top-module tb_alu
```

`-Wno-fatal` keeps lint warnings from stopping the build. The remaining
warnings are about unused bits, for example address bits above the memory
size. All registers and memories are reset or loaded before they are read,
so the testbenches pass with any initial value
(`+verilator+rand+reset+2`).

## How far it can be trusted

* Every module passes its own testbench. The full system runs random
  programs in lockstep with an independent instruction-level model.
* Each testbench has been shown to catch a deliberately broken copy of its
  module. Examples: a register write on the wrong clock edge, a logical SRA,
  swapped halfword lanes, a branch target computed from PC instead of
  PC + 4, and JAL linking PC + 4.
* The reference model and the RTL were written to the same reading of the
  instruction set. A shared misreading would not be caught. The points where
  a choice was made are listed under "Departures" above.
* The falling-edge register write halves the time available for each
  instruction. A real implementation would have to close timing on the
  half-cycle path from PC to register write.
