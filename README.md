# A single-cycle MIPS processor

This is a small 32-bit MIPS computer that runs every instruction in exactly one
clock cycle. Each cycle, one instruction is fetched from its own program memory,
decoded, given its operands from the register file, pushed through the ALU,
optionally used to access a separate data memory, and written back. The PC then
moves on. Program and data live in different memories (a modified Harvard
arrangement), so fetch and load/store never compete.

The design is the classic teaching datapath, built up one instruction class at
a time: arithmetic, shifts, immediates, loads and stores, jumps, branches, and
jump-and-link. The instruction set is the subset below, with the standard MIPS
encodings:

| class | instructions |
|---|---|
| register arithmetic/logic | `ADDU SUBU OR XOR NOR` |
| shifts by a constant | `SLL SRL SRA` |
| immediates | `ADDIU ANDI ORI LUI` |
| loads | `LB LBU LH LHU LW` |
| stores | `SB SH SW` |
| branches | `BEQ BNE BLTZ BGEZ BLEZ BGTZ` |
| jumps | `J JAL JR` |

Any other encoding runs as a no-op: nothing is written and the PC goes to PC+4.
The `illegal` output flags it. There are no exceptions, no multiply/divide, no
`AND`/`SLT`/`ADDI` register forms, and no coprocessor.

## Block structure

```
mips_system
├── mips_cpu                  the core
│   ├── pc_unit               PC register, +4, branch adder, jump concatenation, PC mux, PC+8
│   ├── control               instruction decoder
│   ├── regfile               32 x 32, r0 = 0, 2 read ports, falling-edge write
│   ├── extend                16 -> 32-bit sign/zero extension
│   ├── alu                   add, sub, and, or, xor, nor, sll, srl, sra
│   ├── eq_compare            "=?" for BEQ/BNE
│   ├── zero_compare          "cmp" against zero for BLTZ/BGEZ/BLEZ/BGTZ
│   └── load_align            byte/halfword selection and extension for loads
├── mips_memory  (u_imem)     program memory, always reading words
└── mips_memory  (u_dmem)     data memory
```

`mips_pkg` holds the opcode and function numbers, the ALU, compare, load and
PC-select enums, the 2-bit memory control code, and the `ctrl_t` bundle that the
decoder drives.

## Clocking: one instruction per cycle, two clock edges

This is the part most worth understanding before changing anything.

* **Rising edge.** The PC loads its next value, and data memory performs a store.
* **Falling edge.** The register file performs its write, if `we` is set.

Everything else is combinational. Both memories read combinationally, so the
instruction and any load data are ready within the same cycle.

Because the result is stored halfway through the cycle, an instruction that
writes one of its own source registers (`addiu r5, r5, 5`, `lw r1, 0(r1)`) sees
its operands change during the second half of the cycle. This is harmless
because of one rule: an instruction that writes a register never also changes
the PC target or stores to memory. Branches, `JR` and stores write no register.
`JAL` writes r31, but its target does not depend on any register. So nothing
that is sampled at the rising edge can see the early write. If you add an
instruction that breaks this rule (a load with base-register update, say),
move the register write to the rising edge.

A full-speed clock period must allow the whole path within half a period. That
path runs PC → program memory → decode → register read → ALU → data memory →
load narrowing → register-file setup. The cost of the falling-edge write is that
the register write must also be ready by then.

Reset (`rst`, synchronous, active high) sets the PC to `RESET_PC` (0). While
reset is high, register and data-memory writes are blocked. Registers and
memories have no reset, so a program must write a location before reading it.

## Next PC: branches, jumps and the link value

`pc_unit` chooses among four sources each cycle:

| `pc_sel` | next PC | used by |
|---|---|---|
| `PC_SEQ` | PC+4 | everything else, and branches not taken |
| `PC_BRANCH` | PC+4 + (sign-extended offset << 2) | taken branches |
| `PC_JUMP` | {(PC+4)[31:28], target26, 2'b00} | `J`, `JAL` |
| `PC_JREG` | rs | `JR` |

Both relative and absolute targets are built from the already-incremented PC.
One consequence: a `J` placed in the last word of a 256 MiB region jumps into the
*next* region. For example, an instruction at 0x2FFFFFFC reaches
0x3xxxxxxx.

The branch decision never uses the ALU. `eq_compare` compares the two register
operands, and `zero_compare` tests rs against zero in the mode the decoder
picks. The decoder turns their results into `pc_sel` in a separate
combinational process. Everything else it produces depends on the instruction
alone, so the comparator outputs do not form a loop through the decoder.

**No delay slot.** The chosen target is fetched in the very next cycle.
`JAL` nevertheless writes **PC+8** to r31, which is what the architecture
specifies (the second +4 adder feeds the write-back mux). A `JR r31` therefore
returns to the instruction *two* words after the `JAL`, and the word right after
the `JAL` is never executed. To get conventional MIPS behaviour, either put a
`nop` (or any unused word) after each `JAL`, or change `WB_LINK` in `mips_cpu`
to use PC+4.

## Memory: control codes, byte lanes and aliasing

Both memories are `mips_memory`. Each has a 32-bit byte address, 32-bit data,
an enable `en` and a 2-bit control `mc`:

| `mc` | operation |
|---|---|
| `00` | read the aligned word (`addr[1:0]` ignored) |
| `01` | write `din[7:0]` to the byte at `addr` |
| `10` | write `din[15:0]` to the halfword at `addr[1]` |
| `11` | write the word (`addr[1:0]` ignored) |

* **Byte order is little endian.** Byte address 4k+i is bits 8i+7:8i of word k.
  So 0x12345678 stored at address 1000 puts 0x78 at 1000 and 0x12 at 1003.
* **Stores** use the memory's byte and halfword write codes directly. The core
  drives the store data from register rt and the address from the ALU.
* **Loads** always read the full word. `load_align` then picks the byte (by
  `addr[1:0]`) or the halfword (by `addr[1]`) and sign- or zero-extends it.
* **Misaligned** halfword or word accesses are not trapped. The low address bits
  are simply ignored. In simulation, an assertion in `mips_memory` reports a
  misaligned halfword or word write.
* **Reads and writes.** Reads are combinational. `dout` is 0 while `en` is low.
  Writes happen on the rising edge.
* **Size.** Each memory holds 2^`ADDR_WIDTH` bytes, 64 KiB by default (set by
  `IMEM_AW` / `DMEM_AW` on `mips_system`). Address bits above that are ignored,
  so the memory repeats through the 4 GiB space. The architecture allows up to
  32 address bits. 64 KiB keeps two instances cheap to simulate. Raise the
  parameters if you need more; nothing else depends on them.

## Loading and running programs

`mips_system` adds a load port, which is not part of the processor proper. While
`rst` is high, each clock with `load_we` high writes `load_data` to byte address
`load_addr`. The word goes to program memory if `load_dmem` is 0, or to data
memory if it is 1. Drop `rst` to start execution at `RESET_PC`. The outputs `pc`
and `inst` show the instruction being executed, and `illegal` flags an
undecoded one.

`tb/mips_asm_pkg.sv` contains small encoder functions that testbenches use to
write programs in assembly-like form. Examples are `addiu(5, 5, 16'd5)`,
`lw(3, 32, 2)`, `beq(3, 0, 16'd1)` and `jal(32'h1000)`.

## Decoder conventions

* R-type instructions read rs (bits 25:21) and rt (bits 20:16) and write rd
  (bits 15:11).
* I-type instructions write bits 20:16. Stores and `BEQ`/`BNE` read that field
  instead.
* The three shifts shift the rt register by the 5-bit `shamt` field. `SRL`
  fills with zeros and `SRA` copies the sign.
* `LUI` reuses the shifter: the zero-extended immediate goes to ALU input B with
  a shift amount of 16. The ALU always shifts its B operand for this reason.
* `ADDIU`, load and store offsets are sign-extended. `ANDI` and `ORI` are
  zero-extended. Adds and subtracts wrap; there is no overflow trap.
* `BLTZ` and `BGEZ` share opcode 1 and are told apart by bits 20:16 (0 or 1).

## Where this departs from, or adds to, the reference description

* The following are not specified there and are choices made here: the load
  port, the reset and its value, the memory size (only an upper bound of 32
  address bits is given), combinational memory reads, the rising-edge memory
  write, the treatment of unknown encodings, and misaligned accesses.
* The byte-order slide lists MIPS under both little and big endian; little
  endian is used.
* The shift table is internally inconsistent (one row names rs as the source,
  and its shift operators disagree with its notes); the notes are followed
  (see above).
* The datapath drawings show no unit that narrows load data. `load_align` was
  added so that the byte and halfword loads behave as their table entries say.
* `ADDI` and `SLT` appear in an introductory example program but not in the
  instruction tables, so they are not implemented. That example (a counted
  loop calling `printf`) therefore cannot run as written. The same loop written
  with `BNE` does run (see the system test).

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed time if
something hangs.

| testbench | what it checks |
|---|---|
| `tb_alu` | every operation, directed corners plus 2000 random vectors against a reference model |
| `tb_regfile` | write only after the falling edge, WE gating, r0, both ports against a shadow copy |
| `tb_extend`, `tb_eq_compare`, `tb_zero_compare`, `tb_load_align` | directed corners plus random values against reference arithmetic |
| `tb_mips_memory` | byte/half/word writes against a byte-array model, the endianness example, `en`, aliasing |
| `tb_pc_unit` | reset, +4, forward/backward branches, region-crossing jumps, register jumps, PC+8 |
| `tb_control` | every implemented instruction's control fields, both outcomes of every branch, unknown encodings |
| `tb_mips_cpu` | the core against behavioural memories: memory-interface signals, loads/stores, a call, cycle count |
| `tb_mips_system` | the whole computer at default sizes, below |

`tb_mips_system` runs these programs and checks registers and memory against
hand-computed values:

* the arithmetic examples `r4 = (r1+r2)|r3`, `r8 = 4*r3 + r4 - 1`, `r5 = r3*8`,
  `r9 = -1`, `r9 = 65535` and `r5 = 0xdeadbeef`;
* the byte-layout and endianness examples;
* `A[12] = h + A[8]`;
* register jumps to 0xabcd1234 or 0x0decafe0, chosen by r3, both ways (these
  land on the memory's aliases);
* `if (i == j) i = i*4; else j = i - j;`, both ways;
* every compare-with-zero branch, both taken and not taken;
* a counted loop;
* a `JAL`/`JR` call.

For each program it also checks that the number of clock cycles equals the
number of instructions executed. A monitor counts every instruction kind, taken
and not-taken branches, link writes and discarded writes to r0, and fails if
any of them never happened.

To run one with Verilator, for example the system test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv rtl/*.sv tb/tb_mips_system.sv \
  --top-module tb_mips_system -o sim
./obj_dir/sim
```

The same command works for the other testbenches; change the top module and the
testbench file. Registers and memories start with random contents under
`+verilator+rand+reset+2`, and the tests are written to pass that way.
