# RV32I-Lite: a single-cycle processor for an 11-instruction RISC-V subset

RV32I-Lite is a teaching subset of RISC-V. It keeps 11 instructions and 8 registers, and every
word it uses is a legal RV32I word with the standard encoding, so the GNU assembler and
disassembler work on its programs unchanged. This RTL is a small processor that executes that
subset:

| group | instructions | format |
|---|---|---|
| register-register | `add`, `sub`, `and`, `or`, `xor` | R |
| register-immediate, load, indirect jump | `addi`, `lw`, `jalr` | I |
| store | `sw` | S |
| conditional branch | `beq`, `bne` | B |

There are no shifts, no compares, no `lui`/`auipc`, no `jal`, no byte or halfword accesses,
no traps and no CSRs. Common idioms still exist as pseudo-instructions that the assembler
turns into real ones, using the fact that `x0` reads as zero. Examples are `nop` = `addi x0,x0,0`,
`li` = `addi rd,x0,imm`, `mv`, `neg` = `sub rd,x0,rs`, `beqz`/`bnez`, and `ret` = `jalr x0,x1,0`.
The hardware therefore needs no extra opcodes for them.

The core executes one instruction per clock. It has no pipeline, hazards or stalls.

## The instruction word

Every field that exists in a format sits at the same bit position in all formats. The decoder
can therefore slice the word once, without knowing the format:

```
 31        25 24    20 19    15 14  12 11         7 6      0
| funct7     | rs2    | rs1    |funct3| rd         | opcode |   R
| imm[11:0]           | rs1    |funct3| rd         | opcode |   I
| imm[11:5]  | rs2    | rs1    |funct3| imm[4:0]   | opcode |   S
|i12| imm[10:5]| rs2  | rs1    |funct3|imm[4:1]|i11| opcode |   B
```

Only the opcode decides the format:

| opcode | format | instructions |
|---|---|---|
| `0110011` | R | add (f7 `0000000`, f3 `000`), sub (f7 `0100000`, f3 `000`), xor (`100`), or (`110`), and (`111`) |
| `0010011` | I | addi (f3 `000`) |
| `0000011` | I | lw (f3 `010`) |
| `1100111` | I | jalr (f3 `000`) |
| `0100011` | S | sw (f3 `010`) |
| `1100011` | B | beq (f3 `000`), bne (f3 `001`) |

Register fields are five bits wide, as in RV32I. Only the values 0 to 7 are used, so the
register file is indexed by the low three bits.

## Immediates: where the hard part is

`rv32il_immgen` rebuilds the immediate. This is the only place where the formats really
differ. Two rules make it cheap:

* **The sign is always bit 31.** The upper bits of the 32-bit result are copies of `instr[31]`
  in every format. The sign-extension wiring therefore never depends on the format.
* **Register fields never move.** In S-format the immediate is split around `rs1` and `rs2`.
  `imm[11:5]` is in bits 31:25 and `imm[4:0]` is in bits 11:7.

B-format is the one to watch. Its offset counts bytes but is always even, so bit 0 is not
stored. The remaining bits are shuffled so that as many as possible share positions with the
S-format:

| offset bit | instruction bit |
|---|---|
| imm[12] (sign) | 31 |
| imm[10:5] | 30:25 |
| imm[4:1] | 11:8 |
| **imm[11]** | **7** |
| imm[0] | always 0 |

Bit 7 holding `imm[11]` is the easiest bit to get wrong. The branch reach is -4096 to +4094
bytes. I and S immediates run from -2048 to +2047.

Three worked words make a quick sanity test for any change:

| assembly | word |
|---|---|
| `addi x1, x0, 5` | `0x00500093` |
| `sw x6, 12(x2)` | `0x00612623` |
| `beq x5, x0, +8` | `0x00028463` |

## Decoding and illegal words

`rv32il_decoder` turns the word into one packed struct, `rv32il_pkg::ctrl_t`. The struct holds
the instruction, the format, three 3-bit register indices, and the datapath controls:

* register write
* ALU operand select and operation
* write-back source
* load and store
* branch (with an eq/ne flag)
* jalr

A word is **illegal** when any of these holds:

* its opcode/funct3/funct7 combination is not one of the 11 instructions. The all-zeros word
  is the deliberate example: memory filled with zeros halts the machine. Every other RV32I
  instruction outside the subset is illegal too, including `fence`, `ecall` and the CSR
  instructions.
* a register field that the format actually uses names `x8`..`x31`. Fields that hold
  immediate bits are not checked (`rd` in S and B, `rs2` in I).

The second rule is a choice made for this design. The subset never produces such register
numbers, and trapping on them was judged safer than silently using the low three bits.

## One instruction, one clock

```
            +--------+   ctrl    +---------+
imem_rdata->|decoder |---------->| immgen  |--imm--+
            +--------+           +---------+       |
                 | rs1,rs2,rd                      v
            +---------+ rs1_val  +-----+  sum   +---------+
            | regfile |--------->| ALU |------->| next_pc |--> pc register
            |  8x32   | rs2_val  +-----+        +---------+
            +---------+----+         |result        |pc+4
                 ^         |         v              v
                 |         +--> dmem_wdata      write-back mux <- dmem_rdata
                 +---------------------------------+
```

* **ALU** (`rv32il_alu`): a single adder does `add`, `addi`, `sub` and all address arithmetic.
  `sub` and `add` differ only in funct7 bit 5. That bit inverts operand b and sets the carry-in,
  which computes `a + ~b + 1`. `and`, `or` and `xor` are bitwise. The adder output is also a
  separate `sum` port, and that port drives the memory address and the `jalr` target.
* **Next pc** (`rv32il_next_pc`) picks one of three addresses:
  * `pc+4` by default
  * `pc + imm` when `beq` finds the operands equal, or `bne` finds them different
  * `(rs1 + imm) & ~1` for `jalr`. Bit 0 is cleared even if the sum is odd.

  The link value `pc+4` is written to `rd` by `jalr`. There is no `jal`, so every call goes
  through a register.
* **Register file** (`rv32il_regfile`): two combinational read ports and one write port
  clocked on the rising edge. `x0` reads zero and ignores writes. Reset clears `x1`..`x7`.

All state changes at the rising edge that ends the cycle. At that edge `pc`, `rd` and the data
memory update together.

## Memory ports and timing

`rv32il_core` has no memories inside. It has two word ports:

| port | direction | meaning |
|---|---|---|
| `imem_addr` | out | byte address of the instruction (= pc) |
| `imem_rdata` | in | instruction word, valid in the same cycle |
| `dmem_addr` | out | byte address `rs1 + imm` of `lw`/`sw` |
| `dmem_re` | out | a `lw` is executing |
| `dmem_we` | out | a `sw` is executing; write at the coming rising edge |
| `dmem_wdata` | out | store data (`rs2`) |
| `dmem_rdata` | in | load data, valid in the same cycle |
| `halted` | out | an illegal word was reached; the core has stopped |
| `retire` | out | the current instruction completes at the coming edge |
| `redirect` | out | that instruction is a taken branch or a `jalr` |

Both reads must be combinational. An FPGA block RAM with a registered read would need a
two-cycle or pipelined version of the core. Every access is a 32-bit little-endian word. The
memory should ignore address bits [1:0]. The core does not check alignment, because a
misaligned `lw`/`sw` is simply undefined in this subset.

Reset is synchronous and active-high. It sets `pc` to the parameter `RESET_PC` (default 0).

## Halting

When the word at `pc` is illegal, the core does not execute it:

* no register or memory write happens
* `halted` rises at the next edge
* `pc` stays on the offending word until reset

There is no trap vector: the subset has no privilege modes or CSRs to hold one. Two SystemVerilog
assertions in the core check that a load and a store never coincide, and that nothing is stored
once the core has halted.

## How far it follows the ISA, and what is this design's own choice

Follows the subset's definition exactly:

* the opcodes and funct values
* the field positions and immediate layouts
* the hardwired `x0`
* the add/sub carry-in scheme
* the branch and `jalr` semantics, including clearing bit 0 of the `jalr` target
* the word size and register count. Memory is little-endian, but with word-only accesses
  the byte order is not visible to the core.

This design's own choices:

* the single-cycle organisation
* combinational-read memory ports
* halting on an illegal word, rather than any other reaction
* treating out-of-range register numbers as illegal
* the reset value and reset style
* read-old-value on a same-cycle register read and write
* equality compare for branches (a comparator, not the ALU)
* the control struct and its enums

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rv32il_decoder` | the worked words; 20,000 random words, biased towards the six opcodes, against a flat reference table; the all-zeros word; out-of-range registers |
| `tb_rv32il_immgen` | random I/S/B immediates placed by an independent encoder; range ends; `imm[11]` alone (bit 7) |
| `tb_rv32il_alu` | corner and random operands against plain `+ - & \| ^` |
| `tb_rv32il_regfile` | random traffic against a shadow array; reset; `x0` after a write; write visible next cycle |
| `tb_rv32il_next_pc` | fall-through, both branch outcomes, `jalr` with odd sums |
| `tb_rv32il_core` | see below |

`tb_rv32il_core` runs the core at its default parameters. It holds the two memories and its own
instruction-set model, which executes in lockstep with the core. Every cycle it compares the
fetch address, store strobe, store address and data, `retire` and `halted`. It runs two kinds
of program:

* A directed program that uses all 11 instructions and the pseudo forms. It includes:
  * a counted loop closed by a backward `bne`
  * `beq x0,x0` as a jump
  * a call through `jalr` to an odd address, returned from with `ret`
  * writes to `x0`
  * stores of every register

  The stored values are also checked against hand-computed numbers. The program must take
  exactly 37 cycles for its 37 instructions, and must halt on the zero word.
* 20 random programs of arithmetic, loads, stores and forward branches. Each ends on either
  the zero word or an out-of-range register number.

The testbench counts every mechanism and fails if any never happened. The mechanisms are:
taken and not-taken branches, `jalr`, an odd `jalr` target, loads, stores, `sub`, writes to
`x0`, and both kinds of halt.

`tb_rv32il_programs` runs the idioms that programs for this subset need, and checks both the
results and the clock counts:

* `la`: address of a `.data` symbol through a gp-relative pointer table at gp+0x40, read with
  `addi` then `lw`. It checks the first slots and slot 495, the last one a 12-bit offset
  reaches.
* shift by k as k self-adds: 4 + 3k clocks.
* signed less-than as `sub`, then `and` with a sign mask loaded through `la`, then a branch.
* a 32-step shift-and-add multiply built from `and`, `add` and branches: 198 + popcount(b)
  clocks.

`tb/rv32il_enc_pkg.sv` holds the instruction encoders the testbenches use. They place fields by
the layout above and do not share code with the decoder.

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/rv32il_pkg.sv tb/rv32il_enc_pkg.sv tb/tb_rv32il_core.sv \
    --top-module tb_rv32il_core -o sim
./obj_dir/sim
```

Replace the testbench file and top module to run any other testbench. Every testbench finishes
in seconds.

## Changing it

* **Adding an instruction:** add the opcode/funct constants and the `instr_e` value in
  `rv32il_pkg`. Then add a decoder case and, if it needs one, an ALU operation. The reference
  table in `tb_rv32il_decoder` and the model in `tb_rv32il_core` must learn it too, or they
  will report it as illegal.
* **Registered memories:** split the cycle at the memory boundary and add a stall or bypass for
  `lw`. Nothing in the decoder or immediate generator depends on the single-cycle timing.
* **More registers:** `NREGS` in the package sets the register count and the index width. The
  decoder's out-of-range check follows it.
