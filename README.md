# ZA-SUA: an 8-bit processor with two accumulators

ZA-SUA is a small 8-bit Harvard processor for FPGAs. It sits between a classic
single-accumulator machine and a register machine: it has two accumulators, A
and B, and every instruction names one of them as the ALU source and one as
the destination. Either accumulator can also serve as a pointer, so a program
can walk a table in A while it computes in B. The instruction set has 28
instructions. There are three addressing modes (direct, immediate, indirect
through A or B), an 8-bit I/O port with its own 8-bit port address, an
8-level return stack and one external interrupt.

Sizes:

| part | size |
|---|---|
| data word | 8 bits |
| instruction word | 17 bits |
| program memory (ROM) | 256 to 8192 words, parameter `ROM_DEPTH` (default 8192) |
| data memory (RAM) | 256 x 8, parameter `RAM_DEPTH` |
| program counter | 13 bits |
| return stack | 8 x 13 |
| I/O | 8-bit input port, 8-bit output port, 8-bit port address (256 ports each way) |

The RTL is plain synthesizable SystemVerilog with no vendor primitives. The
two memories are written as arrays with registered reads, so FPGA tools map
them to block RAM.

## Datapath

```
          ROM ──17──> IR ──┬── opcode(5) ──> CONTROL
           ^               ├── ALU op(4) ──> ALU
           │ 13            ├── mode(2) ───> DEC ──> MUX1/MUX4/MUX5 selects
           PC <──13── IR[12:0] / stack top / PC+acc / vector
           │               └── general(8) ─> MUX1, MUX5
           └──13──> STACK (push PC)

 RAM[addr] ─┐                     ┌──────────── port_in
 general ───┴─ MUX1 ─ y ─┐        │
                         ALU ── MUX2 ──> A or B (Destination bit)
 A,B ─── MUX3 ── x ──────┘
          │ (Source bit)
          ├──> RAM write data
          └──> port_out
 A,B ─── MUX4 ── index ─┐
 general ───────────────┴─ MUX5 ── addr ──> RAM address, port_addr
```

- **MUX1** gives the ALU its second operand: the 8-bit `general` field of the
  instruction (immediate) or the RAM word (direct and indirect).
- **MUX3** picks the accumulator named by the Source bit. It is the ALU's first
  operand, the data that STORE writes to RAM and the data OUTPUT puts on the
  port.
- **MUX2** picks what the destination accumulator receives: the ALU result,
  or `port_in` for INPUT.
- **MUX4** and **MUX5** form the one 8-bit address the machine uses for both
  the RAM and the I/O port. MUX5 takes `general` (direct) or MUX4's choice of
  A or B (indirect).
- **DEC** decodes the two addressing bits into the MUX1, MUX4 and MUX5
  selects. CONTROL drives the other multiplexers from the instruction.

The RAM and the I/O space share one addressing path, so every addressing mode
that reaches RAM also reaches a port.

## Instruction word

All instructions except four use the general format. The four absolute jumps
use the jump format.

```
 general:  [16:12] opcode | [11:4] general | [3:2] mode | [1] source | [0] destination
 jump:     [16:13] opcode | [12:0] absolute address
```

Source and destination bits: 0 is A, 1 is B.

Addressing mode (`mode`):

| code | mode | operand / address |
|---|---|---|
| 00 | direct | RAM[general], port[general] |
| 01 | immediate | general |
| 10 | indirect via A | RAM[A], port[A] |
| 11 | indirect via B | RAM[B], port[B] |

### ALU instructions (opcode 0xxxx)

`x` is the Source accumulator and `y` is the MUX1 operand. The result goes to
the Destination accumulator. Every ALU instruction updates Z. The C column
shows which ones also update C.

| opcode | mnemonic | result | C |
|---|---|---|---|
| 00000 | ADD  | x + y | carry out |
| 00001 | ADDC | x + y + C | carry out |
| 00010 | SUB  | x - y | borrow |
| 00011 | SUBC | x - y - C | borrow |
| 00100 | INC  | x + 1 | carry out |
| 00101 | DEC  | x - 1 | borrow |
| 00110 | SHL  | x << 1, 0 shifted in | unchanged |
| 00111 | SHR  | x >> 1, 0 shifted in | unchanged |
| 01000 | ROL  | {x[6:0], C} | x[7] |
| 01001 | ROR  | {C, x[7:1]} | x[0] |
| 01010 | AND  | x & y | unchanged |
| 01011 | OR   | x \| y | unchanged |
| 01100 | XOR  | x ^ y | unchanged |
| 01101 | NOT  | ~x | unchanged |
| 01110 | LOAD | y | unchanged |
| 01111 | MOVE | x | unchanged |

So `LOAD B,#5` is `{01110, 0x05, 01, -, 1}` and `MOVE A<-B` is
`{01111, -, -, 1, 0}`.

### Other instructions

| opcode | mnemonic | action |
|---|---|---|
| 1000 | JIFZ a | if Z then PC <- a |
| 1001 | JIFC a | if C then PC <- a |
| 1010 | JUMP a | PC <- a |
| 1011 | CALL a | push PC+1; PC <- a |
| 11000 | STORE | RAM[addr] <- source (direct or indirect) |
| 11001 | RETURN | pop PC; in immediate mode also destination <- general |
| 11010 | INPUT | destination <- port_in, read from port addr |
| 11011 | OUTPUT | port addr <- source |
| 11100 | EINT | enable interrupts |
| 11101 | DINT | disable interrupts |
| 11110 | RETI | pop PC; C <- C saved at entry; enable interrupts; immediate mode as RETURN |
| 11111 | JUMPR | PC <- PC+1 + source (zero-extended) |

### Table lookup with JUMPR and RETURN #k

JUMPR and the immediate form of RETURN exist to build constant tables in
program memory:

```
        LOAD  B,#index
        CALL  table
        ...                 ; A now holds table[index]
table:  JUMPR B             ; skip 'index' entries
        RETURN #k0 -> A
        RETURN #k1 -> A
        ...
```

## Control sequence and timing

The control unit is a seven-state machine with one state per clock:

```
 RESET -> WAIT -> SEARCH -> DECODE -> INSTRUCTIONS -> WAIT -> SEARCH ...
                \-> INT -> JUMP INT -> WAIT
```

| state | what happens |
|---|---|
| WAIT | The ROM reads the word at PC. A pending, enabled interrupt goes to INT, anything else to SEARCH. |
| SEARCH | IR <- ROM word; PC <- PC+1. |
| DECODE | IR fields settle the multiplexers; the RAM reads the operand at the MUX5 address. |
| INSTRUCTIONS | Everything that changes state is written here: accumulator, flags, RAM, port strobe, PC, stack. |
| INT | Push PC; save C; disable interrupts; pulse `int_ack`. |
| JUMP INT | PC <- `INT_VECTOR`. |

Each state is one clock, which gives these timings:

- Every instruction takes exactly **4 clocks**, including jumps, I/O and
  returns. There is no pipelining and there are no stalls.
- Reset takes **2 clocks** (RESET, WAIT) before the first fetch, at address 0.
- Interrupt entry takes **3 clocks** (INT, JUMP INT, WAIT).

All controls are combinational functions of the state register and the IR.
Whatever a state writes has therefore been selected since the start of that
state. This is why the RAM read in DECODE is ready in INSTRUCTIONS.

### Interrupts

`int_req` is a level.

1. It is sampled in WAIT, that is, only between instructions, and only after
   an EINT.
2. Entry pushes the address of the next instruction and saves C. It also
   clears the interrupt enable, so a request that is still high does not
   re-enter.
3. RETI restores C and sets the enable again.
4. Z, A and B are not saved. An interrupt routine that uses them must save
   them itself, for example with STORE at its start.

`int_ack` is high for the INT clock. A device can use it to drop its request.

## Interface of the top module `zasua`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst | in | 1 | synchronous reset, active high. Clears PC, stack pointer, A, B, flags, IR and interrupt enable; RAM is not cleared. |
| port_in | in | 8 | input port data, sampled at the end of the INSTRUCTIONS clock of an INPUT (when `port_rd`=1) |
| port_out | out | 8 | output data (MUX3), valid while `port_wr`=1 |
| port_addr | out | 8 | port address (MUX5), valid with `port_rd`/`port_wr` |
| port_rd | out | 1 | high for one clock during INPUT |
| port_wr | out | 1 | high for one clock during OUTPUT |
| int_req | in | 1 | interrupt request (level) |
| int_ack | out | 1 | one-clock pulse when the interrupt is taken |
| load_we, load_addr[12:0], load_data[16:0] | in | | writes one program-memory word per clock; use it while `rst` is held |

Parameters:

- `ROM_DEPTH`: 256, 512, 1024, 2048, 4096 or 8192. Addresses wrap at the
  size.
- `RAM_DEPTH`: default 256.
- `INT_VECTOR`: default 1. The reset address is 0, so put a `JUMP main` at 0.
- `ROM_INIT`: a `$readmemh` file that fills the ROM at start-up, as an
  alternative to the load port.

## Files

| file | content |
|---|---|
| `rtl/zasua_pkg.sv` | opcodes, addressing modes, states, instruction struct |
| `rtl/zasua.sv` | top: the processor |
| `rtl/zasua_control.sv` | state machine, instruction decode, flags, interrupt logic |
| `rtl/zasua_alu.sv` | ALU |
| `rtl/zasua_muxes.sv` | MUX1..MUX5 |
| `rtl/zasua_dec.sv` | addressing-mode decoder |
| `rtl/zasua_acc.sv` | accumulators A and B |
| `rtl/zasua_pc.sv` | program counter |
| `rtl/zasua_ir.sv` | instruction register |
| `rtl/zasua_stack.sv` | 8 x 13 return stack |
| `rtl/zasua_rom.sv`, `rtl/zasua_ram.sv` | program and data memories |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/zasua_random_tb.sv` | random-program test of the processor with a 256-word ROM |
| `tb/zasua_iss_pkg.sv` | instruction-set model used by the processor testbenches |

## Verification

Every module has a self-checking testbench that compares it against values
computed in the testbench.

- **ALU:** all 16 operations with corner and random operands.
- **Memories and stack:** array models.
- **Control unit:** state sequence, cycle counts and per-instruction controls.

`tb/zasua_tb.sv` runs the whole processor at its default size. It assembles a
program, loads it through the load port and runs it next to an
instruction-set model written in the testbench.

- **State checks:** after every instruction and every interrupt entry it
  compares A, B, Z, C, the interrupt enable, PC and the stack pointer. It
  also compares every port write, and the whole RAM at the end.
- **Cycle counts:** 2 clocks for reset, 4 per instruction, 3 per interrupt
  entry.
- **Coverage:** it counts that each of the following happened at least once:
  all 28 instructions, all addressing modes, conditional jumps taken and not
  taken, nested CALL, a JUMPR table lookup, port reads and writes, an
  interrupt held off while disabled, an interrupt taken, and RETI restoring a
  changed carry.

`tb/zasua_random_tb.sv` uses the smallest configuration, a 256-word program
memory. It runs 40 random programs of 500 instructions each against the same
model, with the interrupt request toggling at random.

- **Program content:** the programs contain every kind of instruction. Jumps
  go to random 13-bit addresses, which wrap in the small memory. RETURNs with
  no matching CALL make the stack pointer wrap.
- **Interrupt check:** in every WAIT clock the testbench checks that an
  interrupt is taken exactly when it is both requested and enabled.

The shared model is in `tb/zasua_iss_pkg.sv`.

To run a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/zasua_pkg.sv tb/zasua_iss_pkg.sv \
          tb/zasua_tb.sv --top-module zasua_tb
./obj_dir/Vzasua_tb
```

Replace `zasua_tb` with any other testbench name. Only the two processor
testbenches need `tb/zasua_iss_pkg.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Where this design fills gaps, and how far to trust it

The block structure, instruction encoding, opcode values, flag effects,
addressing modes, memory and stack sizes, and the state sequence with its
cycle counts follow the published description of ZA-SUA. That description
names the operations but does not specify them fully. The following are
choices made in this RTL:

- **Operands:** unary ALU operations act on the Source accumulator.
- **Carry:** after SUB, SUBC and DEC the carry is a borrow. The shifts fill
  with 0; the rotates go through the carry.
- **Jump targets:** JIFZ, JIFC, JUMP and CALL take a 13-bit absolute address.
  One passage of the description speaks of a number of lines to skip instead.
  The absolute reading follows the encoding tables.
- **JUMPR:** the offset is the Source accumulator, unsigned and added to the
  address after the JUMPR. The description says only that JUMPR is a
  relative jump for table lookup with RETURN. It gives no path from the
  accumulators to the PC, so this path is an addition.
- **RETURN/RETI in immediate mode** load the constant into the destination
  accumulator. This is what makes the table work.
- **Interrupts:** the vector (address 1), the level-sensitive request,
  `int_ack`, clearing the enable on entry and setting it again in RETI are
  all choices.
- **Ports and ROM loading:** the `port_rd`/`port_wr` strobes and the ROM load
  port are additions.
- **Memory timing:** both memories have registered reads, placed in WAIT/SEARCH
  and DECODE/INSTRUCTIONS.
- **Stack overflow:** not detected. A ninth nested call overwrites the oldest
  return address.
- **RAM size:** one summary table gives the data memory as 32 bytes. The
  block diagram and the text give 256, which is used here.

The original implementation reports 75 flip-flops on a Spartan-3AN. This RTL
has 60 flip-flop bits outside the memories, plus the 8 x 13 stack, which
synthesizes as a small RAM or as registers. Its timing on a real FPGA has not
been measured.
