# SimpleCPU v1d: a 16-bit, four-register CPU with a hardware return stack

This is a small teaching processor, described in SystemVerilog. It is the "v1d" upgrade
of an 8-bit, single-accumulator machine whose address bus reached only 256 words. Each
upgrade fixes one limit of the older machine and keeps the instruction word at 16 bits:

| Limit of the old machine | What v1d does |
|---|---|
| 256 memory words | 12-bit address bus, 4096 x 16-bit memory. The 4-bit opcode + 12-bit address format is kept, so old code still runs. |
| 8-bit data | The data path, registers and ALU are 16 bits. 8-bit immediates are widened by sign or zero extension. |
| One accumulator | Four general purpose registers RA..RD. The ZERO, CARRY, OVERFLOW, POSITIVE and NEGATIVE flags go into a status register. |
| Absolute addresses only | Register (`ADD RX,RY`) and register-indirect (`LOAD RX,(RY)`) addressing. |
| No subroutines | `CALL` and `RET` use a four-entry hardware stack (LIFO) of return addresses inside the program counter. |

Most of the hardware cost is in the wider buses. The two parts that need the most care are
the return stack and the three-cycle control sequence. Both are described below.

## Block structure

```
                +----------------- simple_computer ------------------+
                |                                                    |
                |  simple_cpu_v1d                       memory_4k    |
                |  +--------------------------------+   4096 x 16    |
   clk, clr --->|  | IR (register_n 16)             |   async read   |
                |  | PC (counter_12)                |   sync write   |
                |  |    +- lifo_12 return stack     |                |
                |  |         decrement_2,           |                |
                |  |         decoder_2_4, mux_4     |                |
                |  | ADDR mux (mux_3_12):           |-- addr ------->|--> bus_addr
                |  |    PC / IR(11:0) / RY(11:0)    |<- data_in -----|--> bus_rdata
                |  | control_logic (FETCH/DECODE/   |-- data_out --->|--> bus_wdata
                |  |                EXECUTE)        |-- ram_wr ----->|--> bus_wr
                |  | DATA mux (data_mux) -> alu     |                |
                |  | register_file_4 (RA..RD)       |                |
                |  | status register (register_n 5) |                |
                |  +--------------------------------+                |
                +----------------------------------------------------+
```

The data flow is as follows:

- The ALU's A operand is always register port RX.
- Its B operand comes from the data multiplexer. The choices are the sign-extended
  IR(7:0), the zero-extended IR(7:0), the memory read data, or register port RY.
- The ALU result is written back into the register named by the RX field. So the
  destination is always the first register operand.
- Stores send RX to memory.
- The address bus carries one of three sources: the PC (instruction fetch), IR(11:0)
  (absolute operand address), or RY(11:0) (register-indirect address).

## Instruction set

`IR(15:12)` is the opcode. `RX` is `IR(11:10)` and `RY` is `IR(9:8)`. `K` is `IR(7:0)` and
`A` is `IR(11:0)`. Registers are numbered 0..3 for RA..RD.

| Opcode | Assembler | Operation | Flags |
|---|---|---|---|
| 0000 | `MOVE RX,K` | RX <- sign-extended K | - |
| 0001 | `ADD RX,K` | RX <- RX + sign-extended K | yes |
| 0010 | `SUB RX,K` | RX <- RX - sign-extended K | yes |
| 0011 | `AND RX,K` | RX <- RX and zero-extended K | yes |
| 0100 | `LOAD A` | RA <- M[A] | - |
| 0101 | `STORE A` | M[A] <- RA | - |
| 0110 | `ADDM A` | RA <- RA + M[A] | yes |
| 0111 | `SUBM A` | RA <- RA - M[A] | yes |
| 1000 | `JUMPU A` | PC <- A | - |
| 1001 | `JUMPZ A` | if ZERO: PC <- A | - |
| 1010 | `JUMPNZ A` | if not ZERO: PC <- A | - |
| 1011 | `JUMPC A` | if CARRY: PC <- A | - |
| 1100 | `CALL A` | push PC+1; PC <- A | - |
| 1101 | `OR RX,K` | RX <- RX or zero-extended K | yes |
| 1110 | reserved | no operation | - |
| 1111 | register group | operation chosen by the sub-opcode in `IR(3:0)` | see below |

The register group uses these sub-opcodes (`IR(7:4)` unused):

| Sub-opcode | Assembler | Operation | Flags |
|---|---|---|---|
| 0000 | `MOVE RX,RY` | RX <- RY | - |
| 0001 | `LOAD RX,(RY)` | RX <- M[RY(11:0)] | - |
| 0010 | `STORE RX,(RY)` | M[RY(11:0)] <- RX | - |
| 0100 | `ADD RX,RY` | RX <- RX + RY | yes |
| 0110 | `SUB RX,RY` | RX <- RX - RY | yes |
| 0111 | `AND RX,RY` | RX <- RX and RY | yes |
| 1000 | `OR RX,RY` | RX <- RX or RY | yes |
| 1010 | `SL0 RX` | RX <- RX(14:0) & 0 | yes |
| 1111 | `RET` | PC <- pop | - |

Other sub-opcodes execute as a no-operation.

### Which encodings come from the source description

The source description fixes the following:

- the opcode of `LOAD` (0100) and its 12-bit address field;
- the field layout of the immediate group (destination in IR(11:10), IR(9:8) unused,
  8-bit constant);
- the single register-group opcode with its sub-opcode in the low nibble, and sub-opcode
  0100 = `ADD RX,RY`;
- sign extension for `MOVE` and zero extension for `AND`/`OR`;
- `SL0`.

All other code points are choices of this design. They are collected in
`rtl/simple_cpu_pkg.sv`, so they can be changed in one place.

`simple_cpu_pkg` also provides `enc_imm`, `enc_abs` and `enc_reg`. These build
instruction words, which is the easiest way to write test programs. For example,
`enc_reg(RG_ADD, 2'd1, 2'd2)` is `ADD RB,RC`.

A 16-bit constant needs several instructions, because immediates are only 8 bits. For
example, 0xAAAA takes ten instructions: `MOVE RX,0xAA` (giving 0xFFAA), eight `SL0 RX`
(giving 0xAA00), then `OR RX,0xAA`.

## Status flags

The status register holds the flags in this bit order:

| Bit | Flag |
|---|---|
| B0 | ZERO |
| B1 | CARRY |
| B2 | OVERFLOW |
| B3 | POSITIVE |
| B4 | NEGATIVE |

Only the arithmetic and logic instructions load it (the "flags" column above). `MOVE`,
`LOAD` and jumps leave it alone. Each flag is defined as follows:

- **ZERO**: the result is 0.
- **CARRY**:
  - addition: the carry out of bit 15;
  - subtraction: the carry out of A + not B + 1, so 1 means "no borrow";
  - `SL0`: the bit shifted out;
  - AND and OR: cleared.
- **OVERFLOW**: two's-complement overflow of an addition or subtraction.
- **POSITIVE**: the result is greater than zero as a signed number.
- **NEGATIVE**: bit 15 of the result.

Conditional jumps test the flags stored by the most recent flag-setting instruction.

## Timing: three cycles per instruction

`control_logic` is a three-state sequencer. Every instruction, including jumps, takes
exactly three clock cycles:

| State | Address bus | What happens on the closing clock edge |
|---|---|---|
| FETCH | PC | IR <- M[PC] |
| DECODE | operand address of the new instruction (IR(11:0) or RY), else PC | nothing is written; the memory read settles |
| EXECUTE | same as DECODE | the register file, status register, memory (stores), PC and return stack are updated |

The PC changes only at the end of EXECUTE. It becomes PC+1, the jump target, or a value
popped from the stack. Because of this, the PC still holds the address of a `CALL` while
the `CALL` executes. That is why the stack has its own "+1" adder.

Memory interface:

- `memory_4k` is read asynchronously: `data_in` must be the word at `addr` within the
  same cycle.
- It is written on the rising edge that ends a cycle in which `ram_wr` is high.
- `clr` is an asynchronous, active-high reset. It clears every register and the stack,
  and the CPU starts fetching at address 0.
- Memory contents survive reset.

## The return-address stack (`lifo_12`)

The stack is four 12-bit registers and a two-bit stack counter, which is the write
pointer. Three more small parts complete it:

- **Decrementer** (`decrement_2`): forms the read pointer as the write pointer minus one,
  using one XNOR gate and one inverter: `Y = A xnor B`, `X = not B`.
- **2-to-4 one-hot decoder** (`decoder_2_4`): enables the register at the write pointer
  on a push.
- **Four-input multiplexer** (`mux_4`): always presents the entry at the read pointer.

Stack operations:

- **Reset**: write pointer 0, read pointer 3.
- **Push** (`CALL`): writes PC+1 at the write pointer and advances both pointers.
- **Pop** (`RET`): the PC loads the entry at the read pointer, and both pointers step
  back, on the same edge.

Push and pop are never asserted together; an assertion checks this.

Here is the stack during the standard nesting example: four nested calls, a `MOVE RA,0x01`
in the innermost routine, then four returns. The program occupies words 0..9 (Start = 0,
SubA = 2, SubB = 4, SubC = 6, SubD = 8). "-" is an entry never written. After a pop, the
old contents remain in the register but are dead.

| After | PC | WR | RD | entry 0 | entry 1 | entry 2 | entry 3 |
|---|---|---|---|---|---|---|---|
| reset | 0 | 0 | 3 | - | - | - | - |
| CALL SubA | 2 | 1 | 0 | 1 | - | - | - |
| CALL SubB | 4 | 2 | 1 | 1 | 3 | - | - |
| CALL SubC | 6 | 3 | 2 | 1 | 3 | 5 | - |
| CALL SubD | 8 | 0 | 3 | 1 | 3 | 5 | 7 |
| MOVE RA,0x01 | 9 | 0 | 3 | 1 | 3 | 5 | 7 |
| RET | 7 | 3 | 2 | (dead) | | | |
| RET | 5 | 2 | 1 | | | | |
| RET | 3 | 1 | 0 | | | | |
| RET | 1 | 0 | 3 | | | | |

The pointers are two bits and wrap. A fifth nested `CALL` silently overwrites the oldest
return address, and there is no full or empty indication. Software must keep nesting to
four levels or fewer. A fifth `RET` without a matching `CALL` returns to a stale address.

The program counter (`counter_12`) is built around the stack:

1. A multiplexer selects the current PC or the jump target.
2. An adder adds 1 to the PC or 0 to the target.
3. A second multiplexer selects that sum or the stack's top entry.
4. The PC register loads the result.

A separate adder forms PC+1 as the data that is pushed.

## Choices and departures

These are the places where this RTL fills gaps in the source description, or differs from
what it shows:

- **Control logic.** The published schematic shows the control block but not its insides.
  The three-state sequence, the decoder and the control encoding (`ctrl_t`) are this
  design's own.
- **Memory timing.** The memory reads asynchronously and writes synchronously. This is a
  choice, made so one instruction fits in three cycles. A synchronous-read block RAM
  would need the sequencer to allow one more cycle.
- **Data-out buffer.** It is shown as a tri-state buffer. Here there are separate read and
  write data buses, so it becomes `data_out = RX` qualified by `ram_wr`.
- **Stack multiplexer width.** The parts list of the return stack calls its multiplexer
  8 bits wide. Since the entries are 12 bits, it is built 12 bits wide.
- **Stack step order.** The stack animation shows "push", "update pointers" and "update
  PC" as separate steps. In this RTL all three happen on one clock edge, and likewise for
  `RET`.
- **Formats not built.** A displacement mode (`LOAD RX,K(RY)`, M[RY+K]) and a
  three-operand `ADD RX,RY,RZ` are discussed only as possible extensions. They need an
  address adder and a third register read port, which the v1d data path does not have.
  Opcode 1110, which the displacement example uses, is left reserved.
- **`SUB`.** The register and immediate forms of `SUB`, `SUBM`, and the register forms of
  `AND`/`OR` complete the ALU's operation set. They are choices of this design.
- **Overflow and reset.** Stack overflow behaviour, flag definitions and reset polarity
  are unspecified in the source and chosen here as described above.
- **Macros.** The assembler macros and a memory-based stack with a stack pointer are
  mentioned as software techniques and alternatives. They are not hardware of this design.

## Files

The RTL is in `rtl/`, one module per file:

| File | Contents |
|---|---|
| `simple_cpu_pkg.sv` | widths, opcode/sub-opcode/ALU/select enums, `status_t`, `ctrl_t`, instruction builders |
| `simple_computer.sv` | top: CPU + memory, memory bus as outputs |
| `simple_cpu_v1d.sv` | the CPU |
| `control_logic.sv` | sequencer and decoder |
| `register_file_4.sv` | four 16-bit registers, one write and two read ports |
| `alu.sv`, `data_mux.sv` | ALU with flags; B-operand multiplexer with sign/zero extension |
| `mux_3_12.sv` | address multiplexer (two `mux_2` in series) |
| `counter_12.sv`, `lifo_12.sv` | program counter and return stack |
| `decrement_2.sv`, `decoder_2_4.sv` | stack pointer decrementer; one-hot decoder |
| `register_n.sv`, `mux_2.sv`, `mux_4.sv`, `adder_n.sv` | generic building blocks |
| `memory_4k.sv` | 4096 x 16 memory |

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The main ones are:

- `tb_simple_computer`: the whole machine at full size. It runs one program that goes
  through every mechanism, listed here:
  - 12-bit addresses beyond 255;
  - 16-bit sums (255+255+255 = 765);
  - sign and zero extension;
  - the 0xAAAA sequence;
  - register-indirect load and store;
  - conditional jumps taken and not taken;
  - all five flags;
  - four-deep nested `CALL`/`RET`.

  It counts each mechanism and fails if any never happens. It also checks the final
  registers and memory, and the cycle of the final store (3 cycles x 38 instructions).
- `tb_simple_cpu_v1d`: runs the nesting example, checking the PC after every instruction.
  It then runs 20 random programs of all non-control instructions and conditional jumps.
  After every instruction it compares the PC, the registers, the flags and the memory
  with a reference instruction-set model.
- `tb_lifo_12`, `tb_counter_12`: replay the stack table above and random push/pop
  traffic, including wrap-around.

All testbenches pass.

To simulate with Verilator 5 (the package must be read first):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/simple_cpu_pkg.sv tb/tb_simple_computer.sv --top-module tb_simple_computer
./obj_dir/Vtb_simple_computer
```

Replace `tb_simple_computer` with any other testbench name to run that one. To lint a
single module:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/simple_cpu_pkg.sv rtl/<module>.sv \
    --top-module <module>
```

To run your own program, write it into `u_mem.mem` of `simple_computer` before releasing
`clr`, as `tb_simple_computer` does. Build the words with the `enc_*` functions of
`simple_cpu_pkg`.
