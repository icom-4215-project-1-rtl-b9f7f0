# RISC AR5: an 8-bit accumulator processor with a two-lane vector add

The RISC AR5 is a small teaching processor. It has an 8-bit accumulator `A`,
eight 8-bit general registers `R0`..`R7`, a 256-byte memory that holds both
program and data, and a 16-bit instruction word. It has 21 instructions.
The unusual part is the vector instruction `VADD`. It adds the top two
entries of a small stack of 2-byte vectors, both byte lanes at once. Lane 0
goes to `A` and lane 1 to a separate vector buffer.

This repository holds synthesizable SystemVerilog for the processor. It is
built as a multi-cycle machine: every instruction takes three clock cycles.
The processor also has host ports to load programs, fill the vector stack,
choose between run and step mode, and observe every register. These are the
ports a front panel or debugger would drive.

## Programmer's model

| Register | Width | Notes |
|---|---|---|
| `A` | 8 | accumulator; the result of every operation and load, the source of every store |
| `R0`..`R7` | 8 each | general registers; `R7` also holds the target of every conditional branch |
| `PC` | 8 | cleared by reset, so programs start at address 0 |
| `IR` | 16 | current instruction |
| `SR` | 4 | flags `O N C Z` in bits 3..0: overflow, negative, carry, zero |
| VBuffer | 8 | lane-1 result of the last `VADD` |
| vector stack | 2 x 16 | vectors `{V1,V0}`; `TOS` and `SOS` feed `VADD` |

Instructions are stored high byte first. The program occupies addresses 0..127,
which is room for 64 instructions.

### Instruction word

```
 15      11 10   8 7             0
+----------+------+---------------+
|  opcode  | reg f| operand/addr  |
+----------+------+---------------+
```

The `reg f` field is used by the register instructions. Bits 7..0 hold the
immediate byte for `LDI` and the address for `LDA addr`/`STA addr`. All other
bits are ignored.

### Instruction set and flags

| Opcode | Mnemonic | Operation | Flags written |
|---|---|---|---|
| 00000 | `AND rf` | A <- A & Rf | N Z |
| 00001 | `OR rf` | A <- A \| Rf | N Z |
| 00010 | `XOR rf` | A <- A ^ Rf | N Z |
| 00011 | `ADDC rf` | A <- A + Rf + C | O N C Z |
| 00100 | `SUB rf` | A <- A - Rf | O N C Z (C = borrow) |
| 00101 | `VADD` | A <- TOS.V0 + SOS.V0; VBuffer <- TOS.V1 + SOS.V1 | O N C Z of lane 0 |
| 00110 | `NEG` | A <- 0 - A | O N C Z (C = borrow, so set unless A was 0) |
| 00111 | `NOT` | A <- ~A | N Z |
| 01000 | `RLC` | {C, A} <- {A, C} (rotate left through carry) | N C Z |
| 01001 | `RRC` | {A, C} <- {C, A} (rotate right through carry) | N C Z |
| 01010 | `LDA rf` | A <- Rf | none |
| 01011 | `STA rf` | Rf <- A | none |
| 01100 | `LDA addr` | A <- [addr] | none |
| 01101 | `STA addr` | [addr] <- A | none |
| 01110 | `LDI imm` | A <- imm | none |
| 10000 | `BRZ` | if Z then PC <- R7 | none |
| 10001 | `BRC` | if C then PC <- R7 | none |
| 10010 | `BRN` | if N then PC <- R7 | none |
| 10011 | `BRO` | if O then PC <- R7 | none |
| 11000 | `NOP` | nothing | none |
| 11111 | `STOP` | halt until reset | none |

The opcodes and what each instruction does are part of the processor's
definition. Which flags each instruction writes is a choice made here,
because the definition does not say. So are borrow-as-carry for subtraction
and signed overflow as `O`. The 11 unused opcode values execute as `NOP`.

There is no call, no return and no relative branch. To jump, a program puts
the target address in `R7`, for example with `LDI target` then `STA R7`, and
then uses a conditional branch.

Example program: it loads three registers, sets `R7`, stores `A` to address
0x80, adds, and stops.

```
7019  LDI 0x19      5900  STA R1
70F4  LDI 0xF4      5A00  STA R2
7002  LDI 0x02      5B00  STA R3
7028  LDI 0x28      5F00  STA R7
6880  STA 0x80      1900  ADDC R1     ; A = 0x28 + 0x19 + 0 = 0x41
F800  STOP
```

## Memory map and I/O

| Address | Contents |
|---|---|
| 0..127 | program (also readable and writable as data) |
| 128..249 | data |
| 250, 251 | keyboard word, high byte at 250 and low byte at 251 (read only) |
| 252..255 | four ASCII display characters (write, and read back) |

`ar5_io` decodes addresses 250..255. Memory is neither read nor written
there. A store to a display address updates that character and pulses the
matching `disp_strobe` bit for one cycle, so a host can print it. Stores to
the keyboard addresses are ignored.

## How an instruction executes

The memory has an 8-bit port, so the 16-bit instruction is fetched in two
cycles. Every instruction takes exactly three cycles:

| State | Address bus | Action |
|---|---|---|
| `FETCH_HI` | PC | IR[15:8] <- mem[PC]; PC <- PC + 1 |
| `FETCH_LO` | PC | IR[7:0] <- mem[PC]; PC <- PC + 1 |
| `EXEC` | PC, or IR[7:0] for `LDA addr`/`STA addr` | control word from the opcode; registers update at the end of the cycle |

Memory reads are combinational, so `LDA addr` reads and loads `A` within
`EXEC`. A taken branch loads the PC from `R7` in `EXEC`, replacing the PC
that already points past the branch. The example program above takes
11 x 3 = 33 cycles from start to halt.

`ar5_control` is the sequencer and decoder. It is a five-state machine
(`IDLE`, `FETCH_HI`, `FETCH_LO`, `EXEC`, `HALT`). In `EXEC` it produces a
`ctrl_t` control word, defined in `ar5_pkg`. The datapath in `ar5_top` is
built around that word:

- an address mux (PC or direct address)
- an operand mux for the ALU's second input (register f, memory/I/O read
  data, or the immediate byte)
- a mux into `A` (ALU result or vector lane 0)
- a mux into `SR` (ALU flags under the ALU's write mask, or the lane-0
  vector flags)

## Run mode and step mode

The processor waits in `IDLE` after reset. A one-cycle `start` pulse begins
an instruction:

- `run_mode = 1`: it keeps fetching until `STOP`. Lowering `run_mode` stops
  it cleanly at the next instruction boundary. A new `start` resumes from
  the current PC.
- `run_mode = 0` (step mode): each `start` pulse executes exactly one
  instruction, then the processor returns to `IDLE`.

`instr_done` is high in the `EXEC` cycle of every instruction. The new
register values can be seen on `dbg` in the following cycle. `halted` goes
high after `STOP` and stays high until reset. `busy` is high during fetch
and execute. An assertion checks that the host never writes memory
(`host_we`) while `busy` is high.

## The vector unit

The vector stack (`ar5_vstack`) holds 16-bit vectors `{V1, V0}`. It is two
entries deep by default; `VADD` needs at least two (top and second).
`VADD` reads the two entries and does not pop them. The vector adder
(`ar5_vector_adder`) has one 8-bit adder per lane and no carry between the
lanes.

No instruction pushes onto the vector stack, so it is filled from outside
through `vs_push`/`vs_pop`/`vs_data`. These behave as follows:

- A push onto a full stack drops the bottom entry.
- A pop of an empty stack does nothing.
- Push and pop in the same cycle replace the top entry.
- Empty entries read as zero.
- Reset empties the stack.

All of this is this design's choice. Only the stack, its TOS/SOS operands
and the two-lane add come from the processor's definition.

## Top-level ports (`ar5_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (PC, A, SR, R0..R7, VBuffer, display and vector stack cleared; memory kept) |
| `run_mode`, `start` | in | 1 | see above |
| `host_we`, `host_addr`, `host_wdata` | in | 1, 8, 8 | write one memory byte (program loading); use only while not `busy` |
| `dbg_addr`, `dbg_rdata` | in, out | 8, 8 | read any memory byte at any time |
| `kbd_in` | in | 16 | keyboard word seen at 250/251 |
| `display`, `disp_strobe` | out | 4x8, 4 | display characters 252..255 and their write pulses |
| `vs_push`, `vs_pop`, `vs_data` | in | 1, 1, 16 | vector stack port |
| `dbg` | out | `dbg_t` | PC, IR, A, SR, VBuffer, R0..R7, vector TOS/SOS/count, sequencer state |
| `halted`, `busy`, `instr_done` | out | 1 | status |

To load a program, hold `rst_n` low or wait until the processor is idle or
halted. Write two bytes per instruction, high byte first, starting at
address 0. Then release reset and pulse `start`.

## Departures and choices

These are the points where the processor's definition is silent or
ambiguous, and what this RTL does:

- **NEG and NOT.** `NEG` is the two's complement (0 - A) and `NOT` is the
  bitwise complement. The operation column of the instruction table writes
  both as a complement, but the descriptions say "two's complement" for
  `NEG` and "negate" for `NOT`. This design follows the descriptions.
- **Flags.** The flag policy is the one in the instruction-set table above.
  Loads, stores, branches and `NOP` leave `SR` alone.
- **Timing.** The three-cycle fetch/fetch/execute sequence, the
  combinational memory read and the synchronous reset are this design's own.
- **The "2 external I/O pins"** named in the processor's feature list are
  not specified further. The I/O here is the memory-mapped keyboard and
  display.
- **Memory.** The memory is not cleared by reset. Addresses 250..255 of the
  array exist but are never used.
- **Undefined opcodes** execute as `NOP`. The PC wraps from 255 to 0.
- **Front end.** The original assignment around this processor is a
  software simulator with a GUI, RUN/STEP buttons, and a loader that reads
  a file of 4-hex-digit instruction words. That front end is not hardware.
  The ports above are what such a front end would drive.

## Files

`rtl/` contains one module or package per file:

- `ar5_pkg`: opcodes, flags, control word, debug struct
- `ar5_top`
- `ar5_control`
- `ar5_alu`
- `ar5_sr`
- `ar5_accumulator`
- `ar5_pc`
- `ar5_ir`
- `ar5_regfile`
- `ar5_memory`
- `ar5_io`
- `ar5_vstack`
- `ar5_vector_adder`
- `ar5_vbuffer`

`tb/` has one self-checking testbench per module, `<module>_tb.sv`. Each
prints `TB_RESULT checks=N failures=M`. `tb/ar5_top_tb.sv` is the
end-to-end test at the default size. It contains its own reference model of
the instruction set and uses it to check three things:

- the example program in run mode, including its 33-cycle count; it is
  read from `tb/ar5_example_program.hex`, one 4-hex-digit instruction word
  per line
- a keyboard-to-display and `VADD` program
- 40 random 64-instruction programs in step mode, compared with the model
  after every instruction, plus a run-mode pause and resume

It also counts coverage: every opcode executed, branches both taken and not
taken, keyboard reads, display writes, carry and overflow. A coverage item
that never occurs counts as a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/ar5_pkg.sv -y rtl \
          tb/ar5_top_tb.sv --top-module ar5_top_tb
./obj_dir/Var5_top_tb
```

Run it from the repository root so that the testbench finds
`tb/ar5_example_program.hex`. Replace `ar5_top_tb` with any other
testbench name to run that test. Each
test finishes in well under a second. Lint a module with
`verilator --lint-only -Wall rtl/ar5_pkg.sv -y rtl rtl/<module>.sv`.
The only remaining warnings are the unused lane-1 carry and overflow of the
vector adder in `ar5_top`.
