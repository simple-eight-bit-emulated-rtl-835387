# Two eight-bit teaching computers

Two small computers meant to show students how a processor is built from a
datapath and a control unit. Each is small enough to follow signal by signal:

* **A von Neumann accumulator machine.** One 64-byte memory holds both program
  and data. There are four instructions, and each takes three clock steps. A
  single adder serves both the accumulator and the program counter. Output and
  halt are memory-mapped. Because the program sits in writable memory, a
  program can change its own instructions. That is how it walks through a
  string.
* **A single-cycle Harvard machine.** It has separate program and data
  memories, eight instructions, and a second adder just for the program
  counter, so every instruction finishes on one clock edge. The program
  cannot modify itself. A "Hello World" is therefore a run of output
  instructions.

Both machines are controlled in the same way. A read-only table turns the
current opcode, a zero flag and (for the three-step machine) a step count into
a set of named control lines. Those lines set the bus multiplexers and enable
writes to memory and registers. The RTL keeps these control lines and
multiplexers as separate, visible pieces, so the structure of the original
schematics stays readable in the code.

The top module `eight_bit_computers` places the two machines side by side.
They share only `clk` and `rst_n`.

## Clocking: run switch, single step, halt

In the original schematics a free-running oscillator is gated by a run switch,
and a push button gives single clock pulses. Here everything is synchronous to
`clk`. An "emulated clock edge" is a `clk` cycle in which `tick` is high
(`clock_ctrl`):

```
tick = (run & ~disable_run) | rising_edge(step_btn)
```

* Holding `run` high gives one instruction step per `clk` cycle.
* Each press of `step_btn` gives exactly one step, however long it is held.
  A step press also works while the run clock is disabled.
* `disable_run` is the halt. In the von Neumann machine it is a latch that is
  set by a Save to address 0x3E and cleared by reset. In the Harvard machine
  it is control line DC7 (Clock Disable) of the HALT instruction.

Every register, flag and memory write is qualified by `tick`. `rst_n` is an
asynchronous active-low reset. It clears all registers, flags, the step
counter and the halt latch. It does not clear memory contents.

## The von Neumann machine (`vn_computer`)

### Instructions

An instruction is one byte: the opcode in bits 7:6 and a 6-bit address `I` in
bits 5:0.

| IR7:6 | bytes | instruction | effect |
|---|---|---|---|
| 00 | 00-3F | Add  | AC <= AC + M[I]; zero flag <= (result == 0) |
| 01 | 40-7F | Load | AC <= M[I] |
| 10 | 80-BF | Save | M[I] <= AC |
| 11 | C0-FF | Jump | if the zero flag is set: PC <= I |

Two Save addresses are also commands:

* A Save to **0x3F** sends the accumulator to the terminal (`out_valid`,
  `out_char`).
* A Save to **0x3E** halts the machine.

The memory is written in both cases.

Only Add changes the zero flag; Load does not. An unconditional jump is
therefore written as "Load a zero word, Add a zero word, Jump".

### Datapath

```
            +---------+   AC-PC mux    +-----+   AC-in mux
   AC ----->|         |--(AC | PC)---->|     |---(ALU | mem)---> AC
   PC ----->|         |                | ADD |---(ALU | IR5:0)-> PC   (PC mux)
  mem ----->| M PC+   |--(mem | 1)---->|     |--Z--> zero flag ("Flip")
            +---------+                +-----+
  M Add mux: (PC | IR) -> memory address (low 6 bits)
  memory data -> IR, AC-in mux, M PC+ mux;   AC -> memory write data, terminal
```

The one adder is shared. In the increment step it computes PC + 1: the AC-PC
mux passes PC and the M PC+ mux passes the constant 1. In the execute step of
an Add it computes AC + M[I].

The zero flag loads the adder's Z output only when AC-in, AC-W and M Add are
all active together. That happens only in the execute step of an Add.

### Three steps per instruction (`vn_decoder`, `step_counter`)

`step_counter` counts 0, 1, 2. The decoder looks up the nine control lines
from {IR7:6, zero flag, step}:

| step | name | lines active | effect |
|---|---|---|---|
| 0 | fetch | IR-W (M Add = PC) | IR <= M[PC] |
| 1 | increment | PC-W, M Add (AC-PC = PC, M PC+ = 1, PC mux = ALU) | PC <= PC + 1 |
| 2 | Add | AC-in = ALU, AC-W, M Add = IR, AC-PC = AC, M PC+ = mem | AC <= AC + M[I], flag |
| 2 | Load | AC-W, M Add = IR, AC-in = mem | AC <= M[I] |
| 2 | Save | Mem-W, M Add = IR | M[I] <= AC |
| 2 | Jump | PC-W, PC mux = IR, only if the flag is set | PC <= I |

The names of the control lines and of the five multiplexers come from the
original schematic. The original lists the lines in this order: AC-in Mux,
Mem-W, AC-W, IR-W, PC-W, M Add Mux, PC Mux, AC-PC Mux, M PC+ Mux.

The original's state display shows "Increment PC" as step 1, with PC-W,
M Add, AC-PC and M PC+ lit. The increment row above reproduces that control
word, and it fixes the select polarities of the AC-PC and M PC+ muxes. The
rest of the table, and the remaining select polarities, are this design's
choice. The `vn_ctrl_t` struct in `vn_pkg` documents the polarity of each
field.

An instruction takes exactly three ticks. A program of *k* executed
instructions takes 3*k* ticks.

### Self-modifying "Hello World"

The machine has no indirect addressing. To print a string, a program
increments the address field of its own Load instruction. This is the program
used by the testbenches:

```
 0  Load STR        ; 0x4D, rewritten after every character
 1  Add ZERO        ; flag <= (char == 0)
 2  Jump END
 3  Save 3F         ; print AC
 4  Load 0          ; fetch the Load instruction itself
 5  Add ONE
 6  Save 0          ; ... and store it back, pointing one byte further
 7  Load ZERO
 8  Add ZERO        ; sets the flag
 9  Jump 0
10  END: Save 3E    ; halt
11  ZERO: 00   12  ONE: 01   13.. text, 00
```

For *N* characters this runs 10*N* + 4 instructions, which is
3 x (10*N* + 4) ticks. The three greeting lines "Hello World!",
"Hello Universe!" and "Hello Bill!" are 40 characters. Program, text and
terminator then fill 54 of the 64 bytes. The two top bytes are left to the
I/O addresses.

## The Harvard machine (`harvard_computer`)

### Instruction format

The program memory word is `OC[2:0] | Imm[4:0]`. `Imm` is zero-extended to
eight bits, so the top three bits of the immediate bus are tied to 0. `Imm`
has three uses:

* the data memory address,
* the immediate operand,
* the jump target.

As a result, only data words 0..31 are reachable.

### Registers and datapath

* **RI** (input register) loads from data memory and drives ALU input A.
* **ALU input B** comes from the Mem-Immed mux: either the data memory output
  or `Imm`.
* **RO** (output register) loads the ALU result and is the data memory's
  write data.
* The **zero latch** loads the ALU's Z output when DC0 is high.
* The **terminal** receives the data memory output when DC6 is high.

### Instruction set and control lines (`hv_opdecode`)

The control lines DC7..DC0 and their meanings are the original's:

| line | name | effect when 1 |
|---|---|---|
| DC7 | Clock Disable | stops the run clock (halt) |
| DC6 | Output Enable | terminal <= data memory output |
| DC5 | WE Data Mem | M[Imm] <= RO |
| DC4 | ALU Mux Cont | ALU B = data memory (when 0: Imm) |
| DC3 | PC Mux Cont | PC increments (when 0: jump) |
| DC2 | WE RO | RO <= ALU |
| DC1 | WE RI | RI <= M[Imm] |
| DC0 | ALU Cont | ALU subtracts and the zero latch loads Z (when 0: add) |

The mux selects are the inverted DC4 and DC3, as in the original. DC3 and DC4
are therefore high in every instruction that does not use them.

The eight instructions are **this design's own**. The original names only
OutM. These eight were chosen so that every control line is used:

| OC | mnemonic | effect | DC7..0 |
|---|---|---|---|
| 0 | LOAD a  | RI <= M[a] | 1A |
| 1 | ADD a   | RO <= RI + M[a] | 1C |
| 2 | ADDI k  | RO <= RI + k | 0C |
| 3 | SUB a   | RO <= RI - M[a]; ZL <= (result == 0) | 1D |
| 4 | STORE a | M[a] <= RO | 38 |
| 5 | OUTM a  | terminal <= M[a] | 58 |
| 6 | JZ t    | if ZL: continue at t + 1 | 10 if ZL, else 18 |
| 7 | HALT    | clock disabled | 98 |

### The jump lands one word after its target

The PC path is an adder, not a counter. The Jump-PC Inc mux chooses either
`Imm` (jump) or `PC`, and a dedicated ALU adds 1 to that choice. The PC
register loads the sum on every tick. A taken `JZ t` therefore continues at
**t + 1**. This follows the original wiring. When writing a program, point a
jump at the word *before* the first instruction you want to run. The
testbenches' loop uses `JZ 0` to go back to address 1.

A compare-and-branch is `LOAD x; SUB y; JZ t`. An unconditional jump is
`LOAD zero; SUB zero; JZ t`.

### Hello World

The program memory is read-only and there is no indirect addressing. Printing
text is therefore a straight run of `OUTM 0`, `OUTM 1`, ... over the
characters held in data memory. Eight lines of "HELLO WORLD!" take
8 x 13 = 104 OUTM words and a HALT, out of 256 program words.

## Loading programs

The original machines had their memories filled by the simulation
environment. Here each memory has a load port. Write to it while the machine
is stopped (`run` low, no step press):

* `vn_computer`: `load_we`, `load_addr[5:0]`, `load_data`.
* `harvard_computer`: `pmem_load_*` for the program memory and `dmem_load_*`
  for the data memory (8-bit addresses each).

Load writes take priority over the machine's own data-memory writes. After
loading, pulse `rst_n` to reset the registers, or start directly from reset.

## Module map

| module | role |
|---|---|
| `eight_bit_computers` | top: both machines, `vn_*` and `hv_*` ports |
| `vn_computer`, `harvard_computer` | the two machines |
| `vn_pkg`, `hv_pkg` | opcodes, control-word structs, sizes, I/O addresses |
| `vn_decoder`, `hv_opdecode` | control tables |
| `step_counter` | 0,1,2 step count of the von Neumann machine |
| `vn_mmio` | Save-to-0x3F output and Save-to-0x3E halt decode |
| `clock_ctrl` | run / single step / disable |
| `data_reg` | W-bit register with write enable (PC, AC, IR, RI, RO) |
| `flag_ff` | zero flag / zero latch |
| `mux2_bus` | W-bit 2:1 bus mux (all seven multiplexer arrays) |
| `alu8` | add/subtract with C, OV, Z, N |
| `ram_async` | memory with combinational read and clocked write |

The memories read combinationally, as the original memory parts do. A
synthesis tool will map them to distributed RAM or flip-flops, not to a
synchronous block RAM.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/vn_pkg.sv rtl/hv_pkg.sv \
    tb/tb_eight_bit_computers.sv --top-module tb_eight_bit_computers
./obj_dir/Vtb_eight_bit_computers
```

* `tb_eight_bit_computers` runs both machines together at the top's default
  settings. It checks both terminal streams and the tick counts. It also
  counts each mechanism at least once: single step, both jump outcomes, zero
  flag, memory-mapped output and halt, self-modifying save, immediate
  operand, subtract/zero latch, store and clock disable.
* `tb_vn_computer` checks the 40-character self-modifying Hello World.
* `tb_harvard_computer` checks a looped Hello World that prints eight lines.
* `tb_hv_hello_series` checks the straight-line OUTM version.
* `tb_vn_random` and `tb_hv_random` load random programs and data and
  compare the machine, instruction by instruction, against an
  instruction-level model written in the testbench. The von Neumann check
  covers PC, AC, IR, the flag, the halt, terminal output and the final
  memory. The Harvard check covers PC, RI, RO, the zero latch, terminal
  output and the final data memory. Together they run about 19,000
  instructions.
* The other testbenches cover one module each. The decoders are checked
  exhaustively.

## What follows the original and what does not

Taken from the original design:

* the datapaths, as drawn;
* the register, multiplexer and control-line names;
* the von Neumann opcode assignment and its I/O addresses;
* the 64-byte von Neumann memory (six address lines);
* the Harvard instruction format (3-bit opcode, 5-bit immediate);
* the Harvard clock gating by DC7;
* the inverted DC3/DC4 selects and the PC + 1 adder after the jump mux;
* two control words shown in the original's snapshots:
  * the Harvard OutM word, with DC6, DC4 and DC3 lit;
  * the von Neumann "Increment PC" word (step 1).

This design's own choices:

* both control tables, apart from the two words above. This includes
  placing the fetch before the increment and the execute after it;
* the Harvard instruction set other than OutM, including using DC0 as
  "subtract";
* the von Neumann mux select polarities that the "Increment PC" control
  word does not fix;
* the halt latch of the von Neumann machine. In the original, the 0x3E decode
  drives a lamp;
* the button edge detector;
* the reset behaviour;
* the load ports;
* the synchronous `tick` in place of a gated clock.

One label in the original's opcode legend reads "8X-AX Save, BX-FX Jump".
That conflicts with a 2-bit opcode, and with the Save to 0x3F (byte 0xBF)
that the output command needs. This design decodes IR7:6, so Save is 80-BF
and Jump is C0-FF.

The original's many hex, binary and mnemonic display panels have no logic of
their own. Their values are available on the top's debug outputs: PC, AC, IR,
step, flag and control word for one machine; PC, RI, RO, ZL, opcode and DC
for the other.
