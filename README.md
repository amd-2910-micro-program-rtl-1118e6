# Am2910-style microprogram address sequencer

A microprogrammed controller keeps its control words in a memory and needs
something to decide, every clock, which word to fetch next: the next one in
line, a branch target carried in the current word, the start of a routine
picked by the opcode being executed, an interrupt vector, or the way back from
a subroutine or loop. This RTL is that "something". It is a 12-bit
next-address sequencer with the architecture and instruction set of the AMD
Am2910. Every cycle it drives the address of the next microinstruction on `Y`.
A 4-bit instruction `I` and one condition test decide where that address comes
from and what happens to the internal state.

## Where the next address comes from

Four sources feed one multiplexer:

| Source | What it holds |
|---|---|
| `D` | direct input, from the pipeline register, the mapping PROM or a vector source |
| `R` | the 12-bit register/counter, loaded from `D` |
| `uPC` | the microprogram counter: last cycle's `Y` plus `CIN` |
| `TOS` | the top of a 5-word return-address stack |

The uPC is an incrementer followed by a register. At every rising edge it
stores `Y + CIN`. With `CIN` high, the uPC holds the next sequential address.
With `CIN` low it holds the same address again, so one microinstruction
repeats until `CIN` rises.

Three active-low outputs, `PL_BAR`, `MAP_BAR` and `VECT_BAR`, tell the board
which external device drives `D` this cycle. Exactly one of them is low in
every cycle. `MAP_BAR` is low for `JMAP`, `VECT_BAR` is low for `CJV`, and
`PL_BAR` is low for every other instruction.

## The condition test

`CCEN` and `CC` are active low. The test **fails** only when it is enabled
(`CCEN` = 0) and the condition is false (`CC` = 1). In every other case it
**passes**. Tying `CCEN` high therefore makes every conditional instruction
take its "pass" branch.

## Instruction set

"Push" writes the current uPC value onto the stack. That value is the address
after the current instruction, so it is the return address. `R≠0` / `R=0`
refer to the register/counter's contents *before* the clock edge.

| I | Name | Fail: Y / stack | Pass: Y / stack | R/counter | Enable |
|---|---|---|---|---|---|
| 0 | JZ   | 0 / clear | 0 / clear | hold | PL |
| 1 | CJS  | uPC / hold | D / push | hold | PL |
| 2 | JMAP | D / hold | D / hold | hold | MAP |
| 3 | CJP  | uPC / hold | D / hold | hold | PL |
| 4 | PUSH | uPC / push | uPC / push | hold on fail, load on pass | PL |
| 5 | JSRP | R / push | D / push | hold | PL |
| 6 | CJV  | uPC / hold | D / hold | hold | VECT |
| 7 | JRP  | R / hold | D / hold | hold | PL |
| 8 | RFCT | R≠0: TOS / hold; R=0: uPC / pop | same as fail (no test) | decrement if R≠0 | PL |
| 9 | RPCT | R≠0: D / hold; R=0: uPC / hold | same as fail (no test) | decrement if R≠0 | PL |
| 10 | CRTN | uPC / hold | TOS / pop | hold | PL |
| 11 | CJPP | uPC / hold | D / pop | hold | PL |
| 12 | LDCT | uPC / hold | uPC / hold | load | PL |
| 13 | LOOP | TOS / hold | uPC / pop | hold | PL |
| 14 | CONT | uPC / hold | uPC / hold | hold | PL |
| 15 | TWB  | R≠0: TOS / hold; R=0: D / pop | uPC / pop | decrement if R≠0 | PL |

Independent of the instruction, `RLD` low loads `D` into the register/counter
at the next edge. It overrides any hold or decrement.

## Counted loops

The register/counter counts down. Its zero detector feeds the controller as
the `R = 0` test. If a loop is closed with `RPCT` or `RFCT` and `R` was loaded
with N, the loop body runs **N + 1** times. The branch is taken while `R ≠ 0`,
with a decrement each time, and the loop falls through on the pass that finds
`R = 0`. The usual patterns are:

* `LDCT N` … body … `RPCT start`: the loop address comes from `D`.
* `PUSH` (with the test passing, so that it also loads `R` from `D`), then the
  body, then `RFCT`: the loop address comes from the stack. `RFCT` pops the
  stack when the loop ends.
* `TWB` is a loop that can exit on either of two events. It branches back
  through the stack while the condition fails and `R ≠ 0`. It falls out to
  `uPC` when the condition passes. It goes to `D` when `R` reaches 0 first.

## The stack

The stack is five 12-bit words plus a pointer that counts the nesting depth
(0 to 5). The top word can be read without popping, which is what the loop
instructions need.

* A push writes the word above the current top. The new top is visible in
  the next cycle.
* A pop lowers the depth at the next edge.
* `JZ` sets the depth to zero.
* `FULL` is high, and `FULL_BAR` low, while the depth is 5.
* A push onto a full stack **overwrites the top word**. The depth stays at 5.
* A pop from an empty stack leaves the depth at 0. A `TOS` read from an empty
  stack returns the bottom word, which is stale data.

The pushed word is always the uPC value.

## Jump to zero, and how Y = 0 is produced

There is no reset pin. `JZ` is the reset: it puts 0 on `Y` and empties the
stack. The multiplexer has no constant-zero input. Instead, `JZ` makes the
controller select the uPC path and issue the uPC's *Clear* operation, which
forces the uPC's output to zero for that cycle. The uPC register still stores
`Y + CIN = 0 + CIN`, so `JZ` is followed by address 1, as with any other
instruction. `R` and the uPC start out undefined. Run `JZ` and load `R`
(`LDCT`, `PUSH` or `RLD`) before relying on them.

## Three-state Y

`OE` is active low. While `OE` is high the `Y` pins float, so test equipment
can drive the microprogram address lines directly. The sequencer keeps running
internally while it is disabled. The uPC still stores the address the
multiplexer selected, plus `CIN`, because the uPC is fed from the
multiplexer and not from the pins.

## Pins of the top module `am2910`

| Pin | Dir | Width | Meaning |
|---|---|---|---|
| `CLOCK` | in | 1 | all state changes on the rising edge |
| `I` | in | 4 | instruction |
| `CCEN` | in | 1 | condition test enable, active low |
| `CC` | in | 1 | condition, active low (0 = true) |
| `RLD` | in | 1 | unconditional register/counter load, active low |
| `CIN` | in | 1 | uPC incrementer carry-in |
| `OE` | in | 1 | Y output enable, active low |
| `D` | in | 12 | direct data |
| `Y` | out (three-state) | 12 | next microinstruction address |
| `PL_BAR`, `MAP_BAR`, `VECT_BAR` | out | 1 each | source enables for `D`, active low |
| `FULL` / `FULL_BAR` | out | 1 each | stack full, active high / active low |

Parameters: `ADDR_WIDTH` (default 12) and `STACK_WORDS` (default 5).

Timing: the sequencer is a single-cycle machine. `Y`, the enables and `FULL`
are combinational functions of the inputs and the current state. R, the uPC
and the stack update at the rising edge. In a system, the word fetched from
address `Y` is clocked into the pipeline register at the same edge. That word
supplies `I`, `D` and the condition select for the next cycle.

## Blocks and files

| File | Block |
|---|---|
| `rtl/am2910_pkg.sv` | shared widths, the instruction enum and the 2-bit control-code enums |
| `rtl/control.sv` | combinational instruction decoder, which implements the table above |
| `rtl/regcnt.sv` | register/counter with zero detector and active-low `LOAD` |
| `rtl/stack.sv` | 5 × 12 stack with depth pointer and full flag |
| `rtl/upc.sv` | incrementer + register, with the Clear operation used by `JZ` |
| `rtl/mux_out.sv` | four-input multiplexer, three-state `DATA_OUT` and always-driven `MUX_OUT` |
| `rtl/am2910.sv` | top level that wires the blocks together |

The control buses between the blocks are 2 bits each. Their encodings are
this design's own and are listed in the package.

## Departures and readings

These points are this design's own choices or readings:

* **CONT (14).** The instruction table this design works from lists a stack
  pop for CONT when the test passes, and a hold when it fails. A "continue"
  instruction has no reason to touch the stack, and the Am2910's own CONT does
  not, so both outcomes hold here. To get the pop instead, change the
  `I_CONT` arm in `rtl/control.sv`.
* **Pass/fail.** The source defines "fail" as `CCEN`=0 with `CC`=1, and
  "pass" only as `CCEN`=1 with `CC`=0. Here pass is everything that is not a
  fail.
* **uPC Clear.** Only the name "Clear" is specified for this operation. The
  meaning used here is explained under *Jump to zero* above.
* **Polarities.** `OE` is active low by choice; nothing fixes its polarity.
  The stack's full flag is named both `FULL` and `FULL_BAR` (low when full),
  so both are brought out.
* **Wrap-around.** The uPC wraps from 0xFFF to 0. A decrement of R at zero
  wraps to 0xFFF, which no instruction does.
* The `UPC_CNTL` bus is 2 bits wide, but only its low bit is used.

The microprogram memory, the pipeline register, the mapping PROM and the
vector source are outside the sequencer and are not part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `control_tb` checks all 128 combinations of instruction, `CCEN`, `CC` and
  `R = 0` against a table written out row by row in the testbench.
* `regcnt_tb` runs random operations against a reference value and checks the
  N + 1 loop count for N = 0..5.
* `stack_tb` runs a random push/pop/clear sequence against a model. It forces
  and counts both full-stack overwrites and pops from empty.
* `upc_tb` checks `Y + CIN` over random inputs, the wrap, and the Clear output.
* `mux_out_tb` checks every select code. It also checks that a disabled
  output lets an external driver own the bus.
* `am2910_tb` tests the whole sequencer at its default size:
  * It runs 20,000 random cycles against an independent reference model,
    comparing `Y`, the enables and `FULL` every cycle.
  * It then runs a small microprogram from a behavioural memory through a
    pipeline register. A subroutine is called 4 times from an `RPCT` loop with
    R = 3, then a `PUSH`/`RFCT` loop with R = 2 runs 3 passes. The program must
    reach its final address at cycle 24.
  * It fails if any mechanism never occurred: each conditional instruction
    passing and failing, loop exits at R = 0, full-stack overwrite, pop from
    empty, the `RLD` override, `CIN` low, Y released, and each of the three
    enables.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/am2910_pkg.sv tb/am2910_tb.sv \
          --top-module am2910_tb --Mdir obj_am2910
./obj_am2910/Vam2910_tb
```

Replace `am2910_tb` with any other testbench name. Each testbench finishes
in well under a second. The Y pins are three-state. Verilator resolves the
testbench's external driver against the sequencer's released outputs, so the
release check works even without x/z values.
