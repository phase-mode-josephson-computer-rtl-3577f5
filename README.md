# A fluxoid processor: 6-bit self-timed computer in pulse-level SystemVerilog

In a phase-mode superconducting computer, a bit is not a voltage level. It
is a single quantum of magnetic flux (a *fluxoid*) that travels along
Josephson transmission lines. A fluxoid can also be parked in a
superconducting loop. There it waits as long as needed until another fluxoid
arrives. Every logic function is an interaction between fluxoids. Nothing is
clocked: each step of the machine is started by the fluxoid that ended the
step before.

This RTL models a complete stored-program processor of that kind: a
6-bit word, an 8-word (48-bit) memory and seven instructions. It is built
almost entirely from one primitive, the *ICF gate* (INHIBIT circuit
controlled by fluxoids). The model is pulse-accurate and structural. Each
fluxoid is a one-cycle pulse on a wire, and each gate a small state machine.
The modules are wired the way the superconducting circuit is wired, so the
machine's self-timed sequencing emerges from the gates and is not
programmed into a controller. It follows a published proposal for a
phase-mode Josephson computer. Where that proposal leaves details open,
choices were made; they are listed below.

## The pulse model

* A fluxoid is a `1` on a wire for exactly one `clk` cycle. No pulse means
  no fluxoid. A data word is six wires D1..D6 (D1 = bit 0), and a `1` bit is
  a fluxoid on its wire.
* One `clk` cycle is the time a fluxoid takes to pass one gate. Every gate
  output is registered. `clk` is therefore only the model's time grain. The
  machine has no clock of its own.
* A **bus word** (`pm_pkg::word_t`) is the six data lines plus a control
  line. The control line carries the single *control fluxoid* that travels
  with the data. A word of value 0 is a control fluxoid alone.
* A fan-out branch is a wire driving several inputs. A fan-in (merge) branch
  is an OR of pulses. Neither is a module.
* `rst_n` empties every loop. The real circuit has no reset: it starts
  empty.

## The ICF gate (`icf_gate`)

The gate has inputs X, Y and Re, and outputs A, B and C. A fluxoid on **Y**
is trapped in the gate's loop. A fluxoid on **X** leaves on **A** if the
loop is empty. If the loop holds a fluxoid, the two leave together on **B**,
which empties the loop. So, for fluxoids arriving together:

| X | Y | A | B |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 0 | 1 | 0 | 0 |
| 1 | 0 | 1 | 0 |
| 1 | 1 | 0 | 1 |

A is X AND NOT Y (inhibit) and B is X AND Y. A fluxoid on **Re** removes a
trapped fluxoid. In the plain variant it is dissipated in a resistor. With
`HAS_C=1` it is pulled out onto **C**. Used alone to steer one control
fluxoid, the gate is the *type-II terminal*.

Two things make this a memory element and not just logic. The trapped
fluxoid stays until something takes it. And a gate whose B output is not
taken leaves a *residual* fluxoid behind. Much of the design is about
clearing residual fluxoids at the right moment:

* the control fluxoid of a transfer clears those left in a terminal;
* the end-of-operation fluxoid clears those left in the decoder;
* STOP clears the one in the counter.

Same-cycle rules in this model:

* Y and X together give B.
* X is served before Re.
* Re also removes a Y arriving in the same cycle.
* A second Y into a full loop is lost.

## The bus and the terminals

Words travel on one bus from right to left. They enter on the right from
the adder, the inverter and the input, pass through the memory, then through
three type-I terminals, and end at the control unit.

A **type-I terminal** (`terminal_i`) is seven ICF gates, one per data line
plus one on the control line. An arming fluxoid (`set`) traps a fluxoid in
all seven. The next word is then turned **down** into a unit: each data
fluxoid leaves its gate on B. Its control fluxoid is turned **up** and
clears the gates left armed by 0 bits. An unarmed terminal lets the word
pass on. The up-going control fluxoid (`ctrl_up`) signals that the transfer
is complete.

## Instruction set

An instruction is `b1 b2 b3 . X Y Z`: b1 is on D6 and Z on D1. Word
`XYZ+1` is addressed, so address field 000 is word 1.

| code  | meaning |
|-------|---------|
| 000   | memory word to the output register |
| 100   | memory word into the adder (put it there if empty, else add) |
| 010   | memory word into the adder with end-around carry (subtract) |
| 110   | memory word into the inverter |
| 001   | adder contents to memory (adder is emptied) |
| 101   | inverter contents to memory (inverter is emptied) |
| 111 000 | stop |

Subtraction is 1's complement. The operand must already be inverted in
memory. A program computes A − B as: invert B, store it, add A, then
subtract using the stored ~B (see `tb/tb_phase_mode_processor.sv`).

## The instruction cycle (the self-timed part)

This is the part to understand first; the rest follows from it.

1. `start` (S) makes the program counter emit **R1** and keep a fluxoid
   trapped at its first gate.
2. R1 reads word 1. The memory puts the word on the bus and uses the R
   fluxoid as its control fluxoid. No terminal is armed, so the word reaches
   the **control unit**.
3. The control unit traps the instruction bits in two trees of ICF gates
   and splits the control fluxoid in two.
   * One copy runs through the 3-level *operation tree* to one of 8
     OPERATION lines.
   * The other runs through the 4-level *address tree*, steered first by
     b3, to one of R1..R8 (b3 = 0, read-type) or W1..W8 (b3 = 1,
     write-type). b3 is the only opcode bit that separates the read-type
     codes from the write-type ones.
4. **Read-type instructions** (000, 100, 010, 110):
   * The OPERATION fluxoid arms the type-I terminal of the target unit. For
     010 it also traps the subtraction fluxoid in the adder.
   * The R fluxoid reads the operand. The armed terminal turns the word down
     into the unit and sends its control fluxoid up.
5. **Write-type instructions** (001, 101):
   * The OPERATION fluxoid arms a type-II gate.
   * The W fluxoid arms the target memory word, clears it and leaves the
     memory.
   * It then walks the chain of three type-II gates: adder, inverter, stop.
     The armed gate turns it into the read-out fluxoid of the adder or
     inverter.
   * That unit's word travels back along the bus into the memory and is
     stored in the armed word. The word's control fluxoid leaves the memory
     as `wr_done`.
6. The up-going fluxoid of step 4, or `wr_done` of step 5, is the
   **end-of-operation** fluxoid. It clears the residual fluxoids in the
   control unit and advances the program counter. The counter hands its
   trapped fluxoid to the next gate and emits the next R line, and the cycle
   repeats.
7. **Stop** (111 000):
   * The OPERATION fluxoid arms the third type-II gate.
   * The address tree decodes the code as W1. The W1 fluxoid walks the
     chain to that third gate and enters the counter's STOP input, which
     clears its trapped fluxoid.
   * Side effect: W1 also clears memory word 1 and leaves it armed. The
     next word that passes word 1 on the bus would be captured there.
     Reloading word 1 first, as the testbench does, clears this.

No step waits for a fixed time. Each waits only for the fluxoid that
announces the previous step is done. The one timing requirement is the one
the hardware has too: an arming fluxoid must reach its gate no later than
the fluxoid it steers. In this model, the operation tree (3 levels) is
faster than the address tree (4 levels) plus the memory. Either way, it
settles long before a later instruction is fetched.

## Units

* **Program counter** (`program_counter`) is a chain of 7 ICF gates with
  one trapped fluxoid. A count fluxoid enters at the far end and runs
  through the empty gates to the trapped one. It leaves there on B and is
  split: one copy becomes the next R line, the other is trapped in the next
  gate. A count after R8, or after STOP, is lost, and the machine halts.
* **Control unit** (`control_unit`, with `decoder_tree`) is two decoder
  trees of 7 and 15 gates. The end-of-operation fluxoid resets them.
* **Memory** (`memory`) has 8 words of 6 cells. Each cell is two ICF gates:
  * the lower gate stores the bit;
  * the upper gate steers an incoming bit into the lower gate when the word
    is armed.
  Each word also has a control gate on the bus's control line. A read takes
  the stored fluxoid out and traps a copy of it again, so reads do not
  destroy the word. The bus crosses one word column per cycle, going from
  word 8 towards word 1.
* **Inverter** (`inverter`) has six gates, with the data on Y. The read-out
  fluxoid on X leaves on A wherever nothing is trapped, so the output is the
  complement. The gates are empty afterwards.
* **Adder** (`adder`) has six stages, each one ICF gate (C variant)
  storing one bit. An arriving fluxoid enters on X. In an empty stage it
  leaves on A, which is looped back into Y, so it is stored. In a full stage
  it leaves with the stored one on B as a carry to the next stage.
  * The top carry goes to an ICF gate. It leaves as `overflow`, or, when a
    subtraction fluxoid is trapped, back into stage 1 (end-around carry).
  * Read-out is destructive and also clears an unused subtraction fluxoid.
  * A word settles within 14 cycles. A data bit and a carry must not reach
    a stage in the same cycle (an assertion checks this); in the processor
    they never do, since words reach the adder an instruction apart.
* **Output register** (`output_register`) is cleared by the 000 OPERATION
  fluxoid. The data fluxoids set its bits, and the control fluxoid marks it
  `valid`.

## Top-level ports (`phase_mode_processor`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | model time grain; reset empties all loops |
| `start` | in | S pulse |
| `ext_w[7:0]` | in | manual W pulse per word (bit k-1 = word k), for loading |
| `ext_word` | in | `word_t` from the input unit; enters the bus at the right |
| `out_value[5:0]`, `out_valid` | out | output register and its completion pulse |
| `overflow` | out | overflow pulse from the adder |
| `stopped` | out | pulse when STOP reaches the counter |

To load word k, pulse `ext_w[k-1]`, then present `{ctrl:1, d:value}` on
`ext_word` for one cycle a cycle or more later. Allow about 12 cycles per
word. Then pulse `start`.

## What follows the proposal and what does not

From the proposal:

* the ICF gate and its truth table;
* the structure of the type-I terminal, decoder, counter, memory cell,
  inverter and adder;
* the bus order (memory, three type-I terminals, control unit);
* the instruction set and its codes;
* the read, write and stop sequences;
* the 6-bit word and the 8-word memory.

Choices of this design:

* **Timing.** One cycle per gate, with registered outputs, and a cycle-level
  time grain.
* **Bit placement.** Which data line steers which decoder level. b3 chooses
  R or W. Address field 000 selects word 1.
* **Unit placement.** The adder's terminal is next to the memory, then the
  inverter's, then the output's. The type-II chain order is adder,
  inverter, stop.
* **Adder stages.** The A-to-Y loop that makes a stage store an arriving
  fluxoid is this design's reading of how a single ICF gate both stores an
  augend and passes a carry.
* **Subtraction.** The end-around-carry wiring of the subtraction gate is
  the standard 1's complement arrangement. The operand is inverted by the
  program.
* **Read-out.** Adder read-out is destructive and clears the subtraction
  fluxoid.
* **Output register.** Its construction is this design's own.
* **Stop side effect.** The stop code also clears word 1 (see step 7).
* **Not built.** The proposal draws two extra gates next to adder stages 1
  and 2 without describing them; they are not built.

Not modelled at all: the analog parts (transmission lines and their
velocity, fan-out and merge branches, line crossings, bias supply), and the
input unit. The input unit is a manual source; its signals are ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against arithmetic or reference behaviour worked out independently,
and ends by printing `TB_RESULT checks=N failures=M`.

* **ICF gate:** the truth table, Re and C, and random streams against a
  loop model.
* **Terminal I:** steering and pass-through; residual clearing, shown by
  words sent after a transfer.
* **Control unit:** all 64 codes; OPERATION lines 3 cycles and R/W lines
  4 cycles after the word arrives; the reset.
* **Program counter:** the R sequence, and a delay of NWORDS−k cycles for
  the count from line k; STOP, and running off the end.
* **Memory:** random reads, writes and pass-throughs against an array; read
  delay k; non-destructive reads; no leakage from writes.
* **Inverter and output register.**
* **Adder:** random put, accumulate and subtract against 6-bit arithmetic;
  overflow and end-around counts; settling within 14 cycles; read-out.
* **Whole processor** (`tb_phase_mode_processor`), at the default size:
  * programs that add, store, output and stop (with and without overflow);
  * programs that subtract through the inverter, followed by a restarted
    program that outputs the difference.
  The testbench checks each result and the number of instructions executed.
  It also counts every instruction type, overflow, end-around carry,
  subtraction without carry, each terminal steering, and a restart, and
  fails if any of these never happens.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_phase_mode_processor rtl/pm_pkg.sv tb/tb_phase_mode_processor.sv
./obj_dir/Vtb_phase_mode_processor
```

Use the same command with another `tb_<module>` to run that module's
testbench. Every testbench finishes in well under a second.

## Files

* `rtl/pm_pkg.sv`: word type, sizes, opcodes.
* `rtl/icf_gate.sv`: the primitive.
* `rtl/terminal_i.sv`, `rtl/decoder_tree.sv`, `rtl/control_unit.sv`,
  `rtl/program_counter.sv`, `rtl/memory.sv`, `rtl/inverter.sv`,
  `rtl/adder.sv`, `rtl/output_register.sv`: the units.
* `rtl/phase_mode_processor.sv`: the top level.
* `tb/tb_*.sv`: one testbench per module.
