# Fast carry binary adder: a self-timed dual-rail adder

A clocked adder must allow every addition the time of the worst case, a carry
rippling from the least to the most significant bit. Random operands almost
never do that: in a 49-bit addition the longest carry is about six bits long
on average. This adder has no clock. It signals that it is finished
(`add_end`) as soon as the carries of the operands in front of it have
settled. That makes the average add time, not the worst case, the one that
counts.

Three ideas make this work:

* **Double-rail signals.** Every operand bit, carry and sum bit travels on
  two wires, one raised for a 1 and one raised for a 0. Both wires low means
  "no value yet". Because a bit without a value can be told apart from a bit
  that holds one, completion can be detected.
* **A fast carry line.** Each bit passes a carry through one series switch
  (a carry gate) instead of a chain of logic. Equal operand bits put their
  own value on the line at once. Unequal bits close the gate and pass the
  incoming carry on.
* **A completion AND with noise rejection.** Each bit reports "done" only
  when exactly one of its sum rails is high. A long AND of all bits gives
  `add_end`. A stray signal that raises both rails of a bit holds `add_end`
  low until the signal goes away. A part that has failed holds it low for
  good, so the fault shows instead of a wrong result.

The RTL here models the logic of the original transistor circuit. It is
written as combinational SystemVerilog with no delays, so it reproduces which
signal waits for which, but not the nanosecond timing of the circuit.

## One bit

```
          a, b (dual rail)
               |
      +--------v---------+   u = A.B      (insert a 1 carry)
      | operand compare  |   v = A'.B'    (insert a 0 carry)
      | (fca_operand_    |   w = A == B   (enable "equal" sum gates)
      |  compare)        |   z = A != B   (enable "unequal" sum gates,
      +--+----+----+-----+                 close carry gates / gate amplifier)
         |    |    |
 cin ----+-> carry station --> cout       sampling point -> gate -> insertion point
         |   (fca_carry_gate, or fca_carry_amp in every tenth bit)
         |        | csample (= cin)
         +-> sum gates (fca_sum_gates) --> s (dual rail)
                  |
             sum compare (fca_sum_compare) --> done = s.one ^ s.zero
```

Operand comparison: four two-input ANDs form A.B, A'.B', A.B' and A'.B. Two
ORs combine them into "equal" (`w`) and "unequal" (`z`). The original circuit
also has level shifters, inverters and gate drivers here. They only set
voltage and current levels, and the RTL replaces them with wires. So the
carry-gate drives `x` and `y` are both equal to `z`. While either operand is
absent, every output is low. The rest of the bit then stays dark, whatever
the carry line carries.

Carry station, per rail (one line for 1-carries, one for 0-carries):

```
cout.one  = u | (x & cin.one)
cout.zero = v | (y & cin.zero)
```

These equations are the full-adder truth table in a different form. When the
operands are equal, the carry out equals the operands and does not depend on
the carry in. When they differ, the carry out equals the carry in.

Sum gates: with equal operands the sum equals the incoming carry. With
unequal operands it is the complement of the incoming carry.

```
s.one  = (w & c.one)  | (z & c.zero)
s.zero = (w & c.zero) | (z & c.one)
```

A sum rail rises only when the later of "carry present" and "comparison
done" arrives. It falls when either goes away.

## The carry line and its amplifiers

In the transistor circuit the carry gates are saturated switches in series.
Each one drops some voltage, so after nine gates the level has to be
restored. In bit i (counting from 0), where (i+1) is a multiple of
`AMP_SPACING_P` (10), a gated amplifier replaces the carry gate. In the
49-bit adder these are bits 9, 19, 29 and 39. The amplifier is gated by the
same "unequal" signal as a carry gate, and the bit's generated carry is
inserted at its output. So in logic it does the same job as a carry gate
(`fca_carry_amp`); only the gate input is `z` rather than `x`/`y`. Level
restoration has no logic function and is not modelled. The parameter is kept
so that amplifier positions can be followed or moved.

Timing in the original circuit, for reference (not modelled by the RTL):

| path                                         | delay     |
|----------------------------------------------|-----------|
| operands to generated carry / sum-gate enable | 12-13 ns |
| sum gate + sum inverter                       | about 5 ns |
| setting a carry gate                          | 20-25 ns |
| nine carry gates                              | about 10 ns |
| one amplifier                                 | about 5 ns |
| 49-bit add: minimum / average / maximum       | 15 / 26 / 95 ns |

In those figures the average is set by the longest carry, about log2(5N/4)
bits (5.93 for N = 49). The testbenches measure this length over their random
operands: 6.00 bits at 49 bits and 5.7 bits at 40 bits.

### Watching the self-timing

`tb/fca_adder_timed.sv` is a simulation-only timing model. It builds the
49-bit adder from the same RTL pieces and puts the delays above on their
outputs:

* 12.5 ns from the operands to a generated carry and to the sum-gate enables;
* 20 ns to close a carry gate;
* 10/9 ns per carry gate;
* 5 ns per amplifier;
* 5 ns for the sum.

A carry that equal operands put on the line leaves the bit without passing
the gate. The sum gates sample the carry before the gate.

`tb_fca_adder_timing` follows the original speed estimate. The carry in and
the first operand are present beforehand, and the second operand enters all
bits at once. For each addition the test checks the simulated time to
`add_end` against the time computed bit by bit from the same delays. Results:

| case | add time |
|------|----------|
| all bits equal (every bit generates) | 17.5 ns |
| all bits unequal (carry crosses 49 bits) | 92.8 ns to the last sum (carry out at 88.9 ns) |
| 1000 random additions | average 31.6 ns, range 26.1-44.4 ns |

The original estimates are 15 ns, 95 ns and 26 ns. The 95 ns counts the last
bit's gate and sum inverter in full. The 15 ns minimum is smaller than the
12.5 ns + 5 ns of the measured pieces. The model uses the pieces.

## Using the adder: the return-to-zero protocol

`fca_adder` (top) ports, all dual-rail (`fca_pkg::dr_t`, fields `.one` and
`.zero`):

| port      | dir | width    | meaning                                       |
|-----------|-----|----------|-----------------------------------------------|
| `a`, `b`  | in  | N x dr_t | operands                                      |
| `cin`     | in  | dr_t     | carry into bit 0                              |
| `s`       | out | N x dr_t | sum                                           |
| `cout`    | out | dr_t     | carry out of bit N-1                          |
| `add_end` | out | 1        | every sum bit holds a value (and, optionally, `cout`) |

One addition:

1. Start with every rail of `a` and `b` low. `add_end` is low.
2. Present `cin` and both operands, in any order. The carry into bit 0 may
   come before or after the operands. A bit simply waits for whatever it is
   missing. Before the carry in arrives, every bit above an equal-operand bit
   already has its sum. Only the run of unequal bits at the bottom waits.
3. Wait for `add_end`, then read `s` (and `cout`).
4. Withdraw an operand (all its rails low). Every sum goes back to "no value"
   and `add_end` falls. The adder is then ready for the next addition.

There is no clock and no reset. A synchronous host would synchronise
`add_end` before using it. That host is not part of this design.

Parameters of `fca_adder`:

| parameter              | default | meaning |
|------------------------|---------|---------|
| `N`                    | 49 | width. The same module serves as the 9-bit arithmetic adder, the 15-bit address adder and the 4-bit address modifier of the original machine. |
| `AMP_SPACING_P`        | 10 | an amplifier in every tenth bit |
| `CARRY_OUT_IN_ADD_END` | 0  | 1: `cout` is checked by its own sum comparison and becomes an extra input of the ADD END gate, for when the carry out must be saved |

## Files

| file | contents |
|------|----------|
| `rtl/fca_pkg.sv` | `dr_t` dual-rail type, `dr_encode`, `dr_valid`, widths |
| `rtl/fca_operand_compare.sv` | operand comparison |
| `rtl/fca_carry_gate.sv` | carry line station of a normal bit |
| `rtl/fca_carry_amp.sv` | gated carry amplifier of every tenth bit |
| `rtl/fca_sum_gates.sv` | sum gates |
| `rtl/fca_sum_compare.sv` | per-bit "exactly one rail" detector |
| `rtl/fca_bit.sv` | one bit (`AMP` selects the carry station) |
| `rtl/fca_add_end.sv` | long AND producing `add_end` |
| `rtl/fca_adder.sv` | the N-bit adder (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fca_adder_driver.sv` | reusable stimulus and checker for the adder |
| `tb/tb_fca_adder_widths.sv` | the adder at 4, 9, 15, 20, 40 and 68 bits |
| `tb/fca_adder_timed.sv` | simulation-only delay model built from the RTL pieces |
| `tb/tb_fca_adder_timing.sv` | add-time measurements on the delay model |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. The module testbenches are exhaustive over their dual-rail inputs,
including absent values and, where it matters, both rails high.

`tb_fca_adder` runs the 49-bit adder at its default parameters: directed
cases, then 2000 random additions. The directed cases are a carry across all
49 bits in both directions, all bits equal, and alternating patterns. In each
addition the test:

* checks every sum bit and the carry out against integer addition;
* checks that before the carry in arrives, exactly the bits above an
  equal-operand bit already have their sums;
* checks `add_end` at every step;
* raises both rails of a random operand bit, checks that `add_end` drops, and
  checks that it recovers when the rail is cleared;
* withdraws an operand and checks that all sums return to "no value".

It counts how often each mechanism occurred: carry generation, propagation
through a gate, through an amplifier, a carry across the whole adder, carry
in arriving first and last, return to "no value", and noise rejection. A
mechanism that never occurred counts as a failure. An assertion checks that
`add_end` never rises while an input bit is absent or invalid. The test also checks the
average longest carry against log2(5N/4) to within half a bit.

`tb_fca_adder_widths` runs the same checks with `CARRY_OUT_IN_ADD_END = 1` at
4 bits (exhaustively), 9, 15, 20, 40 and 68 bits.

Simulating with Verilator, for example the full adder test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/fca_pkg.sv tb/tb_fca_adder.sv --top-module tb_fca_adder
./obj_dir/Vtb_fca_adder
```

Replace the testbench name for any other test. Verilator finds the other
modules through `-I`, by file name. `--timescale` is needed by the timing
test, whose files declare their time unit while the RTL does not. Each run
takes well under a second.

## How far the model goes, and where it departs from the original

* **Logic, not timing.** The original circuit's behaviour depends on
  transistor delays. Here every path has zero delay. What the RTL and its
  tests reproduce is the ordering: which outputs exist before the carry in
  arrives, that nothing appears until both operands are present, and that
  ADD END waits for the last bit and rejects a double-rail conflict. The add
  times in the table above come from measurements of the original circuit,
  not from the RTL. The simulation-only delay model reproduces them
  approximately.
* **Circuit-only blocks are wires.** Level shifters, inverters, gate drivers,
  sampling amplifiers, carry generators and sum inverters only set voltages,
  currents and polarities. They appear in the RTL as plain connections, and
  the amplifier's level restoration is not modelled.
* **Choices made here:**
  * The rail encoding: both low means no value, both high means invalid.
  * The amplifier positions: (i+1) mod 10 = 0. This gives four groups of
    nine gates plus an amplifier, then nine gates, which is how the 49-bit
    worst case is made up.
  * The carry-out option of ADD END is off by default.
  * ADD END is a separate AND module. In the original circuit the per-bit
    comparators share a single wired output.
* **Not included:** the register flip-flops that share a circuit card with an
  adder bit (the source describes neither their function nor their wiring),
  the card packaging, and the surrounding machine that moves operands in and
  results out.
