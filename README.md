# Semi-serial IMPLY memristive adder

An n-bit adder that computes inside a memristor array with *stateful logic*:
every bit of data is the resistance of one memristor (low resistance R_on = 1,
high resistance R_off = 0), and computation is done by two in-place operations
applied with voltage pulses:

* **FALSE(m)**: reset memristor m to 0.
* **IMPLY p → q**: on a shared line, the target q becomes `~p | q`; the
  conditioning memristor p keeps its value.

Serial IMPLY adders put every memristor on one line and need 22n to 29n
pulses. Parallel ones give each bit its own line and work memristors, which
is faster but costs memristors and switches that grow with n. The
*semi-serial* topology sits between them. The a operand sits on one line
(section 1) and the b operand on a second line (section 2). Six work
memristors, c, c_in and w1..w4, form a third section. Any of the six can be
switched onto either line, or onto neither. Because the two lines are
separate, two IMPLY/FALSE operations can run in the same step, one per line.
The bits are still processed one after another, least significant first.

| quantity | semi-serial | at n = 32 |
|---|---|---|
| memristors | 2n + 6 (a, b, c_in, and c, w1..w4) | 70 |
| steps per addition | 10n + 2 | 322 |
| section switches | 12, independent of n | 12 |

The sum overwrites a, the carry-out ends up in c_in, and b is overwritten
with `a | b`.

This repository models the adder at the logic level in synthesizable
SystemVerilog: a step sequencer, the step table, the driver/switch decode,
and the memristor array as nonvolatile bits that follow the IMPLY/FALSE rules.

## How one bit is computed

Let a, b be the operand bits of bit i and k the carry into it. The carry is
always held **inverted**, in work memristor c: c = ~k. In the table, each
step lists the operation on each line and the value it leaves. Operations in
the same row happen at the same time and read the values from before the
step.

| step | section 1 (line of a) | section 2 (line of b) |
|---|---|---|
| 1 | FALSE w1, w2 (first bit: also FALSE c) | FALSE w3, w4 |
| CINV (first bit only) | c_in → c: c = ~c_in | — |
| 2 | a → w1: w1 = ~a | b → w3: w3 = ~b |
| 3 | a → w3: w3 = ~(a&b) | w1 → b: b = a\|b |
| 4 | c → w2: w2 = k | w3 → w4: w4 = a&b |
| 5 | FALSE a, w1 | b → w4: w4 = ~(a^b) |
| 6 | w3 → w2: w2 = a&b \| k | w4 → c: c = (a^b) \| ~k |
| 7 | c → a: a = ~(a^b) & k | w2 → w1: w1 = ~(a&b \| k) |
| 8 | FALSE c_in, c, w3 | b → w2: w2 = ~(a\|b) \| a&b \| k |
| 9 | w1 → w3: w3 = a&b \| k | b → c: c = ~(a\|b) |
| 10 | w2 → a: **a = a ^ b ^ k** | w3 → c: **c = ~carry_out** |
| COUT (last bit only) | c → c_in: **c_in = carry_out** | — |

Why step 10 yields the sum: w2 before step 10 is `~(a|b) | a&b | k`. Its
complement is `(a^b) & ~k`, which is ORed into `a = ~(a^b) & k`. The result
is `a^b^k`. On line 2, `~w3 | c = ~(a&b | k) | ~(a|b)` equals the complement
of `a&b | k&(a|b)`. That is the inverted carry-out, already in c and in the
form the next bit expects. So no carry has to move between bits, and the
only inversions are the two extra steps: one turns the stored carry-in into
c, the other turns the final c into the carry-out. That gives 10 steps per
bit plus 2.

Physical rules that every step of the table respects. Assertions in
`crossbar_driver` and `memristor_array` check them during simulation:

* a_i is only ever addressed on line 1 and b_i only on line 2.
* No work memristor is named in both sections of a step. Such a memristor
  would close both of its switches and join the lines.
* No line combines a FALSE with an IMPLY in the same step.

Two readings of the step table that are easy to get wrong:

* **The `c` reset in step 1 happens only in the first bit.** c carries the
  inverted carry from bit to bit, so resetting it at every bit start would
  lose the carry. In the first bit it is cleared so that `c_in → c` can
  invert the carry-in into it.
* **c_in is reset in step 8 of every bit.** The published step table lists
  it in step 8 without restricting it to the last bit. This is harmless: c_in is read only by the
  first bit's inversion step, and the final `c → c_in` needs it to be 0.
  Putting the reset in step 8 keeps the count at 10n + 2. A separate reset
  step after step 10 would work too, but would cost one step.

## Hardware organisation

```
semi_serial_adder            top: wires the four parts, N = 32 by default
├── adder_controller         step sequencer: bit counter, step counter, start/busy/done
├── imply_microcode          the table above: (step, first_bit) -> ops of section 1 and 2
├── crossbar_driver          ops + bit index -> level of every driver, 12 switch states
└── memristor_array          2N+6 nonvolatile bits
    ├── imply_line (line 1)  a_0..a_{N-1} + work memristors switched to line 1
    └── imply_line (line 2)  b_0..b_{N-1} + work memristors switched to line 2
semi_serial_pkg              shared types: mem_e, drive_e, sec_op_t, step_op_t, step_e
```

* **Drivers.** Each memristor has its own voltage driver. `drive_e` encodes
  which level a driver applies in a step: `DRV_COND` for the conditioning
  memristor p, `DRV_SET` for the target q, `DRV_RESET` for FALSE, and
  `DRV_NONE` when the driver is idle. Only a_i and b_i of the current bit
  are ever driven.
* **Switches.** Each work memristor has two switches, `sw1[k]` to line 1 and
  `sw2[k]` to line 2. Six work memristors times two gives the constant 12
  switches. The index order is c, c_in, w1, w2, w3, w4 (`WK_*` in the
  package). The step table never puts c_in on line 2 or w4 on line 1, but
  the switches exist.
* **Line model (`imply_line`).** The model applies these rules to a
  memristor connected to the line:
  * `DRV_RESET` sets it to 0.
  * `DRV_SET` sets it to `q | ~p`, where p is the memristor driven with
    `DRV_COND`.
  * Any other drive leaves it unchanged.

  Memristors not connected to the line keep their state, whatever their
  driver does. The adder never uses two cases, so this model settles them
  by its own choice:
  * With several conditioning memristors, q is set only if all of them are
    0.
  * `DRV_SET` with no conditioning memristor on the line sets q to 1.

## Interface and timing (`semi_serial_adder`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | one algorithm step per rising edge |
| rst_n | in | 1 | synchronous active-low reset of the sequencer (memristor state is not reset) |
| load | in | 1 | writes a_in, b_in, cin_in into a, b, c_in (ignored while busy) |
| a_in, b_in | in | N | operands |
| cin_in | in | 1 | carry-in |
| start | in | 1 | one-cycle pulse starts an addition (ignored while busy) |
| busy | out | 1 | high for exactly 10N+2 cycles, one step each |
| done | out | 1 | one-cycle pulse after the last step |
| sum | out | N | the a memristors: the sum once done has pulsed |
| cout | out | 1 | the c_in memristor: the carry-out once done has pulsed |
| b_mem | out | N | the b memristors (a \| b after an addition) |
| work | out | 6 | c, c_in, w1..w4 |
| step_valid, step, bit_idx | out | 1, 4, clog2(N) | the step applied in this cycle |

Sequence: `load` for one cycle, then `start` for one cycle. `busy` rises at
the next edge. For bit 0 the steps run 1, CINV, 2 … 10. For bits 1 … N−1
they run 1 … 10. The addition ends with COUT. `done` pulses in the cycle
after COUT, and `sum`/`cout` are valid from then on. A new addition needs a
new `load`, because the operands have been overwritten.

## Where this model stops

* **It is a logic-level model.** The memristors are analog devices. The
  reference simulations use a VTEAM-model tungsten chalcogenide ReRAM with
  V_SET = 1 V, V_COND = 900 mV, V_RESET = −5 V, R_G = 40 kΩ and 30 µs
  pulses. Here each memristor is an ideal bit, and each pulse is one clock
  cycle. Device drift, parasitics, variation and energy (about 9.87n + 1.33
  nJ per addition in those simulations) are not modelled.
  `memristor_array` and `imply_line` are behavioural models of that analog
  part. They happen to synthesize, but they do not describe a circuit that
  should be built from flip-flops.
* **The periphery is this design's own choice.** That covers the
  start/busy/done handshake, the single-cycle parallel `load` port, the
  synchronous reset, and one step per clock. A real array would write its
  operands with ordinary SET/RESET pulses, and it would derive pulse widths
  from a slower timer.
* **Unselected memristors.** The a_j and b_j of bits that are not being
  processed stay connected to their line but are not driven. The model
  assumes they are not disturbed.

## Using and changing it

All files are plain SystemVerilog-2017. The package must be compiled first.
Lint:

```
verilator --lint-only -Wall -Irtl rtl/semi_serial_pkg.sv rtl/semi_serial_adder.sv
```

Simulate a testbench (sources under `rtl/` and `tb/` are found through `-I`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/semi_serial_pkg.sv \
    tb/semi_serial_adder_tb.sv --top semi_serial_adder_tb -Mdir obj
./obj/Vsemi_serial_adder_tb
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own, with a watchdog. What each one checks:

| testbench | checks |
|---|---|
| `semi_serial_adder_tb` | At the default N = 32: corner cases and 300 random additions. Sum, carry-out, b = a\|b, and exactly 322 busy cycles each. It also counts that each mechanism occurs: first- and last-bit inversions, dual-section steps, carries between bits, carry-out, and every switch the table uses. |
| `adder_workloads_tb` | A 1-bit adder over all 8 inputs (12 steps each) and a 4-bit adder over all 512 inputs (42 steps each), including the operands 1011 + 0100 and 1001 + 1100. |
| `adder_controller_tb` | The exact step/bit order for N = 4 and the done pulse; start is ignored while busy; 322 cycles at N = 32. |
| `imply_microcode_tb` | Runs the step table through an independent IMPLY/FALSE interpreter for all (a, b, carry) and for the first, middle and last bit. Also checks the section rules. |
| `crossbar_driver_tb` | The driver levels and 12 switch states of every step, against a hand-written table. |
| `imply_line_tb` | The IMPLY truth table, plus random FALSE/IMPLY/connection patterns. |
| `memristor_array_tb` | 3000 random legal steps against a reference copy of all 2N+6 bits. |

To change the width, set `N` on `semi_serial_adder` (any N ≥ 1). To change
the algorithm, edit `imply_microcode`. The driver and array follow
automatically, and the assertions catch a step that addresses an operand on
the wrong line or joins the two lines.
