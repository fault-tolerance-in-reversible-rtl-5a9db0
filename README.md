# Fault masking in reversible logic: TMR with reversible majority voters

Reversible circuits are built only from gates that are bijections: every
output pattern comes from exactly one input pattern. Nothing is erased, which
is why reversible logic promises very low dissipation. The gates are still
physical, though, and can fail. This design masks such failures with
*passive hardware redundancy*. Each circuit is built three times (triple
modular redundancy, TMR), and a majority voter picks the value that at least
two copies agree on. No fault detection, location or reconfiguration is
involved: a wrong copy is simply outvoted.

The voter has to be reversible too. That means three lines in, three lines
out, with one line chosen to carry the majority and the others left as
*garbage*. Two such voters are the core of the design:

| voter | gates | gate count | garbage outputs | constant inputs | quantum cost |
|---|---|---|---|---|---|
| `mvc_two_gate` | negative CNOT, Fredkin | 2 | 2 | 0 | 8 |
| `mvc_three_gate` | Toffoli, negative CNOT, Fredkin | 3 | 2 | 0 | 13 |

The voters are used in two TMR arrangements: a small 3x3 example circuit
(`tmr_example`) and a fault tolerant reversible full adder (`ft_full_adder`).
The top, `ft_rev_top`, places the two side by side.

Everything here is combinational. There is no clock, no reset and no state.
Every output follows the inputs after the gate delays of the cascade.

## Reversible gates and line bundles

Every circuit is a cascade of gates acting on a bundle of lines. In the RTL a
bundle is a packed vector, with bit 0 the top line of the drawn circuit
(line `a`).

* `rev_toffoli` is the multiple-control Toffoli gate. It inverts the target
  line when every control point is satisfied. A positive control needs its
  line at 1 and a negative control needs it at 0. The gate's parameters are
  `CTRL_MASK` (which lines are controls), `CTRL_POL` (their polarity, 1 =
  positive) and `TGT` (the target line). With no controls it is the NOT gate.
  With one control it is the CNOT (Feynman) gate, and with two the 3-bit
  Toffoli gate.
* `rev_fredkin` is the multiple-control Fredkin gate. It swaps its two target
  lines `T0` and `T1` under the same kind of control. With no controls it is
  the SWAP gate.

Both gates are their own inverse.

### Fault injection

Both gate models take a `gate_fault_t` (from `rev_pkg`), so the standard fault
models of reversible logic can be switched on inside a live circuit:

| field | fault model | effect |
|---|---|---|
| `missing` | single gate fault / single missing gate fault | the gate passes its inputs unchanged |
| `missing` on several gates | multiple missing gate fault | |
| `repeated` | repeated gate fault | the gate is applied twice, which for these self-inverse gates equals a missing gate |
| `ctrl_drop[i]` | disappearance crosspoint fault / partial missing gate fault | the control point on line *i* is gone |
| `ctrl_add[i]` | appearance crosspoint fault | a positive control point appears on line *i* |

A single bit fault is one line flipped. It is injected by the circuits, not
by the gates. Each circuit has an `out_flip` field for its output lines, and
each voter has a `stage_flip` field for the line between its two stages. An
all-zero fault value (`NO_FAULT`, `VOTER_NO_FAULT`, `EXAMPLE_NO_FAULT`,
`ADDER_NO_FAULT`) gives the fault-free hardware.

For synthesis, tie every fault port to zero. The fault logic then folds away.
With every fault switch off, an assertion in each voter checks that line `a`
carries the majority.

## How the voters find the majority

The key observation: if `b == c`, those two lines already form a majority,
so the answer is `c`. If `b != c`, line `a` breaks the tie, so the answer
is `a`.

**`mvc_two_gate`** turns that observation into two gates:

1. A negative-controlled CNOT with control `c` and target `b`. It computes
   `b1 = b XOR NOT c`, which is 1 exactly when `b == c`.
2. A positive Fredkin gate with control `b1` and targets `a` and `c`. When
   `b == c` it moves `c` onto line `a`. Otherwise `a` stays.

Line `a` leaves with `maj(a, b, c)`. Lines `b` and `c` are garbage.

Fault-free outputs `{a, b, c}` for inputs `{a, b, c}`:

| input | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| `mvc_two_gate` | 010 | 001 | 000 | 110 | 011 | 101 | 100 | 111 |
| `mvc_three_gate` | 010 | 001 | 000 | 111 | 011 | 101 | 100 | 110 |

**`mvc_three_gate`** puts a Toffoli gate in front of the same two gates. The
Toffoli has controls `b` and `c` and target `a`. This front part is *Stage A*
and the CNOT plus the Fredkin gate are *Stage B*. In the fault-free voter the
Toffoli changes only which garbage values appear, not the majority. It does
matter when a fault hits the voter itself.

Take voter input 011. The Toffoli has already set line `a` to 1. A single bit
fault on line `b` or on line `c` between the stages then leaves the majority
1 on line `a`. The same fault makes `mvc_two_gate` output 0. For
`mvc_two_gate` the stage boundary is its own input, because it has no Stage A
gate.

That is the whole reason to pay 5 more quantum-cost units for the
three-gate voter.

## What is masked and what is not

**Faults in a module copy.** Any single fault confined to one copy spoils at
most one input of each voter. This holds for every kind in the table above,
and for several missing gates in the same copy. Such a fault is always
masked. In the full adder, a fault inside one copy can spoil both its Sum and
its Carry. Each of the two voters still sees only one wrong input, so both
results are correct.

**Faults inside a voter.** The voters do not mask faults inside themselves in
general. The failure pattern of missing gates in Stage B is exact and small.
Let P(C) be the probability that the CNOT is missing and P(F) the probability
that the Fredkin gate is missing.

| voter input | fails when | probability of failure |
|---|---|---|
| 110 | CNOT missing, Fredkin present | P(C)(1 - P(F)) |
| 011 (two-gate) / 111 (three-gate) | Fredkin missing | P(F) |
| 100 | at least one of the two missing | P(C) + P(F) - P(C)P(F) |

For the three-gate voter the middle row moves from input 011 to input 111,
because of the Toffoli in front. The probabilities are the same for both
voters. A missing Toffoli in the three-gate voter is harmless: what remains
is the two-gate voter.

Take input 100 and let each gate be missing independently with probability
x. One voter operation then fails with probability `2x - x^2`. Over N
operations, the chance of at least one failure is `1 - (1 - (2x - x^2))^N`.
For x = 0.003 % that is 0.6 %, 5.8 % and 45 % for N = 100, 1000 and 10000.
`tb_mvc_failure_probability` derives these numbers from the simulated voters
and checks them by Monte Carlo fault injection.

## The protected circuits

**`rev_example_circuit`** is a 3x3 circuit of two gates:

1. A Toffoli gate with controls `a`, `b` and target `c`.
2. A CNOT gate with control `b` and target `a`.

Its outputs are `x = a XOR b` (the output of interest), `y = b` and
`z = c XOR ab`. With input 110 it outputs 011, so `x = 0`. If the second gate
is missing, it outputs 111. `tmr_example` feeds the three copies' `x` lines
to voter lines `a`, `b` and `c` and outputs the majority as `u`. The `VOTER`
parameter picks the voter and defaults to the two-gate one.

**`rev_full_adder`** is a 4x4 reversible full adder with inputs `(const_in,
carry_in, a, b)`:

| output | value |
|---|---|
| `carry_out` | `const_in XOR maj(carry_in, a, b)` |
| `sum` | `carry_in XOR a XOR b` |
| `garbage1` | `a XOR b` |
| `garbage2` | `b` |

With `const_in = 0` it adds. Its four-gate cascade rests on the identity
`maj = ab XOR carry_in(a XOR b)`:

1. Toffoli with controls `a`, `b` and target `k` (the constant line):
   `k ^= ab`.
2. CNOT with control `b` and target `a`: `a ^= b`.
3. Toffoli with controls `carry_in`, `a` and target `k`.
4. CNOT with control `a` and target `carry_in`.

This costs quantum cost 12.

`ft_full_adder` builds three adders. Their Sum lines go to voter 1 and their
Carry lines to voter 2. By default the two-gate voter takes Sum and the
three-gate voter takes Carry, so both voters are in use. `SUM_VOTER` and
`CARRY_VOTER` change this.

## Where this RTL makes its own choices

The following are decisions of this implementation, not fixed by the
description it follows:

* **CNOT control in the example circuit.** The gate types and the worked
  values (input 110 gives `x = 0`, and 111 with the second gate missing) fix
  everything except whether the CNOT is controlled by line `b` or line `c`.
  Line `b` is used.
* **Full adder gates.** The full adder is specified only by its truth table.
  The gate cascade above is this design's own.
* **Voter placement in the full adder.** Which voter sits on Sum and which on
  Carry is a default of this design; either works.
* **Stage boundary.** The Stage A / Stage B boundary is placed after the
  Toffoli gate. Only there do faults on line `b` and on line `c` both get
  masked for input 011, as the three-gate voter is meant to do. A boundary
  between the CNOT and the Fredkin gate (with the Toffoli ahead of both
  stages) would let a fault on line `c` through for input 011.
* **Fredkin control in the two-gate voter.** The voter follows the circuit
  with a negative CNOT. A prose reading in which the Fredkin control equals
  `b XOR c` (swapping when `b != c`) does not compute the majority and is not
  used.
* **Truth table for input 110.** The fault-free outputs for voter input 110
  are 100 for both voters. A value of 101 would not follow from the gates;
  line `a` is 1 either way.
* **Fault injection.** Fault injection ports, the polarity of an appearing
  control point (positive), and the bit ordering of line bundles are
  implementation choices.
* **Voter quantum costs.** Voter quantum costs use NOT 1, positive CNOT 1,
  negative CNOT 3, 3-bit Toffoli 5 and 3-bit Fredkin 5.

### Not included

Two things are not included. One is a second example circuit containing a
Fredkin gate, used elsewhere to illustrate a disappearance fault; its gates
are not known. The other is the earlier voter designs the two voters are
compared against. The crosspoint faults that circuit illustrates are
exercised on the example circuit and the full adder instead.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | fault types, voter kind enum, gate quantum costs |
| `rtl/rev_toffoli.sv`, `rtl/rev_fredkin.sv` | gate models with fault injection |
| `rtl/mvc_two_gate.sv`, `rtl/mvc_three_gate.sv` | the two voters |
| `rtl/mvc_select.sv` | picks either voter by parameter |
| `rtl/rev_example_circuit.sv`, `rtl/tmr_example.sv` | example circuit and its TMR arrangement |
| `rtl/rev_full_adder.sv`, `rtl/ft_full_adder.sv` | reversible full adder and its TMR arrangement |
| `rtl/ft_rev_top.sv` | top |
| `tb/fault_campaign_pkg.sv` | builds the list of every single fault of a circuit |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench checks against values worked out independently of the RTL:
printed truth tables, the arithmetic sum, and hand-traced gate cascades. Each
ends by printing `TB_RESULT checks=N failures=M`.

* `tb_rev_toffoli` and `tb_rev_fredkin` check every gate form and every fault
  kind.
* `tb_mvc_two_gate` and `tb_mvc_three_gate` check:
  * the fault-free truth tables and costs;
  * the exact input sets on which each missing, repeated or control-less
    Stage B gate makes the voter fail;
  * the Stage A/B bit fault at input 011.
* `tb_rev_example_circuit` and `tb_rev_full_adder` check the two protected
  circuits, including that the adder is a bijection.
* `tb_tmr_example` and `tb_ft_full_adder` run a campaign over all inputs. Each
  single fault (of every kind, in every gate) goes into each copy in turn,
  with both voter kinds. The corrected outputs must never be wrong.
* `tb_ft_rev_top` drives the top at its default parameters end to end. It
  runs:
  * the module-fault campaign on both arrangements;
  * a voter-internal bit fault at voter input 011, which the three-gate
    voter masks and the two-gate voter does not;
  * the Stage B missing-gate failure cases for every voter input pattern.

  It counts each mechanism and fails if one never occurs.
* `tb_mvc_failure_probability` reproduces the voter failure probabilities for
  x = 0.001 % ... 0.005 % and N = 100, 1000, 10000. For each x it also runs
  100 batches of 10,000 randomly faulted operations per voter. It checks how
  many batches have failed within their first k operations against
  1 - (1 - P1)^k, for k from 100 to 10,000. This traces the failure
  probability as a function of the number of trials.

All testbenches finish in well under a second. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rev_pkg.sv tb/fault_campaign_pkg.sv rtl/rev_toffoli.sv rtl/rev_fredkin.sv \
    rtl/mvc_two_gate.sv rtl/mvc_three_gate.sv rtl/mvc_select.sv \
    rtl/rev_example_circuit.sv rtl/rev_full_adder.sv rtl/tmr_example.sv \
    rtl/ft_full_adder.sv rtl/ft_rev_top.sv tb/tb_ft_rev_top.sv \
    --top-module tb_ft_rev_top -o sim
./obj_dir/sim
```

Lint with `verilator --lint-only -Wall -Irtl rtl/rev_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused package constants and the Toffoli
field of the shared voter fault bundle, which the two-gate voter does not use.
