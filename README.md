# Reversible n-bit synchronous counter

A binary up-counter built only from reversible gates. In a reversible gate,
every output pattern comes from exactly one input pattern, so no information
is erased and, in principle, no Landauer heat is dissipated. Reversibility
brings two rules that ordinary logic does not have:

* **no fan-out**: a signal drives exactly one gate input. Every value needed
  twice is copied by a gate that makes a copy.
* **no feedback** inside the gate network. A flip-flop's loop must be closed
  through storage, outside the reversible gates.

The design uses two gates. Feynman gates make the copies and Peres gates do
the ANDs. Each T flip-flop is one Peres gate plus one Feynman gate. The default
size is 4 bits (`N = 4`), and the wiring rule extends to any `N`.

## The two gates

| gate | inputs | outputs | quantum cost |
|---|---|---|---|
| Feynman (`feynman_gate`) | x, y | m = x, n = x ^ y | 1 |
| Peres (`peres_gate`) | x, y, z | k = x, l = x ^ y, m = (x & y) ^ z | 4 |

With y = 0 the Feynman gate is the fan-out element: it gives two copies of x.
With z = 0 the Peres gate is a reversible AND: m = x & y. Its outputs k and l
are the "garbage" that keeps the mapping one-to-one. Both modules are purely
combinational.

## The reversible T flip-flop (`rev_tff`)

The T flip-flop follows Q+ = (T · CLK) ^ Q.

* The Peres gate takes (T, CLK, Q), so its third output is T · CLK ^ Q.
* A Feynman gate with a 0 input copies the state twice. One copy is the output
  `q`. The other goes back to the Peres gate's Q input.

Written literally, this loop is combinational and would oscillate while the
clock is high. Here it is closed through a rising-edge register on the wire
between the two gates:

```
   t ──► x ┌────┐ k ──► garbage[0]
 1'b1 ──► y │ PG │ l ──► garbage[1]
   ┌───► z └────┘ m ──► [D  Q] ──► x ┌────┐ m ──► q
   │        (T ^ Q)     register     │ FG │
   │                 0 ──────────► y └────┘ n ──┐
   └────────────────────────────────────────────┘
```

The Peres gate's clock input is tied to 1, the value the clock has while it
is asserted. So the gate always presents the value the state takes at the next
rising edge (T ^ Q), and the register loads it at that edge. Apart from the
register, the flip-flop has only the published structure: two gates, one
constant-0 input and two garbage outputs (T and T ^ 1).

## The counter (`rev_counter`)

Bit *i* toggles when T_i = 1. For a binary count, T_0 = `t0` (tied to 1 in
normal use) and T_i = Q_{i-1} · … · Q_1 · Q_0. The no-fan-out rule sets the
rest of the wiring:

| bit | gates after the flip-flop | what they produce |
|---|---|---|
| 0 | 2 Feynman gates (1 when N = 2) | `q[0]`, T_1 = Q_0, the first AND operand Q_0 |
| 1 … N-2 | Feynman gate, Peres AND, Feynman gate (none after the last AND) | `q[i]`; product P_i = Q_i · P_{i-1}; copies of P_i to T_{i+1} and to the next AND |
| N-1 | none | `q[N-1]` |

For N = 4 this gives 4 flip-flops (8 gates), 5 Feynman fan-out gates and 2
Peres AND gates: 15 reversible gates, 6 Peres and 9 Feynman. That is a
quantum cost of 6·4 + 9·1 = 33 and a hardware complexity of 21 XOR + 6 AND.

In general the design has these costs. They are kept as functions in
`rev_pkg`, and the size testbench checks them against the 2-, 3- and 4-bit
values:

| N | gates (5N-5) | quantum cost (11N-11) | constant inputs (4N-4) | garbage (3N-4) | delay (11(N-1)) |
|---|---|---|---|---|---|
| 2 | 5 | 11 | 4 | 2 | 11 |
| 3 | 10 | 22 | 8 | 5 | 22 |
| 4 | 15 | 33 | 12 | 8 | 33 |

Delay is counted in unit delays of primitive gates. The garbage and
constant-input counts in this table assume a network in which the clock is
passed from one flip-flop's Peres gate to the next as that gate's first
output. This RTL does not do that; see the next section.

### Behaviour with `t0 = 0`

T_1 is Q_0 itself, not `t0 · Q_0`. If `t0` is held low, bit 0 freezes but the
upper bits still toggle whenever Q_0 is 1. `t0` is therefore not a clean
count enable. It is the constant input of the first flip-flop and should be
tied to 1. The testbenches check both behaviours against a model of the
network.

## Where this RTL goes beyond the gate network

* **Storage.** Each flip-flop has a rising-edge D register, as described
  above. Reversible-gate networks say nothing about storage elements, and the
  edge polarity is a choice.
* **Reset.** `rst_n` is an asynchronous, active-low reset that clears the
  count to 0. It is not a reversible operation.
* **Clock as a net.** The clock goes straight to every register. In the
  Peres gates its place is taken by the constant 1. Each flip-flop therefore
  has two garbage outputs where the clock-relaying network has one. The
  `garbage` bus has 4N-4 bits (12 for N = 4), against 3N-4 = 8 in the cost
  table. Likewise, the constant inputs are 15 for N = 4 against 12: the four
  constant-1 clock inputs are added and the `t0` input is not counted.
* **Garbage made visible.** The side outputs are brought out as ports
  instead of being left open. Bits `[2i+1:2i]` are flip-flop *i*'s
  `{T_i ^ 1, T_i}`. They are followed, for each AND gate of bit
  i = 1 … N-2, by `{Q_i ^ P_{i-1}, Q_i}`. `garbage[0]` equals `t0` by the
  gate's definition.
* **Self-check.** `rev_counter` holds an immediate assertion: whenever `t0`
  was 1 at the previous edge, the count must have advanced by exactly one
  (mod 2^N).

After synthesis the network collapses to what it computes: N flip-flops and
a conventional incrementer (for N = 4: 4 XOR, 2 AND, 4 NOT cells). The RTL
keeps the reversible gates as separate module instances, so the structure
stays visible in simulation and in an unflattened netlist. It does not make
the silicon reversible: that needs a reversible technology, which no standard
cell flow gives.

## Interface of the top, `rev_counter`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | common clock of all flip-flops; count advances on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset to 0 |
| `t0` | in | 1 | toggle input of bit 0; tie to 1 to count |
| `q` | out | N | count |
| `garbage` | out | 4N-4 (2 for N = 1) | unused reversible-gate outputs, layout above |

Parameter: `N` (default 4). It must be at least 1. With N = 1 the design is a
single flip-flop.

Timing: one count per rising clock edge. The first edge after reset is
released gives count 1. The count runs 0 … 2^N-1 and wraps to 0 without a
carry output. `q` comes straight from the registers through Feynman gates, so
it has no combinational path from `t0`.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | garbage-bus width and the cost formulas |
| `rtl/feynman_gate.sv` | Feynman gate |
| `rtl/peres_gate.sv` | Peres gate |
| `rtl/rev_tff.sv` | reversible T flip-flop |
| `rtl/rev_counter.sv` | N-bit counter (top) |
| `tb/tb_feynman_gate.sv` | truth table, bijection, inverse, fan-out use |
| `tb/tb_peres_gate.sv` | truth table, bijection, AND use |
| `tb/tb_rev_tff.sv` | 400 random edges against q ^= t; no change between edges; asynchronous reset; garbage |
| `tb/tb_rev_counter.sv` | default 4-bit counter end to end: three full periods at `t0 = 1` (16 states, wraps), random `t0`, garbage bus every cycle, reset in mid-count; counts each of these events and fails if one never happened |
| `tb/tb_rev_counter_sizes.sv` | N = 2, 3, 4 and 8 side by side against a model, plus the cost-table check |

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>` and has
a cycle watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl \
  rtl/rev_pkg.sv rtl/feynman_gate.sv rtl/peres_gate.sv rtl/rev_tff.sv \
  rtl/rev_counter.sv tb/tb_rev_counter.sv --top-module tb_rev_counter
./obj_dir/Vtb_rev_counter
```

To simulate another testbench, swap it in for `tb/tb_rev_counter.sv` and
`--top-module`. Every simulation finishes in well under a second. For lint,
use `verilator --lint-only -Wall` with the same `rtl/` files and
`--top-module rev_counter`. It reports only unused padding bits of internal
vectors. To change the size, set `-GN=<n>` or override `N` at instantiation.
