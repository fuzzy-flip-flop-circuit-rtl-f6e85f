# Fuzzy J-K flip-flops and a fuzzy register

Fuzzy-logic hardware is usually purely combinational: negation, t-norm
(fuzzy "and") and s-norm (fuzzy "or") gates evaluate one inference and
forget it. A fuzzy *sequential* circuit needs a memory element that stores a
membership value between 0 and 1. This design provides one. It is a fuzzy
extension of the binary J-K flip-flop. At the binary corners it keeps the
four J-K behaviours:

| J | K | next Q            |
|---|---|-------------------|
| 0 | 0 | Q (hold)          |
| 1 | 0 | 1 (set)           |
| 0 | 1 | 0 (reset)         |
| 1 | 1 | 1 - Q (invert)    |

For J and K between 0 and 1 it moves the stored value smoothly between those
cases. On top of the flip-flop sits a *fuzzy register*: a row of such
flip-flops that can be loaded in parallel with membership values, or set,
reset, held and inverted all at once.

## Number format

Every fuzzy value is an unsigned W-bit code, W = 4 by default. Code x stands
for membership x / M, where M = 2^W - 1 = 15. So `4'b0000` is 0 and
`4'b1111` is 1. "Not x" is M - x. All equations below are written with 1
meaning M.

## The four flip-flop types

The types differ in which fuzzy "and"/"or" they use. Each is a W-bit register
loaded on the rising clock edge with a next-state function of (J, K, Q):

| module             | next state Q+                                              | arithmetic in codes                   |
|--------------------|------------------------------------------------------------|---------------------------------------|
| `minmax_ff`        | (J ∨ ¬K) ∧ (J ∨ Q) ∧ (¬K ∨ ¬Q), with ∨ = max and ∧ = min   | exact: comparators and multiplexers   |
| `algebraic_ff`     | J + Q − J·Q − K·Q                                          | rounded to the nearest code           |
| `bounded_reset_ff` | 1 ∧ { 0 ∨ (J − Q) + 0 ∨ (Q − K) }                          | exact: saturating subtract, add       |
| `bounded_set_ff`   | 0 ∨ { 1 ∧ (J + Q) + 1 ∧ (2 − K − Q) − 1 }                  | exact: saturating add, add, floor     |

The bounded types use the bounded sum a ⊕ b = min(1, a+b) and the bounded
product a ⊙ b = max(0, a+b−1):

- Bounded reset: Q+ = (J ⊙ ¬Q) ⊕ (¬K ⊙ Q).
- Bounded set: Q+ = (J ⊕ Q) ⊙ (¬K ⊕ ¬Q).

All four reduce to the J-K table above at the corners. All four stay in
[0, 1] for any inputs.

### Min-max datapath

`minmax_ff` is the main cell. It forms the three "or" terms:

- u1 = max(J, M−K)
- u2 = max(J, Q)
- u3 = max(M−K, M−Q)

Each uses one magnitude comparator and a multiplexer. Two more comparators
then take the minimum of the three. So the cell is five 4-bit comparators,
three complementers and a 4-bit state register, plus a 4-bit register for the
complement output.

### Algebraic rounding

`algebraic_ff` computes the numerator N = M·J + M·Q − J·Q − K·Q exactly. N
lies between 0 and M². The cell then stores round(N / M). M is odd, so N / M
is never exactly halfway between two codes and rounding is never ambiguous.
The stored value still carries the rounding error of one step, so repeated
operation drifts from the real-valued result by up to half a code per clock.

## Timing, QN and clearing

- `q` is loaded on every rising edge of `clk`. A change on `j`/`k` reaches
  `q` one clock later. There is no enable: a cell holds only when J = K = 0.
- `qn` is a separate register. It is loaded on the same edge with M minus
  the value `q` had **before** that edge. So `qn` is the complement of `q`,
  but one clock late. This is how the reference circuit behaves, since its
  complement register is fed from the old state. If you want a same-cycle
  complement, use `M - q` combinationally.
- There is no reset input. To clear a flip-flop, clock J = 0, K = M once;
  `qn` becomes valid one clock after that. The testbenches begin this way.
  Until then, the flip-flops hold whatever they powered up with.

## Fuzzy register (`fuzzy_register`)

N flip-flops share `clk` and `k`. Each cell has its own membership input
`men[i]`. Each cell's J comes from a per-bit 2-to-1 multiplexer built from
two levels of 2-input NAND gates, with one inverter on the select line `s1`:

```
j_cell[i] = ~( ~(men[i] & s1) & ~(j & ~s1) )
```

- `s1 = 1`: cell i takes `men[i]`.
- `s1 = 0`: every cell takes the common `j`.

Because `k` is shared, the operating modes are combinations of `s1` and `k`:

| s1 | j | k | effect on every cell (min-max cells)            |
|----|---|---|-------------------------------------------------|
| 0  | 0 | M | reset to 0                                      |
| 0  | M | 0 | set to 1                                        |
| 0  | 0 | 0 | hold                                            |
| 0  | M | M | invert                                          |
| 1  | – | 0 | Q+ = max(men[i], Q): "or" the membership inputs |
| 1  | – | M | Q+ = min(men[i], M − Q)                         |

To load N membership values exactly, reset first, then clock once with
`s1 = 1`, `k = 0`. This two-cycle sequence is checked in the testbenches.

Parameters:

- `W`: bits per value (default 4).
- `N`: number of cells (default 11, a practical register size; the same
  structure drawn with 4 cells is simulated as well).
- `FF_TYPE`: the `fuzzy_pkg::ff_type_e` cell type (default `FF_MINMAX`). Any
  of the four types can be used. The mode table above holds at the corners
  for all of them.

The cells' `qn` outputs are not brought out of the register.

## Top level (`fuzzy_ff_top`)

The top holds two independent parts side by side:

- The 11-cell min-max register, on ports `reg_s1`, `reg_j`, `reg_k`,
  `reg_men[]` and `reg_q[]`.
- One flip-flop of each type, driven by a shared `ff_j`/`ff_k` pair. Their
  outputs are `ff_q[t]` and `ff_qn[t]`, indexed by `ff_type_e`
  (0 min-max, 1 algebraic, 2 bounded reset, 3 bounded set).

Driving all four types from one J/K pair lets you compare their responses to
the same sequence.

## Files

| file                        | content                                                          |
|-----------------------------|------------------------------------------------------------------|
| `rtl/fuzzy_pkg.sv`          | `ff_type_e`, default width                                       |
| `rtl/minmax_ff.sv`          | min-max flip-flop                                                |
| `rtl/algebraic_ff.sv`       | algebraic flip-flop                                              |
| `rtl/bounded_reset_ff.sv`   | bounded reset flip-flop                                          |
| `rtl/bounded_set_ff.sv`     | bounded set flip-flop                                            |
| `rtl/fuzzy_register.sv`     | N-cell register with S1 input selection                          |
| `rtl/fuzzy_ff_top.sv`       | top level                                                        |
| `tb/tb_*.sv`                | one self-checking testbench per module                           |

## Simulation

Each testbench computes the expected values from the defining equation in
real arithmetic, independently of the RTL. It checks `q` and `qn` after every
edge. It also checks `q` just before every edge, to confirm the one-cycle
latency. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. The clock period is 20 time units.

- The single-cell testbenches sweep the four binary behaviours from every
  starting code, then apply 20,000 random J/K pairs.
- `tb_fuzzy_register` runs five registers on one input stream: the default
  11-cell min-max register, a 4-cell min-max register, and 2-cell algebraic,
  bounded-reset and bounded-set registers.
- `tb_fuzzy_ff_top` runs the top at its default parameters. It counts loads,
  common-input cycles, holds, sets, resets and inverts, and fails if any
  count is zero.

Example:

```
verilator --binary --timing --assert -Irtl rtl/fuzzy_pkg.sv tb/tb_fuzzy_ff_top.sv \
          --top-module tb_fuzzy_ff_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each runs in well under a
second.

## What is not reproduced, and choices made here

- Area and delay figures depend on the standard-cell library and are not
  modelled. For reference: 223 NOT-gate equivalents for the smallest min-max
  cell, a worst output delay of 2.26 ns, and 2546 for the 11-cell register.
- The gate-level netlist of the min-max cell is not copied. The RTL gives
  its function and its comparator-based structure, and synthesis chooses
  the gates.
- These are choices of this design, not given by the reference:
  - which `s1` level selects the membership inputs;
  - the rounding rule of the algebraic type;
  - the circuits of the algebraic and bounded types (only their equations
    are given);
  - the `FF_TYPE` option of the register;
  - putting the register and the four single flip-flops together in one top
    level.
- In `bounded_reset_ff` the final clamp to 1 follows the equation, but it
  never acts: J ⊙ ¬Q + ¬K ⊙ Q cannot exceed max(J, Q).
