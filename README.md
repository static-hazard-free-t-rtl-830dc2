# Ternary memory elements and up/down counters built from the T-gate

This is synthesizable SystemVerilog for a family of three-valued (ternary)
sequential circuits in which every gate is the same universal element, the
ternary **T-gate**. The circuits follow the 1977 paper by T. Higuchi and
M. Kameyama, "Static-Hazard-Free T-Gate for Ternary Memory Element and Its
Application to Ternary Counters" (IEEE Trans. Computers, C-26(12)).

The central idea: a ternary clock has two active levels, 1 and -1, besides
the idle level 0. A memory element can therefore do one thing on a positive
clock pulse and another on a negative one. A counter built this way counts
up on a pulse of 1 and down on a pulse of -1, so a single signal line
carries both the count and its direction. The counted number is held in
*signed ternary* (balanced ternary): digits 1, 0, -1 with weights 1, 3, 9, ...

## Trits in two bits

Every ternary signal (a *trit*) is carried on two wires as a two's-complement
number:

| trit | bits |
|------|------|
| 1    | `01` |
| 0    | `00` |
| -1   | `11` |

`10` is not used. `ternary_pkg` defines the type `trit_t`, the constants
`TP`, `TZ`, `TN` and the ternary operators: MIN (the ternary AND), MAX (the
ternary OR), negation, the literals `J_k(s)` and `h_k(s)`, and the cycling
gates. Because the encoding is signed, MIN and MAX are plain signed compares.
Ternary logic is the subject here, so this encoding is an implementation
choice. The original circuit uses three voltage levels on one wire.

## The T-gate

`T(p,q,r;s)` passes `p` when `s = 1`, `q` when `s = 0` and `r` when `s = -1`.
It is a three-way multiplexer. Any ternary function can be built as a tree of
T-gates.

The gate in `tgate` is not written as a multiplexer. It is written in the
consensus form

    T = (p + h1(s)) . q . (r + h-1(s))  +  p . J1(s)  +  r . J-1(s)

Here "." is MIN, "+" is MAX, `J_k(s)` is 1 only when `s = k`, and `h_k(s)` is
its negation. The first term is redundant in logic but matters in timing.
Suppose `p = q` and the control moves from 1 to 0. In the plain sum of
products `p.J1 + q.J0 + r.J-1`, for a moment neither `J1` nor `J0` is 1, and
the output can glitch. The consensus term holds the output at `q` through
that moment. The same holds for `r = q` and a move from -1 to 0.

That is exactly the situation in a memory element. There the output is fed
back into `q`, and the clock returns to 0 after loading the new value.
A glitch would corrupt the stored value.

Zero-delay RTL cannot show a hazard: in simulation the gate is just a
multiplexer. The structure is kept so that a gate-level mapping keeps the
redundant term. If you hand this RTL to a synthesis tool, it will optimise
the term away unless the gate is preserved as a cell.

`tb/tb_tgate_hazard.sv` shows the effect with delays. It uses a behavioural
gate model, `tb/tgate_delay_model.sv`, in which the literal `J0(s)` switches
two time units later than `J1(s)` and `J-1(s)`. It tries every control
change from 1 to 0 with `p = q`, and from -1 to 0 with `r = q`:

* The plain sum of products glitches in 12 of these 18 cases.
* The consensus form glitches in none.

Closed into a D-FFF loop, the plain gate loses a stored 1 when the clock
returns to 0 (it falls to -1), while the consensus gate keeps it.

`tgate_nand` is the same gate built only from ternary NAND gates (`tnand`:
the negated MIN) and the two literals. It has eight NANDs and is
functionally identical to `tgate`.

`tgate_tree3` is a helper: a three-level tree of 13 T-gates that realises
any function of three trits from a 27-entry truth-table parameter.

## Memory elements, and how the RTL models them

In the original circuits, a memory element is a T-gate whose output is wired
back to one of its own inputs: a level-sensitive loop with no clock other
than the ternary clock pulse `CP`. Such loops cannot be simulated
cycle-accurately or synthesised safely as they stand. **The main departure
of this RTL:** every loop is closed through a flip-flop on a binary sampling
clock `clk`, and the ternary `CP` is just a data input sampled on that
clock.

The rules that follow:

* Every level of `CP`, of the preset enable `PE` and of the data inputs must
  last at least one `clk` cycle.
* A master stage's output is the T-gate output itself, so it is transparent
  while `CP` is active. The slave stage's output is registered. It shows its
  new value at the first `clk` edge at which `CP` is 0.
* Counted pulses must be *return-to-zero*: `CP` never steps directly between
  1 and -1. `b_ms_fff` has an assertion for this rule.
* `PE` may be nonzero only while `CP` is 0; a second assertion checks this.
* `rst_n` is a synchronous, active-low reset that clears every stored trit
  to 0. The original circuits have no reset, only their preset inputs, which
  are all kept.

With those rules, each element behaves as described below. The timing
conditions the paper derives for the asynchronous versions are met by
construction. Those conditions concern the delays of the master-slave clock
steering gate relative to the data path.

### D flip-flap-flop (`d_fff`)

`q = T(D, q, preset; CP)`. While `CP = 1` the output follows `D`. While
`CP = -1` it takes the preset value. While `CP = 0` it keeps its own value.

### D master-slave FFF (`d_ms_fff`)

A master D-FFF, a slave D-FFF, and a steering gate `G = T(0,1,1;CP)` on the
slave's control:

* `CP = 1`: the master loads `D`; the slave (`G = 0`) holds.
* `CP` back at 0: the master holds; the slave copies it.
* `CP = -1`: master and slave take the preset together.

### Bilateral master-slave FFF, B-FFF (`b_ms_fff`)

This is the element the counters are made of. It has four T-gates:

    x      = T(P1, master, P2; PE)      preset gate
    master = T(R, x, L; CP)
    slave  = T(master, slave, 0; T(0,1,0;CP))

* `CP = 1` loads the shift-right input `R`.
* `CP = -1` loads the shift-left input `L`.
* With `CP = 0`, the slave copies the master. `PE = 1` presets both to `P1`;
  `PE = -1` presets both to `P2`.

### Counting FFF, C-FFF (`c_fff`)

A B-FFF clocked by the counted pulse `I`, with `R = T(-1,1,0;S)` (S+1 mod 3)
and `L = T(0,-1,1;S)` (S-1 mod 3). So the next state is the balanced-ternary
sum digit of `S + I`. The carry output
`C = T(T(1,0,0;I), 0, T(0,0,-1;I); S)` is 1 while `I = 1` and `S = 1`, and
-1 while `I = -1` and `S = -1`. The carry is itself a return-to-zero pulse,
ready to clock the next digit.

| S  | S' for I = 1 | I = 0 | I = -1 | C for I = 1 | I = 0 | I = -1 |
|----|----|----|----|----|----|----|
| 1  | -1 | 1  | 0  | 1  | 0  | 0  |
| 0  | 1  | 0  | -1 | 0  | 0  | 0  |
| -1 | 0  | -1 | 1  | 0  | 0  | -1 |

## Counters

All counters take one counted-pulse input `i_cp`: 1 counts up, -1 counts
down.

**`async_counter`** is a ripple chain of `N` C-FFFs (default 3). Each
digit's carry clocks the next. The value is `sum S_i * 3^i`, range
`±(3^N-1)/2` (±13 for N = 3), and it wraps at both ends with an overflow
pulse on `c[N-1]`. Common `PE` clears all digits.

**`async_mod10_counter`** is three C-FFFs plus a T-gate decoder,
`T(T(0,T(1,0,0;S2),0;S1), 0, T(0,T(0,0,1;S2),0;S1); S0)`. The decoder
output is 1 exactly at +10 (`S2 S1 S0 = 1 0 1`) and -10 (`-1 0 -1`), and it
drives every `PE`, clearing the count. So the counter runs 0..9 upward and
0..-9 downward, each time returning to 0. In this model the count ±10 is
visible for one `clk` cycle (output `clr = 1`) before the clear. The pulse
line must stay at 0 during that cycle, because the preset only acts with the
clock at 0.

**`sync_mod10_counter`** is the same counting sequence, states -9..9, but
synchronous. Three B-FFFs share the pulse line. Each digit's `R` input
receives that digit of the next count up, and its `L` input that digit of
the next count down. Each of the six functions is a `tgate_tree3` whose
constants are computed at elaboration from the counting rule. The paper
gives the same function as a smaller, hand-minimised T-gate network (about
30 gates in all), which this RTL does not reproduce gate for gate.

**Shift-register counters.** `bilateral_fsr` is `N` B-FFFs on one pulse
line:

* A pulse of 1 shifts right, with a feedback value `f` entering stage 1.
* A pulse of -1 shifts left, with `g` entering stage N.

For a counter, `g` must undo `f`. Right-shifting and then left-shifting must
return the original state, i.e. `g(f(q_N)) = q_N`. Two counters use the
register:

* **`one_of_n_counter`** (modulo 2N; mod 6 for N = 3). The feedback
  negates: `f = -q_N`, `g = -q_1`. After a preset (`PE = 1` loads -1 into
  stage 1 and 0 elsewhere), a single nonzero trit walks through the stages.
  It goes round once as -1 and once as +1. Count `n` is read directly:
  stage `n mod N` is nonzero, negative for `n < N`. Reset leaves all
  stages at 0, which is not a counting state, so preset before counting.
* **`switch_ring_counter`** (modulo 3N; mod 9 for N = 3). The feedback
  cycles: `f = q_N + 1`, `g = q_1 - 1` (mod 3). It starts from all zeros.
  For N = 3 the states, as `(q1,q2,q3)`, are (0,0,0), (1,0,0), (1,1,0),
  (1,1,1), (-1,1,1), (-1,-1,1), (-1,-1,-1), (0,-1,-1), (0,0,-1). Count `n`
  is identified by the two adjacent stages `F_(n-1)` and `F_n` (indices
  mod N). `switch_ring_decoder` does this with two T-gates per count,
  producing `hit[n]` (1 at count n, else -1).

## Top level

`ternary_top` has no shared datapath: it places every circuit side by side.
Each circuit has its own ports under a prefix:

| prefix | circuit |
|--------|---------|
| `tg_`  | T-gate, consensus form |
| `nd_`  | T-gate, NAND form |
| `dff_` | D-FFF |
| `dms_` | D master-slave FFF |
| `bff_` | B-FFF |
| `cff_` | C-FFF |
| `ac_`  | asynchronous counter |
| `am_`  | asynchronous mod-10 counter |
| `sm_`  | synchronous mod-10 counter |
| `on_`  | one-of-N counter |
| `sr_`  | switch ring counter |

Only `clk` and `rst_n` are shared. Parameters `AC_N`, `ON_N` and `SR_N`
(default 3 each, the paper's sizes) set the number of stages. The mod-10
counters are fixed at three digits.

## Where this departs from the paper

* The binary sampling clock, the registered feedback loops, the two-bit
  encoding and `rst_n` are additions (see above). Everything is
  synchronous to `clk`; the original circuits are asynchronous.
* The ECL transistor circuit of the T-gate, its voltage levels and the delay
  conditions of the master-slave elements are analog matters. They are not
  modelled. Static-hazard freedom appears only in the delay-model testbench
  described under "The T-gate"; the RTL itself is zero-delay.
* Inputs printed as don't-care in the original schematics are tied to 0:
  the slave's third input, and `P2` of the counters.
* The synchronous mod-10 counter's next-state logic is a full T-gate tree
  per output, not the paper's minimised network.
* The switch ring decoder's gate-level form is this design's own; the paper
  only states which two stages it reads.
* Applying a preset while `CP` is active is not defined in the paper. In
  this RTL an assertion in `b_ms_fff` flags it, and `CP` takes priority, as
  the T-gate structure gives.

## Simulating

Each circuit in `rtl/` (all modules except the helpers `tnand` and
`tgate_tree3`, which are covered through their users) has a self-checking
testbench `tb/tb_<module>.sv` that prints `TB_RESULT checks=N failures=M`. They compare with reference models
and with the state tables written out in the testbenches, for example the
C-FFF table above and the 19-row table of the mod-10 counter.
`tb_ternary_top` runs every circuit at the default sizes and also counts how
often each mechanism occurs: shifts, presets, carries, overflows, mod-10
clears, ring wraps.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ternary_pkg.sv tb/tb_ternary_top.sv --top-module tb_ternary_top
    ./obj_dir/Vtb_ternary_top

Replace `tb_ternary_top` with any other testbench name. All of them finish
in well under a second.

## Files

* `rtl/ternary_pkg.sv`: trit type and operators.
* `rtl/tgate.sv`, `tnand.sv`, `tgate_nand.sv`, `tgate_tree3.sv`: gates.
* `rtl/d_fff.sv`, `d_ms_fff.sv`, `b_ms_fff.sv`, `c_fff.sv`: memory
  elements.
* `rtl/async_counter.sv`, `async_mod10_counter.sv`,
  `sync_mod10_counter.sv`, `bilateral_fsr.sv`, `one_of_n_counter.sv`,
  `switch_ring_counter.sv`, `switch_ring_decoder.sv`: counters.
* `rtl/ternary_top.sv`: everything side by side.
* `tb/tb_*.sv`: one testbench per circuit.
* `tb/tgate_delay_model.sv`, `tb/tb_tgate_hazard.sv`: delay model of the two
  T-gate forms and the static-hazard experiment (simulation only).
