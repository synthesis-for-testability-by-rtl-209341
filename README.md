# Two-clock-controlled state machine with split state coding

A sequential circuit is hard to test when its states are hard to reach and
hard to read. Scan chains fix that by making every flip-flop loadable and
readable. They cost area, a global scan route and delay in the functional
path. This design gets comparable control and observation of the state
with two cheaper measures:

* **Two clock groups.** The state flip-flops are split into two groups, and
  each group's clock can be switched off on its own in a test mode. A normal
  clock moves the machine from state `s` to `next(s)`. A test clock that
  reaches only one group moves it to a state that mixes `next(s)` in that
  group with `s` in the other. These extra transitions come from the existing
  next-state logic, so they need no extra logic.
* **A state assignment chosen for those groups.** The states are placed
  along a Hamiltonian cycle of the state graph, that is, a cycle of normal
  transitions that visits every state once. They are encoded with a *split
  code* so that the mixed test transitions are short jumps along that
  cycle. Any state can then be reached from any other in a few clocks. A
  normal walk along the cycle, by contrast, can need up to p-1 clocks for a
  p-state machine.

Two extra outputs, `a` and `b`, let a tester identify the present state from
2m normal clocks.

The RTL here builds this scheme for a modulo-p counter. A counter's state
graph is a single cycle, so it is the simplest machine that has such a
cycle. The default is a modulo-50 counter with m = k = 4.

## The split code

A code word is a pair `<a, b>` with `a` in `0..m-1` and `b` in `0..2^k-1`.
The sequence of code words is

    N(0)   = <0, 0>
    N(j+1) = <a_j + 1 mod m,  b_j + 2^(a_j) mod 2^k>

All m·2^k words of the sequence are distinct. State `S_i` of the
cycle gets `N(i)`. The first component `a` (called `alpha` in the RTL) is
held in the **phi1** group, in ceil(log2 m) flip-flops. The second component
`b` (`beta`) is held in the **phi2** group, in k flip-flops. Both are plain
binary. The sequence for m = 3, k = 2 is:

| i | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|---|---|----|----|
| alpha | 0 | 1 | 2 | 0 | 1 | 2 | 0 | 1 | 2 | 0 | 1 | 2 |
| beta  | 0 | 1 | 3 | 3 | 0 | 2 | 2 | 3 | 1 | 1 | 2 | 0 |

When `alpha >= k`, the term 2^alpha mod 2^k is 0, and that step changes
only `alpha`.

**Choosing m and k.** The navigation length grows with m, so m should be as
small as possible. For p states, let n = ceil(log2 p). Find t with
t-1+2^(t-1) < n <= t+2^t. Then k = n-t and m = ceil(p/2^k), raised to k if
it is smaller (k <= m must hold). `split_code_pkg::split_k/split_m` compute
this at elaboration. Results:

| p | 5 | 10 | 40 | 50 | 1000 |
|---|---|----|----|----|------|
| k | 2 | 2  | 4  | 4  | 7    |
| m | 2 | 3  | 4  | 4  | 8    |
| flip-flops (alpha + beta) | 1+2 | 2+2 | 2+4 | 2+4 | 3+7 |

## Clocking modes and navigation

| `test_mode` | `test_sel` | clocks | transition from `S_j = <alpha_j, beta_j>` |
|---|---|---|---|
| 0 | x | phi1 and phi2 | `S_{j+1}` (the normal counter step; `S_{p-1}` goes to `S_0`) |
| 1 | 0 | phi1 only | `<alpha_{j+1}, beta_j>` |
| 1 | 1 | phi2 only | `<alpha_j, beta_{j+1}>` |

Because of the split code, the test transitions move a known distance along
the cycle:

* Changing only `alpha` by one moves forward m·2^alpha + 1 positions. This
  is 1 position once alpha >= k.
* A pair of states that differ only in `beta` is a multiple of m positions
  apart.

A tester mixes the three kinds of clock to reach a target state, using only
sequences that never pass through an unused code word (when p < m·2^k). The
bounds are:

* at most **2m-1** clocks when the target has a lower index than the start;
* at most **4m-1** clocks when it has a higher index.

For the modulo-50 counter these bounds are 7 and 15 clocks. Normal clocks
alone can need up to 49. One example is `N(0) -> N(49) = <1, 5>`:

    <0,0> -normal-> <1,1> -phi1-> <2,1> -normal-> <3,5> -phi1-> <0,5> -phi1-> <1,5>

The navigation sequences are worked out off-chip, by the tester. The
hardware only has to obey the three modes. The end-to-end testbench includes
such a search: a breadth-first search over the cycle.

## Observing the state

`observe_outputs` adds two outputs, both functions of the present state:

* `a = 0` if `alpha = 0`, otherwise `a = 1`;
* `b = beta[alpha]`, which is 0 when `alpha >= k`.

Suppose the tester records `a` and `b` over 2m normal clocks:

* `alpha` follows from where `a` is 0. If the first 0 is at clock i, then
  alpha = (m - i) mod m.
* The bits of `beta` come out of `b` one per clock, from bit `alpha` upward.
  Up to and including the first 1 they are read directly. After that they
  are complemented by the carry of the step that produced the 1.

Example from `N(24) = <0, 1010>`: the b values are 0, 1, 1, 0 and the
counter ends in `<0, 1001>`.

This decoding assumes that no wrap from `S_{p-1}` to `S_0` falls inside the
observed clocks. The testbench therefore also checks the strong form: no two
states of the cycle produce the same 2m-clock record, wrap included. This
holds for p = 5, 10, 40, 50 and for the sampled states of p = 1000.

## Hardware

    test_mode, test_sel ──► clock_control ──► phi1, phi2  (or en1, en2)
                                                    │
          ┌──────────── split_next_state ◄──────────┤
          │  <a,b> -> <a+1, b+2^a>, N(p-1) -> N(0)  │
          ▼                                         │
    split_state_register: alpha group on phi1, beta group on phi2
          │
          └──► observe_outputs ──► obs_a, obs_b

| file | contents |
|---|---|
| `rtl/split_code_pkg.sv` | code-parameter functions, reference code words, `clk_mode_e` |
| `rtl/clock_control.sv` | decodes the pins into the three modes; a latch-and-AND clock gate per group |
| `rtl/split_state_register.sv` | the two flip-flop groups; `GATED=1` uses the gated clocks, `GATED=0` uses enable muxes on `clk` |
| `rtl/split_next_state.sv` | successor in split code, including the wrap from the last state |
| `rtl/observe_outputs.sv` | outputs `a` and `b` |
| `rtl/split_counter_fsm.sv` | top: the modulo-P counter |

**Two equivalent register forms.** `CLOCK_GATING = 1` (the default) gates
the clocks of the two groups. This keeps the extra logic out of the data path
entirely. `CLOCK_GATING = 0` leaves the clock tree alone. Instead, each
flip-flop gets a hold mux controlled by `en1`/`en2`. Synthesis can absorb the
mux into the next-state logic. Both forms go through the same tests with
identical results.

**The gating latches.** `clock_control` contains two intentional latches,
one per group. Each is transparent while `clk` is low and is ANDed with
`clk`. As a result, a pin change can only take effect at the next rising
edge, and it never shortens a clock pulse. In a real flow these would be the
library's clock-gating cells.

### Top-level interface (`split_counter_fsm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock; the state changes after its rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low, to `S_0 = <0,0>` |
| `test_mode`, `test_sel` | in | 1, 1 | mode pins, see the table above; change them while `clk` is low |
| `mode` | out | `clk_mode_e` | decoded mode |
| `alpha`, `beta` | out | AW, K | the counter's state in split code |
| `obs_a`, `obs_b` | out | 1, 1 | observation outputs |

Parameters:

* `P`: number of states. Default 50.
* `K`, `M`: derived from `P` by the rule above.
* `AW` = ceil(log2 M).
* `CLOCK_GATING`: default 1.

An elaboration assertion rejects `P > M·2^K`.

## Choices of this design

* **Mode pins.** There are two mode pins, `test_mode` and `test_sel`. The
  scheme needs only "both clocks", "phi1 only" and "phi2 only". The pin
  encoding is this design's own.
* **Gating circuit.** The latch-based clock gate is this design's own. The
  scheme only says that each group's clock is enabled separately.
* **Reset.** The asynchronous reset to `S_0` is this design's own.
* **Binary code for `alpha`.** `alpha` uses a plain binary code. The scheme
  allows any binary assignment of the two components. The observation rule
  relies on `beta` being plain binary.
* **`b` when `alpha >= k`.** Here `b` is 0.
* **Unused code words.** When p < m·2^k, the unused code words follow the
  same successor formula. Test sequences are expected to avoid them.
* **What the counter outputs.** The state itself is brought out as the
  counter value.
* **The general case.** The method applies to any state machine whose state
  graph has a Hamiltonian cycle, adding transitions if one is missing. Only
  the counter is built here:
  * For another machine, `split_next_state` would be replaced by its
    next-state logic, written over the split-coded states.
  * `a`/`b` would be qualified with the inputs that take the cycle
    transition.
  * The published area results come from benchmark machines (lion9, s208,
    s420, s510). Those are not included: their transition tables are not
    part of this work.
* **More than two clocks.** The scheme can be extended to more than two clock
  groups. Only the two-clock form is built.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line:

* `tb_split_next_state`: every code word for P = 50, 12 and 10. This
  includes the 12-word m = 3, k = 2 table above and the parameter rule for
  p = 5, 10, 40, 1000.
* `tb_observe_outputs`: all inputs for K = 4 and K = 2, and the worked
  `N(24)` output sequence.
* `tb_clock_control`: pulse counts in each mode. It also checks that pin
  changes while `clk` is high never clip or add a pulse.
* `tb_split_state_register`: both register forms holding a 3-bit binary
  counter, grouped 1 + 2 bits, under random modes. For example, 011 goes to
  100 on a normal clock, to 111 on phi1 and to 000 on phi2.
* `tb_split_counter_fsm`: the top at its defaults. It covers:
  * two full cycles with the wrap;
  * the two worked examples;
  * navigation between all 2450 ordered pairs of states, with the 2m-1/4m-1
    bounds checked;
  * identification of all 50 states from `a`/`b`;
  * reset in the middle of a test sequence.

  It also counts each mechanism (normal, phi1, phi2, wrap, navigation,
  identification, reset) and fails if any never happened.
* `tb_split_counter_fsm_variants`: the same checks with enable muxes
  (`CLOCK_GATING = 0`), and for P = 5, 10, 40 and 1000. P = 1000 uses
  random samples.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/split_code_pkg.sv tb/tb_split_counter_fsm.sv \
        --top-module tb_split_counter_fsm
    ./obj_dir/Vtb_split_counter_fsm

Every testbench finishes in well under a second.
