# Hard-decision Viterbi decoder with T-algorithm purging

This is a hard-decision Viterbi decoder, with a matching encoder, for the
rate-1/2 convolutional code with constraint length K = 3 and generator
polynomials 101 and 111 (5 and 7 in octal). It decodes one received symbol
per clock. Its main idea is the **T-algorithm**: in every trellis step, every
state whose path metric is more than a threshold T above the best metric is
*purged*. A purged state writes neither its path-metric register nor its
survivor register. The ACS units then ignore it in the next step. This saves
switching activity. To keep the extra work out of the critical ACS loop, the
best metric is **precomputed** from the registered metrics, in parallel with
the add-compare-select, instead of being searched for after it.

The defaults are K = 3, 8-bit path metrics, 5-bit branch metrics,
a survivor depth of 15 and T = 2.

## Code and trellis conventions

The encoder state is the two previous input bits, with the newest bit in the
MSB: `s = {X(n-1), X(n-2)}`. For an input bit `X(n)` the encoder emits

    Y0 = X(n) ^ X(n-2)            (generator 101)
    Y1 = X(n) ^ X(n-1) ^ X(n-2)   (generator 111)

and the symbol is written `{Y1, Y0}`. The next state is `{X(n), X(n-1)}`.
The two predecessors of a state `ns` are `{ns[0], 0}` and `{ns[0], 1}`. Every
branch into `ns` carries the input bit `ns[1]`. The decision bit of `ns` is
the oldest bit of the predecessor that survived. Which generator drives Y0 and
which drives Y1 is a convention of this design. The helper functions in
`vd_pkg` (`code_bits`, `pred_state`, `in_bit_of`) hold these rules for any K.
The generators `G0`/`G1` are parameters. The RTL is generic in K and is
simulated at K = 3 (the default) and at K = 9 (see below).

Encoder and decoder both start in state 00 after reset.

## Datapath

```
 rx {Y1,Y0} --> [input reg] --> BMU --> bm[0..3] --+--> PMU: 4 x ACS + PM regs --> new_pm, dec
                                                   |              ^                     |
                                                   +--> purge unit (precompute best PM, |
                                                        threshold test) <---------------+
                                                             | keep[], opt_state
                                                             v
                                                  SMU: register exchange --> out_bit
```

| Module | Role |
|---|---|
| `conv_encoder` | K = 3 shift-register encoder, registered output |
| `bmu` | four Hamming distances `popcount(rx ^ c)`, c = 00..11 |
| `cla_adder` | carry look-ahead adder used for every ACS add and compare |
| `acs_unit` | add, compare, select for one state; handles purged predecessors |
| `pmu` | four `acs_unit`s, the path-metric registers and per-state live flags |
| `purge_unit` | precomputes the best new metric, makes the keep mask and the best state |
| `smu` | register-exchange survivor memory, output taken from the best state |
| `viterbi_decoder` | input register + BMU + PMU + purge unit + SMU |
| `viterbi_top` | encoder and decoder side by side, each with its own ports |

### Branch metrics

With hard decisions, a branch metric is the Hamming distance between the
received pair and the pair the branch would have sent. That is 0, 1 or 2. The
unit computes all four values at once, and each ACS unit picks the metric of
its branch by codeword. The metric bus is 5 bits wide, which is the width
specified for branch metrics. Only 2 bits are ever non-zero, so synthesis
removes the rest.

### ACS and modulo normalisation

Path metrics only grow. Instead of subtracting a common value now and then,
they are 8 bits wide and simply wrap around. The spread between live metrics
is small: at most a few units for this code, and far below 128. So the sign bit
of the wrapped difference `cand1 - cand0` still tells which candidate is
smaller. That subtraction is the comparator. It is a third look-ahead adder
fed with `~cand0` and carry-in 1. Ties keep branch 0. The seventh metric bit
is the precision that is needed; the eighth is the extra bit that modulo
normalisation requires.

In `cla_adder` every carry is a direct sum-of-products of the generate and
propagate terms below it. There is no rippling chain. The adder is kept
generic because its exact "modified" structure is not specified.

### T-algorithm and precomputation (the part to read carefully)

Each state has a *live* flag. After reset only state 00 is live, with metric
0. In each step:

1. Each `acs_unit` only considers candidates from live predecessors. A state
   with no live predecessor is not live in the new step.
2. Working only from the registered metrics and the branch metrics, the purge
   unit forms `min over live s, x in {0,1} of pm[s] + bm[code(s, x)]`. This
   equals the smallest new path metric. It does not depend on the ACS
   comparisons, so it runs in parallel with them.
3. A new state is kept if it is live and `new_pm - best <= T` (a modulo
   difference). Kept states write their metric and survivor registers. The
   other states hold their registers and are marked not live.
4. The lowest-numbered state whose metric equals the best is reported as
   `opt_state`.

The best state always survives, so at least one state is always live. The
precomputation uses one step. A deeper precomputation, from metrics several
cycles old, is not built.

**Choosing T.** No value for T is given. For this code, simulation shows that
the metric spread never goes above 3. With T = 3 nothing is ever purged, and
the decoder behaves exactly like a full-trellis decoder. The default T = 2
is the largest value at which purging actually happens. In the testbenches:

* with an error-free channel, about half of all state-updates are purged
  (1028 purges in 515 steps of 4 states);
* with 8 % of channel bits flipped, about a quarter are purged, and over 4000
  bits the decoder made 118 bit errors against 116 for a full-trellis decoder
  on the same received data.

**Constraint length 9.** `tb_viterbi_k9` builds the decoder with K = 9
(256 states), generators 561 and 753 (octal), depth 45 and T = 2. It matches
the reference decoder bit for bit. But T = 2 is far too tight there: on average
only 2 to 18 of the 256 states stay live. At 6 % channel bit errors it made
150 bit errors in 1501 bits, against 7 for a full-trellis decoder. T has to
grow with K. At K = 9, raise `T` (and check that `PM_W` still covers the
larger metric spread) before using the decoder.

### Survivor memory

Each state has a 15-bit register holding the input bits along its survivor.
The newest bit is at bit 0. In each step, a kept state `ns` loads the register
of the predecessor chosen by its decision bit, shifted left, with `ns[1]`
appended. A state that is always chosen in advance could be purged. So the
output is bit 14 of the register of the state that had the best metric in the
step just done. The survivor memory is described as combining register
exchange with trace back, but how the two are combined is not specified.
Only the register-exchange form is built here. A 15-step depth is the usual
5·K rule.

## Interfaces and timing

`viterbi_decoder` (and the `dec_*` ports of `viterbi_top`):

* `in_valid`, `rx[1:0]`: one received symbol `{Y1,Y0}` per clock. Idle cycles
  are allowed. There is no back-pressure.
* `out_valid`, `out_bit`: decoded bits, in order. The bit for symbol *n*
  comes out 2 clocks after symbol *n*+14 was accepted. That is one cycle in
  the input register and one in the SMU output stage, on top of the 15-step
  survivor depth. The last 14 bits of a stream come out only if more symbols
  follow, so end a stream with 15 tail zeros; these also return the encoder
  to state 00.
* `state_live[3:0]`, `opt_pm[7:0]`: which states survived the last step, and
  the best metric (modulo 256). These are for observation only.
* `rst_n`: synchronous, active low.

`conv_encoder` (`enc_*` ports): `in_valid`/`in_bit` in; `out_valid`/`out_code`
one clock later.

Parameters (all `int unsigned`): `K`, `G0`, `G1`, `PM_W`, `BM_W`, `DEPTH`,
`T`. Their defaults are in `vd_pkg`.

## Departures and limits

* The default build is rate 1/2, K = 3. Constraint length 9 is also
  mentioned for this architecture. It is reached by setting `K=9` (256
  states) and is simulated with the generators above, which are the common
  K = 9 pair rather than given ones. A rate-3/4 trellis-coded-modulation (TCM)
  decoder is also mentioned. That would need a transition-metric unit, and it
  is not built.
* The decoder picks the *smallest* Hamming metric. That is the only
  consistent reading of "Hamming distance as an error count".
* The survivor memory is pure register exchange, not a hybrid with trace back.
* T, the survivor depth, the tie rules, the input register and the reset
  state convention are this design's choices (see above).
* The soft-decision squared-distance branch metric is not built. The design is
  hard-decision.

## Simulation

Each block has a self-checking testbench in `tb/`. `tb/vd_ref_pkg.sv` holds
the reference models they share: a bit-level encoder, and a T-algorithm
Viterbi decoder on plain integers with no modulo arithmetic. Every testbench
prints `TB_RESULT checks=N failures=M`.

* `tb_viterbi_top`: the end-to-end test at default parameters. The encoder
  output goes through a bit-flipping channel into the decoder. Phase 1 uses
  isolated errors and requires the decoded stream to equal the sent one.
  Phase 2 uses 8 % errors and requires the output to equal the reference
  decoder bit for bit. It requires that each of these happened at least once:
  purging, all states live, corrected errors, metric wrap-around, idle input
  gaps, and a best state other than 00.
* `tb_viterbi_decoder`: three streams, compared with the reference decoder,
  including output timing.
* `tb_viterbi_k9`: the decoder at K = 9, compared with the reference decoder.
* `tb_pmu`, `tb_purge_unit`, `tb_acs_unit`, `tb_smu`, `tb_bmu`,
  `tb_conv_encoder`, `tb_cla_adder`: unit tests against integer models. The
  adder test is exhaustive at 8 bits.

To run one with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/vd_pkg.sv tb/vd_ref_pkg.sv tb/tb_viterbi_top.sv --top-module tb_viterbi_top
./obj_dir/Vtb_viterbi_top
```

The end-to-end test runs in a few seconds.
