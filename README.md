# Clock-less wave-pipelined dot-product unit

A conventional pipeline makes a long combinational path fast by cutting it
with registers. Clock-less wave-propagated pipelining (CWPP) reaches the same
throughput without those registers. The combinational network is balanced so
that every path from its inputs to its outputs takes almost the same time.
New inputs can then be launched long before earlier ones have reached the
output. Several "waves" of data travel through the logic at once and do not
overtake each other. What limits the launch rate is the spread between the
fastest and slowest path, not the length of the path.

This repository holds SystemVerilog for a unit built this way: an accumulated
dot product of 8-bit vectors of up to 1024 elements. It follows the test case
of the paper *WP 2.0: Signoff-Quality Implementation and Validation of
Energy-Efficient Clock-Less Wave Propagated Pipelining*. In that design, each
wave carries 8 operand pairs. At a 1 ns launch period this gives 8 G
multiply-accumulates per second, with no register between the input and
output samplers.

## The datapath

```
            +---------------+    +-----------------+    +--------------------+
 a[8][8] -->| dp_in_sampler |--->| dp_wallace_tree |--->| wave_balance_delay |--+
 b[8][8] -->|  128 (+2) FF  |    | 64 rows -> 2    |    |  (timing model)    |  |
 vld,sof -->|               |    | carry-save      |    +--------------------+  |
            +-------^-------+    +-----------------+                            v
 clk_in ------------+                                          +----------------+   +----------------+
    |                                                          | dp_out_sampler |-->| dp_accumulator |--> acc, elems
    +--> strobe_config_delay (dly_sel) --> strobe_out -------->|   48 (+2) FF   |   | 26-bit sum     |
                                                               +----------------+   +----------------+
```

* **`dp_in_sampler`**: registers on the rising edge of `clk_in`. It holds 128
  operand bits (8 pairs of 8 bits) and a 2-bit tag. Each edge launches one
  wave.
* **`dp_wallace_tree`**: the wave network, with no clock. Each operand pair
  contributes 8 partial-product rows: `a[i]` gated by one bit of `b[i]` and
  shifted by that bit's weight. All 64 rows are reduced together by layers of
  full adders, three rows to two per layer, in ten layers. Multiplication and
  summation are fused: the eight products are never formed separately. The
  tree stops at a carry-save pair (24-bit sum, 24-bit carry), so its output is
  48 bits wide.
* **`dp_out_sampler`**: 48 result bits plus the tag. They are clocked by
  `strobe_out`, not by `clk_in`.
* **`dp_accumulator`**: on the same strobe, it adds `sum + carry` into a
  26-bit running total. A wave tagged `sof` restarts the total. A wave without
  `vld` is skipped. `elems` counts the accumulated elements.
* **`strobe_config_delay`**: the field-configurable delay on the clock
  strobe.
* **`wp_pkg`**: sizes and the wave structs.

## The clock strobe and the valid window

This section is the part that needs care.

The output registers cannot be clocked by `clk_in`: when a wave reaches the
output, `clk_in` has already launched two or three more. Instead, a branch of
`clk_in` runs beside the data as the *clock strobe*. It passes a configurable
delay and clocks the output side. Its latency, `D_strobe`, is set by
`dly_sel`.

Take a wave launched at time 0. Call the network's fastest path `D_min` and
its slowest `D_max`. Both are counted from the clock root. Fold the output
registers' hold and setup times into them: `D_min` means fastest path minus
hold, and `D_max` means slowest path plus setup. The wave is stable at the
network output from `D_max` until the next wave starts arriving, at
`t_launch + D_min`.

In the normal operating point, the strobe edge produced by the *next* launch
captures the wave. That edge arrives at `t_launch + D_strobe`, so:

```
    D_max - t_launch  <=  D_strobe  <  D_min          (setup, hold)
    t_launch          >   D_max - D_min               (launch-rate limit)
```

These are an ordinary setup check and an ordinary hold check, with the strobe
latency acting as a very large useful skew. Two things follow:

* The hold check does not depend on the launch period.
* Both `t_launch` and `D_strobe` can be set after fabrication. A die that
  fails hold can be fixed by changing `dly_sel`. A die that fails setup can be
  fixed by changing `dly_sel` or by slowing the launch clock.

More generally, the strobe edge of launch `k+n` can capture wave `k` whenever:

```
    D_max - n * t_launch <= D_strobe < D_min - (n - 1) * t_launch
```

With the longest delay settings, `n = 0` also works: the strobe edge of the
wave's own launch captures it, one launch period earlier. Results stay
correct, because the tag bits travel with the data. Only the latency changes.

### Numbers in the default configuration (slow corner)

| quantity | value | origin |
|---|---|---|
| `D_MAX_PS` (slowest path + setup) | 3016 ps | published setup limit: strobe latency ≥ 2.016 ns at `t_launch` = 1.0 ns |
| `D_MIN_PS` (fastest path − hold) | 2040 ps | published hold limit: strobe latency < 2.040 ns |
| launch-rate limit | `t_launch` > 976 ps | follows from the two |
| strobe delay | 1200 ps + 15 ps × `dly_sel`, 128 taps | own choice |
| valid settings at 1.0 ns | `dly_sel` = 55 (2025 ps); also 122 (n = 0) | simulated |
| valid settings at 1.2 ns | `dly_sel` 42–55 and 122–127 | simulated |

The published slow-corner data is not fully self-consistent. At 1.2 ns it
gives a setup limit of 1.906 ns; a fixed `D_max` of 3016 ps predicts
1.816 ns. It also says the slow corner's highest frequency is just over
800 MHz, while showing a (very narrow) window at 1 GHz. The model uses one
fixed `D_min`/`D_max` pair taken from the 1 GHz data.

## What is real logic and what is a timing model

Synthesis sees three register blocks, the adder tree and the accumulator. The
physical timing that makes wave pipelining work comes from gate delays and the
delay cells inserted when the netlist is balanced. RTL cannot express that
timing, so two behavioural models stand in for it:

* **`wave_balance_delay`** sits on the tree output. For each change of its
  input at time t:
  * from t + `D_MIN_PS`, it drives a disturbed value: the new value with every
    bit inverted;
  * at t + `D_MAX_PS`, it drives the settled value.

  Delays are transport delays, so many waves are inside at once. If the next
  wave disturbs the output before the current one settles (launch period
  below `D_MAX_PS - D_MIN_PS`), the current wave never becomes visible.
* **`strobe_config_delay`** delays every edge of `clk_in` by
  `DLY_BASE_PS + dly_sel × DLY_STEP_PS`, also as a transport delay. The base
  delay stands for the whole strobe path: its balanced share of the network
  and the output clock tree. So `dly_sel` maps directly to the strobe latency
  in the formulas above.

Both models use `fork`/`join_none` with `#` delays. Lint tools and simulators
accept them; synthesis tools do not. For gates, synthesize the other modules,
or the top with these two replaced. In a zero-delay simulation without the
models, the output sampler would capture a later wave than intended.

A process corner is a set of model parameters. The defaults describe the slow
corner. `tb_cwpp_corner_bc` models the fast corner with every delay halved:
`D_min` 1020 ps, `D_max` 1508 ps, strobe delay 600 + 8 × `dly_sel` ps. Halving
is this implementation's assumption, based on the published statement that
skew at the fast corner is about half that at the slow corner. In that corner:

| launch period | settings that work |
|---|---|
| 1.4 GHz | 41 of 128 |
| 2 GHz | 3 of 128 |
| 2.2 GHz | none |

## Top-level interface (`cwpp_dot_product`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_in` | in | 1 | launch clock; one wave per rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; clears tags, accumulator and count |
| `vld` | in | 1 | this wave carries operands |
| `sof` | in | 1 | this wave starts a new vector |
| `a`, `b` | in | 8 × 8 | operand pairs, `wp_pkg::opvec_t` |
| `dly_sel` | in | 7 | strobe delay setting |
| `strobe_out` | out | 1 | the delayed strobe, for observing the capture clock |
| `acc` | out | 26 | running dot product, unsigned |
| `elems` | out | 11 | elements in `acc` (8 per wave, 1024 for a full vector) |

Inputs are sampled on the rising edge of `clk_in`. In the normal operating
point, a wave's contribution appears in `acc` on the strobe edge of the second
launch after its own, that is `2 × t_launch + D_strobe` after its launch
edge. For a full vector of 128 waves, `acc` is final that long after the
128th launch. So keep `clk_in` running (with `vld` low) for a few periods
after the last wave. Change `dly_sel` only while `clk_in` is stopped and the
delay line is empty; the strobe delay model asserts this.

Parameters: `D_MIN_PS`, `D_MAX_PS` (network timing model), `DLY_SEL_W`,
`DLY_BASE_PS`, `DLY_STEP_PS` (strobe delay). Operand count, operand width,
vector length and output width are in `wp_pkg`.

## Choices this implementation makes

The published design fixes the overall structure and several sizes:

* the structure: input sampler, fused dot-product Wallace tree, strobe delay
  tune, output sampler, accumulator;
* 8 pairs of 8-bit operands per wave;
* 128 input and 48 output register bits;
* vectors of up to 1024 elements;
* the 1 ns launch period and the slow-corner window.

The rest is this implementation's own choice:

* **Operands are unsigned.**
* **The tree ends in carry-save form.** Its 48 output bits are therefore a
  24-bit sum and a 24-bit carry word, and the final carry-propagate addition
  is done in the accumulator.
* **Each wave carries two tag bits, `vld` and `sof`.** They are registered
  with the operands and pass through the network as balanced wires. This
  gives 130 input and 50 output register bits instead of 128 and 48. The
  published design does not say how the accumulator is controlled.
* **Reset:** asynchronous and active low. It clears only the tags, the
  accumulator and the count; operand and result registers are not reset.
* **Accumulator:** 26 bits, the exact size for 1024 products of 255 × 255.
  It wraps on longer vectors.
* **Strobe delay:** tap count, base and step are invented. They cover the
  published slow-corner latency range (about 1.25 to 3.0 ns) finely enough to
  hit its 24 ps window.
* **Partial-product reduction:** groups whole rows in threes at every level.
  This is a Wallace-style carry-save tree, not a bit-level optimized
  Wallace/Dadda netlist.

After synthesis, the register count is 217 (130 + 50 + 26 + 11). The
published implementation reports 213 flip-flops.

The clock trees on both sides are not written out. They carry the clock and
have no logic function; their latency is part of `DLY_BASE_PS`. The
balancing flow that inserts delay cells into the netlist is a software flow,
not hardware. Its result is represented only by `wave_balance_delay`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dp_wallace_tree` | `sum + carry` against a directly computed dot product: corner vectors and 5000 random ones |
| `tb_dp_in_sampler`, `tb_dp_out_sampler` | capture on the edge, hold between edges, asynchronous tag reset |
| `tb_dp_accumulator` | reference model over random vectors with restarts and bubbles; a full vector of maximal products, which must not overflow |
| `tb_strobe_config_delay` | exact latency of every edge for all 128 settings, with several edges in the line at once |
| `tb_wave_balance_delay` | stable / disturbed / settled values around `D_min` and `D_max`; at a launch period below the skew, no wave ever settles |
| `tb_cwpp_dot_product` | end to end at default parameters (below) |
| `tb_cwpp_corner_bc` | the same end-to-end test with fast-corner timing, at launch periods of 0.45 to 1.0 ns |
| `tb_cwpp_activity` | one full vector at each input toggling activity from 0 to 100 % in 12.5 % steps (each operand bit flips between waves with that probability); checks each result and counts register bit toggles |

`tb_cwpp_dot_product` runs the top at its default parameters:

* a full 1024-element vector, checking the result, the 8 elements per launch
  and the exact latency;
* back-to-back vectors with bubbles;
* a sweep of all 128 strobe settings at 0.9, 1.0 and 1.2 ns. Every
  accumulator update is compared with a scoreboard. Whether each setting
  works must match the window formula above.

It counts, and requires at least once:

* waves in flight;
* bubbles;
* restarts;
* setup and hold violations;
* the launch-rate limit.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/wp_pkg.sv \
    tb/tb_cwpp_dot_product.sv --top-module tb_cwpp_dot_product -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in its own file; the package is named
first because everything imports it. `-Wno-fatal` is needed because delays
computed at run time (in the two timing models and the clock generators of
the testbenches) draw Verilator's ZERODLY warning; none of them is ever zero.

All files use a 1 ps time unit. Each simulation runs in well under a second once built.
