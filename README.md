# Fixed-complexity MIMO detectors

A MIMO receiver with four transmit and four receive antennas gets, on every
tone of an OFDM symbol, a vector `y = H s + n`. Here `s` holds four QAM
symbols. Detection means finding the `s` that best explains `y`.

After a QR decomposition of the channel `H` (done elsewhere), the problem
becomes a search for the `s` that minimises `|y_hat - R s|`. `R` is upper
triangular. Because it is triangular, the distance splits into one term per
antenna, and the search becomes a walk down a tree:

- level 4 picks `s4`;
- level 3 picks `s3`, knowing `s4`;
- and so on down to level 1, where the sum of the terms is the full distance.

An exhaustive search visits `eta^4` leaves, where `eta` is the number of
constellation points: 4, 16 or 64. That is far too many.

This RTL implements the **fixed-complexity** way around that. At the top level
every one of the `eta` candidates for `s4` is tried. Below it, each candidate
is extended by just its single best child per level. The best child comes from
a slicer: round the interference-cancelled point to the nearest constellation
level.

The result is `eta` complete paths per vector symbol, always the same number
and always in the same order. So the search maps onto a systolic pipeline that
takes one path per clock and has a constant throughput. The price is a small
loss against true maximum-likelihood detection.

There are four detector cores, plus an array of sphere decoders. They sit side by side in `mimo_accel_top` and
share only the clock and reset:

| core | output | formats | rate |
|---|---|---|---|
| `hard_detector` | best vector symbol and its distance | QPSK, 16-QAM, 64-QAM; 2x2, 3x3, 4x4; any mix, symbol by symbol | one vector symbol per `eta` clocks |
| `soft_detector` | 24 max-log LLRs per vector symbol | 4x4 64-QAM | 24 LLRs per 64 clocks |
| `lord_detector` | `4 log2(eta)` max-log LLRs per vector symbol | 4x4 QPSK, 16-QAM, 64-QAM, any mix | one vector symbol per `4 eta` clocks |
| `staggered_sd` | best vector symbol, its distance and the work spent | 4x4 QPSK, 16-QAM, 64-QAM | one vector symbol per `n + 7` clocks, `n` = root children visited (1..`eta`) |
| `multicore_sd` | the same per tone, tagged with the tone index | as `staggered_sd` | up to `M` (default 10) tones in flight |

At 500 MHz, the hard core gives 1 Gbit/s for QPSK, 500 Mbit/s for 16-QAM and
187.5 Mbit/s for 64-QAM. The soft core gives 24/64 bit per clock, which is
about 215 Mbit/s at 575 MHz. The LORD core gives `log2(eta)/eta` bit per
clock, which is 217, 108.5 and 40.7 Mbit/s at 434 MHz.

## The node pipeline

All cores use the same chain (the LORD core swaps `node_ctrl` for `lord_ctrl`):

```
node_ctrl --> mcu L4 --> mcu L3 --> mcu L2 --> mcu L1 --> fmu           (hard)
                                                      \-> bitmetric_proc --> llr_proc (soft)
```

A *path* (`mimo_pkg::path_t`) travels down the chain, one register stage per
level. It carries:

- the symbols chosen so far, `s[4:1]`;
- the cumulative distance `d`;
- a control word that travels with the data: `instr = {MF, NS, NA}`. `MF` is
  the modulation format, `NS` marks the first path of a new vector symbol, and
  `NA` is the antenna count minus one;
- flags: `valid`, `live` (not pruned), `last` (final path of the symbol) and
  a one-bit symbol `tag`.

Because the format and antenna count ride with every path, paths of a QPSK
symbol and a 64-QAM symbol can be in the pipeline at the same time. Switching
costs nothing.

**`node_ctrl`** accepts one vector symbol, meaning `y_hat` and the rows of `R`,
through a valid/ready handshake. It then issues the `eta` top-level candidates
on `eta` consecutive clocks:

- It is ready again on the clock of the last candidate, so back-to-back
  symbols leave no gap.
- It pulses `endbit` with the last candidate.
- The hard core issues candidates column by column from the most negative
  level.
- The soft core issues them in **zig-zag order** around the unconstrained
  estimate `y4/R44`: nearest level first, then the neighbours alternating
  outward, per axis (`zz_enum`). Good paths then come early, which makes the
  pruning below effective.

**`mcu` (one per level)** computes, for its level `i`:

```
c  = y_i - sum_{j>i} R_ij * s_j           (interference cancellation)
s_i = slice(c / R_ii)                    (level 4: the candidate itself)
d  = d_in + |Re(c - R_ii s_i)| + |Im(c - R_ii s_i)|
```

Details of the MCU:

- The products `R_ij * s_j` need no multiplier. A symbol component is ±1, ±3,
  ±5 or ±7, so each product is a shift and an add (`mimo_pkg::mul_comp`).
- The distance uses the l1 norm, `|Re| + |Im|`, instead of the square.
- A level above the antenna count (for example level 1 in a 3x3 system) is
  inactive. It passes the path through and reports symbol 0.
- In the soft core an MCU also compares `d` with a radius and clears `live`
  when the radius is exceeded. The datapath register of a dead path is not
  loaded, which stands in for clock gating. The path still moves down so that
  the schedule is kept.

**`qam_slicer`** rounds `c / R_ii` without dividing. It compares `|c|` with
`2R_ii`, `4R_ii` and `6R_ii`, clamps the result to the largest magnitude of
the format, and puts the sign back.

**Row registers.** `R` row `i` is needed by level `i` for all `eta` paths of a
symbol. By then `node_ctrl` may already hold the next symbol. So each level
copies its row into a local register when the `NS` path of a symbol reaches
it, and uses that copy for the rest of the symbol.

## Number formats

| quantity | format |
|---|---|
| `y_hat`, `R` entries | `DW = 11` bit two's complement, real and imaginary parts; `R_ii` real and positive |
| symbol component | 3 bits, sign-magnitude `{sign, m}`; value `±(2m+1)` (`m=0..3`); QPSK uses `m=0` only, 16-QAM `m<=1` |
| symbol | `{re[2:0], im[2:0]}` |
| `c`, error terms | `CW = 17` bits signed |
| distance | `MW = 22` bits unsigned; all ones means "infinite" and the adders saturate there |
| `MF` | `00` QPSK, `01` 16-QAM, `10` 64-QAM |
| `NA` | number of antennas minus one; `3` = 4x4 |
| bit labels (soft) | Gray code per axis; label `{re bits, im bits}`, most significant first |
| LLR | `LW = 8` bit signed; **positive means the bit is 1**; magnitude clipped to `CLIP` |

## Hard detector

The `fmu` stage at the end of the chain keeps the best path of the current
symbol. The `NS` path overwrites it; later paths replace it only when they are
strictly better. On the symbol's `last` path, `fmu` registers
`est_valid/est_s/est_d/est_mf`.

Timing: the estimate appears `eta + 4` clock edges after the edge that
accepted the symbol, which is 8, 20 or 68 edges. A new symbol is accepted
every `eta` clocks.

## Soft detector: bit metrics, LLRs and pruning

The max-log LLR of a bit is the difference between two distances:

- the best distance among paths where the bit is 0;
- the best distance among paths where the bit is 1.

One of these two is always the overall best distance `d_a`, whose path has
label bits `a`. So it is enough to keep, for every bit `(i,j)`, the best
distance `c_ij` among paths whose bit differs from `a_ij`.

**`bitmetric_proc`** maintains these values while the paths stream in, one
per clock. For each live path `b` with distance `d_b`, it touches the bits
where `b` differs from the current best `a`:

- **`b` becomes the new best (`d_b < d_a`).** The old best now lies on the
  opposite side for every bit that differs, so each such `c_ij` takes `d_a`.
  Then `a` and `d_a` are replaced by `b` and `d_b`.
- **Otherwise.** Each differing `c_ij` takes `d_b` if `d_b` is smaller.

The `NS` path resets everything. A `c_ij` that is still infinite at the end
means no path offered the other bit value.

The result is the exact per-bit minimum over the group. The testbench checks
this against a direct search, ties included.

**`llr_proc`** holds the finished `a`, `c` and `d_a` for one symbol. It reads
out one bit per clock, for antennas 1 to 4, real-part bits first. For each bit
it produces:

- `±min(c_ij - d_a, CLIP)`, with the sign taken from `a_ij`;
- `±CLIP` when there is no counter-hypothesis.

24 bits per 64 clocks leaves the serial unit idle most of the time. An
assertion flags a load that arrives during a readout.

**Pruning.** A path whose partial distance already exceeds `d_a + CLIP` can
only produce clipped LLRs, whatever its leaf turns out to be. So the MCUs of
levels 3 to 1 use the running best of the bit-metric processor, plus `CLIP`,
as their radius. A dead path costs no datapath activity, and the LLRs come out
**exactly** as without pruning.

Two conditions keep this safe:

- The radius is "infinite" while the bit-metric processor has not yet seen a
  path of the same vector symbol. The per-symbol `tag` detects this.
- Level 4 never prunes, because the zig-zag order is only roughly sorted.

The `pruned` output flags, per level and clock, each path just pruned, so the
saving can be measured.

Timing: a symbol is accepted every 64 clocks. Its 24 LLRs come on 24
consecutive clocks, the first one 70 clock edges after acceptance:

- 64 candidates;
- 4 node stages;
- the bit-metric register;
- the LLR load.

## LORD soft detector: four trees and metric recycling

The single tree of the other cores favours the antenna at its top level. That
antenna alone gets all `eta` candidates; the others get only best children.
The LORD core (layered orthogonal lattice detection) fixes this. It runs the
search four times per vector symbol, once for each column permutation of the
channel, so that every antenna is at the top once.

**Input.** The core takes four triangular systems per symbol, `in_rows[k]`
for permutation `k`. It does not compute them.

**Permutations.** In permutation `pi`, tree level
`((ant - 1 + pi) mod 4) + 1` holds antenna `ant`:

- permutation 0 is the natural order;
- permutation 1 puts `s3` on top, followed by `s2, s1, s4`;
- and so on.

**Issue order.** `lord_ctrl` issues `4 eta` paths: the `eta` candidates of
permutation 0, then those of permutation 1, and so on. Each path carries:

- its permutation number `pi`;
- `NP` on the first path of a permutation, which makes every level reload its
  row register from that permutation's system;
- `NS` on the first path of the symbol.

**Metric recycling.** A single `bitmetric_proc` runs over all `4 eta` paths as
one group, with its de-permutation stage enabled to map levels back to
antennas. So a bit's best counter-hypothesis may come from any of the four
trees. The LLRs are not clipped by default: `LW = 23` holds any difference of
two 22-bit distances.

**The one stall.** The LLR unit is serial and needs `4 log2(eta)` clocks per
symbol. The array delivers a symbol every `4 eta` clocks. That is too fast
only when a QPSK symbol (16 clocks) directly follows a 64-QAM symbol
(24 LLRs). In that case `lord_ctrl` holds `in_ready` low until
`elapsed + 4 eta_new >= 4 log2(eta_old)`, where `elapsed` is the number of
clocks since the last path of the previous symbol. That costs at most 8
clocks, and `stall` shows it. Every other sequence runs back to back.

**Timing.** The first LLR comes `4 eta + 6` clock edges after the edge that
accepted the symbol.

## Staggered sphere decoder: the same tree, searched with a radius

`staggered_sd` searches the same tree as the hard core: all `eta` children of
the root, and below each of them the best child at every level. It adds a
sphere constraint. The radius is the distance of the best leaf found so far
and starts at all ones for each vector symbol. A path whose partial distance
exceeds the radius cannot win, so it is dropped where it is found. The
result is the same best path as the hard core's, but the work depends on the
channel and the noise.

**The schedule.** There is one unit per level, and they run staggered. In
each clock the top unit issues one child of the root, and the units for
levels 3, 2 and 1 extend the children issued one, two and three clocks
earlier. A leaf arriving at the bottom can shrink the radius in that same
clock, so a later path is already checked against the tighter radius.

**Ascending order at the root.** The top unit, `mcu4_enum`, issues the
root's children in ascending order of partial distance. This is what makes
early termination possible: once one child lies outside the radius, all later
ones do too, and the search stops. It also stops when every child has been
issued. The order is built as follows:

- The constellation splits into `sqrt(eta)` columns of points that share a
  real part.
- Within a column, the order by distance depends only on where the imaginary
  part of `y_hat_4` falls. It is the same for every column and is given by the
  zig-zag of `zz_enum`.
- Each column keeps a counter pointing at its best point not yet issued. A
  distance unit per column prices that point, or gives all ones once the
  column is exhausted.
- `lpm_compare_select` finds the smallest of these `sqrt(eta)` prices. The
  winning point is issued, and its column's counter advances.

The smallest of the column fronts is the global next point, because every
column is itself in ascending order.

**The compare/select.** `lpm_compare_select` does not build a tree of
two-input comparators. It looks at all operands together, one bit column at
a time from the MSB. In a column where some operand has a 0, every operand
with a 1 drops out. The survivors at the end all hold the minimum, and the
lowest index among them wins.

**Timing and reporting.** With `n` root children issued, `est_valid` comes
`n + 6` clock edges after the accepting edge:

- 1 edge to start;
- `n` edges to issue;
- 1 edge to decide to stop;
- 3 edges to drain the lower levels;
- 1 edge for the output register.

The core takes one symbol at a time, so it accepts the next one in the clock
after `est_valid`. `est_nodes` (`n`) and `est_cycles` report the work per
symbol. A block-level scheduler sharing a time budget across tones would
need these.

## Multicore array: many tones, variable run times

An OFDM receiver detects hundreds of tones per OFDM symbol, and a single
sphere decoder with a variable run time cannot keep up. `multicore_sd` puts
`M` staggered cores (default 10) behind one input. The tones are offered in
order, and each goes to the lowest-numbered idle core. `in_ready` stays high
while any core is idle. Each core remembers its tone index and returns it
with the estimate. A quick tone can therefore overtake a slow one, and the
consumer reorders by tone index.

The outputs of all cores are side by side, because several may finish in the
same clock. In the testbench, 500 random 16/64-QAM tones, half of them noisy,
pass through ten cores in about 850 clocks. That is 1.7 clocks per tone,
against `n + 7` clocks (up to 71) per 64-QAM tone on one core.

Block early termination is not built. That scheme gives each tone a cycle
budget, and falls back to a cheap decision when the budget runs out.
`est_nodes` and `est_cycles` of `staggered_sd` are what such a scheduler
would count.

## Departures and choices

Where this RTL follows its source:

- the fixed-complexity search;
- the `instr` word layout `{MF, NS, NA}`;
- the `eta` clocks per symbol with no reconfiguration cost;
- the slicer thresholds at `2R`, `4R`, `6R`;
- the l1 distance;
- the 11-bit inputs and 22-bit distances;
- the bit-metric update rule with its complement-bit bookkeeping;
- the serial LLR unit;
- `CLIP = 3`;
- node pruning at `d_a + clip`, forced open at the start of a symbol;
- the throughput figures above.

Where this design made its own choices:

- **One register per tree level.** The source retimes a deeper pipeline, with
  10 stages in the hard core and 7/7/6/3 in the soft core. Changing the depth
  changes the latencies above but not the throughput.
- **Valid/ready input handshake and asynchronous active-low reset.**
- **Smaller systems.** A 2x2 or 3x3 system uses the top levels of the tree.
  The unused low levels report symbol 0.
- **Ties.**
  - The slicer rounds a tie to the smaller magnitude.
  - The best-path selectors keep the earlier path.
- **Candidate order.** The hard core visits its candidates in a plain column
  order, since every candidate is evaluated anyway. The zig-zag takes its
  first step toward the side of the unconstrained point.
- **The LORD core guards its LLR unit with a stall.** The source only asks
  that symbols be ordered by increasing modulation.
- **The LORD permutations are cyclic.** The source fixes only which antenna
  is on top in each permutation.
- **Gray labelling per axis for the soft output.** The source only says a
  look-up table maps symbols to bits.
- **Staggered sphere decoder.**
  - It takes one symbol at a time. The source does not say how symbols
    overlap.
  - The radius check keeps ties (`d <= radius`), and the best leaf is
    replaced only by a strictly smaller one.
  - Column counters are 4 bits wide, so that 8-point columns (64-QAM) can
    run out.
  - Ties in the compare/select go to the lower column.
  - The source's compare/select circuit finds a maximum; here the same
    elimination is turned around to find the minimum.
- **`CLIP` is in distance LSBs.** What it means in LLR units depends on how
  the inputs are scaled.
- **Not built:**
  - the sequential and parallel sphere decoder variants, the l2-norm
    variant, and the block-level early-termination scheduler;
  - the m-way / k-stage arrays sized for 802.11n;
  - the QR decomposition, the channel memory and the channel decoder.

  For 64-QAM at 802.11n rates (52 tones in 3.6 µs), a single core needs about
  930 MHz. Two cores, or a wider array, are needed there.

## Files

| file | content |
|---|---|
| `rtl/mimo_pkg.sv` | sizes, types (`path_t`, `row_t`, `instr_t`, ...), shift-add product, labels |
| `rtl/qam_slicer.sv` | nearest-level decision |
| `rtl/zz_enum.sv` | zig-zag visiting order for one axis |
| `rtl/node_ctrl.sv` | input handshake, channel buffer, candidate issue |
| `rtl/mcu.sv` | one tree level |
| `rtl/fmu.sv` | best-path selection (hard) |
| `rtl/hard_detector.sv` | hard core |
| `rtl/bitmetric_proc.sv` | per-bit best counter-hypothesis distances (soft) |
| `rtl/llr_proc.sv` | serial LLR readout (soft) |
| `rtl/soft_detector.sv` | soft core |
| `rtl/lord_ctrl.sv` | LORD input buffer, permutation sequencing, stall guard |
| `rtl/lord_detector.sv` | LORD core |
| `rtl/lpm_compare_select.sv` | bit-elimination minimum of N operands |
| `rtl/mcu4_enum.sv` | root children in ascending distance order |
| `rtl/staggered_sd.sv` | staggered sphere decoder |
| `rtl/multicore_sd.sv` | M staggered cores fed from one tone stream |
| `rtl/mimo_accel_top.sv` | all cores |
| `tb/mimo_ref_pkg.sv` | integer reference model (true products, exhaustive slicing) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench:

- is self-checking;
- draws random channels and symbols with `$urandom`;
- compares against the reference model or a direct computation;
- checks the latencies given above;
- ends with a line `TB_RESULT checks=N failures=M`.

For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mimo_pkg.sv tb/mimo_ref_pkg.sv tb/tb_mimo_accel_top.sv --top-module tb_mimo_accel_top
./obj_dir/Vtb_mimo_accel_top
```

`tb_mimo_accel_top` runs all the cores and the multicore array at their default parameters at the same
time. It counts each mechanism and fails if any of them never happens:

- format switches;
- antenna-count switches;
- back-to-back symbols;
- idle gaps;
- input stalls;
- pruned paths;
- clipped LLRs;
- bits without a counter-hypothesis;
- LORD format switches;
- LORD stalls;
- sphere searches that stop early, and ones that visit every root child;
- multicore results returned out of order, and several cores busy at once.

`tb_soft_detector` widens `CLIP` so that LLR magnitudes, not just signs, are
checked.

The widths leave no room for overflow inside the tree. With 11-bit inputs,
`|c|` stays below `1023 + 3 * 2 * 7 * 1023 = 43 989`. That fits the 17-bit
cancellation path. The distance saturates at all ones.

The random channels of the testbenches have `R_ii` between 12 and 82 and
off-diagonal entries within ±12. So the slicer decisions vary and are not
pinned to the outermost level.
