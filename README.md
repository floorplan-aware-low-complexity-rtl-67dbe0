# SIDC FIR filter: multiplierless transposed-form FIR with shared differential coefficients

A fixed-coefficient FIR filter spends most of its logic on constant multiplications:
every tap multiplies the same input sample by its own coefficient. This design
avoids separate multipliers. It builds most coefficient products from products it
has already formed. Write a coefficient as

    c_j = D + 2^L * c_i        (or c_j = D - 2^L * c_i)

Then c_j*x = D*x + (c_i*x << L). The shift costs nothing (it is wiring), so c_j*x
costs one adder plus the product D*x. The difference D is called a *color*. It is
often small or a power of two, and the same color is often shared by several
coefficients. This is the shift-inclusive differential coefficient (SIDC) method.
Which coefficients are computed directly ("roots"), which colors exist, and which
earlier product each coefficient reuses form a graph. That graph is the main design
parameter of the filter.

For the default 36-tap filter this needs 24 adders in the multiplier block. Separate
canonical-signed-digit multipliers would need 47.

## Datapath

```
 x_in ──► input reg ──► primary network ──► secondary network ──► delay-and-add ──► y_out
          (x_q)         K_k * x for every    |c_j| * x for every    transposed FIR
                        root and color       unique coefficient     chain, signs applied
```

| module | role |
|---|---|
| `sidc_fir` | top: input register, the three networks, valid pipeline, elaboration check of the graph |
| `sidc_primary_net` | multiplies the sample by every primary constant (root magnitudes and colors) |
| `csd_const_mult` | one shift-and-add constant multiplier (canonical signed digits) |
| `sidc_secondary_net` | forms every other coefficient product from one color product and one shifted earlier product |
| `tdf_delay_add_net` | transposed-direct-form register chain of the symmetric filter |
| `bk_adder` | Brent-Kung parallel-prefix adder; every adder and subtractor in the design is one |
| `sidc_pkg` | widths, the graph node type and the default coefficient set and graph |

All arithmetic is two's complement and modulo the product width. An intermediate
value such as `c_i*x << 12` may overflow, but each final product fits, so the result
is still exact.

## The SIDC graph: how a configuration is described

A filter is fully described by three parameters of `sidc_fir`:

* `COEF[u]`: the `UNIQ = (TAPS+1)/2` unique coefficients of the symmetric filter.
  Tap `i` uses `COEF[min(i, TAPS-1-i)]`. Each word is 12-bit **signed-magnitude**
  (bit 11 is the sign, bits 10:0 the magnitude).
* `PRIM[k]`: the primary constants (unsigned, 24 bits). The primary network
  multiplies the sample by each one. They are the root magnitudes plus the colors.
* `NODES[k]` (`sidc_pkg::sidc_node_t`): one node per unique coefficient, listed in
  **computation order**, so a node's parent has a smaller index. Its fields:

| field | meaning |
|---|---|
| `coef` | which unique coefficient this node produces |
| `is_root` | product is `PRIM[prim] * x` directly |
| `parent`, `shift` | reuse node `parent`'s product shifted left by `shift` (0..12) |
| `parent_neg` | subtract the shifted parent product |
| `has_color`, `prim`, `color_neg` | add (or subtract) color product `PRIM[prim] * x`; with no color the node is a pure shift |

A non-root node computes `P = ±(PRIM[prim]*x) ± (P_parent << shift)` in one adder.
It may not subtract both terms, because a magnitude is never a negated sum.
Magnitudes only are formed here. The coefficient signs come in later, as the choice
between add and subtract in the tap adders of the delay-and-add network. Signs need
no extra logic because the coefficients are signed-magnitude.

At elaboration, `sidc_fir` evaluates the graph and stops with an error if any node's
value differs from `|COEF[coef]|`, or if a coefficient is produced twice.
`sidc_secondary_net` also rejects an out-of-order parent and index overflow. A
wrong graph therefore does not build.

A graph may have several equally cheap choices of incoming edge. For example, a
coefficient may reuse either of two earlier products with the same color. The
filter's output is the same for either choice, but the wiring differs: the chosen
parent and color block must sit near the node. This is the freedom that a
floorplan-aware synthesis flow exploits. It places the product blocks, then picks
the incoming edges that shorten the critical-path wires. Such a flow is not part of
this RTL. Its outcome is simply a different `NODES` (and perhaps `PRIM`) value.
`tb_sidc_fir_edge_choice` shows this on the default filter. It moves three
coefficients to other incoming edges of the same cost, for example c7 = 2·c3 − 8
instead of 4·c2 − 4. The output stays the same on every sample.

## Default configuration

`sidc_pkg::EX1_*` describes a 36-tap (order 35) equiripple low-pass filter. Passband
edge is 0.15, stopband edge 0.25 (normalised to Nyquist), with 2 dB passband ripple
and 60 dB stopband attenuation as the target. The coefficients are a Parks-McClellan
design, scaled so the largest magnitude is 2047, then rounded:

    c_0..c_17 = -102 -51 -20 42 114 164 158 76 -73 -243 -363 -355 -165 216 739 1301 1775 2047

The graph was found greedily. At each step, the coefficient not yet formed that is
cheapest is added, where:

* a root costs its CSD adders;
* a reused product costs one adder, plus the CSD adders of its color if that color
  is new;
* shifts 0..12 are allowed;
* ties go to the node with smaller adder depth.

The result has 4 roots (magnitudes 20, 2047, 114, 73) and 9 colors (2040, 511, 8,
513, 272, 256, 4, 2, 1). The 10 primary adders and 14 secondary adders give 24 in
total.

To build another filter, set `TAPS`, `NPRIM`, `COEF`, `PRIM` and `NODES` together.
`tb/sidc_fir_case.sv` shows one way to generate a valid graph with a constant
function.

## Interface and timing of `sidc_fir`

| port | width | |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset clears all state |
| `x_in` | `XW` = 12 | sample, two's complement |
| `in_valid` | 1 | `x_in` is a new sample |
| `y_out` | `XW + 11 + clog2(TAPS)` = 29 | `sum_i c_i * x(n-i)`, full precision, no rounding |
| `out_valid` | 1 | `y_out` holds the output of a new sample |

* Throughput is one sample per clock. A sample accepted on edge *t* has its output
  present, with `out_valid` high, after edge *t+1*.
* A cycle without `in_valid` does not advance the filter. `out_valid` is low for the
  matching cycle and `y_out` holds its value.
* The critical path runs from the input register through the primary network, the
  deepest chain of the secondary network, and one tap adder, to a chain register.

## Brent-Kung adder

`bk_adder` folds the carry-in into bit 0's generate signal. It then runs an up-sweep
that builds group generate/propagate over spans 2, 4, 8, and so on at positions
2d-1, and a down-sweep that completes the other positions. That is 2·log2(W)−1
prefix levels. Subtraction is `a + ~b + 1`. The width can be any value, and the
filter uses 23 and 29 bits.

## Where this design makes its own choices

These points are not fixed by the SIDC/transposed-form architecture and were chosen
here:

* **Coefficient values and graph.** The method does not fix them; the defaults are
  described above.
* **Root and color selection.** A simple greedy heuristic is used, not an optimal
  graph algorithm. Colors are multiplied separately, without sharing among primary
  constants.
* **Number formats.** Sample width is 12 bits. The output is full precision. Data is
  two's complement; only coefficients are signed-magnitude.
* **Timing and control.** Input and output registers, the valid handshake, and
  asynchronous reset were all chosen here. The multiplier block is combinational and
  unpipelined.
* **Adder use.** Every adder is a Brent-Kung adder. Adder sizing, placement and
  wire-delay optimisation are left to the implementation tools.

Other filter lengths (81, 99, 127, 215 and 351 taps) have been simulated with
generated coefficients only. No equiripple, least-squares or Butterworth
coefficient sets of those sizes are included.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bk_adder` | 16- and 23-bit adders against `+`: carry chains through every bit, carry-in, random |
| `tb_csd_const_mult` | ten constants (0, powers of two, runs of ones, filter constants) against `*` |
| `tb_sidc_primary_net` | all 13 primary products against constant × sample |
| `tb_sidc_secondary_net` | every coefficient product against `|c_j|` × sample, given exact primary products |
| `tb_tdf_delay_add_net` | the chain against direct convolution, with impulse, full-scale steps, random data and idle cycles (output must hold) |
| `tb_sidc_fir` | default filter end to end, cycle-accurate against a reference model |
| `tb_sidc_fir_edge_choice` | the default filter with two equal-cost graphs that differ in three incoming edges: same output, sample for sample |
| `tb_sidc_fir_examples` | filters of 36, 81, 99, 127, 215 and 351 taps with generated coefficients and graphs |

`tb_sidc_fir` runs with every parameter at its default. It covers the 2-edge
latency, the impulse response (which must equal the coefficients), full-scale runs
of both signs, a worst-case sign pattern, random data with idle cycles, and a reset
in mid-stream. It counts each of these and fails if any never happened.

`tb_sidc_fir_examples` covers both odd and even lengths. Each generated graph
includes shifted reuse, subtracted colors and repeated magnitudes.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sidc_pkg.sv rtl/bk_adder.sv \
    rtl/csd_const_mult.sv rtl/sidc_primary_net.sv rtl/sidc_secondary_net.sv \
    rtl/tdf_delay_add_net.sv rtl/sidc_fir.sv \
    tb/tb_sidc_fir.sv --top-module tb_sidc_fir -o sim && obj_dir/sim
```

For `tb_sidc_fir_examples`, add `tb/sidc_fir_case.sv`. Compiling it takes about a
minute, because the 351-tap case is large.
