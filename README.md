# Barrel-shifter systolic arrays for FIR, IIR and DFT

A systolic filter is a chain of identical cells. Each cell multiplies a sample
by a coefficient and adds the product to a partial sum that moves one cell per
clock. The multiplier is the big, slow part of each cell. This design removes it.

A fixed coefficient `A` is written in canonical signed digit (CSD) form,
`A = sum_j k_j * 2^a_j` with `k_j` in {-1, 0, +1}. The multiplication then
becomes a few shift-and-add steps. Each step is one **BSAC cell** (barrel
shifter + accumulator):

```
x_out = x_in
y_out = y_in + k * 2^a * x_in          k in {-1,0,+1},  -13 <= a <= +1
```

One multiplication takes as many cells as `A` has nonzero CSD digits. The clock
period is the delay of one shifter and one adder, not of a full
multiply-accumulate. CSD has the fewest nonzero digits of any signed-digit code.
Coefficients can also be cut to their few most significant digits, which trades
precision for cells.

The RTL follows the architecture of *Systolic Architectures Based on Barrel
Shifters for Real-Time Signal and Image Processing*. It contains the cell and
the four arrays built from it, each at the size of that paper's worked example:

| array | module | structure | default size |
|---|---|---|---|
| cascaded FIR (Type I) | `bsac_fir_cascaded` | digits of a coefficient in series, variable count per coefficient | 3 taps with 2, 4, 3 cells |
| parallel FIR (Type II) | `bsac_fir_parallel` | one row per digit, rows summed by an adder tree | 3 taps x 4 rows |
| IIR | `bsac_iir` | two digit rows, feed-forward then feedback cells | a(0..2), b(1..2), 2 rows |
| DFT | `bsac_dft`, `bsac_dft_bin` | one chain of twiddle factors per output bin | 4 points, up to 3 cells per factor part |

`bsac_systolic_top` puts all four arrays side by side on one sample stream. It
adds a coefficient loader that takes plain binary coefficients and recodes them
to CSD in hardware (`csd_recoder`).

## Number formats

All widths are in `bsac_pkg`.

- **Sample `x`**: 16-bit two's complement.
- **Partial sum `y`**: 32-bit two's complement, in units of 2^-13 sample LSBs.
  The term `k * 2^a * x` is then `x` shifted left by `a + 13` (0 to 14) bits,
  with no bits lost. This is why the shifter is 16 bits in and 32 bits out.
- **Coefficient value** (loader input): 16-bit Q2.13, so value = `ld_coef / 8192`.
  CSD digit position `p` has exponent `a = p - 13`. Values up to about ±2 fit.
  A value whose CSD form needs `2^2` or more raises `ld_err`.
- **CSD digit** (`csd_digit_t`, 7 bits): a 2-bit sign code (`00` = 0,
  `01` = +1, `11` = -1) and a 5-bit signed exponent `a`.

Sums wrap modulo 2^32. Intermediate overflow does no harm: a final result that
fits in 32 bits is exact. With the default formats an FIR output is exactly
`2^13 * sum A*x`, where `A` is the coefficient as cut to its cells: nothing is
rounded anywhere in the datapath. Only the IIR's fed-back sample is rounded.

## The cell (`bsac_cell`, `barrel_shifter`)

The digit `(k, a)` is held in a register written through `ld`/`ld_digit`. The
barrel shifter is a logarithmic shifter: 4 stages of 2:1 multiplexers, shifting
by 1, 2, 4 and 8. One adder adds, subtracts or skips the shifted sample.

- With `REGISTERED = 1`, `x_out` and `y_out` are registers. They advance on every
  clock with `en = 1` and hold otherwise.
- With `REGISTERED = 0`, the cell is combinational. Only the IIR uses this (see
  below).

## Coefficient recoding and truncation (`csd_recoder`)

Let `m = |coef|`, `h = m >> 1`, `t = m + h` and `c = h ^ t`. The +1 digits of
`m`'s CSD form are the set bits of `t & c`, and the -1 digits are those of
`h & c`. For a negative coefficient the two sets swap. A scan from the top
bit then lists the nonzero digits, most significant first.

An array keeps as many digits as it has cells for that coefficient. It drops
the least significant ones (truncation, not rounding). `ndigits` reports the
length of the full code, so the host can see when a coefficient was cut.

## Cascaded FIR: why the first cell of a coefficient taps the last-but-one cell

`bsac_fir_cascaded` computes `y(n) = sum_j A(j) x(n-j)`. The cells of `A(2)`
come first, then those of `A(1)`, then those of `A(0)`. The partial sum enters
the first cell as 0 and moves one cell per clock. Within the group of one
coefficient, each cell takes `x` from the previous cell. The sum and its sample
travel together, so every digit of `A(2)` multiplies the same sample.

At the boundary between two groups, the partial sum must meet the *next*
sample, one clock newer. A plain chain cannot give it that sample, because the
sum and the sample move at the same speed. So the first cell of each group
takes `x` from the **last-but-one** cell of the previous group. That cell holds
the same sample as the last cell, but one clock earlier.

For the example (digits 2, 4, 3 for `A(0)`, `A(1)`, `A(2)`), the chain is:

```
cell          1      2      3      4      5      6      7      8      9
digit       A2,1   A2,2   A2,3   A1,1   A1,2   A1,3   A1,4   A0,1   A0,2
x taken from x_in   c1     c2     c2     c4     c5     c6     c6     c8
```

Partial sum number `n` meets `x(n)` in cells 1-3, `x(n+1)` in cells 4-7 and
`x(n+2)` in cells 8-9. It leaves as `y(n+2)`, 7 samples after `x(n+2)`
entered. In general the latency is `cells - taps + 1`.

The RTL derives the routing from the `DIGITS` parameter. Cell `i` of group `g`
must see the input delayed by `i - g` registers. It is fed from the nearest
earlier cell whose output has exactly that delay. That cell is the
last-but-one of the previous group whenever that group has two or more cells.
Every coefficient needs at least one cell; a zero coefficient uses a zero digit.

The throughput is one output per clock. The critical path is one cell, however
many digits the coefficients have.

## Parallel FIR (`bsac_fir_parallel`)

All coefficients get `NBS` cells, arranged as `NBS` identical rows. Row `r`
holds digit `r` of every coefficient. The sample is broadcast to every cell, and
each row is a broadcast-input systolic FIR. A binary adder tree sums the rows.
Each tree level is registered, so the clock period stays one cell.

`y_trunc` is the partial sum of the first `NBS/2` rows. It gives the same filter
with every coefficient cut to half its digits. It is delayed so that it lines up
with `y_out`. A coefficient with fewer nonzero digits than `NBS` leaves zero
digits in its spare rows.

## IIR: closing the feedback loop in one clock (`bsac_iir`)

`y(n) = sum_k a(k) x(n-k) + sum_k b(k) y(n-k)`. Every coefficient is cut to
`NROWS` digits. Row `r` holds digit `r` of every coefficient, in this order:

```
x ─┬──────┬──────┐                     y(fed back) ─┬────────┐
   v      v      v                                  v        v
0→[a(2)]→[a(1)]→[a(0)] ───────────────────────────→[b(2)]──→[b(1)]─┐
                                                                   ├─Σ→ y(n)
        (same for row 2) ...........................................┘
```

- The `a` cells form a broadcast-input FIR.
- The `b(2)` cells are registered and read the output register. They add
  `b(2)·y(n-2)` when that register holds `y(n-2)`.
- The `b(1)` cells must use `y(n-1)` in the same clock that `y(n)` is formed.
  So they are combinational (`REGISTERED = 0`). The rows' `b(1)` results are
  summed and registered as `y(n)`.

The feedback loop therefore holds one shifter, one add/subtract and the row
sum. There is no multiplier. The array gives one output per clock, with a
latency of `NB + 1` = 3.

The fed-back value is `y_sample`: the 32-bit sum divided by 2^13, rounded down
and saturated to 16 bits. The filter thus behaves like one with 16-bit input and
output. `y_out` gives the unsaturated sum. With more than two feedback taps, the
`b(NB)..b(2)` cells are all registered and the same reasoning holds.

## DFT (`bsac_dft_bin`, `bsac_dft`)

Bin `K` computes `X(K) = sum_m x(t+m) W^(mK)` with `W = exp(-j2π/N)`, over the
latest `N` samples. This is an FIR sum whose coefficients are twiddle factors.

The input is real, so a bin is two cascaded chains: one with the CSD digits of
`cos(2π mK/N)` gives `Re X(K)`, and one with those of `-sin(2π mK/N)` gives
`Im X(K)`. Each twiddle part has `NBS` cells. A part needing fewer digits loads
zero digits, so the digit count can differ from factor to factor.

`bsac_dft` places `N` bins side by side. The output is a sliding-window DFT, a
new window every clock. For a block transform, read every `N`-th result.
Latency: `N*NBS - N + 1` samples after the window's last sample (9 for the
default).

## Top level and coefficient loading (`bsac_systolic_top`)

All arrays take `x_in` when `en = 1`; `en = 0` freezes them all. `rst` is
synchronous and active high. It clears data, digits and the valid counters, so
coefficients must be loaded after reset.

To write one coefficient per clock, drive `ld_valid`, `ld_target`, `ld_index`
and `ld_coef` (Q2.13):

| `ld_target` | array | `ld_index` |
|---|---|---|
| 0 | cascaded FIR | `j` of `A(j)`, 0..2 |
| 1 | parallel FIR | `j` of `A(j)`, 0..2 |
| 2 | IIR | 0..2 = `a(0..2)`, 3..4 = `b(1..2)` |
| 3 | DFT | `(K*4 + m)*2 + p`, with `p` = 0 for the real part and 1 for the imaginary part of `W^(mK)` |

- `ld_err` flags an index outside the array; nothing is written then.
- `ld_err` also flags a coefficient too large for the exponent range. Its
  in-range digits are still written.
- `ld_ndigits` gives the length of the full CSD code.
- Loading may happen while the arrays run. It takes effect on the next clock.

Output timing, in enabled clocks:

| output | result | latency after newest sample | valid after |
|---|---|---|---|
| `casc_y` | `sum A(j) x(n-j)`, digits 2/4/3 | 7 | 9 samples |
| `par_y`, `par_y_trunc` | same with 4 / 2 digits | 3 | 5 samples |
| `iir_y`, `iir_y_sample` | IIR output | 3 | 3 samples |
| `dft_re[K]`, `dft_im[K]` | `X(K)` of the last 4 samples | 9 | 12 samples |

Each `*_valid` rises once every sample in the window entered after reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the outputs
with a model computed in the testbench, on every clock. The model uses its own
digit-by-digit CSD recoder, in `tb_bsac_pkg`. Streams are random, with random
stalls, and the latencies above are checked exactly. Each testbench prints
`TB_RESULT checks=N failures=M`.

- `tb_barrel_shifter`, `tb_bsac_cell`: cell arithmetic, load, hold, reset.
- `tb_csd_recoder`: all 65,536 coefficient values against the reference
  recoder.
- `tb_bsac_fir_cascaded`, `tb_bsac_fir_parallel`, `tb_bsac_iir`: the arrays.
  The IIR test includes feedback saturation. The cascaded test also checks, on
  every clock, which sample each of the nine cells holds against the routing
  table above.
- `tb_bsac_fir_cascaded_uneven`: the cascaded FIR with 1, 1, 3 and 2 cells per
  coefficient. Single-cell groups have no last-but-one cell, so this exercises
  the general routing rule.
- `tb_bsac_dft_bin`, `tb_bsac_dft`: 4-point DFT, all bins.
- `tb_bsac_systolic_top`: whole design at default parameters, loaded through
  the recoder. It counts each mechanism (stall, truncating load, truncated
  output, IIR saturation, both load errors) and fails if one never happens.
- `tb_workload_fir121`: a 121-tap highpass FIR on both FIR structures (a
  Hamming-windowed filter with cutoff 0.39 cycles/sample, designed for the
  test). Outputs are checked bit-exact. The gain is measured at four
  frequencies. Three digits per coefficient (parallel) track the ideal
  response to within 0.003. The cascaded version, at 1.09 digits per
  coefficient on average, still keeps the stopband below 0.011 and the
  passband within 0.001 of the ideal.
- `tb_workload_dft256`: one bin of a 256-point DFT, fed `1000 cos(2πn/32)`.
  With at most 3 digits per twiddle part, `|X(8)|` is 0.8 % below the exact
  value and `X(5)` is 0.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/bsac_pkg.sv tb/tb_bsac_pkg.sv tb/tb_bsac_systolic_top.sv \
  --top-module tb_bsac_systolic_top -Mdir obj && ./obj/Vtb_bsac_systolic_top
```

Most builds take seconds. The 256-point DFT build takes about 3 minutes
(1,536 cells).

## What is this design's own choice

The cell equations, the CSD coding, the exponent range, the 16-bit sample and
the 32-bit shifter output come from the published architecture. So do the
array structures: the last-but-one tap of the cascaded FIR, the digit rows and
adder tree of the parallel FIR, the row layout and output feedback of the IIR,
and the twiddle-factor chain of the DFT. So do the example sizes.

The following were not specified and are choices made here:

- **Fixed point**: the 2^-13 scaling of the partial sum and the Q2.13 coefficient.
- **Pipelining**: registered cells and adder-tree levels. In the IIR, the
  split into registered `b(2)` cells and a combinational `b(1)` with the row
  sum; only the wiring of that loop is given, not its timing.
- **IIR feedback**: rounded down and saturated to a 16-bit sample.
- **DFT**: real input, separate real and imaginary chains, one bin array per
  output, and a uniform `NBS` cells per twiddle part with zero digits where
  fewer are needed.
- **Control**: reset, clock enable, valid flags, the load ports and the
  binary-to-CSD loader. The original preloads digits computed offline.
- **Truncation**: drops the least significant digits without rounding.
- **Top level**: the four arrays share one stream. They are alternatives for
  different algorithms, shown together here.

The original also reports gate counts for 16-by-16 multiplication (MAC 3,588
gates, BSAC 886 cascaded and 2,028 parallel). It claims throughputs of 100 MHz
or more. Neither is reproduced here. The design is RTL without a technology
mapping or timing analysis.
