# A self-reconfiguring, low-energy NEXT canceller (Dynamic Algorithm Transformations)

An adaptive filter is normally sized for the worst channel it will ever see:
the longest cable, the most taps, the widest coefficients, the full supply
voltage. Most of the time the channel is far kinder than that. This design
pairs the filter with a small controller that measures how well the filter is
doing and trims it while it runs:

* it switches off the taps that contribute least, one at a time, for as long
  as the output quality stays above a target;
* it narrows the coefficients by one or two bits when few taps are left;
* it lowers the supply-voltage code, because fewer taps mean a shorter
  critical path, so the same sample rate can be met at a lower voltage;
* when the quality drops below a lower target (the cable or the channel
  changed), it switches every tap back on and lets the filter re-converge.

The filter is the *signal processing* part and the controller the *signal
monitoring* part. The application is a near-end crosstalk (NEXT) canceller
for a 155.52 Mb/s 64-CAP receiver over category-3 twisted pair. Its worst
case is 30 complex taps with 12-bit coefficients, 4-bit symbols and 16-bit
adders, a 38 ns symbol period, and a 2.5 V supply. The quality measure is
the slicer SNR averaged over 1024 symbols. The target window is 31–34 dB,
and the controller decides once every 8192 symbols.

A second, independent system sits beside it in the top level. It is a
real, direct-form reconfigurable LMS filter with 8 taps and 8-bit data and
coefficients, the small system-identification example. It has its own copy
of the same controller. That copy keeps the mean squared error below 0.01,
for a 50 MHz sample rate and a 5 V maximum supply. Its input precision is
chosen on chip from the statistics of its input.

## Block map

```
dat_top
├── next_canceller      signal processing: the complex NEXT canceller
│   ├── sr_fblock       strength-reduced complex FIR (3 real multipliers per tap)
│   ├── sr_wud          strength-reduced complex LMS weight update
│   └── cap_slicer ×2   64-CAP decision and slicer error, one per dimension
├── sma                 signal monitoring: the reconfiguration controller
│   ├── mse_monitor     error energy over 1024 symbols -> "SNR low"/"SNR high"
│   ├── tap_select      finds the powered-up tap with the smallest merit E_k
│   │   └── mult_energy_model ×3   energy estimate of a multiplication by w
│   ├── precision_select   coefficient LSBs to drop, from the tap count
│   └── vdd_select         supply-voltage code, from the tap count
├── rcfg_lms_filter     real reconfigurable LMS filter (system identification)
├── sma (second copy)   its controller: MSE limit 0.01, 5 V, 20 ns
└── data_precision_select   input LSBs the real filter may drop, from its input's
                            peak-to-average ratio
dat_pkg                 shared sizes, delays, voltages, state type, Vdd function
```

The top-level ports stand in for everything outside the canceller. `tx_ar`
and `tx_ai` are the local transmitter's symbols. `rx_r` and `rx_i` are the
received samples after the equalizer. `dec_*`, `err_*` and `u_*` are the
slicer decisions, the slicer errors and the cancelled samples. `bv` is the
code for an external variable supply.

## The strength-reduced complex filter

The NEXT canceller is complex. A direct complex multiply costs four real
multipliers per tap. This design uses three, as follows.

Write each coefficient as `w = c + j·d`. The filter computes
`y = Σ conj(w_k)·x(n−k)`, with `x = xr + j·xi`. Each tap stores two numbers
instead of c and d:

```
c1 = c + d        d1 = c − d
```

Three rows of real multiply-accumulates are then enough:

```
row1 = Σ c1_k · xr(n−k)
row2 = Σ d1_k · xi(n−k)
row3 = Σ (d1_k − c1_k) · (xr − xi)(n−k)      (d1 − c1 = −2d)
yr   = (2·row1 + row3) / 2  = Σ c·xr + d·xi
yi   = (2·row2 + row3) / 2  = Σ c·xi − d·xr
```

The third row needs its own delay line of `xr − xi`, which is one bit wider
than the symbols. Its coefficient `d1 − c1` is one bit wider than c1 and d1.
To avoid rounding the halving away, `sr_fblock` produces `yr2 = 2·yr` and
`yi2 = 2·yi`, one extra fractional bit. Rows 1 and 2 accumulate in 16-bit
adders, as in the worst-case design. Row 3 and the outputs carry two more
bits, because both operands of row 3 are a bit wider.

The weight update (`sr_wud`) is the complex LMS rule rewritten for c1 and d1.
It shares one product per tap:

```
S_k    = (xr − xi)(n−k) · (er − ei)
c1_k  += μ · (S_k + 2·xi(n−k)·er)
d1_k  += μ · (S_k + 2·xr(n−k)·ei)
```

Expanding these gives exactly `c += μ(xr·er + xi·ei)` and
`d += μ(xi·er − xr·ei)`, which is LMS for `y = Σ conj(w)·x`. μ is a power of
two, so the scaling is a shift (`MU_SH`).

Each coefficient is kept in a register with 8 guard bits (`G`), and the
filter uses the top 12 bits. The default step size is μ = 2^-12 in coefficient
units, chosen here for stable convergence with 30 taps and a 64-CAP symbol
power of 42.

### Per-tap power controls

Each tap has two control bits:

* `alpha_k` = 0 feeds zero into the tap's F-block multipliers. This is the
  tap "powered down"; its adder then adds zero.
* `beta_k` = 0 feeds zero into the tap's update multipliers, so its
  coefficients hold.

`prec_red` forces the 0, 1 or 2 least significant bits of c1 and d1 to zero
at the multiplier inputs. The row-3 coefficient is formed from the
already-reduced values, so all three rows see the same precision.

## Number formats and timing

| signal | format |
|---|---|
| symbols `ar`, `ai` (canceller input) | signed 4-bit integers, odd values −7..7 |
| coefficients c1, d1 | signed 12-bit, value = int / 2^11 |
| `rr`, `ri`, `ur`, `ui`, errors | signed, value = int / 2^12; 18 bits (errors saturated to 14 bits) |
| `yr2`, `yi2` (internal) | signed 18 bits, value = int / 2^13 (twice the filter output) |

Nothing is pipelined; this is the architecture the critical-path formula
below assumes. With `sym_en = 1`, the cancelled sample, the decision and the
error follow the inputs in the same cycle. Coefficients and delay lines
update on that cycle's rising edge. `sym_en` may be held high (one symbol per
clock) or strobed. Reset is asynchronous and active-low, and clears delay
lines, coefficients and the controller.

The slicer (`cap_slicer`) rounds each dimension to the nearest odd level in
−7..7. A value exactly on an even integer goes to the upper level. Its error
is `u − level`.

The canceller adapts on the slicer error, so it is decision-directed. When
the decisions are right, this error equals the canceller's true error.

## The controller (`sma`)

This is the least obvious part of the design.

### Measuring quality without a logarithm

`mse_monitor` adds `er² + ei²` over 1024 symbols, back to back. The SNR at
the slicer is `10·log10(42 / mean |e|²)`, where 42 is the mean power of a
64-CAP symbol. Instead of taking a logarithm, the window sum is compared
with two constants, `1024 · 42 · 10^(−SNR/10)` for 31 dB and for 34 dB. Both
are scaled to the error format and computed at elaboration. The results are
`snr_low` (below 31 dB) and `snr_high` (above 34 dB). `clear` restarts a
window, so a decision never mixes two configurations.

### Ranking taps by merit per unit energy

A tap is worth keeping in proportion to its power `|w_k|²`. It costs the
energy of its multipliers. `mult_energy_model` estimates the energy of a
multiplication by a fixed `w` from its bit pattern:

```
N(w) = 0.9·N1(w) + 0.1·N2(w)
N1   = number of ones in w
N2   = word length − number of trailing zeros of w
```

The output is `10·N(w) = 9·N1 + N2`, so it stays an integer.

The merit of tap k is `E_k = |w_k|² / E_m(w_k)`. For the strength-reduced tap:

* `|w|² = (c1² + d1²)/2`
* `E_m = N(c1) + N(d) + N(d1)`

Here `d = (c1 − d1)/2` is the middle row's multiplier.

`tap_select` walks through the powered-up taps, one per clock. It reads each
tap's coefficients through the canceller's `rd_idx` / `rd_c1` / `rd_d1`
port, and keeps the smallest E_k. It compares fractions by cross-multiplying,
`a/b < c/d ⇔ a·d < c·b`, so no divider is needed. A scan takes N clocks,
and `done` comes one clock later. Ties keep the lower index. A tap whose
coefficients are all zero has E = 0 and goes first.

### Decisions

Every 8192 symbols the controller looks at the last complete 1024-symbol
window. It then moves through four states:

| state | what happens |
|---|---|
| `ADAPT` | All taps on and adapting. After `CONV_DEC` (4) decision periods, and once the SNR is not low, the filter counts as converged: every `beta` is cleared. If the SNR is high, a scan starts. |
| `SCAN` | `tap_select` runs. The chosen tap's `alpha` is cleared, the window restarts, and the state goes to `VERIFY`. |
| `VERIFY` | At the next decision: if the SNR is low, the tap just removed is switched back on (*undo*), and the tap count is frozen. If the SNR is still high, another `SCAN` follows. Otherwise, `MONITOR`. |
| `MONITOR` | A low SNR means the channel changed. Every `alpha` and `beta` is set, and the state returns to `ADAPT` (*re-adapt*). A high SNR with no frozen count leads to another `SCAN`. |

`prec_red` and `bv` are combinational functions of the number of
powered-up taps, `n_on`:

* **Precision.** The coefficient precision may drop by half a bit for every
  halving of the tap count: `B_w = 12 + ½·log2(n_on/30)`, rounded up. In
  integers, `prec_red` is the largest `r ≤ 2` with `n_on·4^r ≤ 30`.
  For example, 4–7 taps give 11 bits.
* **Supply.** The critical path is
  `Tcp = Tm + N·Tmux + B_ADD·Tcarry + n_on·Tsum`, using 4 ns, 0.1 ns,
  0.6 ns and 0.7 ns. Its ratio to the symbol period is `r = Tcp/Ts`. From
  the usual square-law delay model, the lowest safe supply is
  `Vdd(r) = Vt + r·Vo/2 + sqrt(r²·Vo²/4 + r·Vt·Vo)`, with
  `Vo = (Vdd,max − Vt)²/Vdd,max`. `vdd_select` holds a 31-entry table,
  computed at elaboration in integer arithmetic. Each entry is the index of
  the lowest level in 1.0 V, 1.1 V … 2.5 V that is at least `Vdd(r)`.
  The code is meant for the filter's supply only; the controller itself
  stays at the full supply.

Pulses `ev_decide`, `ev_converged`, `ev_power_down`, `ev_undo` and
`ev_readapt` mark each event.

## The real reconfigurable LMS filter (`rcfg_lms_filter`)

A plain direct-form LMS filter, `y = Σ w_k·x(n−k)`, `e = d − y`,
`w_k += μ·e·x(n−k)`, with the same per-tap controls:

* `alpha` and `beta` per tap, as in the canceller;
* `bw_red`, which forces 0–2 coefficient LSBs to zero;
* `bx_red`, which forces 0–2 input LSBs to zero (data precision).

Its formats are:

* `x`: 8 bits, value int/2^7.
* `w`: 8 bits, value int/2^7, in 16-bit registers.
* `d`, `y`, `e`: 16 bits, value int/2^14. `e` is saturated.

μ is 2^-6. One delay line serves both the filter and the update.

In the top level, a second `sma` instance drives its `alpha`, `beta` and
`bw_red`. It uses the same mechanism with different numbers:

* **MSE limit.** The limit `J ≤ 0.01` is given as a 20 dB limit against a
  unit reference power (`SIG_POW = 1`). Both window edges are set to 20 dB,
  so trimming continues until the limit is crossed, and the step that
  crossed it is undone.
* **Tap ranking.** The filter returns the same coefficient on both
  read-back inputs. With `c1 = d1 = w`, the ranking metric reduces to
  `w² / E_m(w)`.
* **Supply.** The supply code uses the 20 ns sample period and the 5 V
  maximum.

Its results appear on the `si_*` outputs.

### Choosing the input precision (`data_precision_select`)

A quantized input loses about 6 dB of signal-to-quantization-noise ratio
per bit. Its SNR is roughly `6·B + 4.8 − PAR` dB, where PAR is the
peak-to-average ratio `20·log10(x_max / rms(x))`.

Assume a gain control keeps the input at the converter's full scale. The
word length must then cover the worst PAR the filter may see, `PAR_MAX_DB`
(14 dB by default). When the actual input is less peaky, the same SNR
needs fewer bits:

```
bx_red = clamp(floor((PAR_MAX_DB − PAR) / 6), 0, 2)
```

The block adds `x²` over 1024 samples. It compares the sum with one
constant per reduction step, `1024 · x_max² · 10^(−(PAR_MAX_DB − 6r)/10)`,
computed at elaboration. `bx_red` changes only at the end of a window.

Some reference points:

* A full-scale uniform input (PAR ≈ 4.8 dB) drops one bit.
* A two-level input (≈ 0 dB) drops two bits.
* A sparse or small input drops none.

The NEXT canceller does not use this block, because its input is always a
4-bit symbol.

## Where this design departs from, or adds to, its source

* **Threshold voltage.** The supply formula needs a threshold voltage, and
  none is given for the 2.5 V process. 0.5 V is used (`dat_pkg::VT_MV`).
  With it, the 8-tap example gets 5.0, 4.9, 4.6, 4.5 and 4.2 V against
  published 5.0, 4.9, 4.6, 4.4 and 4.2 V. The 30-tap canceller gets 2.5 V
  down to 1.7 V at 4 taps, where 2.0 V is reported. No single threshold
  reproduces all the published canceller voltages, so treat `bv` as a
  formula result, not a calibrated table.
* **Complex sign convention.** The update is `w += μ·conj(e)·x`, and the
  filter output uses `conj(w)`, which makes the pair a true gradient
  descent for complex data. If one writes the filter as `Σ w·x` instead,
  the stored coefficients are the conjugates of that `w`.
* **Supply levels.** The 0.1 V grid from 1.0 V is this design's choice.
* **Convergence.** It is taken as 4 decision periods (`CONV_DEC`); how
  convergence is detected is not specified.
* **Pace of trimming.** One tap is removed per decision period. After an
  undo the count is frozen until the next re-adaptation, so the controller
  does not oscillate around the 34 dB limit. Both are this design's choices.
* **SNR window.** The 31–34 dB window is only a target. With the test
  channel in `tb_dat_top`, the end state sits at about 36 dB. The next tap
  to go is a strong one, and removing it drops the SNR below 31 dB, so it is
  put back. The window cannot be met in that case, and the design keeps the
  safe side.
* **State change.** A drop below 31 dB in steady state is always treated as
  a channel change: all taps are switched on. The alternative reading, to
  add back only some taps, is not implemented.
* **Data precision.** It is not reconfigured in the canceller, because its
  input is a fixed 4-bit symbol. For the real filter, the worst-case PAR
  (14 dB), the 1024-sample window and the 2-bit limit are this design's
  choices.
* **Controller for the real filter.** Its window length (1024), decision
  interval (8192) and convergence count (4) are borrowed from the canceller.
  No values are given for this example.
* **Extra widths.** Adder widths beyond 16 bits in row 3, guard bits in the
  coefficient registers, error saturation, and the tie rules in the slicer
  and the tap search are this design's choices.
* **Outside the design.** The rest of the transceiver (scrambler, encoder,
  shaping filters, DAC, line filters, gain control, ADC, timing recovery,
  equalizer, decoder) and the variable supply itself are not included.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if
something hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/dat_pkg.sv tb/tb_dat_top.sv --top-module tb_dat_top -Mdir obj_tb_dat_top
./obj_tb_dat_top/Vtb_dat_top
```

Replace `tb_dat_top` with any testbench:

| testbench | what it checks |
|---|---|
| `tb_mult_energy_model` | all 4096 coefficient values against a bit-counting reference |
| `tb_cap_slicer` | decisions and errors over the input range, including clamping |
| `tb_sr_fblock` | outputs against a direct complex `Σ conj(w)x` reference, with random alpha and precision |
| `tb_sr_wud` | every coefficient against the complex LMS update in c/d form, with random beta |
| `tb_next_canceller` | cancellation, slicing, read-back, and convergence on a synthetic crosstalk path |
| `tb_rcfg_lms_filter` | output, error and weights against a reference model, all four controls |
| `tb_mse_monitor` | window sums and both SNR flags (short window) |
| `tb_tap_select` | selected tap against a real-valued E_k reference, scan latency |
| `tb_precision_select`, `tb_vdd_select` | every tap count against the formulas |
| `tb_data_precision_select` | window sums and input-precision choice against a real-valued PAR reference (short window) |
| `tb_sma` | the controller's state sequence with a scripted error stream (short windows) |
| `tb_sysid_states` | the five 8-tap system-identification states: precision, supply level, identification, held taps |
| `tb_dat_top` | full size, end to end (see below) |

`tb_dat_top` runs the whole design at its default sizes and takes about a
quarter of a minute. The far-end signal is random 64-CAP symbols. The
crosstalk path has three strong taps and 27 weak ones, and noise is added at
about 40 dB. Halfway through, the crosstalk path is replaced by a different
one.

It checks that each mechanism happens at least once:

* convergence with updates switched off;
* tap power-down and undo;
* re-adaptation after the change;
* precision reduction and supply reduction;
* on the real filter, an input-precision reduction and its restoration.

It also checks that:

* all weak taps are removed before any strong one;
* steady-state decisions equal the far-end symbols;
* the strong taps survive.

The same testbench runs the second system in parallel. The real filter
identifies an 8-tap unknown system with three strong and five weak taps.
Its controller must:

* converge;
* switch off the five weak taps;
* undo the attempt on a strong one;
* lower the supply code.

The filter output is checked every sample against a model built from the
reported configuration. `tb_sysid_states` runs the same filter through the
five published tap patterns of the 8-tap example, with precision and supply
checked for each.
