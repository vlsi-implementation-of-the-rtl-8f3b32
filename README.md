# Farrow sample-rate converter with ring-buffer clock-domain decoupling

A Farrow interpolator converts a sampled signal to a new sampling rate by
evaluating, for every output sample, a polynomial in the *inter-sample
position* mu (where, between two input samples, the output instant falls).
A bank of FIR filters running at the input rate produces the polynomial
coefficients; an approximator running at the output rate evaluates the
polynomial. That makes it usable as a converter between two completely
unrelated clocks, but only if the hand-over between the two halves is made
safe. This RTL does that with one idea: instead of measuring when the output
clock edge falls relative to the input clock (which would need sub-setup-time
precision and fails catastrophically near a coincidence of edges), it

* **computes** mu by accumulating the known clock-period ratio
  `mu_step = T_tgt / T_src` modulo 1, starting from 0, and
* places a **three-register ring buffer** behind every filter output, written
  in turn on the input clock and read in turn on the output clock, with the
  read side advancing exactly when the mu accumulator wraps.

Because the read pointer advances on average once per input period, read and
write pointers stay a fixed distance apart for ever, and every register is
stable for three input periods while it is read. No data signal is ever
sampled by the output clock while it changes.

The design is an interpolator only: the output clock must be faster than the
input clock (`mu_step < 1`).

## Block structure

```
             src_clk domain                         tgt_clk domain
 x_in ─► farrow_fir ──x~_0..x~_3──► ring_buffer ×4 ──► approximator ──► y_out
          (9-tap delay line,          (3 regs each)        (Horner in mu)
           C·x, 4 filters)             ▲        ▲               ▲
                                 wr_sel│        │ctl            │mu
                         irc ──────────┘        └──── orc ──────┘
                 (mod-3 write counter)          (mu accumulator,
                                                 mod-3 read counter)
                                                    ▲ mu_step
              mu_step_meter (src count over 2^10 tgt periods) ─┤
                                       mu_step_in ─────────────┘
```

| file | role |
|---|---|
| `rtl/farrow_pkg.sv` | default widths, number formats, default filter coefficients |
| `rtl/farrow_fir.sv` | input latch, 9-tap delay line, four order-8 FIR filters (C·x) |
| `rtl/ring_buffer.sv` | three registers per filter output, one-hot write, muxed read |
| `rtl/irc.sv` | write-address counter (modulo 3, every `src_clk`) |
| `rtl/orc.sv` | mu accumulator and read-address counter `ctl` |
| `rtl/approximator.sv` | polynomial evaluation, output register |
| `rtl/mu_step_meter.sv` | run-time measurement of `mu_step` with two counters |
| `rtl/farrow_src_top.sv` | top level |

## The address arithmetic (the part that has to be right)

Write side: the `irc` counter advances on every `src_clk` edge, 0→1→2→0, and
the ring-buffer register it names takes the current filter outputs at the
next edge. All four ring buffers share the address.

Read side: on every `tgt_clk` edge the `orc` computes
`{carry, mu} = mu + mu_step` (MUSTEP_W = 10 fraction bits). A carry means the
output instant has crossed into the next input period, so `ctl` advances
modulo 3 at the same edge. Over any long interval the number of carries is
exactly `(elapsed time)/T_src` – the same rate at which the writer advances –
provided `mu_step` equals the true period ratio to 10-bit precision. The
approximator receives only the top 7 bits of mu; the full 10 bits are kept so
that the pointers do not drift apart.

Alignment after reset: the write counter resets to **1** and the read counter
to **0**, so the reader trails the writer by one register. Count time from
the reset release so that the first `tgt_clk` edge comes at `T_tgt` and the
first `src_clk` edge at `f`, with 0 < f < T_src. Then the register read
between `tgt_clk` edges m and m+1 was written at least `T_src − f` before
edge m and is overwritten more than `T_src − T_tgt + f` after edge m+1
(write W lands at `(W−1)·T_src + f`, and the read index at edge m is
`W = floor(m·T_tgt/T_src)`). Both margins stay positive
for every ratio below 1, including the worst case `T_src ≈ T_tgt`, where a
value may have to be held for almost three source periods – which is why the
buffer has three registers and not two. (With the write counter reset to 0
instead, the reader could switch to a register at the moment it is written.)

If `mu_step` is not exact, the read pointer slips by one register every
`1/|error|` source periods; after about one slip data is read from a register
that is being rewritten. With a 10-bit `mu_step` the clock ratio must
therefore be an exact multiple of 1/1024, or the converter must be reset
periodically; a wider `MUSTEP_W` pushes the slip out proportionally.

## Data path and number formats

| quantity | width (default) | format |
|---|---|---|
| x, x~, y | `SIG_W` = 16 | signed, 15 fraction bits (range [−1, 1)) |
| filter coefficients | `COEF_W` = 11 | signed, 9 fraction bits (range [−2, 2)) |
| mu to approximator | `ISP_W` = 7 | unsigned fraction |
| mu_step, mu accumulator | `MUSTEP_W` = 10 | unsigned fraction |

The widths (7, 16, 11, 10) are the smallest at which, in the study this
design follows, the RMS error no longer improves noticeably with more bits.
The binary-point positions are this design's choice.

* **Filter bank.** Tap n of the delay line holds x[k−n]; filter l computes
  `x~_l = Σ_n C[l][n]·x[k−n]`, shifts right by 9 (floor) and saturates to 16
  bits. It is combinational from the delay-line registers, so its outputs are
  settled well before the ring buffers latch them one `src_clk` edge later.
* **Default coefficients.** The original coefficient set is not reproduced
  here. `farrow_pkg::LAGRANGE3_COEFFS` holds cubic Lagrange interpolation
  between taps 4 (mu = 0) and 3 (mu → 1), using taps 2–5 and leaving the
  other five taps of each order-8 filter zero:
  `y(mu) = p0 + mu(−p₋₁/3 − p0/2 + p1 − p2/6) + mu²(p₋₁/2 − p0 + p1/2) + mu³(−p₋₁/6 + p0/2 − p1/2 + p2/6)`,
  each coefficient multiplied by 512 and rounded. Any other 4×9 set can be
  passed through the `COEFFS` parameter of `farrow_fir`.
* **Approximator.** `y = ((x~_3·mu + x~_2)·mu + x~_1)·mu + x~_0`, each product
  shifted right by 7 (floor), each sum saturated to 16 bits, result
  registered on `tgt_clk`.

## Measuring mu_step

When the ratio is not known in advance, `mu_step_meter` counts `src_clk`
edges during windows of 2¹⁰ `tgt_clk` periods; the count is
`2¹⁰·T_tgt/T_src`, i.e. mu_step as a 10-bit fraction, to within ±1. The
window boundary crosses into the source domain as a toggle flag through a
two-flop synchroniser; the result crosses back the same way (the value itself
is stable for a whole window). `meas_valid` rises after the second window,
about 2100 `tgt_clk` cycles after reset. With `use_measured_step = 1` the
`orc` uses the measurement instead of `mu_step_in`. Because of the ±1
uncertainty, the measured value is only good enough for pointer alignment over
a limited time (see above).

## Interface and timing of `farrow_src_top`

| port | dir | width | meaning |
|---|---|---|---|
| `src_clk`, `tgt_clk` | in | 1 | input and output sample clocks, unrelated, `T_src > T_tgt` |
| `rst_n` | in | 1 | asynchronous active-low reset of both domains |
| `x_in` | in | 16 | input sample, latched at every `src_clk` rising edge |
| `mu_step_in` | in | 10 | `T_tgt/T_src` as a fraction of 1024 |
| `use_measured_step` | in | 1 | take mu_step from the meter once it is valid |
| `y_out` | out | 16 | output sample, new at every `tgt_clk` edge |
| `mu`, `ctl`, `rd_adv` | out | 7, 2, 1 | read-side state (for observation) |
| `wr_addr` | out | 2 | write address (source domain) |
| `mu_step_meas`, `meas_valid` | out | 10, 1 | run-time measurement |

One sample enters per `src_clk` cycle and one leaves per `tgt_clk` cycle.
Latency: a sample latched at `src_clk` edge e is inside the ring buffer after
edge e+1 (as part of the filter outputs of edge e+1) and the output instant
that uses it lies between taps 4 and 3 of that vector, so the output is the
input delayed by about five source periods plus the read lag; `y_out` follows
`mu`/`ctl` by one `tgt_clk` cycle.

Reset: release `rst_n` while neither clock is near an edge – most simply with
both clocks stopped, as the testbench does – because the pointer alignment
argument above assumes both counters leave reset together.

## How far it is verified

Each module has a self-checking testbench in `tb/` that compares against a
model written independently of the RTL (closed-form expectations where
possible, e.g. `ctl = floor(m·mu_step/1024) mod 3`):

* `tb_farrow_fir` – random and full-scale inputs, saturation, coefficients
  recomputed from the Lagrange formulas.
* `tb_ring_buffer`, `tb_irc`, `tb_orc` – addressing and mu sequence for
  several ratios including 1/1024 and 1023/1024.
* `tb_approximator` – bit-exact Horner model plus comparison with the exact
  real-valued polynomial.
* `tb_mu_step_meter` – five ratios, result within ±1.
* `tb_farrow_src_top` – the whole converter at its default parameters: a
  root-raised-cosine pulse (roll-off 0.35, 30 symbols, 4 samples per symbol)
  at ratios 973, 788, 666 and 573 /1024 (≈ 0.95, 0.77, 0.65, 0.56), then
  random full-scale input at 1020/1024 and at random ratios and clock phases,
  then a switch to the measured mu_step. Every output is compared bit-exactly,
  the ring-buffer timing rule (read only after written, never after
  overwritten) is checked at every output edge, and the RMS error of y against
  the exact pulse is printed (about 2.5e-4 to 2.7e-4 for a pulse of peak 0.5).

What is not verified: metastability and real setup/hold behaviour (the
simulation is zero-delay), clock-gating cells (see below), and long runs with
a ratio that is not a multiple of 1/1024.

## Departures and own choices

* Clock gating: the write strobe of each ring-buffer register and the clock
  of the read counter are meant to be gated clocks. Here they are clock
  enables on the ungated clocks, which stores the same data and simulates
  without gated-clock races; a synthesis flow can turn them back into
  clock-gating cells.
* Filter coefficients: cubic Lagrange defaults instead of the original set.
* Wrap condition: the recursion is written once as "wrap when
  `mu + mu_step > 1`" and once as "advance when the new mu is smaller than the
  old". They differ only when the sum is exactly 1; this RTL wraps then
  (carry out), which gives the same interpolation instant.
* Reset values, saturation, truncation, the output register of the
  approximator, the meter's synchronisers and valid flag, and the mu_step
  selection are this design's own.

## Simulating

Each testbench is a top-level module with no ports. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/farrow_pkg.sv \
    tb/tb_farrow_src_top.sv --top-module tb_farrow_src_top -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Replace
the testbench name to run another; all run in well under a second. Note that
Verilator is two-state: an asynchronous reset that is low from time 0 never
produces an edge, so the testbenches start with `rst_n` high and pull it low.

To change a size, override the parameters of `farrow_src_top` (e.g.
`MUSTEP_W` for a finer ratio, `SIG_W` for wider signals); `ISP_W` must not
exceed `MUSTEP_W`, and the filter coefficients scale with `COEF_FRAC`.
