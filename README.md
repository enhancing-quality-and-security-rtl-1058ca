# PLL-based true random number generator with embedded tests

A true random number generator (TRNG) on an FPGA needs a physical noise source that the
logic around it cannot disturb. The PLLs of an FPGA sit in their own area with their own
supply, so their clock jitter is a well-isolated source of randomness. This generator samples
one PLL output (clk1) with a second, coherently related clock (clk0). Because f1/f0 = K_M/K_D
is an exact ratio of coprime integers, the sampling points sweep the clk1 period in steps of
Δ = T1/K_D and the sequence of samples repeats every K_D clk0 cycles. That interval is the
*pattern period* T_P = K_D·T0. Most samples land far from a clk1 edge and are constant. A few
land within a few picoseconds of an edge, so jitter makes them random. These are the
*contributors*.

The original PLL-TRNG XORed the K_D samples of a pattern period into one bit. This design
instead **counts the ones** in each pattern period with a 9-bit counter, a time-to-digital
converter (TDC). The count N_p carries much more information than its parity:

* its least significant bit is the raw random bit (it equals the XOR of the K_D samples);
* the whole 9-bit value feeds two embedded health tests, derived from a stochastic model of
  the counter:
  * a **Total failure test** raises an alarm if the counter value stops changing;
  * an **Online test** raises an alarm if the Allan variance of the counter value falls
    below the value that guarantees the jitter needed for the entropy target.

A small **security FIFO** holds raw bits back until the Total failure test has had time to
reject them.

## Block structure

```
clk_in ─┬─ PLL1 ── clk1[0..n-1] ──► DFF ─► DFF ─► XOR ─► x_i ──► TDC ──► N_p (9 bit)
        │                                          │               │  cnt[0]
        └─ PLL0 ─┐ (or clk_in directly)            └─► dff_out     │    └─► security FIFO ─► raw_bit
                 └─► clk0 ──► T-base counter (mod K_D) ──► period_end   │
                                                          N_p ──► Total failure test ─► alarm_tot
                                                          N_p ──► Online test (AVAR) ─► alarm_ol
```

| File | Module | Role |
|---|---|---|
| `rtl/pll_trng_pkg.sv` | package | widths, Configuration A constants, test thresholds, K_M/K_D derivation |
| `rtl/trng_sampler.sv` | `trng_sampler` | two flip-flops per PLL1 output (the second resolves metastability), XOR of the n outputs |
| `rtl/tbase_counter.sv` | `tbase_counter` | counts clk0 modulo K_D and marks the last cycle of each pattern period |
| `rtl/trng_tdc.sv` | `trng_tdc` | counts the ones of x_i over each period and delivers N_p and the raw bit |
| `rtl/total_failure_test.sv` | `total_failure_test` | run length of identical N_p, plus the PLL lock flag |
| `rtl/online_test.sv` | `online_test` | Allan variance over 4096 values, compared with 1.1 |
| `rtl/security_fifo.sv` | `security_fifo` | 24-bit holding buffer, flushed by the alarms |
| `rtl/pll_trng_core.sv` | `pll_trng_core` | the synthesizable clk0-domain generator |
| `rtl/pll_model.sv` | `pll_model` | behavioural PLL with bounded Gaussian jitter (simulation only) |
| `rtl/pll_trng_top.sv` | `pll_trng_top` | two PLL models, clock switch and core (simulation top) |

`pll_trng_core` is the part to put on a chip or an FPGA. There, clk0 and clk1 come from real
PLLs, and the first sampling flip-flop should sit as close as possible to the PLL1 output.
`pll_trng_top` wraps the core with PLL models so the whole generator can be simulated.

## Configuration: where K_D comes from

The designer picks only the PLL dividers. A PLL gives f_out = M/(N·C)·f_in. With PLL0 making
clk0 and PLL1 making clk1, both from the same clk_in:

    f1/f0 = (M1·N0·C0) / (N1·C1·M0) = K_M / K_D   (reduced to coprime numbers)

`pll_trng_pkg::trng_kd` and `trng_km` compute these factors. `pll_trng_top` passes K_D to the
core automatically. The defaults are Configuration A, the same for the Cyclone V, Spartan 6
and SmartFusion2 devices it was chosen for:

| | M0 | N0 | C0 | f0 [MHz] | M1 | N1 | C1 | f1 [MHz] | K_M | K_D | R [Mb/s] | S = K_D/T1 [1/ps] |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| A | 29 | 4 | 7 | 129.46 | 26 | 5 | 3 | 216.67 | 728 | 435 | 0.30 | 0.094 |
| CV_B | 99 | 13 | 4 | 237.98 | 8 | 1 | 5 | 200.00 | 416 | 495 | 0.48 | 0.099 |
| S6_B | 19 | 4 | 4 | 148.44 | 29 | 5 | 5 | 145.00 | 464 | 475 | 0.31 | 0.069 |
| SF_B | 31 | 4 | 4 | 242.19 | 23 | 3 | 3 | 319.44 | 368 | 279 | 0.87 | 0.089 |
| CV_C | 5 | 1 | 3 | 208.33 | 147 | 19 | 5 | 193.42 | 441 | 475 | 0.44 | 0.092 |
| S6_C | 33 | 4 | 7 | 147.32 | 17 | 5 | 3 | 141.67 | 476 | 495 | 0.30 | 0.070 |
| SF_C | 35 | 11 | 2 | 198.86 | 17 | 3 | 3 | 236.11 | 374 | 315 | 0.63 | 0.074 |

All use f_in = 125 MHz and K_D < 511, so 9-bit counters suffice. A good configuration also
keeps contributors far apart *in time* within the pattern period. Sample i lands at
reconstructed position j = i·K_M mod K_D, so two neighbouring positions can be sampled at
close or at distant moments. Contributors less than about 30 clk0 periods apart are
correlated. Configurations are screened for this offline; it costs no hardware.

`USE_PLL0 = 0` selects the single-PLL variant: clk0 = clk_in and K_D = N1·C1/gcd.
`N_OUT = n` samples n outputs of PLL1, shifted by 180/n degrees, and XORs the sampler
outputs. This adds contributors, and also correlation between them.

## Timing

* **Sampler:** x_i is the clk1 level captured two clk0 edges earlier.
* **TDC:** `period_end` is high in the last cycle (count K_D−1) of each pattern period. One
  cycle later `cnt_valid` pulses with N_p. This gives one counter value and one raw bit every
  K_D clk0 cycles (3.36 µs, 0.30 Mb/s for Configuration A). The first period after reset is
  discarded, because it still contains the cleared sampler stages.
* **Total failure test:** the alarm rises one cycle after the strobe of the L_MIN-th identical
  value. That is L_MIN·K_D·T0 after the start of the run: 24 × 435 = 10 440 T0, or 80.6 µs.
  The old test, based on 255 output bits, took about 110 925 T0.
* **Online test:** the first estimate comes with the 4097th counter value, then one every 4096
  values, one cycle after the strobe. For CV_B that is 4096·495/237.98 MHz ≈ 8.5 ms.
* **Security FIFO:** a raw bit leaves (`raw_valid`, one cycle after a write to the full FIFO)
  after 24 further counter values have been written. When the Total failure alarm rises, the
  first value of the failing run is therefore still held, and it is discarded.
* **Alarms:** both alarms are sticky until reset. Either one flushes the FIFO, so no raw bit
  leaves after an alarm.
* **Reset:** `rst_n` is asynchronous and active low. The core releases it through a two-stage
  synchroniser. In `pll_trng_top` the core stays in reset until both PLLs report lock.

## The health tests and their thresholds

Each sample X_j is a Bernoulli variable. Its probability of being 1 follows from a Gaussian
edge position around the ideal edge. So N_p follows a Poisson binomial law with
E(N) = Σp_j and Var(N) = Σp_j(1−p_j). Only the contributors add to the variance.

* **Total failure.** Without jitter, N_p is constant. With jitter, equal successive values
  still happen by chance. The threshold l_min(β) is the shortest run whose probability under
  the model is below β. β follows from the accepted false-alarm rate. For Configuration A,
  l_min is 24 (once per day), 26 (once per week) or 28 (once per month). The value is a
  parameter (`L_MIN`), computed offline. `tb_trng_model_pkg::l_min` implements that
  computation: it approximates the Poisson binomial law by a normal law and raises l until
  Σ_k Pr(N = k)^l ≤ β, with β = K_D·T0/t. It reproduces 24/26/28 for the worst case of an
  integer mean and the variance at the Online threshold (1.1), for K_D = 435 and
  T0 = 1/129.46 MHz. `tb_total_failure_test` checks this, together with the latencies of
  10 440, 11 310 and 12 180 clock periods (80.6 µs, 87.4 µs and 94.1 µs). The PLL lock flag is checked as well, because only a
  locked PLL gives the coherent pattern.
* **Online test.** The hardware estimates the Allan variance, ½·E[(N_{p+1} − N_p)²], over 4096
  successive differences. It needs only a subtractor, a squarer and an accumulator, and it is
  insensitive to slow drift. The PLL loop filters out low-frequency noise, so in practice the
  Allan variance and the classical variance agree. The estimate is compared with V_min, the
  variance that the model gives at the jitter needed for the entropy target. That is 1.06 for
  Shannon entropy 0.9998 and 1.09 for min-entropy 0.98. The default is 1.1, a value that
  separated high- from low-entropy measurements well across devices and operating conditions.
  `tb_trng_model_pkg::v_min` derives both numbers. In the worst case, both clock edges fall
  half-way between two sampling positions. The raw bit is the parity of all samples, so its
  bias is ½·Π|2p_j − 1|. A bisection finds the smallest σ/Δ that meets the entropy target, and
  the variance at that jitter is V_min. It gives 1.091 and 1.057, the same for every
  configuration, because only σ/Δ matters. In the best case, one sample sits exactly on each
  edge. The variance then never falls below 0.5, however small the jitter. `tb_online_test`
  checks these values.
  The comparison is exact: S·256 is compared with VMIN_Q8·2·N_AVAR, where S is the sum of
  squares and VMIN_Q8 = round(1.1·256) = 282. `VMAX_Q8` adds an optional upper bound, to catch
  jitter that an attacker has increased. No general value exists for it, so it is off (0) by
  default.

`avar_q8` outputs each estimate as AVAR·256.

### Clock attacks

Manipulating the reference clock is the obvious attack on a coherent-sampling generator.
`tb_pll_trng_attack` runs configuration CV_B (K_D = 495, nominal clk0 237.98 MHz, clk1 200 MHz)
and replaces clk0 with an external generator in two ways.

* **clk0 at exactly 200 MHz, equal to clk1.** Every sample then sees the same level, so N_p
  stays constant. The Total failure alarm rises l_min periods later: 24·495·5 ns ≈ 59 µs.
  The Online test reacts only later. Its current window contains the single step from about
  K_D/2 down to the constant value, and that step alone lifts the estimate above V_min. The
  alarm therefore comes at the end of the next window, about 20 ms after reset. Meanwhile the
  security FIFO releases no bit computed from the failed source.
* **clk0 at 231 MHz.** The ratio is no longer coherent, so N_p does not repeat but drifts
  slowly. The Total failure test never fires. The deterministic drift raises the Allan
  variance to about 4.7, against about 1.7 nominally, so the lower bound V_min never fires
  either. The attack is caught only by the upper bound. The testbench sets it to 3.0, about
  twice the nominal value. The alarm then comes at the end of the first window:
  4097·495/231 MHz ≈ 8.78 ms. A product using this generator should set `VMAX_Q8` for its
  configuration if it has to detect a frequency shift of this kind.

A hardware measurement of the 200 MHz attack showed a longer Total failure latency, about
100 µs. The model does not include how a real generator behaves while it changes frequency,
which may explain the difference.

## Behavioural PLL model

`pll_model` is a model, not a circuit. Edge k of output n lies at

    t_ref + PHASE_PS + n·T/(2·N_OUT) + k·T + g,     with g ~ N(0, JITTER_PS²),

and the falling edges are DUTY·T later, each with its own deviation. t_ref is the first clk_in
edge after reset. The deviations are independent and do not accumulate, like the bounded
thermal jitter of a locked PLL. Two models fed by the same clk_in therefore keep the exact
ratio K_M/K_D. The Gaussian is the sum of 12 uniform numbers. The simulation time precision
is 1 fs. The default jitter is 14 ps for PLL1 and 5 ps for PLL0, which is 14.9 ps combined.
This is an assumption, chosen above the minimum of about 10 ps that Configuration A needs.
With it, the model gives 12 contributors and Var(N) = 1.58. The phase detector, charge pump,
loop filter and VCO are not modelled.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_tbase_counter`, `tb_trng_sampler`, `tb_trng_tdc`, `tb_security_fifo`,
  `tb_total_failure_test` and `tb_online_test` compare each block with an independent
  reference. This covers exact counts, strobe spacing, the alarm latency of L_MIN·K_D cycles,
  and bit-exact Allan-variance estimates with their alarm decisions.
* `tb_pll_model` checks the frequencies, the ideal edge times, the rms jitter, the duty cycle,
  the phase shift and lock.
* `tb_pll_trng_core` drives a synthetic coherent pattern into the core. It checks every
  counter value and every released raw bit. It also runs a healthy, a weak, a dead and an
  unlocked source, each with the expected alarm.
* `tb_pll_trng_top` runs five complete generators side by side, with a 256-value window. The
  five are healthy, jitter-free, low-jitter, two outputs and single-PLL. It counts each
  mechanism: raw output, Total failure alarm, Online alarm, FIFO flush, two outputs and the
  clock switch.
* `tb_pll_trng_top_full` runs the top at its defaults for one full 4096-value Online window.
  It takes about 5 s. It compares the mean counter value and the Allan variance with the
  stochastic model of `tb/tb_trng_model_pkg.sv` (simulated 1.64 against 1.58).
* `tb_pll_trng_attack` runs the two clock attacks described above, next to a nominal copy
  that must pass a full window without an alarm. It takes about 16 s.
* `tb_pll_trng_configs` runs all seven configurations of the table with one and with two
  outputs. It checks K_M/K_D, R and S against the table, and the simulated statistics against
  the model.

To simulate one of them with Verilator 5 (the PLL model uses run-time delays, so
`--timing` is required, and `-Wno-fatal` lets its zero-delay warning pass):

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/pll_trng_pkg.sv tb/tb_trng_model_pkg.sv rtl/*.sv tb/tb_pll_trng_top_full.sv \
      --top-module tb_pll_trng_top_full
    ./obj_dir/Vtb_pll_trng_top_full

## Choices made in this implementation

These points are design decisions where the generator's description leaves the details open:

* Reset style (asynchronous, active low, synchronised release), and the sticky alarms.
* The tests and the FIFO are strobed by the TDC's `cnt_valid`, not directly by the time base.
  That way each counter value is seen exactly once.
* The FIFO is a shift register. Its depth equals L_MIN (24), and it is flushed by both alarms.
  The description only ties the depth to the Total failure latency and mentions up to 34
  registers.
* The Online test uses consecutive 4096-difference windows, a Q8 threshold format, and an
  optional upper bound that is disabled by default.
* The first period after reset is discarded.
* The PLL jitter, duty cycle and phase values are modelling assumptions.

Not implemented: the offline search for divider configurations and for the time distances
between contributors. This is a design-time calculation, and its result enters as the divider
parameters. The l_min and V_min calculations exist only as testbench functions. The register and
LUT counts of the FPGA implementations were not targeted.
