# Near-threshold injection-locked clock multiplier with an edge-selective error detector

An injection-locked clock multiplier (ILCM) makes a clock N times faster than its reference
from a ring oscillator. Once per reference period it replaces one oscillator edge with the
reference edge, which wipes out the jitter the ring has accumulated. This gives very low
jitter for little power and area, even at 0.4–0.5 V supplies. The catch is the
*reference spur*. If the ring's free-running period T differs from T_REF/N, every injection
moves one edge by the accumulated error. On top of that, the cycle right after an injection
is distorted by mismatch in the injection path (the **pulse distortion** τ_err). Both
repeat at f_REF and show up as a spur. The effect is worse near threshold, where mismatch is
larger.

This RTL implements a calibrated ILCM built around an **edge-selective error detector (ESED)**.
Its key observation: the injected edge is a falling edge of the output clock, and the two
edge polarities carry different information:

* the **rising edges** just before and just after the injection are one period apart if and
  only if N·T = T_REF. The pulse distortion moves every rising edge after the injection by
  the same amount, so it cancels out of this pair. That gives a clean frequency error;
* the **falling edges** (the injected one and the next) are T − τ_err apart. This isolates
  the pulse distortion.

One detector is used for everything: divider, edge detector, delay line (DCDL) and
bang-bang phase detector (PD). The loop filter steers it one reference cycle at a time to the
frequency error, to the DCDL delay, or to the pulse distortion, and integrates the
PD decision into the matching DAC code. Sharing one path means the three measurements see the
same path delays.

Defaults: N = 10, 1.0 GHz output from a 100 MHz reference (the 0.5 V operating point). The
300 MHz / 30 MHz point (0.4 V) is the same logic with slower analog models, set through
parameters.

## Block map

```
             en_inj & !gate_inj
 CLK_REF ──► eil ──SEL──► pulse_gen ──pulse──► pdac_driver ──pdac_g[23:0]──┐
    │         │ SELB                                  ▲ D_PERIOD           │
    │         ▼                                       │                    ▼
    │       divider ◄─────────── CLK_OUT ◄──────────── dco_model ◄── coarse_th[15:0], fine_th[127:0]
    │         │ CLK_DIV             │                  (mux + 7-inv ring)        ▲
    │         ▼                     ▼                                           │
    │      edge_detector ◄── EN_Dist (XOR selects rising / falling edges)  freq_dac_ctrl
    │         │ E1        │ E2                                                ▲ fine code
    │         ▼           │                                                   │ (coarse: input)
    │      dcdl_model     │                                                   │
    │         │ E1 + ~T   ▼                                                   │
    │         └──────► bbpd ──UP, TOG──► loop_filter ──fine / DCDL / D_PERIOD codes,
    └────────────────────────────────────► (falling CLK_REF)   EN_Dist, gate_inj
```

`ilcm_top` wires these together. `dco_model` and `dcdl_model` are behavioural (analog) models.
Everything else is synthesizable RTL: 38 flip-flops of digital logic in all.

## Edge timing around one injection

All times are relative to the injected falling edge F_inj. They hold in lock, with N = 10 and
the pulse distortion τ = τ0 + K·(units on − 16).

| edge | when | used by |
|---|---|---|
| F_{N−1}, last natural falling edge | −T | CLK_DIV rises (divider count reaches N−1) |
| R_before, last rising edge before injection | −T/2 | E1 in frequency and DCDL modes |
| F_inj, injected edge = CLK_REF + D_MUX | 0 | CLK_DIV falls, divider reset; E1 in distortion mode |
| R_after | T/2 − τ | E2 in frequency mode |
| F_after | T − τ | E2 in distortion mode; injection pulse ends |

The low phase that starts at F_inj is the only distorted one. That is the model's version of
the requirement that the nine-stage ring settles back before the next edge. Every later edge
is shifted by −τ. R_before is shifted by the same −τ from the previous injection. So
R_after − R_before = T_REF − (N−1)·T, whatever τ is. The DCDL delays E1 by about T, and the
PD asks whether E2 came first:

| mode (`det_mode_e`) | EN_Dist | injection | E1 → E2 | UP means | action on UP / DN |
|---|---|---|---|---|---|
| `MODE_FREQ` | 0 | on | R_before → R_after = T_REF − (N−1)T | DCO slow | fine code +1 / −1 |
| `MODE_DCDL` | 0 | gated | two free-running rising edges = T | DCDL longer than T | DCDL code −1 / +1 |
| `MODE_DIST` | 1 | on | F_inj → F_after = T − τ | period after injection short | D_PERIOD −1 / +1 |

At equilibrium the DCDL equals T, T_REF − (N−1)T = T (so N·T = T_REF), and τ = 0.

The loop filter runs on the **falling** edge of CLK_REF. That is half a reference period
from the injection, when CLK_DIV, E1 and E2 are all low. There it applies the decision of
the cycle that just ended and moves to the next mode. The modes go round
FREQ → DCDL → DIST. Changing EN_Dist toggles the XOR clock of the edge detector, but at
that moment it only shifts zeros, so it creates no false E1 or E2. The PD flags each
decision by toggling `tog`. The loop filter only acts on a changed toggle, so a cycle
without a measurement does not move any code.

## Pulse-distortion DAC (`pdac_driver`)

A 24-unit PMOS resistor DAC on the last inverter trims only the first cycle after an
injection. The injection pulse (`pulse_gen`) is high from SEL until the falling edge that
ends that cycle. The code D_PERIOD (0..24) is turned into a thermometer d[i] = (i < code),
and then:

* units 0..15: gate = pulse & ~d[i]. These are on (gate low) outside the pulse. During the
  pulse, the units whose bit is clear turn off, which gives a weaker pull-up and a longer
  period.
* units 16..23: gate = ~(pulse & d[i]). These are off outside the pulse. During the pulse,
  the units whose bit is set turn on, which shortens the period.

Outside the pulse exactly 16 units are on for every code, so the steady-state period does not
depend on D_PERIOD. During the pulse the number of units on equals the code, so the period
after injection is longest at code 0 and shortest at the top code.

## Divider and edge detector

The detector is only correct if CLK_DIV never slips by a DCO cycle. `divider` is a 4-bit
counter on falling CLK_OUT edges. At the injected edge, SEL is still high and the counter is
forced to 0 (RST_DIV = ~SELB). CLK_DIV is the registered decode of count N−1. In a gated
cycle there is no SEL and the counter wraps by itself, in the same phase.

`edge_detector` clocks two flip-flops with CLK_OUT ^ EN_Dist. The first samples CLK_DIV (E1)
and the second samples E1 (E2), so E1/E2 mark the first and second selected edges after
CLK_DIV rises.

`eil` raises SEL on each allowed CLK_REF rising edge and clears it at the next falling
CLK_OUT edge, using a req/ack toggle pair. `en_inj` low, or `gate_inj` from the loop filter (the
injection-gating enable used to calibrate the DCDL), blocks it.

## Behavioural models and operating points

`dco_model` is an event-driven model with fs resolution. Its parameters:

| parameter | default (0.5 V, 1 GHz) | 0.4 V, 300 MHz testbench | meaning |
|---|---|---|---|
| `T_BASE_PS` | 1112 | 3669.33 | period with no DAC unit on |
| `K_COARSE_PS` / `K_FINE_PS` | 10 / 0.5 | 30 / 1.5 | period step per coarse / fine unit |
| `TAU0_PS` | 6 | 12 | intrinsic shortening of the first low phase after injection |
| `K_DIST_PS` | 1 | 2 | shortening of a low phase per P-RDAC unit on beyond 16 |
| `D_MUX_PS` | 150 | 500 | CLK_REF edge to injected CLK_OUT edge |
| `JITTER_PS`, `SEED` | 0, 1 | 0, 1 | rms white jitter added to each half period (Gaussian, `$dist_normal`), and its seed |

With `JITTER_PS` = 0 the model is noiseless and every result is exactly repeatable. With
jitter on, a free-running ring accumulates the errors as a random walk: the spread of L
periods grows as √L. Each injected edge throws the accumulated error away.

While SEL is high and the reference edge is on its way (`D_MUX_PS`), the mux blocks the ring
path, so a natural falling edge in that window is replaced. The ring must therefore be within
`D_MUX_PS` of lock. If its edge comes earlier than that, the injection produces no output
edge and the divider slips by one edge. Start the loops near lock: the coarse code is a
configuration input for exactly this.

`dcdl_model` delays a rising input edge by `D_MIN_PS + K_PS·code` (800 ps + 2 ps·code by
default, 8-bit code). All of these constants are this implementation's assumptions. The
analog circuits publish structure, not numbers. `ilcm_top` passes them through its
`DCO_*` and `DCDL_*` parameters.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and stops by
itself (each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/ilcm_pkg.sv tb/tb_ilcm_top.sv \
          --top-module tb_ilcm_top -o sim && ./obj_dir/sim
```

Replace `tb_ilcm_top` with any other `tb/tb_*.sv`. All files use `timescale 1ps/1fs`.

* `tb_ilcm_top` runs the whole multiplier at its defaults, with the DCO started 10 ps slow
  (coarse 7). It checks four phases:
  - Injection only: 10 edges per reference period, but the periods around the injection are
    90 ps off, and the codes stay frozen. A frequency error alone gives a reference spur of
    20·log10(N·|ΔT/T|). Here that is 20·log10(10 · 10/1000) = −20 dBc, and the estimate must
    land within 2 dB of it.
  - Calibration on: the codes settle at the values worked out from the model constants (fine
    84, DCDL 100, D_PERIOD 10). Every rising and falling period is then within 10 ps of
    1000 ps; the residue is bang-bang dither, about 7 ps.
  - Free running: the frequency holds.
  - Relock: the loop locks again.

  It counts injections, gated cycles, each mode, and each code moving up and down, and fails
  if any never happened. It also estimates the reference spur from the rising-edge timing
  errors (the f_REF Fourier component of the edge displacement, as narrow-band phase
  modulation). It requires calibration to lower it by at least 20 dB. The model has no noise
  and the 1 GHz lock lands exactly on integer codes, so the calibrated estimate hits its
  −200 dBc floor. Injection alone gives about −20 dBc. It simulates 8 µs in well under a
  second.
* `tb_ilcm_jitter` turns on 2 ps rms of ring jitter per half period at the 1 GHz defaults.
  It compares σ(L), the spread of the time across L output periods. Free-running, σ(300) is
  about 55 ps, close to the random-walk value 2.83 ps·√300 = 49 ps. Locked, σ(300) is about
  14 ps, no more than σ(30). The residue is the error gathered within one reference period,
  plus the loops' dither, which the noise keeps alive. The loops still settle, and the
  divider never slips.
* `tb_ilcm_top_0v4` runs the same test at 300 MHz from 30 MHz with the slower model
  constants above. Here the equilibrium DCDL code (133.3) is not an integer, so the loop keeps
  dithering. The limits are 25 ps, and the spur estimate falls from about −21 dBc to about
  −53 dBc.
* One testbench per block checks it against a model written in the testbench:
  `tb_freq_dac_ctrl`, `tb_pdac_driver`, `tb_eil`, `tb_pulse_gen`, `tb_divider`,
  `tb_edge_detector`, `tb_bbpd`, `tb_loop_filter`, `tb_dco_model`, `tb_dcdl_model`. The
  DAC decoders are tested exhaustively.

## Where this departs from, or adds to, the original chip

* **Edge polarity of EN_Dist.** Two descriptions of the original disagree on it. Here,
  EN_Dist = 0 selects rising edges (frequency and DCDL) and 1 selects falling edges
  (distortion).
* **Sign of the distortion loop.** It is chosen so that the loop converges: a short period
  after the injection lowers D_PERIOD.
* **Loop filter.** Its schedule (round-robin, one reference cycle per mode), unit steps,
  saturation and reset codes (fine 64, DCDL 100, D_PERIOD 16) are this implementation's.
  No proportional path, gain setting or lock detector is included.
* **Coarse code.** It is a static input. Only the fine code is loop-controlled.
* **EIL, PD and DCDL.** Their circuits come from earlier work and are not described, so
  simple equivalents are used. The injection path's slope control exists only as the DCO
  model's reference-path delay.
* **pdac_driver.** It accepts D_PERIOD up to 24, so all 24 units can be used.
* **Not modelled.** Beyond timing, the analog parts are modelled only as far as white ring
  jitter (off by default). There is no flicker noise, supply dependence, RDAC common mode,
  pre-mux voltage or metastability. Configuration access
  (the chip is set up over I2C), bias and supplies are not part of the RTL. Their settings
  appear as top-level ports (`en_inj`, `en_esed`, `coarse_code`).
* **Spur and jitter figures.** The silicon reaches about −34 dBc with injection only and
  −54 dBc (1 GHz, 0.5 V) / −62 dBc (300 MHz, 0.4 V) calibrated. Those levels come from
  mismatch, noise and DAC resolution, which these models leave out. The spur the testbenches
  report depends on the chosen start-up error and model constants. It shows what the loops
  remove, not what the chip would measure. The same holds for the jitter: the chip's
  2.58 ps rms (1 GHz) and 11.7 ps rms (300 MHz) depend on the real ring's phase noise.

## Files

* `rtl/ilcm_pkg.sv`: sizes, code widths and the `det_mode_e` mode type.
* `rtl/ilcm_top.sv`: the multiplier.
* `rtl/eil.sv`, `pulse_gen.sv`, `pdac_driver.sv`, `freq_dac_ctrl.sv`: oscillator control.
* `rtl/divider.sv`, `edge_detector.sv`, `bbpd.sv`: the shared error detector.
* `rtl/loop_filter.sv`: the digital loop filter and sequencer.
* `rtl/dco_model.sv`, `dcdl_model.sv`: behavioural models, for simulation only.
* `tb/`: the testbenches listed above.
