# An all-digital PLL whose loop filter is the varactor bank

This is a charge-pump-free PLL for a 2.4 GHz clock from a 24 MHz reference,
with a phase-noise model of its oscillator. The idea that sets it apart is
that there is **no loop-filter block**. A classic digital PLL puts a
proportional-integral filter (an adder and two multipliers) between the
phase detector and the oscillator. Here the phase detector's UP/DN pulses go
straight into the digitally controlled oscillator (DCO):

- **Adding** is free, because capacitors in parallel add. The proportional
  and integral paths each switch their own varactors, and the oscillator
  sees the sum.
- **Multiplying** is replaced by sizing. The proportional-to-integral gain
  ratio is set by how many unit varactors each path switches (10 : 1 here).

The second half of the design is a way to simulate such a loop fast with
realistic oscillator noise. The noise is applied as event-driven period
perturbations, using four noise shapes (white, 1/f, 1/f², 1/f³ phase noise)
made from uniform random numbers.

```
            +-------+  UP   +-------------------------------------------+
  REF ----->|  PFD  |------>|  DCO                                      |
  24 MHz    |       |  DN   |  prop_path --+                            |
       +--->|       |------>|              +-> retiming_reg -> dco_osc -+--> OUT
       |    +-------+       |  integral  --+    (clock FB)    (+noise)  |   2.4 GHz
       |                    +-------------------------------------------+
       |  FB                           ^ FB                              |
       +-------------------------------+----------- fdiv (/100) <-------+
```

## The loop

| Quantity | Value |
|---|---|
| Reference | 24 MHz |
| Divide ratio N | 100 (8-bit divider) |
| DCO intrinsic frequency F0 | 2.2 GHz (all control varactors off) |
| DCO gain KDCO | 100 kHz per unit varactor |
| Proportional weight KP | 10 units, so one proportional step is 1 MHz |
| Integral weight KI | 1 unit, so each PFD decision changes the integral path by 100 kHz |
| Integral path | 12-bit saturating up/down counter, binary-weighted varactors |

The DCO frequency is

    f = F0 + KDCO * (KP * p + KI * I)

Here p is the 2-bit proportional word read as a number (0, 1 or 2) and I is
the integral word. After reset p = 0 and I = 0, so the loop starts at
2.2 GHz. It then climbs about one 100 kHz step per reference period, needing
about 2000 units (83 µs) to reach 2.4 GHz. It overshoots a little and then
settles.

**Phase/frequency detector (`pfd`).** This is the classic three-state
circuit: two flip-flops with D tied high, clocked by REF and FB, and cleared
together by the AND of their outputs. The earlier edge leaves a pulse as
wide as the phase error. The AND-gate delay is zero in this model, so the
UP&DN overlap takes no simulated time.

**Divider (`fdiv`).** A counter gives exactly one rising FB edge every N DCO
periods. The duty cycle is 50 % for even N.

## Inside the DCO: the filter made of switches

This part is the least obvious, and it decides how the loop behaves.

### Proportional path (`prop_path`)

Two gates drive two proportional varactors:

| UP | DN | p[1] = UP·!DN | p[0] = UP xnor DN | p − 1 |
|---|---|---|---|---|
| 0 | 0 | 0 | 1 | 0 |
| 0 | 1 | 0 | 0 | −1 |
| 1 | 0 | 1 | 0 | +1 |
| 1 | 1 | 0 | 1 | 0 |

So p − 1 is a signed −1/0/+1 correction. The constant −1 (one varactor that
is always on) is folded into F0.

### Integral path (three codings)

The integral path is stepped once per PFD decision. Its step clock is the
rising edge of UP|DN, and the PFD state at that edge gives the direction:
UP alone adds one, DN alone removes one, both together hold. Three
varactor codings are provided. Choose one with the `CODING` parameter.

| `CODING` | Module | Stored word | Varactors | Value |
|---|---|---|---|---|
| `CODING_BINARY` (default) | `int_updn_counter` | binary count, saturating | 1, 2, 4, … C0 | the count |
| `CODING_UNARY` | `int_unary_shreg` | thermometer (low bits set) | all C0 | the number of ones |
| `CODING_ONEHOT` | `int_onehot_shreg` | one bit set | C0 + k·CΔ | the index k, in fine CΔ steps |

The binary bank is compact but matches worst. The unary bank is regular and
matches best. The one-hot bank reaches steps finer than the smallest
manufacturable varactor. For the one-hot coding, set `K_I` to CΔ/C0.

### Retiming (`retiming_reg`)

Both words are registered on the rising edge of FB before they reach the
varactors, so the frequency changes once per reference period at a fixed
phase.

**Consequence: the −1 proportional value never reaches the varactors in
closed loop.** The retiming register samples the PFD state just before the
FB edge. DN can only be set by that same FB edge, so DN is never seen high.
What the register does see is UP (REF led: p = +1) or nothing (FB led, or in
phase: p = 0). The proportional path therefore pushes the frequency up by
1 MHz after every reference-leading cycle and never pushes it down. The
integral path keeps the loop symmetric, and it still locks cleanly. The
closed-loop testbenches confirm this. Sampling on a delayed FB instead would
mirror the behaviour (−1 or 0, never +1). Both settle to a one-sided dither.

### Oscillator and varactor bank (`dco_osc`, behavioural)

The oscillator turns the retimed words into a period:

    T = 1 / (F0 + KDCO * ctrl) + dperiod

Here dperiod is the noise perturbation. Each period is computed at the
rising edge that starts it. Edges are scheduled against an absolute ideal
time with 1 fs precision, so rounding never accumulates. This matters
because some noise terms are below a femtosecond per period.

## Oscillator noise model (`dco_noise`, behavioural)

Phase noise is split into four slopes. Each slope gets a time-domain name
and its own random stream:

| Phase-noise slope | Name | Level at corner | Per-period term | σ from level L = 10^(dBc/10) |
|---|---|---|---|---|
| flat (white) | jitter | −150 dBc/Hz | e[n] − e[n−1], e = σj·gauss | σj = √(L/f0) / 2π |
| −10 dB/dec (pink) | flicker | −150 dBc/Hz at 100 MHz | e[n] − e[n−1], e = σf·pink | σf = (Δf/f0)·√(L/(2π f0)) |
| −20 dB/dec (red) | wander | −140 dBc/Hz at 10 MHz | σw·gauss | σw = (Δf/f0)·√(L/f0) |
| −30 dB/dec (infrared) | saunter | −120 dBc/Hz at 1 MHz | σs·pink | σs = Δf/(2π² f0)·√(L/(2π f0)) |

Jitter and flicker move edges without accumulating, so a period sees the
difference of two successive displacements. Wander and saunter change the
period itself. The oscillator integrates them into phase, which supplies
the extra −20 dB/dec. The pink and infrared curves are integrals of white
and pink in the same way. At f0 = 2.2 GHz the four sigmas are 1.073e-13,
1.223e-14, 9.69e-15 and 1.96e-16 s.

The random numbers come from three generators:

- **`mt19937`** (synthesizable). This is the standard Mersenne Twister, one
  32-bit word per clock, bit-exact with the reference software generator.
  Seeding takes 624 clocks after reset.
- **`box_muller`** (behavioural, real arithmetic). It maps pairs of uniform
  words to two unit Gaussians.
- **`voss_mccartney`** (synthesizable, fixed point). It makes pink noise
  from 16 random rows plus a white term. Row k is replaced every 2^(k+1)
  samples, chosen by the trailing zeros of a counter. The sum is kept as a
  running total.

Each of the four noise classes uses its own MT19937 instance. All of them
are clocked by the DCO output, and all four terms are zero until seeding
ends. The `NOISE_EN` bit mask switches classes off: bit 0 jitter, 1 flicker,
2 wander, 3 saunter.

## How well it matches

| Behaviour | Result in simulation |
|---|---|
| Noise-free step response | 2.2 GHz start; 2.4 GHz first reached at 86 µs; peak 2.413 GHz at 92 µs; within 2 MHz of 2.4 GHz (1-µs averages) from 250 µs; FB within 9 ps of REF once locked |
| Step response with all noise and a −130 dBc/Hz reference | pull-in at 86 µs; mean locked frequency 2.4 GHz to 0.1 ppm; per-period deviation 1.523e-13 s rms (1.522e-13 predicted) |
| DCO alone, L(1 MHz) / L(10 MHz) | −118.2 / −137.7 dBc/Hz (−116.8 / −136.6 expected from the noise levels) |
| Closed loop, clean reference, L(1 MHz) | −111.4 dBc/Hz (−116.6 reported for this configuration) |
| Closed loop, −130 dBc/Hz reference, L(1 MHz) | −84.4 dBc/Hz |

The last row is the main departure. With 10 ps rms jitter on the reference,
the PFD's bang-bang decisions become random. The retimed 1 MHz proportional
steps then act as broadband frequency noise, and the measured phase noise
at 1 MHz offset is far above what the oscillator alone
produces. With a clean reference the dither stays orderly, and the result
is within about 5 dB of the reported value. How the reference noise was
applied in the original study is not known. If your reference is noisy,
expect the proportional weight KP to dominate the output spectrum.

A 436 µs run of the whole loop with all noise takes under a second with
Verilator.

## Files

Synthesizable RTL: `pfd`, `fdiv`, `prop_path`, `int_updn_counter`,
`int_unary_shreg`, `int_onehot_shreg`, `retiming_reg`, `mt19937`,
`voss_mccartney`.

Behavioural models (real numbers and delays; simulation only): `dco_osc`,
`dco_noise`, `box_muller`. `dco` and `adpll_top` are therefore behavioural
as a whole. To take the digital part of the DCO to silicon, use `prop_path`,
the chosen integral module and `retiming_reg`, and replace `dco_osc` with
the real oscillator.

`adpll_pkg` holds the coding enum, the loop and noise constants, and the
four level-to-sigma functions.

Testbenches (`tb/`), all self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line.

| Testbench | What it runs |
|---|---|
| `tb_<block>` | one per block, against independently computed values (published MT19937 outputs, truth tables, hand-computed periods and sigmas) |
| `tb_adpll_top` | noise-free step response, checks pull-in time, overshoot, lock, and that every loop mechanism occurs |
| `tb_adpll_full` | the top at its default parameters, all noise on, 436 µs |
| `tb_adpll_phase_noise` | Welch phase-noise estimate of the open-loop DCO and the closed loop (about 4 s) |
| `ref_clk_model` | 24 MHz reference with optional white phase noise (edge jitter); not a testbench |

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_adpll_full rtl/adpll_pkg.sv tb/tb_adpll_full.sv
./obj_dir/Vtb_adpll_full
```

Replace `tb_adpll_full` with any testbench name. `-Wno-fatal` is needed
because the oscillator's computed delays raise Verilator's zero-delay
warning. Every module declares `timeunit 1ps; timeprecision 1fs`.

Reset is asynchronous and active low, and is applied on its falling edge.
A testbench that holds `rst_n` low from time 0 must first drive it high for
a moment, or the design is not reset.

## Changing it

- Loop gains and frequencies are parameters of `adpll_top` (`F0`, `K_DCO`,
  `K_P`, `K_I`); the divide ratio is the `div_ratio` input.
- `CODING`, `IW` (counter width) and `L` (shift-register length) select the
  integral path. For the unary or one-hot coding to lock at 2.4 GHz with
  100 kHz steps, `L` must exceed about 2000. The 64-bit default only suits
  smaller ranges or a coarser step.
- `NOISE_EN` and `SEED` control the noise. Noise levels are parameters of
  `dco_noise`, defaulting to the package constants.

## Choices made here

- The divider counts rising edges only. A counter clocked on both edges
  would give the same FB edge spacing and an exact 50 % duty for odd N.
  Ratios below 2 act as 2.
- One active-low asynchronous reset serves the whole loop.
- The integral counter is 12 bits wide and saturates at 0 and 4095. The
  shift registers are 64 bits. None of these sizes come from the original
  description.
- The integral step clock is UP|DN, rather than a re-evaluation on any change
  of UP or DN. The count per PFD cycle is the same.
- Pink samples are normalised to unit variance.
- The Voss-McCartney generator is the counter-driven form. No stochastic
  row-selection variant is used.
- The four noise generators are written in SystemVerilog, not called from C.
- Combining the three codings as coarse, medium and fine banks in one DCO
  is not built.
