# Low-jitter digital PLL for a 1 MHz reference

This is a digital PLL that multiplies a 1 MHz reference clock by 1024 to get
1.024 GHz. A low reference rate is hard for a digital PLL. The phase detector
only fires once per microsecond, so the loop must be slow. A bang-bang (1-bit)
detector also adds large quantization noise that the proportional gain would
normally put straight onto the oscillator. This design handles both problems
with two ideas:

1. **No DCO in the integral path.** A ring oscillator (VCO1, about 256 MHz,
   four phases) runs freely, trimmed once by a frequency-locked loop. The
   fine frequency is set by a *digital phase accumulator* (DPA). The DPA picks
   one VCO1 phase at a time and steps through them under delta-sigma control,
   so the average frequency of the selected clock moves in very fine steps.
   A small analog PLL (the *sub-PLL*, ×4, about 1 MHz bandwidth) then cleans
   up the phase steps and multiplies the clock to 1.024 GHz. Its output is
   the DPLL output.
2. **Proportional path in the phase domain.** The proportional correction is
   not added to a frequency control word. Instead, the sub-PLL clock that
   goes back to the divider is *phase-shifted* by a number of quarter-period
   steps, using the same phase rotator and phase multiplexer circuits as the
   DPA. That shifted clock, `vcps_out`, only feeds the feedback divider. The
   output `clk_out` is taken before the shifter, so the bang-bang dither of
   the proportional path never reaches it.

```
             +-------+  err  +-----+ acc(14b) +-----------------------------+
 ref_clk --->| BBPD  |------>| DLF |--------->| DPA: DSM -> rotator -> mux  |--> sub-PLL x4 --+--> clk_out
             +-------+       |     |          |      over VCO1 phases       |                 |   (1.024 GHz)
                 ^           |     | prop     +-----------------------------+                 |
                 |           |     |-------+                ^ VCO1 (4 phases, 256 MHz)         |
                 |           +-----+       v                |                                  |
                 |                  +---------------------+ |                                  |
   fb_clk  /1024 |<-- vcps_out -----| VCPS: rotator + mux |<---- sub-PLL phases (4) ------------+
                                    +---------------------+
 FLL: ref_clk, VCO1/256 -> frequency detector -> accumulator -> DSM -> DAC code -> VCO1 (and sub-PLL coarse)
```

## Clocks and frequency plan

| Signal | Default | Set by |
|---|---|---|
| `ref_clk` | 1 MHz | external |
| VCO1 | 256 MHz, 4 phases | FLL: `FLL_DIV` = 256 |
| DPA output | 256 MHz plus a small loop correction | DPA |
| `clk_out` | 1.024 GHz | sub-PLL, `SUB_MULT` = 4 |
| `fb_clk` | 1 MHz | `vcps_out` / `DIV` (1024) |
| DPA and VCPS `sck` | their own output / 8 | `SCK_DIV` |
| FLL modulator clock | VCO1 / 8 | `SCK_DIV` of `fll_ctrl` |

The digital core has five clock domains: the reference, the DPA's SCK, the
VCPS's SCK, the FLL modulator clock and the feedback divider's input clock.
Multi-bit words cross between domains only through `cdc_word`, a
toggle synchronizer. The word is captured on the *falling*
reference edge, half a period after the loop filter computes it, and taken
in the destination domain three destination clocks later. Capturing on the
falling edge rather than the next rising edge matters: each reference
period of delay around the loop widens the bang-bang limit cycle. The
reset `rst_n` is asynchronous and active low everywhere.

## Phase detector and loop filter

`bbpd` is one flip-flop clocked by the reference that samples the divided
clock. If the divided clock is still low at the reference edge, the reference
leads and `err = +1`; otherwise `err = -1`. The detector gives only the
sign of the phase error, never its size, so a locked loop keeps switching
between runs of +1 and −1.

`dlf` accumulates `err << K_I_SH` into a 14-bit saturating word `acc`. This is
the integral word and the DPA's input. The proportional word is
`prop = K_P * (acc >>> P_SH)`, counted in quarter periods of the output clock.
Note that the proportional branch is taken *after* the accumulator. Because
the phase shifter holds its offset, a phase offset proportional to `acc` acts
like a frequency term proportional to `err`. The loop phase is therefore
`K_P·Σe + ΣΣe`, a normal type-II loop whose proportional path lives in the
phase domain. With the defaults (`K_I_SH = 2`, `K_P = 4`, `P_SH = 2`) each
decision moves the VCPS offset by four quarter-period steps, i.e. one
output period. The loop locks in about 450 µs after reset. In lock the
detector output forms runs of two to four equal decisions, so `acc`
dithers over four or five neighbouring values. The delay from a decision to
its effect on the next decision is about two reference periods: one for the
loop-filter register and half for the word capture. The rest is the
phase-shifter pipeline and the time until the next feedback edge.

## Digital phase accumulator (DPA)

The DPA turns a 14-bit word into a small frequency offset on VCO1, without
touching VCO1 itself. It has three parts:

* **Delta-sigma modulator (`dsm`).** A second-order error-feedback modulator
  with a 3-level output. Per SCK cycle it computes
  `v = x + 2·e[n-1] − e[n-2]` and quantizes v to −1, 0 or +1 with step
  `D = 2^13` and thresholds at ±D/2. The error is `e = v − q·D`. The input is
  14 bits and the internal words are 18 bits. The mean of the output is
  `x / 2^13`, and its quantization noise is pushed to high frequencies, where
  the sub-PLL filters it out.
* **Phase rotator (`phase_rotator`).** A circular shift register that holds a
  one-hot pointer `S[N:1]` over the N phases. Each cell is a 3-to-1 choice
  between its lower neighbour (step −1), itself (0) or its upper neighbour
  (+1), so a step of −1 moves the pointer up by one place. The step arrives
  as a one-hot 3-bit code (`dpll_pkg::step_t`).
* **Phase multiplexer (`phase_mux`).** Picks the phase the pointer names; see
  the next section.

In the DPA, SCK is the DPA output divided by 8, and the modulator is fed the
*negated* loop word. A growing word therefore gives more −1 steps. Each −1
step moves the output to the next, earlier VCO1 phase, which shortens one
period by T/4. The resulting output frequency is

    f_dpa = f_vco1 · (1 + (acc / 8192) / (N · SCK_DIV))

so the full 14-bit range spans ±1/32 of the VCO1 frequency (±3.1 %). One LSB
is 0.24 ppm.

Phase numbering is a design convention used throughout: `phi[k+1]` leads
`phi[k]` by T/N.

## Glitch-free phase switching

Changing the selected phase of a running clock can produce a runt pulse or a
glitch. `phase_mux` avoids this as follows:

* The phases are split into an **odd bank** (`phi[0]`, `phi[2]`) and an
  **even bank** (`phi[1]`, `phi[3]`). Each bank has its own multiplexer and
  its own select register.
* The pointer moves by at most one place per SCK cycle, so every move lands
  in the *other* bank. On an SCK edge the bank that will carry the new phase
  loads its select from the rotator. The bank that is currently driving the
  output is not touched. The flag `s_odd` (set from the pointer's parity)
  records which bank should drive.
* The **retimer** is a latch that copies the flag to the output select only
  while *both* bank outputs are low. The hand-over thus always happens in a
  low phase common to both clocks, so every output pulse is a complete high
  pulse of one phase.

The result: a move to an earlier phase gives one period that is T/4 shorter,
and a move to a later phase one period that is T/4 longer. There are no
short pulses. This only works if SCK is derived from the rising edge of
`phi_out` itself, so that the bank load happens while the active bank is
high. Both the DPA and the VCPS do this.

The latch is intended. It is the retimer, and lint tools report it as a
latch.

## Proportional phase shifter (VCPS)

`vcps` reuses the rotator and the multiplexer on the four sub-PLL phases. The
target offset `prop` (in quarter periods, 12 bits, taken modulo 2^12)
crosses into the VCPS clock domain. On each SCK a controller compares the
target with the offset already applied and issues one −1 or +1 step until
they agree. A −1 step advances the feedback clock, the same sign as the DPA.
While a correction is applied, single output periods are T/4 shorter or
longer, about 1.37 GHz or 0.82 GHz instantaneous frequency at 1.024 GHz.
This is what the proportional path looks like from outside.

## Frequency-locked loop

Before the phase loop can work, VCO1 has to be close to 256 MHz.

* `clk_divider` divides VCO1 by `FLL_DIV` and publishes its count in Gray
  code.
* `freq_detector` samples that count in the reference domain. The
  difference between two samples, taken modulo the counter width, is the
  number of VCO1 cycles in one reference period minus `FLL_DIV`. Its output
  is valid from the fourth reference edge after reset.
* `fll_ctrl` subtracts `err << K_F_SH` from an accumulator with 10 integer
  bits and 13 fraction bits. With the defaults that is 1/4 DAC LSB per cycle
  of error. The fraction drives a second `dsm` clocked at VCO1/8, and
  `dac_code` is the integer part plus the modulator output. The FLL settles
  in about 150 reference periods to within a few hundred ppm. It keeps
  running after lock.
* The same DAC code serves as the sub-PLL's coarse setting.

## Analog parts (behavioural models)

Two modules stand for the analog circuits. They use `real` arithmetic and
delays, are for simulation only and are not synthesizable:

* `dco_model`: DAC plus VCO1. The target frequency is
  `F_MIN + code · F_LSB`, with defaults 180 MHz and 125 kHz, so 256 MHz
  needs code 608 of 1023. The oscillator sits inside its own
  frequency-feedback loop, so the frequency follows the target with a
  first-order response of 3 MHz bandwidth (time constant about 53 ns). This
  also smooths the delta-sigma dither of the DAC code. The model produces N
  evenly spaced phases with 50 % duty.
* `sub_pll_model`: a phase-locked charge-pump loop made of its parts. It
  has a tri-state phase-frequency detector, a 12 µA charge pump and a
  filter of R = 4 kΩ in series with C1 = 147 pF, with C2 = 11.5 pF across
  it. Its VCO has two controls. The coarse code sets
  `SUB_MULT · (F_MIN + code · F_LSB)` at a fine voltage of 0.61 V, and the
  fine voltage adds 600 MHz/V. A ÷`SUB_MULT` divider closes the loop, which
  gives a bandwidth of about 1 MHz. The filter is integrated in steps of at
  most 0.1 ns at every detector and VCO event. Because the coarse code is
  the FLL code, the fine voltage settles at 0.61 V in lock. Until the
  first input edge the VCO runs at the coarse frequency. The model produces
  N phases.

These models capture frequency and phase behaviour, not noise. There is no
phase noise, no charge-pump mismatch or leakage, no detector reset delay and
no supply sensitivity. Jitter figures cannot be taken from this simulation.
In silicon the models are replaced by the analog macros, and `dpll_core` is
the part to synthesize.

## Files

| Module | Role |
|---|---|
| `rtl/dpll_pkg.sv` | step type and level/step conversions |
| `rtl/bbpd.sv` | bang-bang phase detector |
| `rtl/dlf.sv` | loop filter (integral and proportional words) |
| `rtl/dsm.sv` | 2nd-order 3-level delta-sigma modulator |
| `rtl/phase_rotator.sv` | circular one-hot phase pointer |
| `rtl/phase_mux.sv` | odd/even multiplexer with glitch-free retimer |
| `rtl/dpa.sv` | digital phase accumulator |
| `rtl/vcps.sv` | proportional phase shifter |
| `rtl/clk_divider.sv` | divider with 50 % output and Gray count |
| `rtl/cdc_word.sv` | multi-bit clock-domain crossing |
| `rtl/freq_detector.sv` | FLL frequency detector |
| `rtl/fll_ctrl.sv` | FLL divider, detector, accumulator and modulator |
| `rtl/dpll_core.sv` | complete synthesizable core |
| `rtl/dco_model.sv` | behavioural DAC + VCO1 |
| `rtl/sub_pll_model.sv` | behavioural sub-PLL |
| `rtl/dpll_top.sv` | core plus models, the simulation top |

Every module except the package and `cdc_word` has a self-checking
testbench `tb/tb_<module>.sv`. `cdc_word` is exercised through `tb_dpa`
and `tb_vcps`. Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if
it hangs.

## Simulating

With Verilator 5 (the testbenches need `--timing`):

```
verilator --binary --timing --assert -Irtl rtl/dpll_pkg.sv \
          $(ls rtl/*.sv | grep -v dpll_pkg) tb/tb_dpll_top.sv \
          --top-module tb_dpll_top -o sim && ./obj_dir/sim
```

Replace `tb_dpll_top` with any other testbench. The package must come first
on the command line; after it, the simplest choice is to pass every other
file in `rtl/`. All files use
`` `timescale 1ns/1fs ``, because the phase steps of a 1 GHz clock are a few
hundred picoseconds.

`tb_dpll_top` runs the whole design at its default parameters for 700
reference periods (700 µs of simulated time, about a second of run time on
a desktop). It checks the following:

* the FLL brings VCO1 within 1000 ppm of 256 MHz;
* after lock, 100 reference periods contain 102 400 ± 10 output edges and
  100 ± 1 feedback edges;
* the detector dithers (both decisions are seen);
* every mechanism occurs at least once: FLL corrections, early and late
  decisions, DPA −1 and +1 steps, DPA and VCPS bank switches, VCPS −1 and
  +1 steps. Each is counted and reported.

`tb_dpll_div` runs the two smaller settings, ×512 and ×256, side by side.
VCO1 is at 128 MHz and 64 MHz there, and the model's range is moved down.
Both lock within the same 700 reference periods as the default case.

`tb_dsm_sqnr` measures the modulator's in-band SQNR. The modulator runs at
125 MHz with a 1 MHz band (oversampling ratio 62.5), and the in-band SQNR is
taken from a windowed DFT. A half-range sine gives 78.9 dB, against
78.7 dB predicted for an ideal second-order 3-level modulator. Larger
sines overload the 3-level quantizer.

`tb_dpll_core` drives the core with a reference 300 ppm high and checks that
the loop tracks it.

## Changing the design

* **Multiplication factor.** Set `DIV` and, for the same VCO1 ratio, change
  `FLL_DIV` and `SUB_MULT` so that `FLL_DIV · SUB_MULT = DIV`. For 256 MHz or
  512 MHz outputs, VCO1 has to run at 64 or 128 MHz, which is below the
  default model range: lower `F_MIN` as well.
* **Loop dynamics.** `K_I_SH` sets the integral step (2^K_I_SH LSB per
  decision). `K_P` sets the proportional offset in quarter periods per
  2^P_SH integral LSB. Raising `K_P` damps the loop more but adds
  proportional dither at the divider. The output itself does not see it.
* **Number of phases.** `N_PHASE` must be even, because of the odd/even
  banks. More phases give finer steps in both paths.

## Where this design departs from its source

The block structure and the numbers marked below follow the published
design. The rest are choices made here:

* Taken from the source: the bang-bang detector; the DPA made of a
  delta-sigma modulator, phase rotator and phase multiplexer; the 14-bit
  modulator input with 18-bit internal arithmetic; the modulator clocked at
  one eighth of the phase-selector rate; 4 phases with S[4:1]; the odd/even
  banks with a retimer; the proportional path as a phase rotator; ÷1024
  feedback; the FLL with detector, accumulator, modulator and DAC; a
  1 MHz-bandwidth ×4 sub-PLL from 256 MHz, with its charge-pump current,
  filter components, VCO gain and 0.61 V locked fine voltage; the 3 MHz
  bandwidth of the closed-loop VCO.
* Chosen here: all loop gains; the 10-bit DAC and its tuning curve; the FLL
  ratio of 256; the FLL detector (counter sampling); the retimer circuit (a
  latch); the VCPS step controller; the clock-domain crossings; reset
  behaviour; saturation of the loop word.
* The source places the modulator at 125 MHz, but also at one eighth of the
  phase-selector rate. With a 256 MHz VCO1 these cannot both hold. This
  design follows the one-eighth rule, so the DPA modulator runs at 32 MHz.
* The source sizes the modulator for 80 dB in-band SQNR at an oversampling
  ratio of 62.5. This modulator reaches 78.9 dB there with a half-range
  sine, which is what an ideal second-order 3-level loop gives. Inside the
  DPLL it runs at 32 MHz, an oversampling ratio of 16 for a 1 MHz band.
* The feedback divider is a synchronous counter rather than a ripple chain
  of dynamic flip-flops, so it has no lower input-frequency limit.
* The analog parts are behavioural models (see above). The sub-PLL model
  keeps its detector, charge pump, filter and VCO as separate equations,
  with the source's component values. The closed-loop VCO's
  switched-capacitor frequency-to-current converter, integrator and ring
  oscillator are reduced to a linear code-to-frequency curve with a
  first-order 3 MHz response, since their component values are not given.
