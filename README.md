# Fractional-N synthesizer core for direct GFSK modulation

This design transmits a 2.5 Mb/s GFSK signal at 1.8–1.9 GHz without mixers or
I/Q D/A converters. It modulates the division ratio of a phase-locked loop
directly. A 20 MHz reference drives the PLL. The feedback divider is switched
every reference cycle between neighbouring integer ratios, so that on average
it divides by a fractional value. A second-order sigma-delta converter chooses
the sequence of ratios and pushes the resulting quantization noise to high
frequencies, where the narrow loop (natural frequency 84 kHz) filters it out.
Frequency modulation is simply a change of the fractional ratio from sample to
sample.

That loop is far too slow to pass 2.5 Mb/s data. The modulation samples are
therefore pre-emphasised by a compensation filter, folded into the Gaussian
transmit filter, whose rise cancels the loop's second-order roll-off. The
boosted samples need more range than a single-bit converter gives. The
converter therefore has 6 output bits and drives a divider with 64 moduli.

This repository holds the digital part of that synthesizer chip as
synthesizable SystemVerilog:

| module | what it is |
|---|---|
| `fracn_synth_top` | the digital core, wired as in the system diagram below |
| `serial_cfg_reg` | serial port holding the carrier word and the loop gain code |
| `carrier_mod_adder` | carrier word + modulation sample → 16-bit converter input |
| `mash_sigma_delta` | second-order MASH converter, adders pipelined two bits per stage |
| `pipe_accum`, `pipe_add`, `skew_shift` | the pipelined integrator, adder and the skew/align delays it is built from |
| `mod64_divider` | divide by 32 … 63.5 in half-cycle steps |
| `div2_3p5_stage` | divide-by-2/2.5/3/3.5 front stage using four clock phases |
| `div23_cell` | divide-by-2/3 cell, four of them in a chain |
| `pfd` | phase/frequency detector with one duty-cycle output for the charge pump |
| `fracn_pkg` | widths and types |

The analog and off-chip parts are not part of the RTL: the charge pump with
its 5-bit current DAC, the loop filter, the VCO, the external divide-by-2
prescaler, the modulation FIFO and the host that fills it. They connect
through the top's ports. For simulation only, `tb/pll_loop_model.sv` gives a
behavioural model of pump, filter, VCO and prescaler, so the loop can be closed
(see the last section on checking).

```
 ref_clk (20 MHz) ──┬──────────────────────────────────────────────┐
                    ▼                                              │
 ser_data/en/load ─► serial_cfg_reg ─ gain_adjust[4:0] ────────────┼──► charge-pump DAC
                         │ carrier[15:0]                           │
 modulation[15:0] ─────►(+) carrier_mod_adder                      │
                         │ 16 bit                                  │
                    mash_sigma_delta  (clocked by div_out)         │
                         │ div_code[5:0]                           ▼
 vco2_p/vco2_n ────► mod64_divider ──── div_out ─────────────────► pfd ──► phi, phi_b
 (VCO ÷ 2)                                                            (to the charge pump)
```

## Number formats

The frequency word is 16 bits: the upper 6 bits are the integer divider code
`D` and the lower 10 bits a fraction. The divider divides its input by
`32 + D/2`. The external prescaler divides the VCO by 2 first, so the VCO is
divided by `64 + D`. One LSB of the word is therefore `20 MHz / 1024 ≈ 19.5 kHz`
at the VCO, and one code step is 20 MHz. Examples:

| VCO | ratio to 20 MHz | code D | carrier word |
|---|---|---|---|
| 1.80 GHz | 90 | 26 | `26*1024` = 0x6800 |
| 1.85 GHz | 92.5 | 28.5 | 0x7200 |
| 1.90 GHz | 95 | 31 | 0x7C00 |

The modulation sample is two's complement and is added to the carrier word
modulo 2^16. The sum should keep the code between 1 and 61. The converter's
output wraps modulo 64 and does not saturate, and the dither reaches one code
below and two above the integer part.

## The pipelined MASH converter

The converter is a MASH 1-1:

```
stage 1:  {c1, f1} = f1 + x.frac          m1 = x.int + c1     (6 bits)
stage 2:  {c2, f2} = f2 + f1
output:   y[n]     = m1[n] + c2[n] - c2[n-1]            (mod 64)
```

so `y = x − (1 − z⁻¹)² · f2`: the average of `y` is `x/1024` and the error is
second-order high-pass. A MASH has no feedback from the output to the input.
Each adder can therefore be pipelined as deeply as wanted, and only latency is
added. This keeps the logic slow and lets it run at a low supply voltage.

Every adder is cut into 2-bit chunks with a carry flip-flop between chunks. A
carry thus moves up only one chunk per clock (`pipe_accum`, `pipe_add`). For
this to add the right numbers, chunk *j* of every operand must arrive *j*
cycles after chunk 0. The signals inside the converter are all kept in this
**skewed** form:

* `skew_shift` with `ALIGN=0` (PIPE SHIFT) delays input chunk *j* by *j* cycles.
* Stage 1 (16 bits, only the low 10 bits fed back) produces its sum in skewed
  form one cycle later. Its low 10 bits are, unchanged, the skewed input of
  stage 2, and its upper 3 chunks are `m1`.
* Stage 2's top-chunk carry `c2[n]` is ready exactly when the output adder's
  lowest chunk needs it. `c2[n-1]` for the subtractor is the same bit two
  flip-flops later.
* `skew_shift` with `ALIGN=1` (ALIGN SHIFT) delays output chunk *j* by *2−j*
  cycles, so the 6 output bits change together.

A word captured at clock edge *n* appears on `y` after edge *n+9*
(`FRAC_W/2 + OUT_W/2 + 1`). The output has the same values as the
non-pipelined equations above, only 9 cycles late. One sample is produced per
clock.

## The 64-modulus divider

```
 in_p,in_n ─► ÷2 ─ Φ1..Φ4 ─► 4:1 MUX ─► ÷2/3 ─► ÷2/3 ─► ÷2/3 ─► ÷2/3 ─► div_out
                              ▲  CONTROL  (D2)     (D3)     (D4)     (D5)
                              └─ D0,D1 ◄── modulus control runs from right to left
```

**Divide-by-2/3 chain.** Each `div23_cell` divides its clock by 2. In the one
output cycle per divider period in which the cell to its right signals
`mod_in`, it divides by 3 if its code bit is set. The cell then passes the
signal leftwards as `mod_out`, high for exactly one of its own input cycles.
The last cell's `mod_in` is tied high. Each cell therefore adds one of its input
cycles per divider period: D5 adds 16, D4 8, D3 4 and D2 2 cycles of the
divider input.

**Divide-by-2/2.5/3/3.5 stage.** The divider input arrives as a differential
pair. A divide-by-2 made of a flop on `+in` (Φ1) and a flop on `−in` (Φ2),
plus their complements (Φ3, Φ4), gives four square waves at half the input
rate. Each lags the previous by half an input cycle. The multiplexer output
normally follows one phase, a period of 2 input cycles. Moving the selection
one phase later delays the next rising edge by half a cycle. During the output
cycle in which the first cell signals `mod_in`, the selection is advanced
`k = 2·D1 + D0` phases, one per half input cycle. That cycle then lasts
2, 2.5, 3 or 3.5 input cycles.

Switching a clock multiplexer risks runt pulses. Here each step is made on
exactly the input edge at which the newly selected phase toggles. The old and
new phases are both high or both low at that moment, so the output never
glitches. To do this, the selection is held as a 2-bit Johnson code. The bit
that moves from an even phase (Φ1, Φ3) to the next is clocked by `−in`. The
bit that moves from an odd phase is clocked by `+in`. A small `target` register,
clocked by the multiplexer output, remembers the phase at rest.

Together, the divider output period is `64 + D` half input cycles. The code is
read at several moments during a period, so it must change only just after a
rising edge of `div_out`. The top meets this by clocking the adder and the
converter from `div_out`. In the test, a new random code every period gives
exactly the expected length for every period.

## The phase/frequency detector

The charge pump is steered by one signal, `phi`, and its complement, and its
average current is zero at a 50% duty cycle. `pfd` makes `phi` rise on a
reference edge and fall on the next divider edge. At equal frequencies the duty
cycle is therefore the divider's phase lag as a fraction of a period: linear
over the whole period, with no dead zone. In lock the divider runs half a
period behind the reference. For frequency acquisition the detector keeps the
difference between the numbers of reference and divider edges, clamped to
−1..2, and holds `phi` high while it is 1 or 2. A reference that runs fast thus
drives the duty cycle to 100%, and a slow one to 0%. The two edge counters are
2-bit Gray counters, one per clock, and the difference is decoded from both.
Only one counter bit changes per edge.

## Clocking and reset

* `div_out` clocks the adder and the converter. At lock it runs at 20 MHz and
  follows the reference. `ref_clk` and `div_out` are the detector's two
  inputs. The `modulation` input must be stable around the rising edge of
  `div_out`.
* `ref_clk` clocks the serial port. The carrier and gain words cross into the
  `div_out` domain without synchronizers. Treat them as static settings and
  change them only when a glitch of one period in the synthesized frequency
  does not matter (a channel change).
* The divider runs on both edges of its input, through the `+in`/`−in` pair.
* Reset is asynchronous and active low everywhere and clears all state to
  zero, including the carrier (code 0, ratio 64) and gain words.

Serial port: while `ser_en` is high, `ser_data` is shifted in on each `ref_clk`
rising edge, MSB first, as the 21-bit word `{gain[4:0], carrier[15:0]}`. A
one-cycle `ser_load` pulse then updates both outputs at once.

## What follows the source design and what does not

Taken from the published design: the system partition and the widths printed
in it (16-bit converter input, 6-bit code, 5-bit gain), the MASH 1-1
structure, and pipelining every two bits with pipe and align shift delays. The
divider follows its structure too: a divide-by-2 with four phase outputs and a
4-to-1 multiplexer, followed by four divide-by-2/3 cells with code bits
D2..D5, giving 32 to 63.5 in half steps.

Choices of this design, where the source gives no detail:

* The 6/10 integer/fraction split. The carrier word width and the
  two's-complement modulation format.
* The exact delay placement in the converter's output path. The arithmetic is
  the standard MASH 1-1, and the latency of 9 cycles follows from it.
* The divide-by-2/3 state machine and the modulus-control handshake between
  the cells.
* How the multiplexer control steps the phases: target register, Johnson-coded
  selection, one step per half cycle.
* The converter is clocked by the divider output.
* The serial port protocol, bit order and reset values.
* The phase/frequency detector circuit. The source uses an earlier published
  detector and gives only its purpose and the 50% operating point. `pfd` is
  the simplest detector with that behaviour and may differ from it, for
  example in how it acquires frequency.

Not included: the Gaussian/compensation filter, which is computed off chip
and whose samples arrive through `modulation`. The charge pump, its 5-bit DAC
and the continuous-time loop filter (pole at 127 kHz, set by a switched
capacitor) are analog.

## How far it is checked

Each module has a self-checking testbench in `tb/`:

* `tb_pipe_accum` checks the integrator chunk by chunk against integer
  arithmetic, with full and partial feedback.
* `tb_mash_sigma_delta` compares the converter, sample by sample, with the
  non-pipelined equations, latency included. For constant inputs it also
  checks the mean over 1024 samples and the output range.
* `tb_div23_cell` checks one cell and a three-cell chain for all settings.
* `tb_div2_3p5_stage` checks 4..7 half-cycle periods, the phase relationships
  and that the output low time never shrinks, i.e. no glitches.
* `tb_mod64_divider` checks all 64 codes held constant, and 2000 periods with a
  new random code each.
* `tb_fracn_synth_top` is the end-to-end test at full size. It loads two
  channels (1.806 and 1.894 GHz) through the serial port. For every period it
  checks the divider period against the code and the code against an
  independent model of adder and converter. It also checks the mean division
  ratio over 2048 periods (e.g. 90.3250 for an expected 90.3252), and applies
  NRZ modulation at 2.5 Mb/s. It checks that the detector reports the
  reference as faster, since the divider runs slower here. It counts that
  every divider modulus, every cell stretch, dithering, both signs of
  modulation and both loads actually happened.
* `tb_pfd` sweeps the phase lag from 5% to 95% and checks the duty cycle
  against it. Around the 50% lock point it steps the lag by 0.1 ns and checks
  that every step moves the duty cycle by that amount. This shows there is no
  dead zone. With a 10% frequency error in each direction it checks
  saturation to 100% and to 0%.
* `tb_gfsk_workload` drives a Gaussian-filtered (BT = 0.5) 2.5 Mb/s bit stream
  with about 668 kHz peak deviation. It runs it once as is and once boosted
  by an inverse loop response (f0 = 84 kHz), which swings the code from 21
  to 35. It checks that the accumulated divider phase follows the integral of
  the input to within 2 VCO cycles after every period.

Two more testbenches close the loop. They use `tb/pll_loop_model.sv`, a
behavioural (not synthesizable) model of the analog parts:

* charge pump with gain code;
* loop filter K1/s + K2/(s + wp), wp = 2π·127 kHz;
* VCO;
* divide-by-2 prescaler.

It is updated once per reference period from the detector duty cycle. Its
natural frequency is about 84 kHz and its damping about 0.7.

* `tb_pll_lock` starts the VCO at 1840 MHz and checks lock at 1850 MHz, a
  channel change to 1905 MHz, and constant modulation of ±256 LSB (±5 MHz).
  Each is checked within 0.3 MHz from counted prescaler edges, with the
  detector duty cycle within 0.5 ± 0.05.
* `tb_gfsk_loop` sends 240 random bits at 2.5 Mb/s through the closed loop.
  With the compensation filter every bit comes out with the right sign, at a
  mean deviation of about 1 MHz. Without it only about two thirds do, because
  the loop is far too slow for the data. For this test the compensation f0 is
  matched to the model's high-frequency roll-off (about 122 kHz). The loop
  filter pole adds a second-order roll-off that a pure 84 kHz response would
  not have.
* `tb_gain_adjust` runs three cores side by side: nominal VCO gain with gain
  code 16, a VCO gain 20% low with code 16, and the same low gain with code 20.
  It applies a 5 MHz modulation step to all three. Code 20 restores the
  nominal step response (within 2% of the step, in fact exactly in this linear
  model). Code 16 leaves an error of about 1 MHz.

Timing of the real circuit is not modelled. The divider input amplifiers and
the speed of the divider (930 MHz in the source) and of the converter
(20 MHz) are circuit properties that RTL simulation cannot show.

## Simulating

Each testbench is a top module with no ports. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fracn_pkg.sv tb/tb_fracn_synth_top.sv --top-module tb_fracn_synth_top
./obj_dir/Vtb_fracn_synth_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The end-to-end
test runs in a few seconds. In the divider testbenches the input toggles every
1 ns, so a period measured in ns is a period in half input cycles, and at the
top level the VCO division ratio.
