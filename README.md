# Video pixel-clock ADPLL with fast phase tracking

A monitor or video capture chip that samples an analog RGB signal needs a
pixel clock rebuilt from the only timing the source gives: the horizontal
sync pulse, HSYNC. HSYNC is slow: 31.5 kHz for VGA, 75 kHz for UXGA. The
pixel clock is M times faster, with M the total pixels per line: 800 for VGA
up to 2160 for UXGA. Its rising edges must stay put against HSYNC, because a
sampling edge that wanders into a pixel transition smears the picture.

This RTL is an all-digital PLL built for that job. Two numbers make it hard:

* **A large M.** A DCO period error of Δ becomes M·Δ of phase error after one
  line. An 11.5 ps fine step at M = 2160 is already 25 ns per line, about
  four UXGA pixels.
* **A noisy HSYNC.** HSYNC edges jitter by around a nanosecond. A loop that
  corrects only by tiny frequency steps falls behind the jitter, and its
  phase error keeps growing.

The design answers each with its own mechanism:

* **A sigma-delta modulator (SDM) on the pixel clock.** It dithers the DCO
  code between two neighbouring integer values. This gives the DCO an
  effective step 256 times finer than its real fine step.
* **A one-shot TDC correction.** Time-to-digital converters (TDCs) measure
  how far the feedback edge missed HSYNC. That error is added to the DCO code
  for exactly one line. The phase is pulled back without disturbing the
  average frequency.
* **A four-state acquisition controller and a trimmed-mean loop filter.**
  Together they reach lock within a few hundred to a few thousand lines and
  keep HSYNC noise out of the baseline frequency.

The DCO, the phase/frequency detector and the TDCs are timing circuits. They
are given here as behavioural models. Everything between them is
synthesizable SystemVerilog.

## The loop at a glance

```
 HSYNC ──┬──► PFD ── flagU/flagD ──► controller ── dco_code_base ──┬──► TDC loop ── dco_code_frac
         │     │  └─ phase_clk (one tick per comparison)          │        ▲                 │
         │     │                                    loop filter ◄─┘        │          code_sync (CDC)
         ├──► TDC (HSYNC→FB)  code_lag ────────────────────────────────────┤                 │
         └──► TDC (FB→HSYNC)  code_lead ───────────────────────────────────┘                 ▼
                                                                                  SDM (pixel clock)
  FB_CLK ◄── divide by M ◄── pixel clock ◄── DCO ◄── decoder ◄── 13-bit integer code ◄──┘
```

There are two clock domains:

* **The phase clock.** The PFD makes one pulse of this clock per HSYNC
  comparison. It runs the controller, the loop filter and the TDC loop.
* **The pixel clock.** This is the DCO output. It runs the SDM, the divider
  and the CKOUT gate.

The 21-bit control word crosses from the phase-clock domain to the
pixel-clock domain once per line.

## The DCO control word

All code values are written `{coarse, fine, fraction}`:

| field    | bits | meaning |
|----------|------|---------|
| coarse   | 7    | one of 128 coarse delay stages; 448.02 ps per step |
| fine     | 6    | 0–63 varactor loads in the fine stage; 11.48 ps per step |
| fraction | 8    | sub-fine-step value, realised only by SDM dithering |

The modelled DCO period is `2630 ps + 448.02 ps·coarse + 11.48 ps·fine`.
These are typical-corner means, and they give a range of 2.63 ns to 60.3 ns.
That covers every mode from 229.5 MHz (4.36 ns) down to 25.175 MHz
(39.7 ns).

The fine range is 723 ps, wider than one coarse step. So one period can be
reached with two different {coarse, fine} pairs, and the boundary between
coarse codes is not monotonic in a real DCO. The controller deals with this:
it picks the coarse code once and never lets the fine field carry into it.

## Acquisition: the four controller states

`adpll_controller` runs on the phase clock and sees one lead/lag decision per
line:

* **lead** means FB_CLK arrived before HSYNC. The line was too short, so the
  DCO period must grow and the code goes *up*.
* **lag** is the opposite, and the code goes down.
* **Dead zone.** If the edges are too close for the PFD to tell (within its
  16 ps dead zone), the comparison is ignored.
* **Phase polarity.** A decision that differs from the previous one is
  called a *phase polarity*. It means the code has just crossed the right
  value.

The 2-bit `FSM` output shows the state:

| FSM | state | step | on each phase polarity | leaves when |
|-----|-------|------|------------------------|-------------|
| 0 | coarse SAR | {8,0,0}, halved each polarity | halve the step; load the filter average if the filter is full, else move by the halved step | step has reached {1,0,0} |
| 1 | frequency search | {1,0,0} | load the filter's average coarse code | 15 polarities have occurred |
| 2 | fine & fraction SAR | {0,32,0}, halved each polarity | as in state 0, on the 14-bit fine+fraction field | step has reached the smallest fraction step |
| 3 | phase tracking | smallest fraction step ({0,0,1} at 8 bits) | load the filter average | — (LOCK after 128 polarities) |

Between polarities, every decision moves the code by one step in the
decided direction.

**State 0, coarse SAR.** This is a successive approximation on the coarse
field. Each reversal halves the step, so the coarse code converges in a few
dozen lines.

**State 1, frequency search.** This state exists because the coarse code
alone cannot land exactly. The loop bounces between two or three
neighbouring coarse codes for 15 reversals while the loop filter averages
them. When it leaves, it does four things:

* It sets the coarse code to that average and freezes it.
* It sets the fine code to mid-range (32).
* It empties the filter.
* It forgets the previous decision, so the first decision in state 2 cannot
  count as a polarity.

**State 2, fine & fraction SAR.** The same SAR runs on the fine and fraction
bits, and the SDM is now on. The state ends at the smallest step the
selected fraction width allows:

| SD_MODE | fraction bits | smallest step |
|---------|---------------|---------------|
| 0 | 8 | {0,0,1} |
| 1 | 6 | 4 fraction LSBs |
| 2 | 4 | 16 fraction LSBs |
| 3 | 0 (SDM off) | one fine step |

**State 3, phase tracking.** The code moves by the smallest step each line,
and each polarity snaps it back to the filter average. The TDC loop is
active here. After 128 polarities LOCK goes high and stays high until
RESET.

### The loop filter

`loop_filter` keeps the last ten codes that the controller produced and
outputs their mean with the largest and the smallest left out: the sum of
the middle eight, divided by 8.

A single HSYNC edge jittered far to one side therefore cannot drag the
baseline. Its code is simply one of the two extremes that get dropped. The
filter reports `ok` once it holds ten codes since reset or since it was last
emptied. Reloading the average on each polarity does two jobs:

* It speeds up acquisition, because the code jumps to the centre of the
  oscillation instead of walking there.
* After lock, it keeps a noise-driven excursion from becoming the new
  frequency.

## Sigma-delta dithering on the pixel clock

The integer DCO code can only change the period in 11.48 ps steps. That is
far too coarse at M = 2160. `sdm` runs on the pixel clock itself and turns
the fraction into a pattern of integer codes.

Call the integer part of the input `xi` (13 bits, {coarse, fine}) and the
fraction `xf`. On every pixel clock, an accumulator adds `xf`. When the sum
passes 1.0, a carry `yt` is emitted and 1.0 is taken back out. The output
code is `xi + yt`.

Over any 2^F pixel clocks, exactly `xf` of them use the longer period. They
are spread as evenly as a first-order modulator can spread them, never
bunched. The average period is therefore `xi + xf/2^F` fine steps:

* with 8 fraction bits, a 45 fs equivalent step;
* the phase error inside a line stays within about one fine step, because
  the dither error never accumulates beyond one LSB.

This is a reduced first-order structure. It has no separate difference and
integration blocks: the carry out of an (F+2)-bit accumulator is the
quantiser.

The modulator has three further rules:

* SD_MODE sets how many fraction bits are used. Lower bits are masked.
* With SD_MODE = 3, or before state 2, the accumulator is held clear and the
  output is just `xi`.
* If the fine field is already 63, the carry is dropped rather than rolled
  into the coarse field.

Because the SDM runs on the DCO's own output clock, each dithered code sets
exactly one DCO period. The divider counts those same edges, so the line
length is exactly the sum of the M dithered periods. Changing the code just
after a rising edge is also what keeps a multiplexer-type DCO glitch-free:
the select lines settle well before the edge they steer comes round.

## The TDC loop: a one-line phase correction

Once locked, the controller moves the code by only one fraction LSB per
line. A single HSYNC edge displaced by 1 ns would take many lines to work
off, and during that time more jitter piles up.

The TDC loop closes the gap:

1. Two TDCs (100 ps resolution, 64 stages, 190 ps dead zone) run side by
   side:
   * One starts on HSYNC and stops on FB_CLK. It reads the lag.
   * The other starts on FB_CLK and stops on HSYNC. It reads the lead.
2. On each phase clock, `tdc_loop` takes the code of the side the PFD
   reported and multiplies it by a gain. The signed result `cp_code` is
   positive on lead and negative on lag.
3. It adds `cp_code` to the controller's base code:
   `dco_code_frac = dco_code_base + cp_code`.
4. `cp_code` is **replaced**, not accumulated, at the next phase clock. So
   the correction lasts for exactly one line.

During that line, the SDM spreads the extra fraction evenly over all M pixel
clocks. The line becomes longer or shorter by the measured error, and the
next FB_CLK edge lands back on HSYNC. The average frequency, held in
`dco_code_base` and the filter, does not move.

The ideal gain makes one line's correction equal the measured time:

```
gain = T_tdc · 2^8 / (T_fine · M)      [fraction LSBs per TDC count]
```

For example, 100 ps TDC steps and 11.48 ps fine steps at M = 2160 give about
1.03 LSB per count.

The top computes this gain for every DIVM_MODE at elaboration, as a Q8.4
number. It uses the top's `T_TDC_PS` and `T_FINE_PS` parameters, scaled by
`TDC_GAIN_PCT`. If the real DCO and TDC drift over process, voltage or
temperature, set `TDC_GAIN_PCT` to match. A gain of 50–100 % of ideal is a
good range for real HSYNC jitter.

## PFD, flags and the phase clock

`pfd` models a three-state phase/frequency detector:

* Two state flops are set by the HSYNC and FB_CLK rising edges. Both are
  cleared, after a reset-path delay, once both are set.
* While only the HSYNC flop is set, OUTU pulses low. While only the FB_CLK
  flop is set, OUTD pulses low.
* A pulse amplifier stretches each low pulse so that a flag flop can catch
  it:
  * flagU is cleared by an OUTU pulse (FB_CLK lagged) and set again by the
    next HSYNC edge;
  * flagD works the same way with OUTD and FB_CLK.
* Pulses shorter than the 16 ps dead zone leave both flags high.

The model also makes the **phase clock**. This is a pulse issued a fixed
2 ns after both edges of a comparison have arrived, so the flags and both
TDC codes have settled when the controller samples them.

The controller, the filter and the TDC loop update on its rising edge. The
new code is handed to the pixel domain on its falling edge, by `code_sync`,
which works as follows:

* The source holds the word and flips a toggle bit.
* The destination passes the toggle through three flops and copies the word
  when the toggle changes.

The word is stable for a whole line, so the copy is clean.

## Pins

| pin | dir | width | function |
|-----|-----|-------|----------|
| RESET | in | 1 | active-high asynchronous reset; stops the DCO |
| HSYNC | in | 1 | reference |
| EN_CKOUT | in | 1 | enables CKOUT (sampled on the falling pixel-clock edge, so no runt pulses) |
| EN_TDC_LOOP | in | 1 | enables the TDC correction in phase tracking |
| SD_MODE | in | 2 | fraction width: 0 = 8 bits, 1 = 6, 2 = 4, 3 = SDM off |
| DIVM_MODE | in | 4 | M: 1 = 800 (VGA), 2 = 1056 (SVGA), 3 = 1344 (XGA), 4 = 1688 (SXGA), 5 = 2160 (UXGA), 6–14 = 32, 64, 128, 256, 512, 1024, 2048, 4096, 5600; 0 and 15 = 32 |
| HSYNCD | out | 1 | HSYNC passed through |
| FB_CLK | out | 1 | pixel clock / M |
| CKOUT | out | 1 | gated pixel clock |
| LOCK | out | 1 | phase lock |
| FSM | out | 2 | controller state |
| PHASE_CLK, P_UP, P_DOWN, DIVM, DCO_CODE_FRAC, TDC_CODE, DCO_CODE_INT | out | — | observation of the internal buses |

The divider loads a new M at the end of its current period. FB_CLK is high
for floor(M/2) pixel clocks.

## Behavioural models and what they leave out

These three models use `#` delays and `$realtime`. They are for simulation
only.

* **`dco`** is a linear period model. It has the typical-corner mean steps
  and no DNL or INL. A new code takes effect at the next edge, which is the
  glitch-free behaviour the real OR-gate coarse chain is designed for.
* **`pfd`** has the reset-path, amplifier and phase-clock delays as
  parameters (150 ps, 200 ps, 2 ns). These values are assumed.
* **`tdc`** computes `floor(Δt / 100 ps)` over a 64-stage (6.4 ns) line,
  saturating at 63. Intervals under the dead zone read 0.

To build a chip, replace them with the cell-level circuits. The decoder in
front of the DCO (`dco_decoder`) is real logic. It produces a one-hot coarse
select and a thermometer-coded fine enable. With a 6-bit code, the 64th fine
load is never enabled.

## Departures and open points

* **Loop filter replacement policy.** The original description says both
  that new codes replace the largest and smallest stored codes, and that the
  average excludes the largest and smallest. This filter keeps the ten
  newest codes (oldest out) and excludes the extremes from the average.
* **Tracking under jitter without the TDC loop.** At UXGA with ±1.2 ns
  uniform HSYNC jitter and EN_TDC_LOOP low, this implementation does not
  reach LOCK in 6000 lines.
  * The one-LSB tracking step is too slow to follow the random phase walk.
    Each phase polarity is hundreds of lines apart, and the phase error grows
    to microseconds.
  * The original design reports about 3.4 ns in this case, so its tracking
    rules probably differ in a detail that is not described.
  * With the TDC loop on, which is the intended configuration, every mode
    locks and stays within about 2 ns.
  * The same limit cycle can appear with a clean HSYNC when the DCO step is
    changed: with an 18 ps fine step, clean XGA with the 8-bit fraction does
    not lock (the code ramps one LSB per line for hundreds of lines each
    way). The other fourteen runs of `tb_adpll_dco18` lock.
* **Choices not fixed by the original description:**
  * start code {0,32,0};
  * fine restart at 32 after the frequency search;
  * emptying the filter between the coarse and fine searches;
  * saturation instead of carry between fields;
  * sticky LOCK;
  * how the phase clock is made and when it samples;
  * the clock-domain crossing;
  * the divider's duty cycle;
  * the meaning of unused DIVM_MODE codes.
* **Not modelled:** PVT corners, DCO nonlinearity, and the 18 ps DCO step
  used in some of the original system simulations. The defaults are the
  typical corner's 11.48 ps.

## Simulating

Every file sets `timeunit 1ps; timeprecision 1fs`. With Verilator 5:

```
verilator --binary --timing -Irtl -yrtl rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
          --top-module tb_adpll_top -o sim && obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-y`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself, and each
has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_adpll_modes` | defaults, VGA to UXGA at 60 Hz: lock, mean period, phase error with clean HSYNC (TDC off) and with ±1.2 ns jitter (TDC on); about 20 s |
| `tb_adpll_top` | 32× test mode (6 MHz → 192 MHz): 8-, 6- and 4-bit and SDM-off runs, jitter with TDC, 64× mode, CKOUT gating; counts every mechanism (each state, polarity, filter reload, dithering, TDC correction, lock, gating) and fails any that never happened |
| `tb_adpll_gain` | three copies at 50 %, 100 % and 200 % of the ideal TDC gain at UXGA, under fast (independent) and slow (12-line sinusoid) ±1.2 ns jitter; about 70 s |
| `tb_adpll_dco18` | T_FINE_PS = 18 ps, the DCO step of the original behavioural loop simulations, VGA to UXGA: 8- and 6-bit clean, and 1.2 ns normally distributed jitter with the TDC loop on; about 30 s |
| `tb_adpll_controller` | the state sequence, steps, reloads and lock count against a scripted lead/lag stream |
| `tb_loop_filter`, `tb_sdm`, `tb_tdc_loop`, `tb_freq_divider`, `tb_dco_decoder`, `tb_dco`, `tb_pfd`, `tb_tdc`, `tb_code_sync` | each block against an independent reference |

Results of `tb_adpll_modes`: the worst FB_CLK-to-HSYNC error after lock,
over 100 lines.

| mode | M | 8-bit, clean, TDC off | 6-bit, clean, TDC off | 8-bit, ±1.2 ns jitter, TDC on |
|------|---|------------------------|------------------------|--------------------------------|
| VGA | 800 | 0.08 ns | 0.33 ns | 2.01 ns |
| SVGA | 1056 | 0.07 ns | 0.38 ns | 1.82 ns |
| XGA | 1344 | 0.10 ns | 0.24 ns | 1.99 ns |
| SXGA | 1688 | 0.14 ns | 0.56 ns | 1.68 ns |
| UXGA | 2160 | 0.16 ns (2.6 % of a pixel) | 1.02 ns (16.5 %) | 1.98 ns (32 %) |

At UXGA with the TDC loop on, the error against the jitter amplitude is:

| jitter | error |
|--------|-------|
| ±0.2 ns | 0.40 ns |
| ±0.5 ns | 0.95 ns |
| ±1.0 ns | 1.45 ns |
| ±1.2 ns | 1.98 ns |

The jittered figures include the jitter of the HSYNC edge itself, because
the error is measured against the edge actually received. The jitter is
uniform, and the random sequence depends on the simulator seed. Lock takes
350–2900 lines, depending on mode and jitter.

With an 18 ps fine step and normally distributed jitter (sigma 0.4 ns,
clipped at ±1.2 ns), `tb_adpll_dco18` gives at UXGA: 0.33 ns with the 8-bit
fraction on a clean HSYNC, 1.23 ns with the 6-bit fraction, and 1.39 ns
(22.5 % of a pixel) with jitter and the TDC loop on. The original design
reports below 1 ns, 3.7 ns and 1.37 ns (22 %) for the same three cases.

### TDC gain and the character of the jitter

`tb_adpll_gain` compares three gains at UXGA. Each cell is the worst phase
error after lock.

| jitter | 50 % | 100 % | 200 % |
|--------|------|-------|-------|
| independent per line, ±1.2 ns | 1.72 ns | 2.04 ns | 6.23 ns |
| 12-line sinusoid, 1.2 ns | 0.98 ns | 0.59 ns | 0.79 ns |

When consecutive edges move the same way, a correction near the ideal gain
removes the error in one line. When edges jump back and forth, each
correction is applied to a line whose error has already reversed, and a high
gain amplifies the noise. Choose the gain for the jitter of the actual source;
somewhat below ideal is the safer side.

## Files

`rtl/`:

* `adpll_pkg` — widths, state type, mode decodes
* `adpll_top`
* `adpll_controller`
* `loop_filter`
* `tdc_loop`
* `code_sync`
* `sdm`
* `freq_divider`
* `dco_decoder`
* `dco` (model)
* `pfd` (model)
* `tdc` (model)

`tb/` holds one testbench per block, plus the two system testbenches above.
