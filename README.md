# Low-power 14-bit DCO with glitch-free path switching, in a 480 MHz ADPLL

A digitally controlled oscillator (DCO) is a ring oscillator whose period is set by a digital code.
This design builds the ring from four cascaded tuning stages of falling step size:

- slow, low-power hysteresis delay cells;
- AND-gate chains;
- resistor-capacitor loads;
- MOS gate-capacitor loads.

Together they give a 14-bit code. The coarse stages select their delay by switching a multiplexer
between a short and a long path. Switching a path while a clock edge is inside it creates a runt
pulse that keeps circulating. So every coarse control bit passes through a flip-flop clocked by the
falling edge at the output of its own stage. The bit can then only change when no edge is in that path.

The DCO sits in an all-digital PLL that multiplies a 12 MHz reference by 40 to 480 MHz:

- a phase/frequency detector (PFD) gives `lead`/`lag` levels;
- a controller runs a binary frequency search, then tracks phase one LSB at a time;
- a ÷40 divider closes the loop.

The DCO itself is a behavioural timing model, because its delays are analog quantities. Everything
around it is synthesizable RTL.

## The oscillator ring (`dco_model`, `dco_stage`)

```
 rst_n ─┐
        NAND ──► LV4 ──Y5──► LV3 ──Y4──► LV2 ──Y3──► AND4 ──Y2──► AND2 ──Y1──► AND1 ──Y0──┬──► buffer ──► dco_out
   ┌───►                       ▲                        ▲                        ▲         │
   │      short path (buffer) ─┴────────────────────────┴────────────────────────┘         │
   └───────────────────────────────────────────────────────────────────────────────────────┘
```

Each stage is a delay cell plus a 2-input multiplexer. The select `L` chooses "through the cell"
(1) or "around it" (0). The three stages marked with a short path have a second multiplexer, `M`.
With `M` = 0 the stage's input is taken from a buffered copy of the NAND output instead of the
previous stage, so all earlier stages drop out of the loop.

| code bit | stage | role | added period (ps) |
|---|---|---|---|
| 13 | LV4 hysteresis cell | 1st coarse, select `L` | 2082.72 |
| 12 | LV3 hysteresis cell | 1st coarse, select `L` | 1057.32 |
| 11 | LV2 hysteresis cell | 1st coarse, select `L` | 528.92 |
| 10 | 4-AND chain | 2nd coarse, select `L` | 412.72 |
| 9 | 2-AND chain | 2nd coarse, select `L` | 205.58 |
| 8 | 1-AND chain | 2nd coarse, select `L` | 111.02 |
| 7 / 6 / 5 | short-path select `M` at Y4 / Y2 / Y0 | 1 = take previous stage | see below |
| 4 / 3 | RC loads on the NAND output | 1st fine | 49.06 / 24.98 |
| 2 / 1 / 0 | gate-capacitor loads | 2nd fine | 17.58 / 9.00 / 3.88 |

The base period is 1053.02 ps with every bit at 0. Setting `M` to 001, 011 and 111 gives
1266.94, 1492.14 and 1727.08 ps. A cell's `L` step counts only if its stage is in the loop, which
depends on the `M` bits.

The model adds the contributions linearly. The characterisation this follows varies one stage at a
time, so interactions between stages are not captured.

These are typical-corner figures (TT, 1.0 V, 25 °C). Over all codes the model spans 1053 to 6230 ps,
about 950 to 160 MHz.

The parameter `CORNER` selects one of three corners:

- `CORNER_SS`: 0.9 V, 125 °C;
- `CORNER_TT`: the default;
- `CORNER_FF`: 1.1 V, −40 °C.

Each corner has its own base periods and steps. At SS the period is about 1.9 times TT; at FF it
is about 0.62 times TT.

At FF, the gate-load steps are not additive: the first step is about 16 ps, the following ones
about 3 ps. The model reproduces the single-bit values only.

### Delay modelling

Each delay element uses an intra-assignment delay on a non-blocking assignment. A pulse shorter
than the delay is therefore swallowed, much as a real gate filters it. The fixed loop delay is
split among the NAND, the short-path buffer and the multiplexers (see `dco_model.sv`). That split
is a fitting choice; it reproduces the four base periods above. The fine loads add to the NAND's
delay.

Every delay process evaluates once at time 0 and then on each input change. The ring therefore
starts from any power-up state of the simulator.

## Why code changes glitch, and the retiming cells (`glitch_cancel`)

Consider one stage while the clock is high. A rising edge has entered the long path but not yet
left the cell. If the select switches now, the multiplexer output can drop, then rise again when
the cell's output catches up. The result is a runt pulse.

The dangerous window is when the code goes from the short path to the long one. That window spans
from just before a rising edge reaches the stage (one multiplexer delay, `T_M`) to half a cycle
minus `T_M` after it. Switching just after a falling edge is always safe, and so is switching the
other way (long path to short).

`glitch_cancel` has one D flip-flop per coarse bit. Each one is clocked by the **falling** edge of
the tap that the bit's stage drives:

| bits | tap |
|---|---|
| 13 | Y5 |
| 12, 7 | Y4 |
| 11 | Y3 |
| 10, 6 | Y2 |
| 9 | Y1 |
| 8, 5 | Y0 |

The fine bits only change loading and go to the ring directly. The flip-flops reset to the
controller's reset code, so the ring does not see a spurious code change when it starts.

`tb_dco_glitch_window` sweeps the switch time over a whole cycle and finds exactly this window. `tb_dco_model` shows both sides of it at the two extremes:

- Switching bit 11 or bit 10 at the rising edge of its tap leaves a runt under 300 ps.
- Switching at the falling edge leaves every pulse above 800 ps.

## The loop

### PFD (`pfd`)

This is a three-state detector.

- Two edge flip-flops record that the reference or the feedback edge has arrived.
- When both are set, they clear each other asynchronously.
- Two output flip-flops turn the arrival order into levels:
  - `lead` is clocked by the reference and samples "feedback not yet seen". So `lead` = 1 means the DCO is slow.
  - `lag` is clocked by the feedback and samples "reference not yet seen". So `lag` = 1 means the DCO is fast.
- Exactly coincident edges set both outputs to 1, which the controller reads as "no change".

The original detector sharpens the outputs with a cross-coupled latch and pulse amplifiers. Here
that is reduced to the same decision in plain flip-flops. The short pulses on the losing output
are not reproduced. As ideal flip-flops, the detector has no dead zone. It resolves offsets of
10 ps and far less, where the transistor-level original is quoted with a dead zone of about
10 ps.

The flip-flops have declaration initialisers. Their combined asynchronous clear therefore always
starts from a defined state. `clr` forces both outputs low; the controller uses it during the search.

### Controller (`adpll_controller`)

It is clocked on the falling edge of the reference, half a period after the PFD decides, and has
two modes.

- **Frequency search:** the search starts at the middle code with a step of a quarter of the
  range. A larger code means a longer period. After each measurement the step is added if `lag` = 1
  (DCO too fast) or subtracted if `lead` = 1 (too slow), then halved. The search ends after the step-1 measurement and raises `locked`.
- **Phase tracking:** one LSB up or down per reference period, following `lead`/`lag`. It saturates at both ends.

**How one search step measures frequency** is this design's own choice; the source does not say.
For each step the controller raises `align` for one controller clock. `align` does three things:

- it clears the PFD;
- it holds the ring (through the DCO's enable NAND) and the divider in reset;
- it keeps them held until the next rising reference edge.

That edge restarts the ring. The first divided edge then arrives 40 DCO periods after a reference
edge, and the PFD compares it with the next reference edge. Each step therefore takes two reference
periods. With the 10-bit search word (below), the search takes 1 + 2·9 = 19 reference periods.
That is inside the source's budget of 42 cycles for locking.

### Divider (`freq_divider`)

It is a modulo-N counter, N = 40 by default. Its output rises when the count reaches N−1 and falls
at N/2−1. The first rising edge comes exactly N input periods after reset is released.

### Top (`adpll_top`) and the searched word

The source does not say how the controller drives the individual fields of the 14-bit code.
The top searches a 10-bit word, `{code[13:11], code[9:8], code[4:0]}`:

- **Short-path selects `code[7:5]` are held at `SHORT_SEL` = 111**, so every stage stays in the
  loop. Changing an `M` bit while running switches between sources of different latency. The
  falling-edge retiming is not enough to make that safe.
- **4-AND select `code[10]` is held at `AND4_SEL` = 0.** Its 413 ps step plus the smaller ones
  exceeds the 529 ps LV2 step. With it in the word, the period would not rise monotonically with
  the word, and one-LSB tracking could walk the wrong way at a field boundary. Without it, each
  searched bit outweighs all the bits below it, to within a few ps.

With these settings the loop covers 1727 to 5817 ps (about 579 to 172 MHz). That includes the
2083.33 ps needed for 480 MHz. The top instantiates the DCO at its default, typical corner. At the slow corner the same held settings
start at 3265 ps (306 MHz), so 480 MHz would need the short paths in the search; at the fast
corner it stays within reach.

## What follows the source and what does not

Followed:

- the four-stage ring and its stage order;
- the 14-bit code;
- the per-stage delay steps and base periods at the three characterised corners;
- falling-edge retiming of every coarse bit by the flip-flop of its own stage;
- a three-state PFD with `lead`/`lag` outputs;
- binary search from mid-range with a quarter-range first step, then one-LSB tracking;
- divide by 40; 12 MHz reference; 480 MHz output.

Chosen here:

- the measurement scheme of the search (`align`);
- the controller clock edge;
- the searched fields and the held `M`/AND4 bits;
- the split of the loop's fixed delay;
- linear addition of stage delays;
- the PFD simplification;
- the `clr` input;
- the reset values of the retiming flip-flops.

The text describing the PFD gives the same levels for both phase orders. The polarity here follows
the detector's simulated waveforms:

- feedback leading gives `lag` high;
- feedback lagging gives `lead` high.

Not modelled:

- transistor-level parts: the hysteresis cells and their stacked variant, the transmission-gate
  loads, and the PFD's pulse amplifiers;
- the decoder between the binary and linear parts of the second coarse stage (not described in detail);
- device noise (random jitter), power and area.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dco_model` | Period against an independent sum of the table steps, for 16 codes including every `M` pattern. The hold state. Runt pulse when switching at the rising edge, none when switching at the falling edge. |
| `tb_dco_tables` | The characterisation sweeps of each tuning stage (2nd fine, 1st fine, 2nd coarse, 1st coarse) at all three corners, against the published periods, within 0.5 %; the largest deviation is 0.46 %. Also the TT range end points, 949.6 MHz and below 170 MHz. Left out: two 2nd-coarse rows that depend on the unmodelled decoder, and the non-additive FF gate-load rows. |
| `tb_dco_glitch_window` | Sweeps the moment of a level-2 select change over a whole cycle, both ways. Short to long must glitch (a runt, or a high phase cut short) exactly while the stage input is high, from `T_M` before a rising tap edge to `T/2 − T_M` after it, and nowhere else. Long to short must never glitch. |
| `tb_glitch_cancel` | 4000 random tap-edge/code sequences against a reference model of the per-bit falling-edge flip-flops, plus the reset values. |
| `tb_pfd` | Feedback leading and lagging by 10 ps, 30 ps and 5 ns. Coincident edges. `clr`. A missing feedback edge. A late edge followed by a normal pair. |
| `tb_adpll_controller` | Full searches at W = 14 and W = 10 against a step-by-step model, with lock at clock 1 + 2(W−1). Tracking, hold and saturation at both ends. |
| `tb_freq_divider` | Output against `k ≥ N && (k mod N) < N/2` for N = 40 and N = 5, with a reset in mid-count. |
| `tb_adpll_top` | The whole loop at its default parameters with a 12 MHz reference. Lock within 42 reference periods. Then 150 reference periods of tracking: mean DCO period within 0.5 % of 2083.33 ps, 150 ± 2 feedback edges, bounded code wander, no output pulse under 0.4 of a period. It counts each mechanism (ring hold, search up/down, track up/down, code retiming) and fails one that never happens. |

A typical run of `tb_adpll_top` locks in 19 reference periods, averages about 2083.6 ps in
tracking, and moves the code by ±1 around the 480 MHz point.

The same run reports the spread of single DCO periods during tracking, about 1988 to 2123 ps
(135 ps peak to peak). The model has no noise, so all of this comes from the loop itself:

- the code dithering by one LSB;
- one-cycle transients when a carry crosses from the fine bits into a coarse bit. The fine bits
  act at once, while the coarse bit waits for its tap's falling edge.

Treat this number as a property of the control scheme, not as a jitter prediction for silicon.
The original design reports 80 ps peak to peak from a transistor-level simulation.

## Simulating

All files use Verilator 5 with timing support. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_adpll_top -o sim \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/adpll_pkg.sv tb/tb_adpll_top.sv
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name (twice) to run another block. Adding `+verilator+rand+reset+2` starts every
variable nothing initialises at a random value; all testbenches pass that way.

`adpll_pkg` sets the code width, the coarse/fine split, the tap of each coarse bit and the
division ratio.

## Changing it

- **Division ratio:** the top's `N` parameter. The target period is then `T_ref / N`. It must lie
  in the 1727 to 5817 ps window, or change `SHORT_SEL`/`AND4_SEL` to move the window.
- **Delay steps:** the per-corner period tables at the top of `dco_model`. Every delay derives from them.
  Keep each searched bit larger than the sum of those below it, or tracking can lose monotonicity.
- **Search width:** `adpll_controller` takes any `W` ≥ 2. The top maps its word onto the code in
  one `assign`.
