# Reference-less 1 Gb/s CDR with an injection-locked DCO

This is a clock and data recovery (CDR) circuit that needs no reference clock.
It runs from 0.74 to 1.34 Gb/s and is built around one ring oscillator. A
conventional CDR has two analog loops: a frequency loop and a phase loop,
each with its own charge pump and filter. Here both are replaced:

* **Frequency** is acquired by a *digital* frequency-locked loop (FLL). The
  loop logic is synthesizable and steers the oscillator through a 10-bit
  code.
* **Phase** is not tracked by a loop at all. Once the frequency is right,
  every rising data edge fires a short *injection pulse* into the ring
  oscillator. The pulse pulls one of the ring's nodes toward switching at
  that instant, so the clock phase is pulled back to the data at every
  rising edge. No phase detector or phase filter is needed, and phase lock
  takes only a few data edges.

The oscillator is an 8-phase digitally controlled ring (IL-DCO) running at
half the bit rate: 500 MHz for 1 Gb/s. The RTL here covers all of the
digital loop. The two analog parts, the oscillator and the pulse generator,
are behavioural models, so the whole CDR can be simulated end to end in
Verilator.

```
             +-------------------------------- lock_flag ------------------+
             |                                                             v
 data_in --+-|--------------------------------------------------> pulse_generator --inj--+
           | |                                                                           |
           +-> bb_pfd --up/dn--> deser_1to4 --4 words--> majority_vote --PU/DN-->        |
               ^  (8 phases,       (1:4, 125 MHz          (count ups    gain_ctrl_dlf     |
               |   half rate)       word clock)            vs dns)      (integrator)     |
               |                                                            |            |
               |                               ref_pu/ref_dn -> gain_ctrl_dlf (ref loop) |
               |                                                            |            |
               |                            mode_select (MODE_SEL) <--------+            |
               |                            external_mode (en_cors, ext_code)            |
               |                                   | code[9:0]                           |
               |                                   +--> lock_detector --> lock_flag      |
               |                                   v                                     |
               +------------------------------- il_dco  <--------------------------------+
                                              (371-670 MHz)
```

## Files

| file | kind | role |
|---|---|---|
| `rtl/cdr_pkg.sv` | package | `code_t` (10-bit DCO code), `pump_t` (HOLD/UP/DN) |
| `rtl/cdr_top.sv` | top | wires the whole CDR (includes the two models) |
| `rtl/bb_pfd.sv` | RTL | 8-phase bang-bang frequency detector and data sampler |
| `rtl/deser_1to4.sv` | RTL | 1:4 deserializer built from dividers |
| `rtl/majority_vote.sv` | RTL | 4 lanes to one PU/DN/HOLD per word |
| `rtl/gain_ctrl_dlf.sv` | RTL | gain controller and integral loop filter |
| `rtl/mode_select.sv` | RTL | MODE_SEL: data loop or reference loop |
| `rtl/external_mode.sv` | RTL | en_cors: loop code or external code |
| `rtl/lock_detector.sv` | RTL | 2048-sample max/min lock detector |
| `rtl/il_dco.sv` | behavioural | injection-locked 8-phase ring DCO |
| `rtl/pulse_generator.sv` | behavioural | injection pulse at rising data edges |
| `tb/<block>_tb.sv` | testbench | one self-checking bench per block, `cdr_top_tb` end to end |
| `tb/cdr_rate_tb.sv` | testbench | acquisition at data rates from 0.75 to 1.33 Gb/s, and with jitter |
| `tb/cdr_lock_range_tb.sv` | testbench | injection lock range against pulse width |

## How frequency acquisition works

### Detecting a frequency error without a reference (`bb_pfd`)

The detector receives all eight DCO phases, spaced 45° apart. At half rate
one DCO period covers two bits, so the eight sampling instants cut each bit
period into four quarters. Each phase samples the data in its own flop. On
every rising edge of `ph[0]`, the eight samples of the previous period are
copied into a single register, and all later logic runs in the `ph[0]`
domain.

Two neighbouring samples that differ reveal a data transition. Which of the
four quarters it fell in gives the transition's position relative to the
clock. The detector compares that quarter with the quarter of the previous
transition:

* **Same quarter:** the rates agree, so there is no decision.
* **One quarter later (+1):** each data bit is longer than the clock's bit
  period. The DCO is fast, so the detector outputs **dn**.
* **One quarter earlier (−1):** the DCO is slow, so the detector outputs
  **up**.
* **±2 quarters:** the direction is ambiguous, so the step is ignored.

Each half period contributes at most one transition, the last one found in
it. The votes of one DCO period are summed into a single `up`/`dn` pair.
This is a rotational frequency detector, and it needs no reference because
the data's own transitions are the reference.

The rotation rule only works while the DCO is within about ±50 % of the
right rate. Beyond that, one bit moves the transition by two quarters or
more and the direction aliases. The reset code (128, about 408 MHz) is
1.6× too slow for 1.33 Gb/s, which is outside that window. A second rule
covers the slow side. It looks for a run of only one or two equal samples
between two transitions. Such a run means a bit much shorter than the DCO's
bit period, and it forces an **up** for that DCO period. At lock a bit spans
four samples, so this rule stays silent there.

Without the second rule, the loop started at code 128 false-locked at code
0 for rates of 1.25 Gb/s and above. With it, every tested rate from 0.75 to
1.33 Gb/s locks. Block-level results:

| clock | up | dn |
|---|---|---|
| 450 MHz | 3860 | 200 |
| 340 MHz | 3530 | 1100 |
| 560 MHz | 250 | 3670 |

The detector gives no phase decisions. Phase is handled by injection.
Because of that, the design needs no proportional path in the filter.

### 1:4 deserializer (`deser_1to4`)

The decision stream (one `{up,dn}` symbol per DCO period, 500 MHz) is
slowed to 125 MHz words:

1. A divide-by-2 makes complementary half-rate clocks, ½P and ½N. Their
   rising edges split the stream into even and odd symbols.
2. Each half-rate clock is divided again. This gives four quarter-rate
   clocks: ¼PP and ¼PN from ½P, ¼NP and ¼NN from ½N.
3. Four flops sort the symbols into lanes:

   | lane | takes | on clock |
   |---|---|---|
   | D0 | even | ¼NP |
   | D1 | odd | ¼PN |
   | D2 | even | ¼NN |
   | D3 | odd | ¼PP |

D0–D3 change at four different instants. They hold one coherent word only
between the D3 update and the next D0 update. A final register captures the
word at the rising edge of ¼NP, and ¼NP is also the word clock `wclk`.

Word order depends on the divider phases, so reset puts every divider into
a known state. After reset, the first word that holds data appears 5 symbol
clocks after the first symbol. From then on, each word holds symbols 4k to
4k+3, with `word[0]` the oldest.

Deserializing costs loop latency, but it lets all the following logic run
at 125 MHz.

### Vote and loop filter (`majority_vote`, `gain_ctrl_dlf`)

The vote counts the up lanes and the dn lanes of each word:

* more ups: **PU**
* more dns: **DN**
* a tie: **HOLD**

The filter is the bilinear-transform image of an R + 1/sC loop filter,
H(z) = Kp + Ki/(1 − z⁻¹). Only the integral term is used:

* Each PU adds Ki to an accumulator and each DN subtracts it.
* The accumulator is 10 + `FRAC_W` bits wide, and the top 10 bits are the
  DCO code.
* `beta` sets Ki = 2^beta / 2^FRAC_W codes per decision.
* `alpha` adds an optional proportional kick of ±alpha codes. Set it to 0
  for the intended integral-only filter.
* The accumulator saturates at code 0 and code 1023 rather than wrapping.
* Reset loads code 128.

### Lock detection (`lock_detector`)

The detector watches the code that actually reaches the DCO, one sample per
word clock:

1. At the start of a window, max is 0 and min is 1023.
2. For 2048 samples (16.4 µs at 125 MHz), max and min are updated with each
   code.
3. After the last sample, if max − min ≤ 1, `lock_flag` goes high and stays
   high until reset. Otherwise a new window starts.

A tolerance of 1 is needed because the correct frequency usually falls
between two codes, so a locked loop dithers between them.

A larger window makes a false lock less likely, and a smaller one locks
faster. A flat code at a saturation limit also passes the test. This is a
false lock that the scheme cannot tell apart from a real one.

## How phase lock works (`pulse_generator`, `il_dco`)

While `lock_flag` is low, no pulses are produced. Once it rises, every
rising data edge produces one pulse `inj_pulse`. The pulse width is set in
silicon by two control voltages that starve an inverter; here it is the
`pulse_width_ps` input.

The pulse closes a switch between the ring's 45° and 225° nodes, pulling
them to cross at that instant. The model measures, at the pulse's rising
edge, how far its 45° output is from an edge there. It chooses whichever
edge (rising or falling) is nearer. When the pulse ends, it shifts the ring
by that error, but by no more than `INJ_GAIN` (0.5) times the pulse width.
A 56 ps pulse therefore corrects at most 28 ps per data edge. A larger
error is worked off over several edges, and a frequency offset whose drift
between edges exceeds that pull cannot be held. This is why the lock range
widens with pulse width.

The data centres then sit 90° later, at 135° and 315°. The detector's
samples at those two phases are the recovered data `rdata`:

* two bits per `rclk` = `ph[0]` period
* `rdata[0]` is the earlier bit

Between data edges the DCO runs free at the locked code. Its residual
frequency error is removed again at the next rising edge (one code is
about 0.29 MHz).

## Test modes

* **MODE_SEL = 0:** a second `gain_ctrl_dlf` drives the DCO. Its input is
  the PU/DN decisions of a reference-clock FLL (`ref_pu`, `ref_dn`, clocked
  by `ref_clk`). That detector is not part of this RTL: its decisions come
  in on ports.
* **en_cors = 1:** `ext_code` drives the DCO directly, which is used to
  characterise the oscillator.
* The lock detector sees whichever code is selected.

## Timing summary

| signal | clock | latency |
|---|---|---|
| bb_pfd up/dn, rdata | `ph[0]` (500 MHz at lock) | describes the DCO period before the previous `ph[0]` edge |
| deser word | `wclk` = ¼NP (125 MHz) | symbols 4k..4k+3 valid 5 symbol clocks after symbol 4k |
| vote pump | `wclk` | 1 word |
| filter code | `wclk` | 1 word |
| lock_flag | `wclk` | at the 2048th sample of a qualifying window |
| mode/external selection | combinational | 0 |

All digital blocks use one asynchronous, active-low reset `rst_n`.

## Behavioural models

Both models are excluded from synthesis. They use `#` delays and `real`
arithmetic, in `timeunit 1ps; timeprecision 1fs`.

* **`il_dco`**
  * The frequency is linear in the code: 371 MHz at code 0 and 670 MHz at
    code 1023, the measured end points of the chip's oscillator.
  * That puts 500 MHz near code 441.
  * The published simulation instead quotes code 323 for 500 MHz, and a
    195 kHz/bit step, which would span only 200 MHz. Both conflict with the
    measured end points, which this model follows.
  * The injection pull is limited to `INJ_GAIN` × pulse width. The value
    0.5 was chosen so that the 56 ps lock range comes out close to the
    chip's simulated range (about 497–504 MHz). The model's range grows
    linearly with width. The chip's range grows faster at first and then
    flattens, reaching about 483–516 MHz at 192.5 ps, which is wider than
    the model's.
  * Phase noise and jitter of the ring are not modelled.
* **`pulse_generator`**
  * A pulse of exactly `width_ps` starts at each rising data edge while
    `en` (the lock flag) is high.
  * The analog mapping from INP/INN (0 V/1.8 V for the narrowest pulse) to
    width is not modelled.

## Choices of this implementation

The original design gives the detector's type, the vote and the gain
controller only by name or function. The following were chosen here:

* the rotational quarter-position rule and the short-run rule of `bb_pfd`;
* deserializing the detector's up/dn stream (2-bit symbols) rather than the
  raw data;
* the majority rule with hold on a tie;
* power-of-two integral gain, 8 fraction bits, saturation, and the alpha
  path kept as an option;
* where the word register sits in the deserializer (the ¼NP edge);
* the lock flag staying set until reset;
* the injection strength `INJ_GAIN` of the oscillator model;
* the register stages, and one shared reset.

Where the source descriptions disagree, this implementation chose:

* for the lock detector's initial min, 1023 rather than 2048, which would
  not fit in 10 bits;
* for its test, max − min ≤ 1 rather than "less than 1".

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example with plain
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/cdr_pkg.sv rtl/*.sv \
          tb/cdr_top_tb.sv --top-module cdr_top_tb -o sim
./obj_dir/sim
```

For a single block, list its file instead of `rtl/*.sv`. `cdr_pkg.sv` must
come first.

`cdr_top_tb` runs the top with all parameters at their defaults. It uses a
PRBS-7 stream at 1 Gb/s, with `beta` = 4, `alpha` = 0 and a 56 ps pulse
width, and checks the following:

* **External mode** sets the DCO to 575.6 MHz (code 700).
* **Reference mode:** 32 PU at beta = 4 moves the code from 128 to 130.
* **Data loop:** starting from code 128, the code ramps up and settles at
  441/442. `lock_flag` rises about 105 µs after reset, and the locked DCO
  runs at 499.94 MHz.
* **Injection:** no pulse appears before lock. After lock there is
  exactly one pulse per rising data edge (1562 in the run), and 2000
  recovered bits match the transmitted PRBS with no errors.

The run takes about a quarter of a second. The testbench counts each of
these mechanisms and fails if one never happened.

`cdr_rate_tb` repeats the acquisition from code 128 at several rates and
once with jitter, checking lock and error-free recovered data each time:

| rate (Gb/s) | 0.75 | 0.90 | 1.00 | 1.10 | 1.25 | 1.33 |
|---|---|---|---|---|---|---|
| lock time (µs) | 44 | 75 | 105 | 136 | 188 | 211 |
| code | 14 | 271 | 442 | 612 | 869 | 1006 |

The jitter case is 1 Gb/s with 0.22 UI of sinusoidal jitter at 10 MHz.
The oscillator model has no noise and a fitted injection strength, so
passing this case says little about the jitter tolerance of silicon.

`cdr_lock_range_tb` holds the DCO at fixed codes through external mode so
that only injection can keep it at 500 MHz. It steps the code outward from
441 in steps of two codes. For each pulse width it records the span of
free-running frequencies at which the mean DCO frequency stays at exactly
500 MHz:

| pulse width (ps) | 56 | 112 | 170 | 192 |
|---|---|---|---|---|
| locked, this model (MHz) | 497.0–503.4 | 493.5–506.9 | 490.0–510.4 | 488.2–512.2 |
| chip simulation, read from its plot (MHz) | 497–504 | 490–510 | 485–514 | 483–516 |

The test checks that the range never shrinks as the width grows and that
the 192 ps range is at least twice the 56 ps range.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `cdr_top` | `LOCK_SAMPLES` | 2048 | lock detector window |
| | `LOCK_TOL` | 1 | accepted max − min |
| | `FRAC_W` | 8 | filter fraction bits |
| | `INIT_CODE` | 128 | code after reset |
| `deser_1to4` | `WIDTH` | 1 | bits per symbol (the top uses 2) |
| `majority_vote` | `N` | 4 | lanes per word |
| `gain_ctrl_dlf` | `FRAC_W`, `GAIN_W`, `INIT_CODE` | 8, 4, 128 | |
| `il_dco` | `F_MIN_MHZ`, `F_MAX_MHZ` | 371.0, 670.0 | code 0 / code 1023 frequency |
| | `INJ_GAIN` | 0.5 | largest phase pull per pulse, ps per ps of width |

## Not included

* **Pulse width controller (Vctl):** an analog block whose transfer
  function is not given. The pulse width enters directly as
  `pulse_width_ps`.
* **Reference-clock frequency detector of the test mode:** it is only
  named, so its decisions are ports.
* **Output buffers:** analog pad drivers.
* **Jitter tolerance:** the chip's behaviour under input jitter (0.22 UI
  at 10 MHz) depends on analog effects these models do not represent. The
  jitter run above only shows that the digital loop keeps its lock.
* **Clock jitter and phase noise:** in silicon, recovered-clock jitter
  grows with the injection pulse width (about 8 ps rms at the narrowest
  width). The oscillator model has no noise, so neither this trade-off nor
  the phase noise can be read from simulation.
