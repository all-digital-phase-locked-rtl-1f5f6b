# All-digital phase-locked loop, 100–720 MHz

This is a phase-locked loop with no analog parts in its control path. A
ring oscillator's period is set by digital codes. It is compared with a
reference clock by a phase frequency detector, which gives one
"faster / slower" decision per reference cycle. A small controller turns
those decisions into the codes. A charge pump, loop filter and voltage
controlled oscillator are replaced by flip-flops, a counter-like controller
and a digitally controlled oscillator (DCO). The oscillator covers
101.9 MHz to 720.5 MHz in two stages:

* A **coarse** ladder of 16 delay segments. Each enabled segment adds about
  485 ps to the period.
* A **fine** bank of 8 switched-capacitance segments. Each adds about 36 ps,
  289 ps in total.

The controller first sweeps the coarse code until the detector's decision
reverses. It then tracks the reference with the fine code.

```
            +-----+ UP/DOWN +----------+  step  +------------+ 4  +--------------+ 16
 REF_CLK -->| pfd |-------->| ref_sync |------->| controller |--->| therm_sr(16) |-----+
        +-->|     |         +----------+        |            |--->| therm_sr(8)  |--+  |
        |   +-----+              ^ CLK          +------------+ 4  +--------------+ 8|  |
        |                                                                           v  v
        |                                                                        +-------+
        +-------------------------------------------------------------- DCO_CLK <-|  dco  |
                                                                                 +-------+
```

The DCO is a behavioural timing model of a full-custom circuit, so the loop
as a whole simulates but does not synthesise. Every other block is ordinary
synthesizable RTL.

## The oscillator

`dco` closes a ring through three parts:

1. an enable NAND, which also stops the ring and holds the output high
   during reset;
2. the fine block;
3. the coarse block.

With all codes zero the half period is 694 ps, which gives a 1388 ps period
(720.46 MHz). The model's delays are set so that it reproduces two measured
tables exactly (`tb/dco_tb.sv` checks both to 0.01 ps):

| coarse ones | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| period (ps) | 1388 | 1873 | 2357 | 2837 | 3704 | 4190 | 4600 | 5157 | 6027 | 6519 | 7004 | 7477 | 8361 | 8848 | 9330 | 9817 |

| fine ones (coarse 0) | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| period (ps) | 1388 | 1420 | 1460 | 1492 | 1529 | 1566 | 1601 | 1639 | 1677 |

The coarse steps are uneven: every fourth step is larger. These are the
oscillator's measured values, not a design goal, and the package keeps them
as constants (`adpll_pkg::COARSE_PERIOD_PS`, `FINE_PERIOD_PS`). When both
codes are non-zero, the model simply adds the two effects.

### Coarse ladder (`dco_coarse_block`, `dco_coarse_segment`)

Each segment has four parts:

* a NAND, which passes the edge on to the right;
* an inverting multiplexer, which sends it back to the left;
* a latch that holds the segment's control bit;
* a second latch, always transparent, on the NAND output.

A segment whose bit is 1 lets the edge continue to the next segment. The
first segment whose bit is 0 turns the edge round through its multiplexer.
So with *n* ones the path is *n* NANDs and *n*+1 multiplexers, always an odd
number of inversions.

The control-bit latch is enabled by the segment's own multiplexer output.
A code change is therefore taken only while that output is high, never in
the middle of an edge's trip through the segment. This keeps the changeover
free of glitches: `tb/dco_tb.sv` changes codes at random times and checks
that no half period is shorter than the fastest one.

The multiplexer delay is 60 ps. Each segment's NAND delay is set from the
period table: half the period step minus the multiplexer. The sixteenth
segment has no neighbour on its right. An inverter with the multiplexer's
delay closes its loop. The controller never sets that bit (its coarse word
has 4 bits, at most 15), and the model gives it the mean step of 487 ps.

### Fine bank (`dco_fine_block`)

The fine block has five inverters in series. Each of the 8 fine segments
hangs eight NAND gates on the outputs of the first four inverters, two per
output. A NAND's other input is the segment's enable. Switching the enable
changes the gate capacitance the inverter sees, and that slows it slightly.
The model adds a per-segment delay, one eighth of that segment's period
step, to each of the four loaded inverters. The varactor NANDs themselves
have no logic function and are not modelled as gates.

## Phase frequency detector (`pfd`)

This is the classic two-flip-flop detector:

* `up` is set by a reference edge and `dn` by a DCO edge.
* When both are set, an AND gate clears them.

A third flip-flop turns the pair into one level. It is clocked by the first
of the two pulses (`up | dn`) and stores `up`. `UP_DOWN` = 1 therefore
means the reference edge came first, so the DCO must speed up. The level
holds until the next pair of edges.

Like any PFD it remembers phase. When the frequencies differ, the edges
drift apart until one overtakes the other, so the decision lags the
frequency error. This matters for the controller (below).

## Shift registers (`therm_sr`)

The controller produces binary words. The DCO needs thermometer codes:
ones filling from segment 0, so `0011` gives `1110000000000000`. Each
register follows its word by shifting one place per CLK cycle:

* a 1 enters at segment 0 to add a one;
* a 0 enters at the far end to remove one.

At all zeros and all ones the register holds its state. A word larger than
the register (e.g. 8 for the 8-bit fine register) gives all ones. Because
the register shifts one place at a time, the oscillator's code changes by
one segment per CLK cycle.

## Controller (`controller`, `ref_sync`)

`ref_sync` samples `REF_CLK` and `UP_DOWN` on CLK with two flip-flops each.
A third flip-flop finds the rising reference edge, which gives the
controller a one-cycle `step` strobe per reference cycle. CLK
must run at least twice as fast as the reference. The testbenches use
4 GHz, which keeps the loop delay small. The range test also locks at every
setting with a 1.67 GHz CLK, 2.5 times the fastest reference.

Both words reset to 0, the fastest setting. A larger word means more delay,
so `UP_DOWN` = 1 lowers a word.

**Coarse stage.** Every decision moves the coarse word one step. The sweep
ends when the decision reverses, or at either end of the range. If the
reversal says "too slow", the word steps back once, because the fine bank
can only add delay, never remove it. `COARSE_LOCKED` then rises and the
fine stage takes over.

**Fine stage.** Every decision moves the fine word one step, held between
0 and 8.

**Coarse carry.** Because the detector reacts to phase, the decision
reverses late, and the sweep usually stops a few coarse settings past the
right one. The fine range (289 ps) cannot make up for even one coarse step
(≈485 ps). To recover, the fine stage watches its own saturation. Suppose
the fine word sits at an end for `SAT_LIMIT` = 32 decisions in a row and is
still asked to go further. The controller then moves the coarse word one
step in that direction and restarts the fine word from its other end. The
loop thus walks back to the right coarse setting one step at a time.

The loop locks inside every coarse setting, from 100.4 MHz to 654 MHz.
Across that range, the coarse setting is final after 0.04–1.7 µs. The
slowest cases are at low frequencies, where each decision takes a long
reference period (`tb/adpll_range_tb.sv`). With `SAT_LIMIT` = 8 the loop
fails to settle at some frequencies. Both 16 and 32 work; with 16 some
frequencies took longer to settle.

## What is taken from the original design and what is not

The design follows a published ADPLL architecture in these points:

* the block structure (detector, two-stage stepping controller, 16-bit
  coarse and 8-bit fine thermometer shift registers, DCO) and the 4-bit
  controller words;
* the detector of two reset flip-flops with a single UP/DOWN output;
* the coarse segment of NAND, inverting multiplexer and latches, with the
  bit latch enabled by the output clock;
* the fine block of five inverters loaded by 8 segments of 8 NAND
  varactors;
* the 60 ps multiplexer delay;
* the two measured period tables;
* the shift registers holding their state at all zeros and all ones.

These parts are this implementation's own:

* **The synchroniser and the CLK rate.** The original only names CLK.
* **The UP/DOWN converter.** The original describes it only as a small
  circuit after the detector.
* **The coarse-stage end rule and the step back.** The original only says
  the coarse stage stops when the DCO approaches the reference.
* **The coarse carry from the fine stage.** This is the main departure. It
  also makes the lock time longer than the original's figures, which are
  about 0.2 µs overall and about 60 ns typical. This loop takes up to
  1.7 µs at the low end of the range.
* **How a word drives a shift register** (one shift per clock towards the
  word).
* **Reset values and RESET polarity.** RESET is active high and
  asynchronous.
* **The oscillator's delay split.** The 34 ps enable NAND, the 120 ps
  inverters and the per-segment NAND delays are set to hit the tables. The
  ring order and the enable NAND itself are also this model's own; some
  inverting gate is needed, because the ladder and five inverters alone
  give an even count.
* **The coarse step size.** The original's text gives about 150 ps per
  coarse bit, while its measured table shows about 485 ps of period per
  bit. The model follows the table.

The layout, jitter, power and area results of the original design are
analog properties and are not represented here.

References that fall between one coarse setting's fine range and the next
(for example 1.68–1.87 ns) cannot be matched exactly. The fine range is
smaller than a coarse step, so the loop dithers between the two settings.
`tb/adpll_tb.sv` checks that it stays on those two.

## Files

| file | contents |
|---|---|
| `rtl/adpll_pkg.sv` | sizes, code types, period tables, delay constants |
| `rtl/adpll.sv` | top level |
| `rtl/pfd.sv` | phase frequency detector with UP/DOWN converter |
| `rtl/ref_sync.sv` | reference-edge strobe and UP/DOWN synchroniser on CLK |
| `rtl/controller.sv` | two-stage stepping controller with coarse carry |
| `rtl/therm_sr.sv` | binary-to-thermometer shift register |
| `rtl/dco.sv` | ring oscillator model |
| `rtl/dco_coarse_block.sv`, `rtl/dco_coarse_segment.sv` | coarse ladder model |
| `rtl/dco_fine_block.sv` | fine varactor bank model |

Top-level ports:

* inputs: `RESET`, `REF_CLK`, `CLK`;
* output: `DCO_CLK`;
* status outputs: `PFD_UP`, `PFD_DN`, `UP_DOWN`, `COARSE_LOCKED`, the two
  words and the two thermometer codes.

Each module has a testbench in `tb/` named `<module>_tb.sv`, and there is
one extra:

* `tb/adpll_tb.sv` runs the full loop at references inside and outside the
  range. It counts every mechanism: coarse steps, reversals, step-backs,
  end of range, carries, fine steps, the fine code held at all ones, and
  both decisions.
* `tb/adpll_range_tb.sv` locks the loop once inside every coarse setting
  and reports the lock times.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

All files use `timeunit 1ps; timeprecision 1fs`. The DCO needs verilator's
timing support:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/adpll_pkg.sv rtl/*.sv \
          tb/adpll_tb.sv --top-module adpll_tb
./obj_dir/Vadpll_tb
```

Replace `adpll_tb` with any other testbench name. The full-loop tests take
a few seconds. Verilator warns about the ascending `[0:N-1]` ranges of the
thermometer types. These are deliberate: element 0 is the first segment,
so a code reads left to right like the segment chain.

To change the loop's behaviour, start with the `controller` parameters
(`SAT_LIMIT` in particular). To change the oscillator, edit the period
tables and delay constants in `adpll_pkg`. The segment delays are derived
from them.
