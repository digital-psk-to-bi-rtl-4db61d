# Digital PSK to Bi-phase-L demodulator for a 2^N × bit-rate carrier

A PCM bit stream can be sent by phase-shift keying a square-wave carrier: each
bit occupies 2^N carrier cycles, and a 0 bit carries the carrier inverted. This
demodulator recovers three things from such a signal with a handful of
flip-flops and counters and no phase-locked loop:

* **NRZ-L** data, from which one-shot (rising or falling transition) keeps firing;
* a **bit clock** (BTCK), by counting carrier cycles and realigning the count at
  every 1-to-0 data step;
* **Bi-phase-L** (Manchester) data, formed from the two and retimed so that it
  has no glitches.

The key observation is that a data change leaves a hole in the carrier. Inside a
bit the line changes every half carrier period; where the data changes from one
bit to the next the two half-periods around the bit edge have the same level, so
the line stays still for a whole period. Two one-shots whose pulse lasts 3/4 of
a period use that hole to find, and keep, the transition in the middle of each
carrier cycle, whose direction is the bit value. A single 1-to-0 step in the data
is enough to bring the whole demodulator into step. The carrier may drift or
jitter by about ±20 % before it loses lock.

The RTL reproduces a discrete-logic circuit (one-shots, three flip-flops, gates
and a binary counter) as synchronous logic. The defaults describe the unit built
for a 56 kHz carrier and 14 kbit/s (N = 2), sampled at 64 clocks per carrier
period (a 3.584 MHz clock).

## The input signal

With N = 2 every bit is four carrier cycles. In this design a **1** bit is a
carrier that is low in the first half of each cycle and high in the second; a
**0** bit is the inverse. So inside a 1 bit the transition in the middle of a
cycle rises, inside a 0 bit it falls. Which carrier phase means 1 is a convention
of this RTL; inverting `psk_in` swaps it.

The diagram below comes from an ideal model of the circuit (one character is a
quarter of a carrier period, `‾` high, `_` low). It starts unsynchronised: the
bit clock is only aligned from the first 1-to-0 step, marked by the RST pulse.

```
PSK    __‾‾__‾‾__‾‾__‾‾__‾‾__‾‾__‾‾__‾‾‾‾__‾‾__‾‾__‾‾__‾‾__‾‾__‾‾__‾‾____‾‾__‾‾__‾‾__‾‾‾‾__‾‾__‾‾__‾‾__
Q0     __‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_________________________________‾‾‾_‾‾‾_‾‾‾_‾‾‾_______________
Q1     __________________________________‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_________________‾‾‾_‾‾‾_‾‾‾_‾‾
CCK    __‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾‾_‾‾
NRZ-L  __‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾________________________________‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾______________
QA     _____‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾________________________________‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾___________
RST    __________________________________‾‾‾_____________________________________________‾‾‾___________
BTCK   ______‾‾‾‾‾‾‾‾________‾‾‾‾‾‾‾‾____________‾‾‾‾‾‾‾‾________‾‾‾‾‾‾‾‾________‾‾‾‾‾‾‾‾________‾‾‾‾‾‾
Q_N-1  __‾‾‾‾____‾‾‾‾____‾‾‾‾____‾‾‾‾________‾‾‾‾____‾‾‾‾____‾‾‾‾____‾‾‾‾____‾‾‾‾____‾‾‾‾____‾‾‾‾____‾‾
BiO-L* __‾‾‾‾________‾‾‾‾‾‾‾‾________‾‾‾‾________‾‾‾‾‾‾‾‾________‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾________________‾‾‾‾‾‾
BiO-L  __‾‾‾‾‾‾‾‾________‾‾‾‾‾‾‾‾____________________‾‾‾‾‾‾‾‾________‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾________________‾‾
data   1               1               0               0               1               0               
```

## Decoding the carrier: the cross-coupled one-shots

`psk_nrz_demod` holds two one-shots. Q0 fires on rising input transitions and
Q1 on falling ones; each pulse is 3/4 of the nominal carrier period T. Each
one-shot's output drives the other's reset input, so while one pulses the other
is held cleared and ignores its transitions.

*Steady state.* Inside a run of equal bits transitions come every T/2 and
alternate in direction. Once one one-shot fires, the opposite transition T/2
later falls inside its 3T/4 pulse and is ignored; the pulse ends at 3T/4; the
next transition of its own direction comes at T and fires it again. One one-shot
therefore fires once per carrier period and the other stays silent.

*Data change.* At a bit edge where the data changes, the line is still for a
whole period, from T/2 before the edge to T/2 after it. The running pulse ends
in that time. The next transition, in the middle of the new bit's first cycle,
has the direction of the new bit, so the matching one-shot fires. From then on
the demodulator is locked onto the mid-cycle transitions.

*Wrong-phase start.* After reset the demodulator may lock onto the transitions
at the cycle boundaries instead. These carry the inverse of the data, so NRZ-L
is wrong until the first data change, where the quiet period moves the lock to
the mid-cycle transitions for good. The end-to-end test provokes this start on
purpose.

FF1 is a set-reset flip-flop, set by Q0 and reset by Q1; its output is NRZ-L. As
the lock is on the mid-cycle transitions, NRZ-L trails the data by half a carrier
period.

*Tolerance.* The scheme works as long as a pulse outlasts half a carrier period,
so that the opposite transition is ignored, and ends within one period, so that
the next transition of the same direction fires again. With a pulse of 3T₀/4 for
a nominal period T₀ the carrier period may range from 3T₀/4 to 3T₀/2. For the
56 kHz unit that is about 37 to 75 kHz. Jitter is tolerated as long as the spacing of neighbouring
transitions changes by less than T₀/4.

## Recovering the bit clock

`bit_clock_gen` ORs Q0 and Q1 into CCK. Exactly one of them pulses per carrier
period, so CCK has one rising edge per period, and a binary counter of modulus
2^N counts those edges. Its top bit (Q_N) is BTCK and the bit below it (Q_N-1)
clocks the Bi-phase output flip-flop.

To align the counter with the bits, FF2 samples NRZ-L at the end of every pulse,
on the falling edge of CCK. Its output QA is NRZ-L delayed by one pulse width.
RST = QA & ~NRZ-L is therefore high from each 1-to-0 step of NRZ-L until the end
of that pulse, and clears the counter. The counter then starts every NRZ-L bit
that follows a 1-to-0 step at 0. BTCK is low in the first half of each NRZ-L bit
and rises in its middle. Between 1-to-0 steps the counter free-runs on CCK. A 0-to-1 step
does not reset it. Because the carrier is an exact multiple of the bit rate, it
stays aligned between steps.

## Bi-phase-L and the deglitching flip-flop

`biphase_encoder` forms BiØ-L* = (NRZ-L & ~BTCK) | (~NRZ-L & BTCK): a 1 bit is high
then low, a 0 bit low then high. NRZ-L and BTCK change at bit edges at nearly the
same moment. Any skew between them gives a short spike on BiØ-L*. FF3 samples
BiØ-L* on each rising edge of Q_N-1. Those edges fall in the middle of each half
bit, well away from both kinds of edge. Its output BiØ-L is clean and trails NRZ-L by
a quarter bit.

## Timing at the defaults

| output | relative to the bit edges of the PSK input |
|---|---|
| NRZ-L | T/2 later, plus 4 clocks (2 synchroniser stages, one-shot register, FF1) |
| BTCK | falls with each NRZ-L edge, rises half a bit later |
| BiØ-L | T/2 + 1/4 bit later, plus 5 clocks |
| sync | BTCK aligned from the first 1-to-0 data step; NRZ-L correct from the first data change |

With T = 64 clocks and 4 cycles per bit, a bit is 256 clocks.

## Modules

| file | role |
|---|---|
| `rtl/psk_demod_pkg.sv` | default parameters and the `demod_probe_t` struct of internal signals |
| `rtl/psk_biphase_demod.sv` | top: wires the three stages together |
| `rtl/psk_nrz_demod.sv` | synchroniser, one-shot pair Q0/Q1, FF1 → NRZ-L |
| `rtl/psk_edge_detect.sv` | two-stage synchroniser and rise/fall pulse detector |
| `rtl/psk_oneshot.sv` | retriggerable one-shot with reset input (down-counter) |
| `rtl/bit_clock_gen.sv` | G1 (CCK), modulo-2^N counter, FF2 (QA), G2 (RST) |
| `rtl/biphase_encoder.sv` | G3–G5 (BiØ-L*) and FF3 (BiØ-L) |

Top-level ports of `psk_biphase_demod`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock, `CARRIER_CLKS` per nominal carrier period |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `psk_in` | in | 1 | logic-level PSK signal, asynchronous to `clk` |
| `nrz_l` | out | 1 | recovered NRZ-L |
| `bit_clk` | out | 1 | BTCK |
| `biphase_l` | out | 1 | deglitched BiØ-L |
| `probe` | out | 7 | Q0, Q1, CCK, QA, RST, BiØ-L*, Q_N-1 for observation |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 2 | carrier cycles per bit = 2^N; N ≥ 2 since Q_N-1 is used |
| `CARRIER_CLKS` | 64 | sampling clocks per nominal carrier period |
| `ONESHOT_CLKS` | 3·CARRIER_CLKS/4 = 48 | one-shot pulse width |

To adapt the demodulator to another carrier, pick a sampling clock, set
`CARRIER_CLKS` = f_clk / f_carrier and `N` = log2(f_carrier / bit rate). Keep the
pulse at 3/4 of the period: that centres the tolerance window. Finer sampling
(a larger `CARRIER_CLKS`) makes the 2-clock synchroniser uncertainty a smaller
part of the ±T/4 margins. At 64 clocks it is about 3 % of T.

## Departures from the discrete circuit

* Every flip-flop clock of the original (input transitions, CCK edges, Q_N-1) becomes
  a one-cycle enable of one sampling clock. The one-shots' RC timing becomes a
  down-counter. The counter's clear is synchronous.
* A two-flip-flop synchroniser is added in front of the one-shots. It delays
  everything by 2 clocks and quantises edge times to one clock.
* The one-shots are retriggerable, as common CMOS dual one-shots are. In normal
  operation this never matters, since a one-shot is not triggered during its own pulse.
* FF2 is taken to be clocked by the end of the one-shot pulse (falling CCK), and
  the counter by the start (rising CCK).
* The mapping of carrier phase to bit value, and Q0 as the rising-edge one-shot
  that sets FF1, are choices of this design.
* The reset state is NRZ-L = 0 and counter = 0. A line that is high when reset is
  released gives one spurious rising edge. This is harmless: lock is taken again
  at the first data change.
* The line receiver at the input and the line driver at the output of the
  original unit are electrical parts. They are not modelled: `psk_in` and
  `biphase_l` are logic-level.
* If only NRZ-L is wanted, the 2^N restriction goes away: `psk_nrz_demod` on its
  own works for any whole number of carrier cycles per bit. No separate top is
  provided for that use.

## Verification

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

* `tb_psk_biphase_demod`: the top at its default parameters. Random bits are sent
  as PSK, with edge times kept in 1/16 of a clock. Every bit after the first
  1-to-0 step is checked: NRZ-L and BTCK at 1/4 and 3/4 of the bit, BiØ-L in the
  middle of both of its half bits. Every output edge is checked against its
  nominal time (NRZ-L at T/2 after a bit edge, BTCK every half bit, BiØ-L a quarter
  bit later, each within 8 clocks plus the jitter). The scenarios are:
  * a nominal 56 kHz carrier;
  * a start locked onto the wrong half of the cycle, which must be seen and then recovered;
  * 39 kHz and 70 kHz carriers, the range over which the 56 kHz hardware unit held sync;
  * ±10 % random jitter on every transition, so intervals vary by up to 20 %;
  * 34 kHz and 90 kHz carriers, outside the tolerance, which must produce errors.

  Counters show that each mechanism happened: transitions ignored through the
  cross coupling, RST pulses, hand-overs between the one-shots, the wrong-phase
  lock, and loss of sync outside the tolerance.
* `tb_psk_biphase_demod_n3`: the same at N = 3 and 32 clocks per carrier period.
* `tb_psk_nrz_demod`: Q0/Q1 never together; each fires only in bits of its value.
  Every NRZ-L edge comes exactly 4 clocks after the mid-cycle transition of the
  first carrier cycle of a new bit. It runs at 4 and at 3 carrier cycles per bit.
* `tb_psk_oneshot`: exact pulse width, retrigger, clear during a pulse, trigger
  blocked by clear, and 20 000 clocks of random traffic against a time-stamp model.
* `tb_bit_clock_gen`: the default N = 2 and N = 3 against a reference counter
  model. One bit has an extra carrier cycle, so the counter slips and must be
  realigned by the next 1-to-0 step. RST must last exactly one pulse width and
  appear only at 1-to-0 steps.
* `tb_biphase_encoder`: NRZ-L is skewed by up to 6 clocks against BTCK, which
  makes glitches on BiØ-L*. BiØ-L must change only after rising edges of Q_N-1,
  carry the Manchester half bits, and show no glitch.

All of them run in well under a second.

Limits of this evidence: the tests use clean logic-level square waves and a
sampling clock that is exact. Metastability in the synchroniser is not modelled by a
two-state simulator. The tolerance results hold for the default sampling rate; at
coarser sampling the synchroniser's one-clock quantisation eats into the margins
(at 32 clocks per period and 39 kHz only one clock of margin is left, and the
N = 3 test still passes).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_psk_biphase_demod \
    -y rtl -y tb +libext+.sv rtl/psk_demod_pkg.sv tb/tb_psk_biphase_demod.sv
./obj_dir/Vtb_psk_biphase_demod
```

Replace the testbench name to run another. The package must come first on the command
line; everything else is found through `-y`. `psk_nrz_demod` holds an assertion
that Q0 and Q1 never pulse together; `--assert` enables it.
