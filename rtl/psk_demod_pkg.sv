// psk_demod_pkg - constants and types shared by the PSK to BiPhase-L demodulator.
//
// The demodulator turns a digital PSK signal, whose square-wave carrier runs at
// 2^N times the bit rate, into NRZ-L data, a bit clock and Bi-phase-L (Manchester)
// data. The original circuit is built from one-shots, flip-flops and a ripple
// counter. This RTL version runs everything from one sampling clock: a one-shot
// becomes a down-counter and every flip-flop clock edge becomes a one-cycle
// enable. The defaults describe the 2^2 unit (56 kHz carrier, 14 kbit/s): N = 2 and
// a pulse width of 3/4 of the carrier period come from that design; the sampling
// rate of 64 clocks per carrier period (3.584 MHz for 56 kHz) is this design's choice.
package psk_demod_pkg;

  // Carrier cycles per bit are 2**DEF_N.
  parameter int unsigned DEF_N            = 2;
  // Sampling clocks per nominal carrier period.
  parameter int unsigned DEF_CARRIER_CLKS = 64;
  // One-shot pulse width: 3/4 of the nominal carrier period.
  parameter int unsigned DEF_ONESHOT_CLKS = (DEF_CARRIER_CLKS * 3) / 4;

  // Internal signals of the timing diagram, brought out for observation.
  typedef struct packed {
    logic q0;        // one-shot on rising input edges (bit value 1)
    logic q1;        // one-shot on falling input edges (bit value 0)
    logic cck;       // counter clock, Q0 | Q1
    logic qa;        // NRZ-L delayed by one pulse width (FF2)
    logic rst;       // counter resynchronisation pulse, QA & ~NRZ-L
    logic bi_raw;    // undeglitched Bi-phase-L (gates G3-G5)
    logic half_clk;  // counter output Q(N-1), clock of FF3
  } demod_probe_t;

endpackage
