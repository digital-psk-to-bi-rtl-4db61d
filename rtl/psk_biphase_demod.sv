// psk_biphase_demod - digital PSK to NRZ-L and Bi-phase-L demodulator (top).
//
// The input is a square-wave carrier running at 2^N times the bit rate whose
// phase is inverted for 0 bits. psk_nrz_demod recovers NRZ-L with two
// cross-coupled one-shots and a set-reset flip-flop; bit_clock_gen counts the
// one-shot pulses to make the bit clock and realigns it at every 1-to-0 data
// step; biphase_encoder turns NRZ-L and the bit clock into deglitched
// Bi-phase-L. One 1-to-0 step in the data is enough to synchronise the bit clock.
// The structure follows the original discrete circuit; running it from a
// sampling clock (CARRIER_CLKS clocks per carrier period) is this design's own.
//
// Timing with the defaults: NRZ-L follows the data half a carrier period after
// each bit edge (plus 4 sampling clocks); BTCK is low in the first half of each
// NRZ-L bit; BiO-L trails NRZ-L by a further quarter bit (plus 1 clock).
// Tolerance: a one-shot pulse must outlast half a carrier period and end within
// one, so with a pulse of 3/4 of the nominal period the carrier period may range
// from 3/4 to 3/2 of nominal (about 37 to 75 kHz for a 56 kHz design carrier).
module psk_biphase_demod
  import psk_demod_pkg::*;
#(
  parameter int unsigned N            = DEF_N,
  parameter int unsigned CARRIER_CLKS = DEF_CARRIER_CLKS,
  parameter int unsigned ONESHOT_CLKS = (CARRIER_CLKS * 3) / 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         psk_in,     // logic-level PSK from the line receiver
  output logic         nrz_l,      // recovered NRZ-L
  output logic         bit_clk,    // BTCK
  output logic         biphase_l,  // BiO-L to the line driver
  output demod_probe_t probe       // internal signals for observation
);

  logic         q0, q1, cck, qa, rst, half_clk, bi_raw;
  logic [N-1:0] count;

  psk_nrz_demod #(.ONESHOT_CLKS(ONESHOT_CLKS)) u_nrz (
    .clk, .rst_n, .psk_in, .q0, .q1, .nrz_l
  );

  bit_clock_gen #(.N(N)) u_clk (
    .clk, .rst_n, .q0, .q1, .nrz_l, .cck, .qa, .rst, .count,
    .btck(bit_clk), .half_clk
  );

  biphase_encoder u_bi (
    .clk, .rst_n, .nrz_l, .btck(bit_clk), .half_clk, .bi_raw, .biphase_l
  );

  always_comb begin
    probe.q0       = q0;
    probe.q1       = q1;
    probe.cck      = cck;
    probe.qa       = qa;
    probe.rst      = rst;
    probe.bi_raw   = bi_raw;
    probe.half_clk = half_clk;
  end

endmodule
