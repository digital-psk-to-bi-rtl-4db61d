// psk_nrz_demod - PSK to NRZ-L conversion with two cross-coupled one-shots.
//
// In the PSK signal each bit holds 2^N square-wave carrier cycles, and a 0 bit
// carries the carrier inverted. Where the data changes there is no transition at
// the bit edge, so the line stays still for a whole carrier period. One one-shot
// (Q0) fires on rising input edges, the other (Q1) on falling ones; each pulse is
// 3/4 of a carrier period long. A pulsing one-shot holds the other in reset, so
// the transition half a period later is ignored and one one-shot keeps firing
// once per carrier period. After the quiet period at a data change the pulse has
// ended and the next transition, whose direction is the new bit value, fires the
// matching one-shot. Q0 sets and Q1 resets flip-flop FF1, whose output is NRZ-L.
// Which one-shot sets FF1 follows the original circuit (Q0 to S, Q1 to R); taking Q0 as
// the rising-edge one-shot, and so a 1 bit as a carrier whose mid-cycle transition
// rises, is this design's reading.
//
// Timing: NRZ-L follows the data half a carrier period after the bit edge, plus
// SYNC_STAGES + 2 sampling clocks (synchroniser, one-shot register, FF1).
module psk_nrz_demod #(
  parameter int unsigned ONESHOT_CLKS = psk_demod_pkg::DEF_ONESHOT_CLKS,
  parameter int unsigned SYNC_STAGES  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic psk_in,   // digital PSK carrier
  output logic q0,       // rising-edge one-shot output
  output logic q1,       // falling-edge one-shot output
  output logic nrz_l     // FF1: recovered NRZ-L data
);

  logic rise, fall;

  psk_edge_detect #(.SYNC_STAGES(SYNC_STAGES)) u_edge (
    .clk, .rst_n, .din(psk_in), .rise, .fall
  );

  // Cross coupling: each one-shot's output drives the other's reset input.
  psk_oneshot #(.WIDTH(ONESHOT_CLKS)) u_os0 (
    .clk, .rst_n, .trig(rise), .clr(q1), .q(q0)
  );
  psk_oneshot #(.WIDTH(ONESHOT_CLKS)) u_os1 (
    .clk, .rst_n, .trig(fall), .clr(q0), .q(q1)
  );

  // FF1: set-reset flip-flop, S = Q0, R = Q1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  nrz_l <= 1'b0;
    else if (q0) nrz_l <= 1'b1;
    else if (q1) nrz_l <= 1'b0;
  end

  // The cross coupling keeps the two one-shots from pulsing together.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(q0 && q1));

endmodule
