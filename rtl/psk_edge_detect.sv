// psk_edge_detect - input synchroniser and edge detector for the PSK line.
//
// The PSK signal is asynchronous to the sampling clock. It passes through
// SYNC_STAGES flip-flops, and one more flip-flop keeps the previous sample, so
// that `rise` and `fall` are single-cycle pulses that mark the input's low-to-high
// and high-to-low transitions. They take the place of the edge-triggered inputs of
// the one-shots in the original circuit; the synchroniser is this design's own
// addition. Latency: an input edge shows on rise/fall SYNC_STAGES clock edges later.
// The chain resets to 0, so a line that is high at reset release gives one rising
// pulse; the demodulator recovers from it like from any other misalignment.
module psk_edge_detect #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic rise,
  output logic fall
);

  // sh[0] is the first synchroniser stage, sh[SYNC_STAGES] the previous sample.
  logic [SYNC_STAGES:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[SYNC_STAGES-1:0], din};
  end

  assign rise =  sh[SYNC_STAGES-1] & ~sh[SYNC_STAGES];
  assign fall = ~sh[SYNC_STAGES-1] &  sh[SYNC_STAGES];

endmodule
