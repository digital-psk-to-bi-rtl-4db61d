// biphase_encoder - NRZ-L to Bi-phase-L (Manchester) with a deglitching flip-flop.
//
// Gates G3-G5 form BiO-L* = (NRZ-L & ~BTCK) | (~NRZ-L & BTCK): a 1 bit is high in
// the first half of the bit and low in the second, a 0 bit the reverse. Because
// NRZ-L and BTCK need not change at exactly the same moment this can glitch at
// bit edges, so flip-flop FF3 samples it on every rising edge of the counter
// output Q_N-1, a quarter of a bit into each half bit, and its output is BiO-L.
// This delays BiO-L by 1/4 bit. The rising edge of `half_clk` acts as a clock
// enable of the sampling clock, so biphase_l changes one clock after it.
module biphase_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic nrz_l,      // NRZ-L data
  input  logic btck,       // bit clock, low in the first half of a bit
  input  logic half_clk,   // counter output Q_N-1
  output logic bi_raw,     // BiO-L* before FF3
  output logic biphase_l   // deglitched BiO-L
);

  logic half_d;

  assign bi_raw = (nrz_l & ~btck) | (~nrz_l & btck);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_d    <= 1'b0;
      biphase_l <= 1'b0;
    end else begin
      half_d <= half_clk;
      if (half_clk && !half_d) biphase_l <= bi_raw;
    end
  end

endmodule
