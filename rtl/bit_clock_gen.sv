// bit_clock_gen - recovers the bit clock from the one-shot pulses.
//
// Gate G1 ORs the two one-shot outputs into CCK, which has one rising edge per
// carrier period. A binary counter of modulus 2^N counts those edges; its most
// significant bit (Q_N in the original circuit) is the bit clock BTCK and the bit below it
// (Q_N-1) clocks the output flip-flop of the Bi-phase encoder. To align the
// counter with the bit edges, FF2 samples NRZ-L at the end of each one-shot
// pulse (falling edge of CCK), giving NRZ-L delayed by one pulse width (QA), and
// gate G2 forms RST = QA & ~NRZ-L. RST is high from every 1-to-0 step of NRZ-L to
// the end of that one-shot pulse and holds the counter at 0, so BTCK is low in
// the first half and high in the second half of each NRZ-L bit.
//
// Every flip-flop edge of the original (CCK rising, CCK falling) is an enable of
// the sampling clock here, and the counter's clear is synchronous; both are this
// design's choices. BTCK and Q_N-1 change one sampling clock after the CCK edge,
// on the same clock edge as NRZ-L. N must be at least 2.
module bit_clock_gen #(
  parameter int unsigned N = psk_demod_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         q0,        // one-shot outputs
  input  logic         q1,
  input  logic         nrz_l,     // NRZ-L from FF1
  output logic         cck,       // G1 output, carrier-rate clock
  output logic         qa,        // FF2 output
  output logic         rst,       // G2 output, counter reset
  output logic [N-1:0] count,     // binary counter
  output logic         btck,      // bit clock, Q_N
  output logic         half_clk   // Q_N-1
);

  if (N < 2) begin : g_bad_n
    $error("bit_clock_gen needs N >= 2");
  end

  logic cck_d;
  logic cck_rise, cck_fall;

  assign cck      = q0 | q1;
  assign cck_rise =  cck & ~cck_d;
  assign cck_fall = ~cck &  cck_d;
  assign rst      = qa & ~nrz_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cck_d <= 1'b0;
      qa    <= 1'b0;
      count <= '0;
    end else begin
      cck_d <= cck;
      if (cck_fall) qa <= nrz_l;
      if (rst)           count <= '0;
      else if (cck_rise) count <= count + 1'b1;
    end
  end

  assign btck     = count[N-1];
  assign half_clk = count[N-2];

endmodule
