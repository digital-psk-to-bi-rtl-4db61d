// psk_oneshot - retriggerable one-shot (monostable multivibrator) with reset.
//
// A one-cycle pulse on `trig` starts an output pulse on `q` that lasts exactly
// WIDTH clock cycles, starting on the clock edge after the trigger. A trigger
// during a pulse restarts it (like the CMOS dual one-shots of the original
// circuit, which are retriggerable). While `clr` is high the pulse is cleared and
// triggers are ignored; the demodulator uses this to cross-couple its two
// one-shots. In the original circuit the width is set by a resistor and a
// capacitor; here it is a down-counter of the sampling clock.
module psk_oneshot #(
  parameter int unsigned WIDTH = psk_demod_pkg::DEF_ONESHOT_CLKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,   // one-cycle trigger pulse
  input  logic clr,    // reset input: clears the pulse, blocks triggers
  output logic q       // output pulse
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [CW-1:0] remain;   // cycles of the pulse still to run

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              remain <= '0;
    else if (clr)            remain <= '0;
    else if (trig)           remain <= CW'(WIDTH);
    else if (remain != '0)   remain <= remain - 1'b1;
  end

  assign q = (remain != '0);

endmodule
