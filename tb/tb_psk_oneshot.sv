// tb_psk_oneshot - self-checking test of the retriggerable one-shot.
//
// The one-shot runs with its default width (48 clocks, 3/4 of a 64-clock
// carrier period). Inputs change on the falling clock edge. The expected output
// comes from a time-stamp model: a trigger seen on clock edge p makes q high for
// clock edges p .. p+WIDTH-1 after it, a later trigger restarts that window and a
// clear (which wins over a trigger) ends it. Directed parts measure one pulse,
// retrigger it, clear it mid-pulse and trigger during a clear; a random part
// then drives sparse triggers and clears for 20000 clocks.
module tb_psk_oneshot;
  localparam int unsigned WIDTH = psk_demod_pkg::DEF_ONESHOT_CLKS;

  logic clk = 1'b0, rst_n = 1'b0, trig = 1'b0, clr = 1'b0;
  logic q;

  psk_oneshot dut (.clk, .rst_n, .trig, .clr, .q);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint n = 0;          // falling edges since reset release
  longint pulse_end = -1;     // last falling edge at which q must be high
  int     n_retrig = 0, n_clr_mid = 0, n_blocked = 0;

  // At each falling edge: check q, then set the inputs for the next rising edge.
  task automatic step(bit t, bit c);
    @(negedge clk);
    n++;
    checks++;
    if (q !== (n <= pulse_end)) begin
      failures++;
      $display("FAIL edge %0d: q=%0b expected %0b", n, q, n <= pulse_end);
    end
    if (c && n < pulse_end) n_clr_mid++;
    if (c && t) n_blocked++;
    if (t && !c && n < pulse_end) n_retrig++;
    trig = t;
    clr  = c;
    if (c)      pulse_end = n;
    else if (t) pulse_end = n + WIDTH;
  endtask

  int high_run;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // One pulse: measure its length directly as well.
    step(1, 0);
    high_run = 0;
    repeat (WIDTH + 10) begin
      step(0, 0);
      if (q) high_run++;
    end
    checks++;
    if (high_run != int'(WIDTH)) begin
      failures++;
      $display("FAIL pulse width %0d, expected %0d", high_run, WIDTH);
    end
    // Retrigger half way.
    step(1, 0);
    repeat (WIDTH / 2) step(0, 0);
    step(1, 0);
    repeat (WIDTH + 5) step(0, 0);
    // Clear in the middle of a pulse.
    step(1, 0);
    repeat (10) step(0, 0);
    step(0, 1);
    repeat (20) step(0, 0);
    // Trigger while cleared.
    step(1, 1);
    repeat (WIDTH + 5) step(0, 0);
    // Random traffic.
    repeat (20000) step($urandom_range(0, 39) == 0, $urandom_range(0, 99) == 0);
    checks++;
    if (n_retrig == 0 || n_clr_mid == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL coverage: retrig=%0d clr_mid=%0d blocked=%0d", n_retrig, n_clr_mid, n_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
