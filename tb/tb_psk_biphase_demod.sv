// tb_psk_biphase_demod - end-to-end test of the PSK to Bi-phase-L demodulator.
//
// The top is used with its default parameters (2^2 carrier cycles per bit, 64
// sampling clocks per nominal carrier period, one-shot pulse 48 clocks). A PSK
// generator builds the line signal from random data: each bit is 4 square-wave
// carrier cycles, a 1 bit is low then high in every cycle, a 0 bit high then low.
// Edge times are kept in 1/16 of a clock so that carrier periods need not be a
// whole number of clocks, and each transition can be moved by random jitter.
//
// For every bit after the first 1-to-0 step (which synchronises the bit clock)
// the checker samples, relative to D = bit start + half a carrier period:
//   D + 1/4 bit : NRZ-L = bit, BTCK = 0      D + 1/2 bit : BiO-L = bit
//   D + 3/4 bit : NRZ-L = bit, BTCK = 1      D + 1 bit   : BiO-L = not bit
// and every output edge is checked against its nominal time: NRZ-L edges half a
// carrier period after a bit edge, BTCK edges every half bit from there, BiO-L
// edges a further quarter bit later, each within a few sampling clocks (plus the
// jitter). Scenarios: nominal 56 kHz carrier, a start that locks onto the wrong
// half of the carrier cycle, 39 kHz and 70 kHz carriers (the range over which the
// 56 kHz unit stayed in sync), +-10 % edge jitter (intervals vary by up to 20 %),
// and two carriers outside the tolerance, where errors are required.
module tb_psk_biphase_demod;
  import psk_demod_pkg::*;

  localparam int NB   = 1 << DEF_N;           // carrier cycles per bit
  localparam int FX   = 16;                   // time unit: 1/16 clock
  localparam int T0   = DEF_CARRIER_CLKS;     // nominal carrier period, clocks
  localparam int NBIT = 160;                  // bits per scenario

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         psk_in = 1'b0;
  logic         nrz_l, bit_clk, biphase_l;
  demod_probe_t probe;

  psk_biphase_demod dut (.clk, .rst_n, .psk_in, .nrz_l, .bit_clk, .biphase_l, .probe);

  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  // Scenario state shared with the edge monitor.
  longint t_start;        // time of the first bit edge, 1/16 clock
  longint per;            // carrier period, 1/16 clock
  longint bitp;           // bit period, 1/16 clock
  longint jit;            // jitter bound, 1/16 clock
  bit     edge_on = 1'b0; // edge timing checks active
  bit     tol_ok;         // carrier inside the tolerance: mismatches are failures
  int     lost;           // mismatches seen outside the tolerance

  // Mechanism counters.
  int n_ignored = 0;      // transitions ignored because the other one-shot pulsed
  int n_resync = 0;       // counter reset pulses (RST)
  int n_handover = 0;     // firing passed from one one-shot to the other
  int n_wrong_lock = 0;   // NRZ-L wrong before the first data step, wrong-phase start
  int n_lost_sync = 0;    // out-of-tolerance scenarios that did lose sync
  int n_edges_nrz = 0, n_edges_btck = 0, n_edges_bi = 0;

  function automatic void check(bit cond, string what);
    if (tol_ok) begin
      checks++;
      if (!cond) begin
        failures++;
        $display("FAIL t=%0d clocks: %s", cyc, what);
      end
    end else if (!cond) begin
      lost++;
    end
  endfunction

  // Signed distance of t from the grid ref + k*p, in (-p/2, p/2].
  function automatic longint grid_phase(longint t, longint ref_t, longint p);
    longint ph;
    ph = (t - ref_t) % p;
    if (ph < 0) ph += p;
    if (ph > p / 2) ph -= p;
    return ph;
  endfunction

  // Edge monitor: checks each output edge against its nominal time.
  logic   nrz_d = 1'b0, btck_d = 1'b0, bi_d = 1'b0, rst_d = 1'b0, q0_d = 1'b0, q1_d = 1'b0;
  bit     last_q1 = 1'b0;
  always @(posedge clk) begin
    longint t, ph, lo, hi;
    t  = cyc * FX;
    lo = -jit - longint'(FX);
    hi = 8 * FX + jit;
    if (edge_on) begin
      if (nrz_l != nrz_d) begin
        ph = grid_phase(t, t_start + per / 2, bitp);
        check(ph >= lo && ph <= hi, $sformatf("NRZ-L edge %0d/16 clocks off its slot", ph));
        n_edges_nrz++;
      end
      if (bit_clk != btck_d) begin
        ph = grid_phase(t, t_start + per / 2, bitp / 2);
        check(ph >= lo && ph <= hi, $sformatf("BTCK edge %0d/16 clocks off its slot", ph));
        n_edges_btck++;
      end
      if (biphase_l != bi_d) begin
        ph = grid_phase(t, t_start + per / 2 + bitp / 4, bitp / 2);
        check(ph >= lo && ph <= hi, $sformatf("BiO-L edge %0d/16 clocks off its slot", ph));
        n_edges_bi++;
      end
    end
    if (probe.rst && !rst_d) n_resync++;
    if (probe.q0 && !q0_d) begin
      if (last_q1) n_handover++;
      last_q1 = 1'b0;
    end
    if (probe.q1 && !q1_d) begin
      if (!last_q1) n_handover++;
      last_q1 = 1'b1;
    end
    nrz_d  <= nrz_l;
    btck_d <= bit_clk;
    bi_d   <= biphase_l;
    rst_d  <= probe.rst;
    q0_d   <= probe.q0;
    q1_d   <= probe.q1;
  end

  bit data [NBIT];

  // Line level in half-cycle segment j (j < 0: idle level).
  function automatic bit seg_level(int j, bit idle);
    if (j < 0) return idle;
    return data[j / (2 * NB)] ? bit'(j % 2) : !bit'(j % 2);
  endfunction

  task automatic wait_until(longint t_fx);
    while (cyc * FX < t_fx) @(negedge clk);
  endtask

  task automatic drive_psk(bit idle);
    longint tb_fx;
    bit     lv;
    for (int j = 0; j < 2 * NB * NBIT; j++) begin
      lv = seg_level(j, idle);
      if (lv != seg_level(j - 1, idle)) begin
        tb_fx = t_start + (longint'(j) * per) / 2;
        if (jit > 0) tb_fx += longint'($urandom_range(0, 32'(2 * jit))) - jit;
        wait_until(tb_fx);
        if (lv && probe.q1) n_ignored++;
        if (!lv && probe.q0) n_ignored++;
        psk_in = lv;
      end
    end
  endtask

  task automatic check_bits(int kc, bit wrong_phase_start);
    longint d;
    // Before the first 1-to-0 step only NRZ-L is defined.
    for (int k = 1; k < kc; k++) begin
      d = t_start + k * bitp + per / 2;
      wait_until(d + bitp / 2);
      if (wrong_phase_start) begin
        if (nrz_l != data[k]) n_wrong_lock++;
      end else begin
        check(nrz_l == data[k], $sformatf("bit %0d: NRZ-L before sync", k));
      end
    end
    wait_until(t_start + kc * bitp + per / 2 + bitp / 8);
    edge_on = 1'b1;
    for (int k = kc; k < NBIT - 1; k++) begin
      d = t_start + k * bitp + per / 2;
      wait_until(d + bitp / 4);
      check(nrz_l == data[k], $sformatf("bit %0d: NRZ-L in first half", k));
      check(bit_clk == 1'b0, $sformatf("bit %0d: BTCK in first half", k));
      wait_until(d + bitp / 2);
      check(biphase_l == data[k], $sformatf("bit %0d: BiO-L first half", k));
      wait_until(d + 3 * bitp / 4);
      check(nrz_l == data[k], $sformatf("bit %0d: NRZ-L in second half", k));
      check(bit_clk == 1'b1, $sformatf("bit %0d: BTCK in second half", k));
      wait_until(d + bitp);
      check(biphase_l == !data[k], $sformatf("bit %0d: BiO-L second half", k));
    end
    edge_on = 1'b0;
  endtask

  // carrier_hz: actual carrier for a design built for 56 kHz (T0 clocks).
  task automatic scenario(string name, int carrier_hz, int jitter_pct, bit idle,
                          bit in_tol);
    int kc;
    per    = (longint'(T0) * FX * 56000) / longint'(carrier_hz);
    bitp   = per * NB;
    jit    = (per * jitter_pct) / 100;
    tol_ok = in_tol;
    lost   = 0;
    foreach (data[i]) data[i] = 1'($urandom_range(0, 1));
    data[0] = 1'b1; data[1] = 1'b1; data[2] = 1'b1; data[3] = 1'b1; data[4] = 1'b0;
    kc = 4;
    psk_in = idle;
    @(negedge clk) rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3 * T0) @(negedge clk);
    t_start = (cyc + 2) * FX;
    fork
      drive_psk(idle);
      check_bits(kc, idle);
    join
    if (!in_tol) begin
      checks++;
      if (lost > 0) n_lost_sync++;
      else begin
        failures++;
        $display("FAIL %s: no errors outside the tolerance", name);
      end
    end
    $display("scenario %-14s carrier %0d Hz jitter %0d%%: checks so far %0d, failures %0d, out-of-range mismatches %0d",
             name, carrier_hz, jitter_pct, checks, failures, lost);
  endtask

  initial begin
    scenario("nominal",     56000,  0, 1'b0, 1'b1);
    scenario("wrong_phase", 56000,  0, 1'b1, 1'b1);
    scenario("low_39k",     39000,  0, 1'b0, 1'b1);
    scenario("high_70k",    70000,  0, 1'b0, 1'b1);
    scenario("jitter_10pct",56000, 10, 1'b0, 1'b1);
    scenario("too_low_34k", 34000,  0, 1'b0, 1'b0);
    scenario("too_high_90k",90000,  0, 1'b0, 1'b0);
    tol_ok = 1'b1;
    check(n_ignored > 0,    "no transition was ignored by the cross coupling");
    check(n_resync > 0,     "no counter reset pulse");
    check(n_handover > 0,   "no handover between the one-shots");
    check(n_wrong_lock > 0, "wrong-phase start did not happen");
    check(n_lost_sync == 2, "loss of sync outside the tolerance not seen twice");
    check(n_edges_nrz > 0 && n_edges_btck > 0 && n_edges_bi > 0, "output edges missing");
    $display("mechanisms: ignored=%0d resync=%0d handover=%0d wrong_lock=%0d lost_sync=%0d edges nrz/btck/bi=%0d/%0d/%0d",
             n_ignored, n_resync, n_handover, n_wrong_lock, n_lost_sync,
             n_edges_nrz, n_edges_btck, n_edges_bi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
