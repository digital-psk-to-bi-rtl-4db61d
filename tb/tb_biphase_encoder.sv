// tb_biphase_encoder - self-checking test of the Bi-phase-L encoder.
//
// The stimulus plays the bit clock counter for N = 2: a 2-bit count advances
// every 64 clocks, BTCK is its top bit and Q_N-1 its low bit. NRZ-L carries
// random bits and changes a few clocks after BTCK falls (0 to 6 clocks, random),
// so the gated signal BiO-L* has short glitches at bit edges, as in the original
// circuit. Checks, on every clock:
//   - BiO-L* equals NRZ-L XOR BTCK (BTCK is low in the first half, so a 1 bit
//     is high then low);
//   - BiO-L changes only on the clock after a rising edge of Q_N-1;
//   - after each rising edge of Q_N-1 BiO-L holds the expected Manchester half
//     bit: the bit value in the first half of the bit, its inverse in the second,
//     i.e. the code trails NRZ-L by a quarter bit;
//   - glitches on BiO-L* were present (counted) and none reached BiO-L.
module tb_biphase_encoder;
  localparam int T    = 64;
  localparam int NBIT = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic nrz_l = 1'b0, btck = 1'b0, half_clk = 1'b0;
  logic bi_raw, biphase_l;

  biphase_encoder dut (.clk, .rst_n, .nrz_l, .btck, .half_clk, .bi_raw, .biphase_l);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_glitch = 0, n_updates = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit   d;
    int   skew, raw_run;
    logic half_prev, bi_prev, raw_prev;
    bit   exp_bi, have_exp, upd_due;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    half_prev = 1'b0;
    bi_prev   = biphase_l;
    raw_prev  = bi_raw;
    raw_run   = 0;
    have_exp  = 1'b0;
    upd_due   = 1'b0;
    for (int k = 0; k < NBIT; k++) begin
      d    = 1'($urandom_range(0, 1));
      skew = $urandom_range(0, 6);
      for (int c = 0; c < 4; c++) begin
        for (int t = 0; t < T; t++) begin
          @(negedge clk);
          // Checks on what the last rising edge left.
          check(bi_raw == (nrz_l ^ btck), "BiO-L* is not NRZ-L XOR BTCK");
          if (upd_due) begin
            n_updates++;
            check(biphase_l == exp_bi, $sformatf("bit %0d: BiO-L %0b expected %0b", k, biphase_l, exp_bi));
          end else begin
            check(biphase_l == bi_prev, "BiO-L changed without a Q_N-1 rising edge");
          end
          bi_prev = biphase_l;
          if (bi_raw != raw_prev) begin
            if (raw_run < 8) n_glitch++;
            raw_run = 0;
          end else begin
            raw_run++;
          end
          raw_prev = bi_raw;
          // Drive the counter outputs and NRZ-L.
          if (t == 0) begin
            btck     = c[1];
            half_clk = c[0];
          end
          if (t == skew && c == 0) nrz_l = d;
          // Expected FF3 action at the next rising edge.
          upd_due = half_clk && !half_prev;
          if (upd_due) exp_bi = (c == 1) ? d : !d;
          half_prev = half_clk;
        end
      end
    end
    check(n_updates == 2 * NBIT, $sformatf("%0d FF3 updates, expected %0d", n_updates, 2 * NBIT));
    check(n_glitch > 10, "no glitches on BiO-L* to remove");
    $display("glitches=%0d updates=%0d", n_glitch, n_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBIT * 4 * T + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
