// tb_bit_clock_gen - self-checking test of the bit clock recovery.
//
// Two instances are tested, one with the default N = 2 and one with N = 3, each
// driven by its own stimulus. The stimulus stands in for the one-shots and FF1:
// in every 64-clock carrier cycle the one-shot of the current bit value pulses
// for 48 clocks, and NRZ-L takes the bit value one clock after the pulse starts.
// Bits are random; one bit (number 60) is given an extra carrier cycle so that
// the counter slips and must be realigned by the next 1-to-0 step.
//
// Reference model: a counter of carrier cycles modulo 2^N that is set to 0 at the
// first carrier cycle of a 0 bit that follows a 1 bit. In the middle of every
// carrier cycle after the first 1-to-0 step the test checks count, BTCK (its top
// bit), Q_N-1 and CCK against the model; it checks that RST is high only after a
// 1-to-0 step and there for 47 clocks (one pulse width, less the clock that NRZ-L
// trails the pulse by), and that at least one realignment really happened.
module tb_bit_clock_gen;
  localparam int T    = 64;
  localparam int W    = 48;
  localparam int NBIT = 120;
  localparam int SLIP = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_realign = 0, n_rst_pulses = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int done = 0;

  for (genvar g = 0; g < 2; g++) begin : g_n
    localparam int NN = 2 + g;
    localparam int NB = 1 << NN;

    logic          q0 = 1'b0, q1 = 1'b0, nrz_l = 1'b0;
    logic          cck, qa, rst, btck, half_clk;
    logic [NN-1:0] count;

    if (g == 0) begin : g_default
      bit_clock_gen dut (.clk, .rst_n, .q0, .q1, .nrz_l, .cck, .qa, .rst, .count,
                         .btck, .half_clk);
    end else begin : g_override
      bit_clock_gen #(.N(NN)) dut (.clk, .rst_n, .q0, .q1, .nrz_l, .cck, .qa, .rst,
                                   .count, .btck, .half_clk);
    end

    bit data [NBIT];

    initial begin
      int  exp_cnt, rst_len, ncyc;
      bit  synced, prev;
      foreach (data[i]) data[i] = 1'($urandom_range(0, 1));
      data[0] = 1'b1; data[1] = 1'b0;
      data[SLIP + 1] = 1'b1; data[SLIP + 2] = 1'b1;
      synced  = 1'b0;
      exp_cnt = 0;
      prev    = 1'b0;
      wait (rst_n);
      for (int k = 0; k < NBIT; k++) begin
        ncyc = (k == SLIP) ? NB + 1 : NB;
        for (int c = 0; c < ncyc; c++) begin
          // Reference model: advance, realign at a 1-to-0 step.
          if (c == 0 && prev && !data[k]) begin
            if (synced && (exp_cnt + 1) % NB != 0) n_realign++;
            exp_cnt = 0;
            synced  = 1'b1;
          end else begin
            exp_cnt = (exp_cnt + 1) % NB;
          end
          rst_len = 0;
          for (int t = 0; t < T; t++) begin
            @(negedge clk);
            if (rst) rst_len++;
            if (synced && t == T / 2) begin
              check(count == NN'(exp_cnt),
                    $sformatf("N=%0d bit %0d cycle %0d: count %0d expected %0d", NN, k, c, count, exp_cnt));
              check(btck == exp_cnt[NN-1], $sformatf("N=%0d bit %0d: BTCK", NN, k));
              check(half_clk == exp_cnt[NN-2], $sformatf("N=%0d bit %0d: Q_N-1", NN, k));
              check(cck == 1'b1, $sformatf("N=%0d: CCK low during a pulse", NN));
            end
            if (t == W + 4) check(cck == 1'b0, $sformatf("N=%0d: CCK high between pulses", NN));
            // Drive the one-shot of this bit and NRZ-L.
            if (t == 0) begin
              q0 = data[k];
              q1 = !data[k];
            end
            if (t == 1) nrz_l = data[k];
            if (t == W) begin
              q0 = 1'b0;
              q1 = 1'b0;
            end
          end
          if (c == 0 && k > 0) begin
            if (prev && !data[k]) begin
              n_rst_pulses++;
              check(rst_len == W - 1, $sformatf("N=%0d bit %0d: RST lasted %0d clocks", NN, k, rst_len));
            end else begin
              check(rst_len == 0, $sformatf("N=%0d bit %0d: RST without a 1-to-0 step", NN, k));
            end
          end else begin
            check(rst_len == 0, $sformatf("N=%0d bit %0d: RST inside a bit", NN, k));
          end
        end
        prev = data[k];
      end
      done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done == 2);
    check(n_realign >= 2, "counter slip was not realigned in both instances");
    check(n_rst_pulses > 20, "too few RST pulses");
    $display("realign=%0d rst_pulses=%0d", n_realign, n_rst_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBIT * 9 * T + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
