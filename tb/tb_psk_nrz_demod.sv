// tb_psk_nrz_demod - self-checking test of the PSK to NRZ-L front end.
//
// A generator sends random bits as PSK with a 64-clock carrier and 4 carrier
// cycles per bit: a 1 bit is low then high in each cycle, a 0 bit high then low,
// so at a data change the line stays still for a whole carrier period. Inputs
// change on falling clock edges. The test checks that
//   - Q0 and Q1 never pulse together, and Q0 fires only during 1 bits, Q1 only
//     during 0 bits (from the first data change on);
//   - NRZ-L equals the bit in the middle of every bit;
//   - every NRZ-L edge comes exactly 4 clocks after the input transition that
//     caused it (2 synchroniser stages, the one-shot register, FF1), and that
//     transition is the mid-cycle one of the first carrier cycle of the bit, so
//     NRZ-L trails the data by half a carrier period;
//   - transitions half a period after a firing are ignored (counted).
// The stream is sent twice: with 4 carrier cycles per bit, as in the full
// demodulator, and with 3, since NRZ-L recovery alone needs no power of two.
module tb_psk_nrz_demod;
  localparam int T    = 64;
  localparam int NBIT = 200;

  logic clk = 1'b0, rst_n = 1'b0, psk_in = 1'b0;
  logic q0, q1, nrz_l;

  psk_nrz_demod dut (.clk, .rst_n, .psk_in, .q0, .q1, .nrz_l);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ignored = 0, n_nrz_edges = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  bit     data [NBIT];
  longint m = 0;            // falling edges since the stream started
  longint last_edge_m = -100;
  int     last_edge_seg = -1;
  bit     locked = 1'b0;
  logic   nrz_prev = 1'b0;

  int NB = 4;                // carrier cycles per bit in the current run

  function automatic bit seg_level(int j);
    return data[j / (2 * NB)] ? bit'(j % 2) : !bit'(j % 2);
  endfunction

  task automatic run(int nb);
    NB = nb;
    foreach (data[i]) data[i] = 1'($urandom_range(0, 1));
    data[0] = 1'b1; data[1] = 1'b1; data[2] = 1'b0;
    psk_in = 1'b0;
    rst_n  = 1'b0;
    locked = 1'b0;
    m = 0;
    last_edge_m = -100;
    last_edge_seg = -1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    nrz_prev = nrz_l;
    for (int j = 0; j < 2 * NB * NBIT; j++) begin
      repeat (T / 2) begin
        @(negedge clk);
        m++;
        // Check the outputs left by the last rising edge.
        check(!(q0 && q1), "Q0 and Q1 high together");
        if (nrz_l != nrz_prev) begin
          n_nrz_edges++;
          if (locked) begin
            check(m - last_edge_m == 4,
                  $sformatf("NRZ-L edge %0d clocks after the input edge", m - last_edge_m));
            check(last_edge_seg % (2 * NB) == 1,
                  $sformatf("NRZ-L edge caused by segment %0d of its bit", last_edge_seg % (2 * NB)));
          end
        end
        nrz_prev = nrz_l;
        if (locked) begin
          if (q0) check(data[(last_edge_seg) / (2 * NB)] == 1'b1, "Q0 fired in a 0 bit");
          if (q1) check(data[(last_edge_seg) / (2 * NB)] == 1'b0, "Q1 fired in a 1 bit");
        end
        if (locked && (j % (2 * NB)) == NB && m == last_edge_m + T / 2 - 1)
          check(nrz_l == data[j / (2 * NB)], $sformatf("bit %0d: NRZ-L mid-bit", j / (2 * NB)));
      end
      // Segment j starts now.
      if (j > 0 && seg_level(j) != seg_level(j - 1) || j == 0 && seg_level(0)) begin
        if (seg_level(j) && q1) n_ignored++;
        if (!seg_level(j) && q0) n_ignored++;
        psk_in = seg_level(j);
        last_edge_m = m;
        last_edge_seg = j;
      end
      if (j == 2 * 2 * NB + 2) locked = 1'b1;   // one carrier cycle into bit 2
    end
  endtask

  initial begin
    run(4);
    run(3);
    check(n_ignored > 100, "too few ignored transitions");
    check(n_nrz_edges > 40, "too few NRZ-L edges");
    $display("ignored=%0d nrz_edges=%0d", n_ignored, n_nrz_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBIT * 7 * T + 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
