// tb_viterbi_core: test of the decoding core with four states (N = 1).
//
// A random bit stream a(n) is sent through the channel y = 16*a(n) +
// 16*a(n-1) plus noise, clipped to 6 bits, and the testbench itself computes
// the branch metrics |y - ideal| that drive the core. Phase 1 uses small
// noise (below half the level spacing), where the core must return the sent
// bits exactly. Phase 2 uses larger noise; there the output is compared with
// a software Viterbi model in this testbench that uses the same tie rules and
// sliding-block traceback, but plain integers for the metrics. Gaps in
// in_valid exercise the clock gate. Also checked: the latency of every
// decoded block and that the metrics hold while the clock is gated.
// Mechanisms counted (each must occur): gated idle cycles, tracebacks, FILO
// bank swaps, ACS choosing each predecessor, path-metric wrap-around, a
// non-zero traceback start state.
module tb_viterbi_core;

  localparam int L      = 16;
  localparam int NSTAGE = 40 * L;
  localparam int NS     = 4;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       rx_valid = 0;
  logic [5:0] rx_sample = '0;
  logic       dec_valid;
  logic [1:0] dec_bits;
  logic [5:0] bm [NS];

  always_comb
    for (int k = 0; k < NS; k++) bm[k] = 6'(absd(int'(rx_sample), ideal(k)));

  viterbi_core dut (.clk(clk), .rst_n(rst_n), .in_valid(rx_valid), .bm(bm),
                    .dec_valid(dec_valid), .dec_bits(dec_bits));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // sent bits, samples and model output
  bit   sent   [NSTAGE];
  int   samp   [NSTAGE];
  bit   expect_bits [$];
  int   out_idx = 0;

  // mechanism counters
  int n_idle = 0, n_tb = 0, n_swap = 0, n_dec0 = 0, n_dec1 = 0, n_wrap = 0, n_best_nz = 0;

  always @(posedge clk) cycles++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- software reference Viterbi ----------------
  function automatic int ideal(int k);
    return (k[0] ? 16 : 0) + (k[1] ? 16 : 0);
  endfunction

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  task automatic run_model();
    longint sm [NS];
    bit     dec [NSTAGE][NS];
    int     blocks = NSTAGE / L;
    foreach (sm[k]) sm[k] = 0;
    for (int t = 0; t < NSTAGE; t++) begin
      longint nsm [NS];
      for (int k = 0; k < NS; k++) begin
        int pi = k >> 1, pj = (k >> 1) | 2;
        int bm = absd(samp[t], ideal(k));
        if (bm > 63) bm = 63;
        dec[t][k] = sm[pj] < sm[pi];
        nsm[k] = (dec[t][k] ? sm[pj] : sm[pi]) + bm;
      end
      sm = nsm;
      if ((t + 1) % L == 0 && (t + 1) >= 2 * L) begin
        int best = 0;
        int st;
        bit blk [L];
        for (int k = 1; k < NS; k++) if (sm[k] < sm[best]) best = k;
        st = best;
        for (int s = t; s > t - 2 * L; s--) begin
          if (s <= t - L) blk[s - (t - 2 * L + 1)] = st[0];
          st = {dec[s][st], st[1]};
        end
        for (int i = 0; i < L; i++) expect_bits.push_back(blk[i]);
      end
    end
  endtask

  // ---------------- output checker ----------------
  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      for (int b = 0; b < 2; b++) begin
        checks++;
        if (out_idx >= expect_bits.size()) begin
          failures++;
          $display("extra output bit %0d", out_idx);
        end else if (dec_bits[b] !== expect_bits[out_idx]) begin
          failures++;
          if (failures < 10) $display("bit %0d: got %0b expected %0b", out_idx, dec_bits[b], expect_bits[out_idx]);
        end
        out_idx++;
      end
    end
  end

  // mechanism monitors
  logic [8:0] sm0_prev;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!rx_valid) n_idle++;
      if (dut.tb_start) begin
        n_tb++;
        if (dut.best_state != 0) n_best_nz++;
      end
      if (dut.u_filo.full[dut.u_filo.rbank] && dut.u_filo.rptr == 0) n_swap++;
      if (rx_valid) begin
        n_dec1 += $countones(dut.decisions);
        n_dec0 += NS - $countones(dut.decisions);
      end
      // gated registers must hold on idle cycles
      if (!rx_valid) begin
        checks++;
        #1;
        if (dut.sm[0] !== sm0_prev) begin
          failures++;
          $display("state metric changed on an idle cycle");
        end
      end
    end
  end
  // latency: the first word of each decoded block must appear TB_LEN + 2
  // clock edges after the edge that writes the last stage of the following
  // block (traceback TB_LEN cycles, FILO fill and registered output).
  int lat_cyc = 0;
  int lat_q [$];
  logic dec_valid_q = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rx_valid && dut.pos == 4'(L - 1) && dut.blocks_done >= 1) lat_q.push_back(lat_cyc);
      if (dec_valid && !dec_valid_q) begin
        checks++;
        if (lat_q.size() == 0 || (lat_cyc - 1) - lat_q[0] != L + 2) begin
          failures++;
          $display("latency %0d, expected %0d", lat_q.size() ? (lat_cyc - 1) - lat_q[0] : -1, L + 2);
        end
        if (lat_q.size()) void'(lat_q.pop_front());
      end
    end
    dec_valid_q = dec_valid;
    lat_cyc++;
  end

  always @(negedge clk) begin
    if (rst_n && dut.sm[0] < sm0_prev) n_wrap++;
    sm0_prev = dut.sm[0];
  end

  // ---------------- stimulus ----------------
  initial begin
    bit prev = 0;
    for (int t = 0; t < NSTAGE; t++) begin
      int noise, y;
      sent[t] = $urandom_range(1);
      noise = (t < NSTAGE / 2) ? $urandom_range(14) - 7 : $urandom_range(36) - 18;
      y = 16 * sent[t] + 16 * prev + noise;
      if (y < 0) y = 0;
      if (y > 63) y = 63;
      samp[t] = y;
      prev = sent[t];
    end
    run_model();
    // in the low-noise half the model must equal the sent bits
    for (int i = 0; i < NSTAGE / 2 - 2 * L; i++) begin
      checks++;
      if (expect_bits[i] != sent[i]) begin
        failures++;
        $display("reference model disagrees with sent bit %0d", i);
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NSTAGE; t++) begin
      // occasional idle cycles (gated clock)
      while ($urandom_range(7) == 0) begin
        rx_valid = 0;
        @(negedge clk);
      end
      rx_valid  = 1;
      rx_sample = 6'(samp[t]);
      @(negedge clk);
    end
    rx_valid = 0;
    repeat (3 * L) @(negedge clk);

    checks++;
    if (out_idx != expect_bits.size()) begin
      failures++;
      $display("decoded %0d bits, expected %0d", out_idx, expect_bits.size());
    end

    $display("mechanisms: idle=%0d tracebacks=%0d filo_swaps=%0d acs_i=%0d acs_j=%0d pm_wraps=%0d best_nonzero=%0d",
             n_idle, n_tb, n_swap, n_dec0, n_dec1, n_wrap, n_best_nz);
    if (n_idle == 0 || n_tb == 0 || n_swap == 0 || n_dec0 == 0 || n_dec1 == 0 || n_wrap == 0 || n_best_nz == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
