// tb_viterbi_top: end-to-end test of both decoders and the encoder, at the
// default parameters.
//
// Channel detector: a random bit stream a(n) is sent through the channel
// y = 16*a(n) + 16*a(n-1) plus noise, clipped to 6 bits. In the first half
// the noise is below half the level spacing and the detector must return the
// sent bits exactly; in the second half the output is compared with a
// software Viterbi model in this testbench (same metric, tie rules and
// sliding-block traceback, plain integers for the metrics). Gaps in rx_valid
// exercise the clock gate; block latency and metric hold are checked.
// Convolutional path: random bits go through the encoder (checked against its
// equations), one code bit in every 12th code word is flipped, and the code
// decoder must return the sent bits exactly.
// Mechanisms counted (each must occur): gated idle cycles, tracebacks, FILO
// bank swaps, ACS choosing each predecessor, path-metric wrap-around, a
// non-zero traceback start state, corrected code errors.
module tb_viterbi_top;

  localparam int L      = 16;
  localparam int NSTAGE = 40 * L;
  localparam int NS     = 4;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       rx_valid = 0;
  logic [5:0] rx_sample = '0;
  logic       dec_valid;
  logic [1:0] dec_bits;
  logic       enc_valid_in = 0, enc_bit_in = 0, enc_valid_out;
  logic [1:0] enc_code_out;
  logic       code_valid = 0;
  logic [1:0] code_in = '0;
  logic       cdec_valid;
  logic [1:0] cdec_bits;

  viterbi_top dut (.*);

  // convolutional path
  localparam int NC = 30 * L;
  bit   csent [NC];
  logic [1:0] ccode [NC];
  int   cout_idx = 0, n_err = 0;

  always @(posedge clk) begin
    if (rst_n && cdec_valid) begin
      for (int b = 0; b < 2; b++) begin
        checks++;
        if (cout_idx >= NC - L || cdec_bits[b] !== csent[cout_idx]) begin
          failures++;
          if (failures < 10) $display("code bit %0d: got %0b", cout_idx, cdec_bits[b]);
        end
        cout_idx++;
      end
    end
  end

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
      if (dut.u_mlsd.tb_start) begin
        n_tb++;
        if (dut.u_mlsd.best_state != 0) n_best_nz++;
      end
      if (dut.u_mlsd.u_filo.full[dut.u_mlsd.u_filo.rbank] && dut.u_mlsd.u_filo.rptr == 0) n_swap++;
      if (rx_valid) begin
        n_dec1 += $countones(dut.u_mlsd.decisions);
        n_dec0 += NS - $countones(dut.u_mlsd.decisions);
      end
      // gated registers must hold on idle cycles
      if (!rx_valid) begin
        checks++;
        #1;
        if (dut.u_mlsd.sm[0] !== sm0_prev) begin
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
      if (rx_valid && dut.u_mlsd.pos == 4'(L - 1) && dut.u_mlsd.blocks_done >= 1) lat_q.push_back(lat_cyc);
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
    if (rst_n && dut.u_mlsd.sm[0] < sm0_prev) n_wrap++;
    sm0_prev = dut.u_mlsd.sm[0];
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

    // encoder: rate 1/2, generators 7 and 5 (octal), checked against its
    // equations; its code words are kept for the decoder
    begin
      bit s1 = 0, s0 = 0;  // s1 newest
      for (int i = 0; i < NC; i++) begin
        automatic bit u = $urandom_range(1);
        csent[i] = u;
        enc_valid_in = 1; enc_bit_in = u;
        @(negedge clk);
        checks++;
        if (!enc_valid_out || enc_code_out[0] != (u ^ s1 ^ s0) || enc_code_out[1] != (u ^ s0)) begin
          failures++;
          $display("encoder mismatch at %0d", i);
        end
        ccode[i] = enc_code_out;
        s0 = s1; s1 = u;
      end
      enc_valid_in = 0;
    end
    // one code bit in error in every 12th code word; the decoder must return
    // the sent bits exactly
    for (int i = 0; i < NC; i++) begin
      automatic logic [1:0] cw = ccode[i];
      if (i % 12 == 5) begin
        cw[$urandom_range(1)] ^= 1'b1;
        if (i < NC - L) n_err++;
      end
      while ($urandom_range(7) == 0) begin
        code_valid = 0;
        @(negedge clk);
      end
      code_valid = 1; code_in = cw;
      @(negedge clk);
    end
    code_valid = 0;
    repeat (3 * L) @(negedge clk);
    checks++;
    if (cout_idx != NC - L) begin
      failures++;
      $display("code path decoded %0d bits, expected %0d", cout_idx, NC - L);
    end

    $display("mechanisms: idle=%0d tracebacks=%0d filo_swaps=%0d acs_i=%0d acs_j=%0d pm_wraps=%0d best_nonzero=%0d code_errors_corrected=%0d",
             n_idle, n_tb, n_swap, n_dec0, n_dec1, n_wrap, n_best_nz, n_err);
    if (n_idle == 0 || n_tb == 0 || n_swap == 0 || n_dec0 == 0 || n_dec1 == 0 || n_wrap == 0 || n_best_nz == 0 || n_err == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
