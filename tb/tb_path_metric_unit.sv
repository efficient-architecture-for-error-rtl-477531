// tb_path_metric_unit: random branch metrics for many stages; the state
// metrics, decision bits and best state are compared each stage with a
// model that uses unbounded integers (the hardware keeps them modulo 2^9).
// Also checks that the metrics hold while the clock is stopped.
module tb_path_metric_unit;
  localparam int NS = 4, PM_W = 9;
  logic clk = 0, clk_en = 0, rst_n = 0;
  logic gclk;
  logic [5:0] bm [NS];
  logic [NS-1:0] decisions;
  logic [PM_W-1:0] sm [NS];
  logic [1:0] best_state;
  longint msm [NS];
  int checks = 0, failures = 0, wraps = 0;

  assign gclk = clk & clk_en;
  path_metric_unit dut (.clk(gclk), .rst_n(rst_n), .bm(bm), .decisions(decisions),
                        .sm(sm), .best_state(best_state));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (msm[k]) msm[k] = 0;
    foreach (bm[k]) bm[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      longint nsm [NS];
      bit      d [NS];
      int      best;
      foreach (bm[k]) bm[k] = 6'($urandom_range(63));
      clk_en = $urandom_range(4) != 0;
      #1;
      for (int k = 0; k < NS; k++) begin
        automatic int pi = k >> 1, pj = (k >> 1) | 2;
        d[k] = msm[pj] < msm[pi];
        nsm[k] = (d[k] ? msm[pj] : msm[pi]) + bm[k];
        checks++;
        if (decisions[k] !== d[k]) begin
          failures++;
          $display("stage %0d state %0d: decision %0b expected %0b", t, k, decisions[k], d[k]);
        end
      end
      @(negedge clk);
      if (clk_en) begin
        if (PM_W'(nsm[0]) < PM_W'(msm[0])) wraps++;
        msm = nsm;
      end
      best = 0;
      for (int k = 1; k < NS; k++) if (msm[k] < msm[best]) best = k;
      for (int k = 0; k < NS; k++) begin
        checks++;
        if (sm[k] !== PM_W'(msm[k])) begin
          failures++;
          $display("stage %0d state %0d: metric %0d expected %0d", t, k, sm[k], PM_W'(msm[k]));
        end
      end
      checks++;
      if (best_state !== 2'(best)) begin
        failures++;
        $display("stage %0d: best state %0d expected %0d", t, best_state, best);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("metrics never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
