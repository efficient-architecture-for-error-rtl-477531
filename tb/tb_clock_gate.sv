// tb_clock_gate: a counter on the gated clock must advance exactly once per
// cycle with the enable high, and the gated clock must never be high while
// the free clock is low; enable changes during the high phase are ignored.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int gcount = 0, expected = 0;

  clock_gate dut (.*);

  always #5 clk = ~clk;
  always @(posedge gclk) gcount++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // glitch check
  always @(gclk) begin
    checks++;
    if (gclk && !clk) begin
      failures++;
      $display("gclk high while clk low");
    end
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      en = $urandom_range(1);
      if (en) expected++;
      @(posedge clk);
      #2 en = $urandom_range(1);   // toggled in the high phase: must not matter
      @(negedge clk);
      checks++;
      if (gcount != expected) begin
        failures++;
        $display("cycle %0d: %0d gated edges, expected %0d", i, gcount, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
