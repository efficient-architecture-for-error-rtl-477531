// tb_filo_buffer: pushes numbered words in bursts of DEPTH (with gaps, as the
// traceback does) and checks that each burst comes out last-in first-out,
// bursts in order, one word per cycle, starting the cycle after the burst.
module tb_filo_buffer;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop_valid;
  logic [7:0] push_data = 0, pop_data;
  int checks = 0, failures = 0;
  logic [7:0] expq [$];
  int first_pop_cycle [$];
  int cycle = 0;

  filo_buffer #(.DEPTH(DEPTH), .W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && pop_valid) begin
      checks++;
      if (expq.size() == 0 || pop_data !== expq[0]) begin
        failures++;
        $display("pop %0h, expected %0h", pop_data, expq.size() ? expq[0] : 8'hxx);
      end
      if (expq.size()) void'(expq.pop_front());
    end
  end

  initial begin
    logic [7:0] val = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      logic [7:0] burst [DEPTH];
      repeat (DEPTH / 2) @(negedge clk);   // convergence half of a traceback
      for (int i = 0; i < DEPTH; i++) begin
        push = 1; push_data = val; burst[i] = val; val++;
        @(negedge clk);
        push = 0;
        if ($urandom_range(3) == 0 && i != DEPTH - 1) @(negedge clk);
      end
      for (int i = DEPTH - 1; i >= 0; i--) expq.push_back(burst[i]);
      // the last-pushed word appears one cycle after the stack fills
      @(negedge clk);
      checks++;
      if (!pop_valid || pop_data !== burst[DEPTH - 1]) begin
        failures++;
        $display("burst %0d: first word not out one cycle after filling", b);
      end
      // the pop side must keep up: the burst must be fully out before the
      // same stack is filled again
    end
    repeat (3 * DEPTH) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d words never came out", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
