// tb_traceback_unit: fills a decision memory (modelled here) with random
// survivor bits, starts tracebacks from random addresses and states, and
// checks the pushed bits and their timing: TB_LEN busy cycles, pushes only in
// the second half, last on the final cycle, each push {newer, older}, against a traceback computed in
// this testbench.
module tb_traceback_unit;
  localparam int L = 16, DEPTH = 3 * L;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] start_addr = 0, raddr0, raddr1;
  logic [1:0] start_state = 0, push_bits;
  logic [3:0] rdata0, rdata1;
  logic push, busy, last;
  logic [3:0] mem [DEPTH];
  int checks = 0, failures = 0;

  traceback_unit dut (.*);

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      bit exp_bits [2 * L];
      automatic int a, st, pushes = 0, busy_cycles = 0;
      foreach (mem[i]) mem[i] = 4'($urandom);
      a  = $urandom_range(DEPTH - 1);
      st = $urandom_range(3);
      // reference: bit of stage (newest - s) for s = 0..2L-1
      begin
        automatic int aa = a, ss = st;
        for (int s = 0; s < 2 * L; s++) begin
          exp_bits[s] = ss[0];
          ss = {mem[aa][ss], ss[1]};
          aa = (aa == 0) ? DEPTH - 1 : aa - 1;
        end
      end
      start = 1; start_addr = 6'(a); start_state = 2'(st);
      @(negedge clk);
      start = 0;
      while (busy) begin
        busy_cycles++;
        checks++;
        if (last !== (busy_cycles == L)) begin
          failures++;
          $display("last wrong in busy cycle %0d", busy_cycles);
        end
        if (push) begin
          automatic int s = L + 2 * pushes;
          checks++;
          if (push_bits !== {exp_bits[s], exp_bits[s + 1]}) begin
            failures++;
            $display("run %0d push %0d: got %b expected %b%b", r, pushes, push_bits, exp_bits[s], exp_bits[s + 1]);
          end
          pushes++;
        end
        @(negedge clk);
      end
      checks += 2;
      if (busy_cycles != L) begin failures++; $display("busy for %0d cycles", busy_cycles); end
      if (pushes != L / 2) begin failures++; $display("%0d pushes", pushes); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
