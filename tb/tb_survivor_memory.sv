// tb_survivor_memory: writes random decision words to random addresses,
// with and without write enable, and reads both ports against a shadow copy.
module tb_survivor_memory;
  localparam int DEPTH = 48;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr0 = 0, raddr1 = 0;
  logic [3:0] wdata = 0, rdata0, rdata1;
  logic [3:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  survivor_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = 6'(a); wdata = 4'($urandom); shadow[a] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 500; i++) begin
      we = $urandom_range(1);
      waddr = 6'($urandom_range(DEPTH - 1));
      wdata = 4'($urandom);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      raddr0 = 6'($urandom_range(DEPTH - 1));
      raddr1 = 6'($urandom_range(DEPTH - 1));
      #1;
      checks += 2;
      if (rdata0 !== shadow[raddr0]) begin failures++; $display("port 0 addr %0d", raddr0); end
      if (rdata1 !== shadow[raddr1]) begin failures++; $display("port 1 addr %0d", raddr1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
