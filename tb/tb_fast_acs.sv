// tb_fast_acs: checks the double-state add-compare-select against
// SM_new = min(SM_i, SM_j) + BM computed on unbounded integers, for random
// metric pairs whose spread stays inside the modulo range, including pairs
// that straddle the 2^PM_W wrap point.
module tb_fast_acs;
  localparam int PM_W = 9, BM_W = 6;
  logic [PM_W-1:0] sm_i, sm_j, sm_new;
  logic [BM_W-1:0] bm;
  logic            decision;
  int checks = 0, failures = 0;

  fast_acs #(.PM_W(PM_W), .BM_W(BM_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int base = $urandom_range(10000);
      automatic int a = base + $urandom_range(200);
      automatic int b = base + $urandom_range(200);
      automatic int m = $urandom_range(63);
      automatic int exp_sm = ((a <= b) ? a : b) + m;
      automatic bit exp_d  = b < a;
      sm_i = PM_W'(a); sm_j = PM_W'(b); bm = BM_W'(m);
      #1;
      checks++;
      if (sm_new !== PM_W'(exp_sm) || decision !== exp_d) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d bm=%0d: got %0d/%0b expected %0d/%0b",
                                    a, b, m, sm_new, decision, PM_W'(exp_sm), exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
