// tb_branch_metric_unit: every 6-bit sample against |r - y_k| with the ideal
// outputs of the channel 1 + D (16 LSB per unit): y = 0, 16, 16, 32 for
// ending states 00, 01, 10, 11.
module tb_branch_metric_unit;
  logic [5:0] rx_sample;
  logic [5:0] bm [4];
  int checks = 0, failures = 0;
  int yk [4] = '{0, 16, 16, 32};

  branch_metric_unit dut (.rx_sample(rx_sample), .bm(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      rx_sample = 6'(r);
      #1;
      for (int k = 0; k < 4; k++) begin
        automatic int e = r > yk[k] ? r - yk[k] : yk[k] - r;
        checks++;
        if (bm[k] !== 6'(e)) begin
          failures++;
          $display("r=%0d state %0d: got %0d expected %0d", r, k, bm[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
