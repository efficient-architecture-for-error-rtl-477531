// tb_code_branch_metric_unit: for every received code word and every ending
// state of the 8-state trellis, the metric must be the Hamming distance to the
// (7,5) code word of that transition: with u the newest state bit (bit 0),
// u1 bit 1 and u2 bit 2, c0 = u ^ u1 ^ u2 and c1 = u ^ u2.
module tb_code_branch_metric_unit;
  logic [1:0] code_in;
  logic [1:0] bm [8];
  int checks = 0, failures = 0;

  code_branch_metric_unit dut (.code_in(code_in), .bm(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      code_in = 2'(c);
      #1;
      for (int k = 0; k < 8; k++) begin
        automatic bit u = k[0], u1 = k[1], u2 = k[2];
        automatic logic [1:0] cw = {u ^ u2, u ^ u1 ^ u2};
        automatic int e = $countones(cw ^ code_in);
        checks++;
        if (bm[k] !== 2'(e)) begin
          failures++;
          $display("code %0d state %0d: got %0d expected %0d", c, k, bm[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
