// tb_conv_encoder: the (7,5) octal rate-1/2 code against its equations
// c0 = u ^ u(-1) ^ u(-2), c1 = u ^ u(-2), with random gaps in valid_in.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, valid_in = 0, bit_in = 0, valid_out;
  logic [1:0] code_out;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit u1 = 0, u2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      automatic bit u = $urandom_range(1);
      valid_in = $urandom_range(3) != 0;
      bit_in = u;
      @(negedge clk);
      checks++;
      if (valid_out !== valid_in) begin
        failures++;
        $display("valid_out wrong at %0d", i);
      end
      if (valid_in) begin
        checks++;
        if (code_out !== {u ^ u2, u ^ u1 ^ u2}) begin
          failures++;
          $display("code word wrong at %0d", i);
        end
        u2 = u1; u1 = u;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
