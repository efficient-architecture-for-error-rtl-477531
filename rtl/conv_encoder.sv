// conv_encoder: rate 1/ENC_N convolutional encoder.
//
// The input bit stream passes through a shift register of K-1 cells; each of
// the ENC_N output bits is the XOR of the current input and the register cells
// selected by one generator polynomial. G[x] is given MSB first: bit K-1 taps
// the current input, bit 0 the oldest cell (octal 7 = 111, 5 = 101). The
// default code (K = 3, rate 1/2, generators 7 and 5 octal) is this design's
// choice.
//
// Timing: one input bit per cycle when valid_in is high; the code word of that
// bit is registered and appears with valid_out the next cycle. Reset clears
// the register (encoder starts in state 0).
module conv_encoder #(
  parameter int unsigned K     = 3,
  parameter int unsigned ENC_N = 2,
  parameter logic [K-1:0] G [ENC_N] = '{3'o7, 3'o5}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  logic             bit_in,
  output logic             valid_out,
  output logic [ENC_N-1:0] code_out
);

  logic [K-2:0] sr;        // sr[K-2] newest cell, sr[0] oldest
  logic [K-1:0] window;

  assign window = {bit_in, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      valid_out <= 1'b0;
      code_out  <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        sr <= window[K-1:1];
        for (int x = 0; x < ENC_N; x++) code_out[x] <= ^(window & G[x]);
      end
    end
  end

endmodule
