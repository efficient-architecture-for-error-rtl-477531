// code_branch_metric_unit: branch metrics for decoding a rate-1/ENC_N
// convolutional code on a double-state trellis.
//
// The code word of a transition is c_x = XOR over the taps of generator G[x]
// of the current and the K-1 previous input bits. A double-state trellis with
// N = K-1 holds exactly those K bits in its ending state (state bit 0 = the
// current input, bit K-1 = the oldest), so the code word, and with it the
// branch metric, depends on the ending state alone. This is the same property
// the channel detector relies on, and lets the code be decoded by the same
// fast-ACS core.
//
// The metric is the Hamming distance between the received hard-decision code
// bits and the code word of each state. Generators use the encoder's
// convention: G[x] bit K-1 taps the current input, bit 0 the oldest. Hard
// decisions and the (7,5) default code are this design's choices.
//
// Purely combinational.
module code_branch_metric_unit #(
  parameter int unsigned K     = 3,
  parameter int unsigned ENC_N = 2,
  parameter logic [K-1:0] G [ENC_N] = '{3'o7, 3'o5},
  localparam int unsigned NUM_STATES = 2 ** K,
  localparam int unsigned BM_W       = $clog2(ENC_N + 1)
) (
  input  logic [ENC_N-1:0] code_in,
  output logic [BM_W-1:0]  bm [NUM_STATES]
);

  always_comb begin
    for (int unsigned k = 0; k < NUM_STATES; k++) begin
      logic [K-1:0] window;   // encoder window: [K-1] current input
      logic [K-1:0] st;
      int unsigned  hd;
      st = K'(k);
      for (int b = 0; b < K; b++) window[K-1-b] = st[b];
      hd = 0;
      for (int x = 0; x < ENC_N; x++) begin
        if ((^(window & G[x])) != code_in[x]) hd++;
      end
      bm[k] = BM_W'(hd);
    end
  end

endmodule
