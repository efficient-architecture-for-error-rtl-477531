// branch_metric_unit: one branch metric per trellis state.
//
// For a channel H(D) = h0 + h1*D + ... + hN*D^N + 0*D^(N+1) with inputs in
// {0,1}, the ideal output of a transition is y = h0*a(n) + ... + hN*a(n-N),
// and a(n)..a(n-N) are exactly the bits of the ending state k (bit 0 newest).
// The bit that differs between the two starting states of k, a(n-N-1), meets
// the zero coefficient, so both transitions into k share y_k and one branch
// metric. The metric is the absolute distance |r - y_k| between the received
// sample r and y_k, saturated to BM_W bits. Coefficients h0 and h1 are
// parameters; any further taps (N > 1) are taken as zero.
//
// The distance measure, the coefficient values and the sample format are this
// design's choices; the sharing of one metric per ending state is the
// double-state property the detector is built on.
//
// Ports: rx_sample (unsigned RX_W bits) in, bm[k] out. Purely combinational.
module branch_metric_unit #(
  parameter int unsigned N    = viterbi_pkg::DEF_N,
  parameter int unsigned RX_W = viterbi_pkg::DEF_RX_W,
  parameter int unsigned BM_W = viterbi_pkg::DEF_BM_W,
  parameter int unsigned H0   = viterbi_pkg::DEF_H0,
  parameter int unsigned H1   = viterbi_pkg::DEF_H1,
  localparam int unsigned NUM_STATES = 2 ** (N + 1)
) (
  input  logic [RX_W-1:0] rx_sample,
  output logic [BM_W-1:0] bm [NUM_STATES]
);

  // Taps beyond h1 are zero in the default configuration; the newest state
  // bit is multiplied by h0 and the next by h1.
  function automatic int unsigned ideal(input logic [N:0] k);
    int unsigned y = 0;
    if (k[0]) y += H0;
    if (k[N > 0 ? 1 : 0] && N > 0) y += H1;
    return y;
  endfunction

  always_comb begin
    for (int unsigned k = 0; k < NUM_STATES; k++) begin
      int unsigned y;
      int unsigned d;
      y = ideal((N+1)'(k));
      d = (int'(rx_sample) >= int'(y)) ? int'(rx_sample) - y : y - int'(rx_sample);
      bm[k] = (d > (2 ** BM_W) - 1) ? BM_W'((2 ** BM_W) - 1) : BM_W'(d);
    end
  end

endmodule
