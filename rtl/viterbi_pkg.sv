// viterbi_pkg: constants and functions shared by the double-state Viterbi
// detector.
//
// The detector works on a channel H(D) = h0 + h1*D + ... + hN*D^N + 0*D^(N+1).
// Its trellis has 2^(N+1) states ("double state"): a state holds the last N+1
// input bits, bit 0 the newest and bit N the oldest. A transition with input a
// from state s ends in state {s[N-1:0], a}. Because the channel's last
// coefficient is zero, the ideal output of a transition depends only on the
// ending state, so both transitions into one state have the same branch metric.
//
// pm_width() is the path-metric width rule PM_BW = ceil(log2 Bmax +
// log2(4(K-1))) for modulo arithmetic; the default channel coefficients
// (H(D) = 1 + D, 16 LSB per unit) and sample width are this design's choices.
package viterbi_pkg;

  // Defaults used by every block.
  localparam int unsigned DEF_N      = 1;   // channel order: 2^(N+1) = 4 states
  localparam int unsigned DEF_RX_W   = 6;   // received sample width (unsigned)
  localparam int unsigned DEF_BM_W   = 6;   // |r - y| fits the sample width
  localparam int unsigned DEF_TB_LEN = 16;  // traceback convergence / decode length
  localparam int unsigned DEF_H0     = 16;  // h0 in sample LSBs
  localparam int unsigned DEF_H1     = 16;  // h1 in sample LSBs

  // ceil(log2(x)) for x >= 1, as a real-free integer loop.
  function automatic int unsigned clog2_int(input longint unsigned x);
    int unsigned r = 0;
    longint unsigned v = 1;
    while (v < x) begin
      v = v << 1;
      r++;
    end
    return r;
  endfunction

  // PM_BW = ceil(log2 Bmax + log2(2*2*(K-1))) = ceil(log2(Bmax * 4 * (K-1))).
  function automatic int unsigned pm_width(input int unsigned bmax, input int unsigned k);
    return clog2_int(longint'(bmax) * 4 * (longint'(k) - 1));
  endfunction

endpackage
