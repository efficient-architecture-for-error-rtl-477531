// fast_acs: add-compare-select for one state of a double-state trellis.
//
// In a double-state trellis the two transitions into state k carry the same
// branch metric BM_k, so
//     SM_k(n+1) = min(SM_i(n), SM_j(n)) + BM_k(n).
// The unit therefore compares the two predecessor metrics directly, selects
// the smaller one and adds the single branch metric: one comparator, one
// multiplexer and one adder, where a conventional ACS needs two adders before
// its comparator. The compare no longer waits for an addition.
//
// Metrics are kept modulo 2^PM_W: the compare takes the sign of the wrapped
// difference sm_j - sm_i, which is correct while all metrics lie within
// 2^(PM_W-1) of each other (guaranteed by the width rule in viterbi_pkg).
// Ties select predecessor i (this design's choice).
//
// Ports: sm_i (predecessor whose oldest bit is 0), sm_j (oldest bit 1), bm;
// outputs sm_new and decision (1 = j selected). Purely combinational.
module fast_acs #(
  parameter int unsigned PM_W = 9,
  parameter int unsigned BM_W = 6
) (
  input  logic [PM_W-1:0] sm_i,
  input  logic [PM_W-1:0] sm_j,
  input  logic [BM_W-1:0] bm,
  output logic [PM_W-1:0] sm_new,
  output logic            decision
);

  logic [PM_W-1:0] diff;
  logic [PM_W-1:0] sm_sel;

  always_comb begin
    diff     = sm_j - sm_i;          // modulo difference
    decision = diff[PM_W-1];         // negative: sm_j < sm_i
    sm_sel   = decision ? sm_j : sm_i;
    sm_new   = sm_sel + PM_W'(bm);
  end

endmodule
