// path_metric_unit: state-metric recursion of the double-state Viterbi
// detector, built from one fast_acs per state.
//
// State k (N+1 bits, bit 0 newest input) is reached from the two states that
// differ only in their oldest bit: i = k >> 1 and j = (k >> 1) | 2^N. Each
// fast_acs compares SM_i and SM_j, keeps the smaller and adds BM_k. The new
// metrics are written to the state-metric registers on every rising edge of
// clk, which the detector drives with a gated clock so the registers only
// switch on stages that carry a sample. The decision bits of the stage (1 =
// predecessor j) go to the survivor memory.
//
// Metrics wrap modulo 2^PM_W; no normalisation is needed. best_state is the
// state of smallest metric (modulo compare, lowest index on ties), used as
// the traceback start; it reflects the registered metrics.
//
// Reset (asynchronous, active low) clears all metrics: the starting state is
// taken as unknown. The reset values and the best-state search are this
// design's choices.
module path_metric_unit #(
  parameter int unsigned N    = viterbi_pkg::DEF_N,
  parameter int unsigned BM_W = viterbi_pkg::DEF_BM_W,
  parameter int unsigned PM_W = viterbi_pkg::pm_width(2 ** BM_W - 1, N + 2),
  localparam int unsigned NUM_STATES = 2 ** (N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [BM_W-1:0]       bm         [NUM_STATES],
  output logic [NUM_STATES-1:0] decisions,
  output logic [PM_W-1:0]       sm         [NUM_STATES],
  output logic [N:0]            best_state
);

  logic [PM_W-1:0] sm_next [NUM_STATES];

  for (genvar k = 0; k < NUM_STATES; k++) begin : g_acs
    localparam int unsigned PI = k >> 1;
    localparam int unsigned PJ = (k >> 1) | (2 ** N);
    fast_acs #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .sm_i    (sm[PI]),
      .sm_j    (sm[PJ]),
      .bm      (bm[k]),
      .sm_new  (sm_next[k]),
      .decision(decisions[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_STATES; k++) sm[k] <= '0;
    end else begin
      sm <= sm_next;
    end
  end

  // Smallest metric, modulo compare.
  always_comb begin
    logic [PM_W-1:0] best_sm;
    logic [PM_W-1:0] diff;
    best_state = '0;
    best_sm    = sm[0];
    for (int unsigned k = 1; k < NUM_STATES; k++) begin
      diff = sm[k] - best_sm;
      if (diff[PM_W-1]) begin
        best_state = (N+1)'(k);
        best_sm    = sm[k];
      end
    end
  end

endmodule
