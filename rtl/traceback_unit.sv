// traceback_unit: recovers the maximum-likelihood path from the survivor
// memory.
//
// A traceback starts from start_state at the newest stage start_addr and
// walks back 2*TB_LEN stages, two per clock cycle, so it takes TB_LEN cycles.
// One step from state s (bit 0 newest) at stage t: the decoded input of stage
// t is s[0], and the state one stage earlier is {d, s[N:1]} where d is the
// stored decision bit of s at stage t. The first TB_LEN stages only let the
// path converge; the decoded bits of the last TB_LEN stages are pushed to the
// FILO, newest first, two per cycle as {newer, older}.
//
// Timing: start is sampled on a rising edge together with start_addr and
// start_state; busy is high for the TB_LEN following cycles and a new start
// may arrive on the edge that ends the last of them (marked by last). Reads are combinational
// from the survivor memory. The sliding-block schedule is this design's
// choice.
module traceback_unit #(
  parameter int unsigned N      = viterbi_pkg::DEF_N,
  parameter int unsigned TB_LEN = viterbi_pkg::DEF_TB_LEN,
  localparam int unsigned NUM_STATES = 2 ** (N + 1),
  localparam int unsigned DEPTH      = 3 * TB_LEN,
  localparam int unsigned ADDR_W     = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     start_addr,
  input  logic [N:0]            start_state,
  output logic [ADDR_W-1:0]     raddr0,
  input  logic [NUM_STATES-1:0] rdata0,
  output logic [ADDR_W-1:0]     raddr1,
  input  logic [NUM_STATES-1:0] rdata1,
  output logic                  push,
  output logic [1:0]            push_bits,
  output logic                  busy,
  output logic                  last
);

  localparam int unsigned CNT_W = $clog2(TB_LEN + 1);

  logic [ADDR_W-1:0] addr;
  logic [N:0]        state;
  logic [CNT_W-1:0]  cnt;
  logic [N:0]        mid_state, next_state;

  function automatic logic [ADDR_W-1:0] addr_dec(input logic [ADDR_W-1:0] a);
    return (a == '0) ? ADDR_W'(DEPTH - 1) : a - 1'b1;
  endfunction

  always_comb begin
    raddr0     = addr;
    raddr1     = addr_dec(addr);
    mid_state  = {rdata0[state], state[N:1]};
    next_state = {rdata1[mid_state], mid_state[N:1]};
    push       = busy && (cnt >= CNT_W'(TB_LEN / 2));
    push_bits  = {state[0], mid_state[0]};
    last       = busy && (cnt == CNT_W'(TB_LEN - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      addr  <= '0;
      state <= '0;
      cnt   <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      addr  <= start_addr;
      state <= start_state;
      cnt   <= '0;
    end else if (busy) begin
      addr  <= addr_dec(addr_dec(addr));
      state <= next_state;
      cnt   <= cnt + 1'b1;
      if (last) busy <= 1'b0;
    end
  end

  // The convergence and decode halves are TB_LEN stages each, two per cycle.
  initial assert (TB_LEN % 2 == 0 && TB_LEN >= 2) else $error("TB_LEN must be even");

endmodule
