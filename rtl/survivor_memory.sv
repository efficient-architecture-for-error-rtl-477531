// survivor_memory: decision storage for the traceback.
//
// One word per trellis stage, one bit per state (1 = the survivor into that
// state came from the predecessor whose oldest bit is 1). The memory is a ring
// of DEPTH = 3*TB_LEN words: while one block of TB_LEN stages is written, the
// two blocks before it are traced back. It has one synchronous write port and
// two asynchronous read ports, so the traceback unit can follow two stages
// per clock cycle.
//
// The one-bit-per-state-per-stage organisation is the standard survivor
// memory; the depth and the two read ports are this design's choices.
module survivor_memory #(
  parameter int unsigned N      = viterbi_pkg::DEF_N,
  parameter int unsigned TB_LEN = viterbi_pkg::DEF_TB_LEN,
  localparam int unsigned NUM_STATES = 2 ** (N + 1),
  localparam int unsigned DEPTH      = 3 * TB_LEN,
  localparam int unsigned ADDR_W     = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [ADDR_W-1:0]     waddr,
  input  logic [NUM_STATES-1:0] wdata,
  input  logic [ADDR_W-1:0]     raddr0,
  output logic [NUM_STATES-1:0] rdata0,
  input  logic [ADDR_W-1:0]     raddr1,
  output logic [NUM_STATES-1:0] rdata1
);

  logic [NUM_STATES-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
