// viterbi_core: the metric-independent part of a double-state Viterbi
// decoder: path-metric unit with fast ACS on a gated clock, survivor memory,
// traceback unit and FILO buffer, plus the bookkeeping that schedules the
// tracebacks.
//
// Each cycle with in_valid high is one trellis stage; bm[k] is the branch
// metric shared by both transitions into state k (double-state trellis, state
// bit 0 newest). The clock of the state-metric registers and survivor memory
// is gated by in_valid. Decisions go to a ring of three blocks of TB_LEN
// stages. When the last stage of a block is written and two blocks exist,
// tb_start rises for one cycle; in that cycle the metric registers still hold
// that stage, so best_state is the state of smallest metric there. The
// traceback then walks back 2*TB_LEN stages, two per cycle (TB_LEN cycles),
// and pushes the decoded bits of the older TB_LEN stages to the FILO, which
// releases them in time order.
//
// Output: dec_valid with dec_bits = two decoded bits, [0] the older. The
// first of a block's TB_LEN/2 words appears TB_LEN + 2 clock edges after the
// edge that writes the last stage of the following block; its words come on
// consecutive cycles. A stage is decoded after TB_LEN to 2*TB_LEN - 1 later
// stages.
//
// The fast ACS, modulo metrics, clock gating, one-bit-per-state survivor
// memory and FILO reordering follow the method; the traceback schedule, the
// best-state start and all sizes are this design's choices.
module viterbi_core #(
  parameter int unsigned N      = viterbi_pkg::DEF_N,
  parameter int unsigned BM_W   = viterbi_pkg::DEF_BM_W,
  parameter int unsigned TB_LEN = viterbi_pkg::DEF_TB_LEN,
  localparam int unsigned NUM_STATES = 2 ** (N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [BM_W-1:0] bm [NUM_STATES],
  output logic            dec_valid,
  output logic [1:0]      dec_bits
);

  localparam int unsigned PM_W   = viterbi_pkg::pm_width(2 ** BM_W - 1, N + 2);
  localparam int unsigned DEPTH  = 3 * TB_LEN;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned POS_W  = $clog2(TB_LEN);

  logic                  gclk;
  logic [NUM_STATES-1:0] decisions;
  logic [PM_W-1:0]       sm [NUM_STATES];
  logic [N:0]            best_state;
  logic [ADDR_W-1:0]     waddr, last_addr, raddr0, raddr1;
  logic [NUM_STATES-1:0] rdata0, rdata1;
  logic [POS_W-1:0]      pos;         // stage index within the current block
  logic [1:0]            blocks_done; // saturates at 2
  logic                  tb_start;
  logic                  tb_push, tb_busy, tb_last;
  logic [1:0]            tb_bits;

  clock_gate u_cg (.clk(clk), .en(in_valid), .gclk(gclk));

  path_metric_unit #(.N(N), .BM_W(BM_W), .PM_W(PM_W)) u_pmu (
    .clk(gclk), .rst_n(rst_n), .bm(bm), .decisions(decisions), .sm(sm),
    .best_state(best_state));

  survivor_memory #(.N(N), .TB_LEN(TB_LEN)) u_smu (
    .clk(gclk), .we(in_valid), .waddr(waddr), .wdata(decisions),
    .raddr0(raddr0), .rdata0(rdata0), .raddr1(raddr1), .rdata1(rdata1));

  // Write pointer and block bookkeeping.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr       <= '0;
      last_addr   <= '0;
      pos         <= '0;
      blocks_done <= '0;
      tb_start    <= 1'b0;
    end else begin
      tb_start <= 1'b0;
      if (in_valid) begin
        last_addr <= waddr;
        waddr     <= (waddr == ADDR_W'(DEPTH - 1)) ? '0 : waddr + 1'b1;
        pos       <= (pos == POS_W'(TB_LEN - 1)) ? '0 : pos + 1'b1;
        if (pos == POS_W'(TB_LEN - 1)) begin
          if (blocks_done != 2'd2) blocks_done <= blocks_done + 1'b1;
          if (blocks_done >= 2'd1) tb_start <= 1'b1;
        end
      end
    end
  end

  traceback_unit #(.N(N), .TB_LEN(TB_LEN)) u_tbu (
    .clk(clk), .rst_n(rst_n), .start(tb_start), .start_addr(last_addr),
    .start_state(best_state), .raddr0(raddr0), .rdata0(rdata0),
    .raddr1(raddr1), .rdata1(rdata1), .push(tb_push), .push_bits(tb_bits),
    .busy(tb_busy), .last(tb_last));

  filo_buffer #(.DEPTH(TB_LEN / 2), .W(2)) u_filo (
    .clk(clk), .rst_n(rst_n), .push(tb_push), .push_data(tb_bits),
    .pop_valid(dec_valid), .pop_data(dec_bits));

  // A traceback must have finished before the next one is due.
  assert property (@(posedge clk) disable iff (!rst_n) tb_start && tb_busy |-> tb_last)
    else $error("viterbi_core: traceback overrun");

endmodule
