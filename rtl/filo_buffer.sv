// filo_buffer: first-in-last-out buffer that restores time order after the
// traceback.
//
// The traceback produces decoded bits from the newest stage backwards; popping
// them in reverse order of arrival puts them in time order. Two stacks of
// DEPTH words are used in ping-pong: the traceback fills one (push) while the
// other is emptied, one word per cycle, from its last-pushed word down to its
// first. A stack is emptied only once it holds DEPTH words.
//
// Timing: a push is taken on a rising edge; pop_valid/pop_data are registered
// and start the cycle after a stack becomes full. There is no back-pressure on
// the output. Pushing into a stack that is still being emptied is an error
// (checked by an assertion). The ping-pong organisation is this design's
// choice.
module filo_buffer #(
  parameter int unsigned DEPTH = viterbi_pkg::DEF_TB_LEN / 2,
  parameter int unsigned W     = 2,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] push_data,
  output logic         pop_valid,
  output logic [W-1:0] pop_data
);

  logic [W-1:0]     mem [2][DEPTH];
  logic [1:0]       full;
  logic             wbank, rbank;
  logic [PTR_W-1:0] wptr, rptr;

  always_ff @(posedge clk) begin
    if (push) mem[wbank][wptr] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wptr      <= '0;
      rptr      <= PTR_W'(DEPTH - 1);
      pop_valid <= 1'b0;
      pop_data  <= '0;
    end else begin
      logic [1:0] full_n;
      full_n = full;
      // fill side
      if (push) begin
        if (wptr == PTR_W'(DEPTH - 1)) begin
          wptr          <= '0;
          wbank         <= ~wbank;
          full_n[wbank] = 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      // empty side: last pushed word first
      pop_valid <= 1'b0;
      if (full[rbank]) begin
        pop_valid <= 1'b1;
        pop_data  <= mem[rbank][rptr];
        if (rptr == '0) begin
          rptr          <= PTR_W'(DEPTH - 1);
          rbank         <= ~rbank;
          full_n[rbank] = 1'b0;
        end else begin
          rptr <= rptr - 1'b1;
        end
      end
      full <= full_n;
    end
  end

  // A stack must be empty before the traceback fills it again.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full[wbank])
    else $error("filo_buffer: push into a stack that is not yet empty");

endmodule
