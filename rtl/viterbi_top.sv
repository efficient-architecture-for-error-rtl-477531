// viterbi_top: two decoders built on the same double-state fast-ACS core,
// side by side, plus the convolutional encoder.
//
// 1. Channel detector (rx_* -> dec_*): maximum-likelihood sequence detection
//    for the intersymbol-interference channel H(D) = h0 + h1*D (+ 0*D^2).
//    branch_metric_unit gives |r - y_k| per ending state; viterbi_core does
//    the fast ACS, survivor storage, traceback and FILO reordering.
// 2. Convolutional codec: conv_encoder (enc_*) encodes a bit stream with the
//    rate-1/2, K = 3 code (generators 7, 5 octal). Its code words, after the
//    transmission channel, return on code_* and are decoded by
//    code_branch_metric_unit (Hamming distance per ending state) and a second
//    viterbi_core with 2^K = 8 states: the code word depends only on the K
//    newest bits, which is the double-state property the fast ACS needs.
//    The encoder output is not wired to the decoder inside this module.
//
// Both decoders take one input per cycle at most (valid-qualified; their
// metric registers are clock-gated by the valid) and output two decoded
// bits per dec_valid/cdec_valid, [0] the older. Latency, per decoder: a
// block's first word appears TB_LEN + 2 clock edges after the input that
// completes the following block of TB_LEN stages.
//
// The decoder structure and the fast ACS follow the method; channel, code,
// metrics, traceback schedule and sizes are this design's choices.
module viterbi_top #(
  parameter int unsigned N      = viterbi_pkg::DEF_N,
  parameter int unsigned RX_W   = viterbi_pkg::DEF_RX_W,
  parameter int unsigned BM_W   = viterbi_pkg::DEF_BM_W,
  parameter int unsigned H0     = viterbi_pkg::DEF_H0,
  parameter int unsigned H1     = viterbi_pkg::DEF_H1,
  parameter int unsigned TB_LEN = viterbi_pkg::DEF_TB_LEN,
  parameter int unsigned ENC_K  = 3,
  parameter int unsigned ENC_N  = 2,
  parameter logic [ENC_K-1:0] ENC_G [ENC_N] = '{3'o7, 3'o5}
) (
  input  logic             clk,
  input  logic             rst_n,
  // channel detector
  input  logic             rx_valid,
  input  logic [RX_W-1:0]  rx_sample,
  output logic             dec_valid,
  output logic [1:0]       dec_bits,
  // convolutional encoder
  input  logic             enc_valid_in,
  input  logic             enc_bit_in,
  output logic             enc_valid_out,
  output logic [ENC_N-1:0] enc_code_out,
  // convolutional decoder (hard-decision code bits in)
  input  logic             code_valid,
  input  logic [ENC_N-1:0] code_in,
  output logic             cdec_valid,
  output logic [1:0]       cdec_bits
);

  localparam int unsigned NUM_STATES  = 2 ** (N + 1);
  localparam int unsigned CNUM_STATES = 2 ** ENC_K;
  localparam int unsigned CBM_W       = $clog2(ENC_N + 1);

  // ---------------- channel detector ----------------
  logic [BM_W-1:0] bm [NUM_STATES];

  branch_metric_unit #(.N(N), .RX_W(RX_W), .BM_W(BM_W), .H0(H0), .H1(H1)) u_bmu (
    .rx_sample(rx_sample), .bm(bm));

  viterbi_core #(.N(N), .BM_W(BM_W), .TB_LEN(TB_LEN)) u_mlsd (
    .clk(clk), .rst_n(rst_n), .in_valid(rx_valid), .bm(bm),
    .dec_valid(dec_valid), .dec_bits(dec_bits));

  // ---------------- convolutional codec ----------------
  logic [CBM_W-1:0] cbm [CNUM_STATES];

  conv_encoder #(.K(ENC_K), .ENC_N(ENC_N), .G(ENC_G)) u_enc (
    .clk(clk), .rst_n(rst_n), .valid_in(enc_valid_in), .bit_in(enc_bit_in),
    .valid_out(enc_valid_out), .code_out(enc_code_out));

  code_branch_metric_unit #(.K(ENC_K), .ENC_N(ENC_N), .G(ENC_G)) u_cbmu (
    .code_in(code_in), .bm(cbm));

  viterbi_core #(.N(ENC_K - 1), .BM_W(CBM_W), .TB_LEN(TB_LEN)) u_conv (
    .clk(clk), .rst_n(rst_n), .in_valid(code_valid), .bm(cbm),
    .dec_valid(cdec_valid), .dec_bits(cdec_bits));

endmodule
