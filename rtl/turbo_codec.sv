// turbo_codec: top level. Rate-1/3 turbo encoder and iterative Hybrid
// Log-MAP turbo decoder with QPP interleaving, side by side.
//
// The two halves meet only through the channel, which is outside this
// design: the encoder's serial code bits (u, p1, p2 per information bit) are
// BPSK modulated, sent, received, digitised and turned into channel LLRs by
// a soft demodulator, and those LLRs enter the decoder in the same serial
// order. Both halves use the same QPP permutation, (F1*x + F2*x^2) mod N,
// and the same frame length N (default 1024, F1 = 31, F2 = 64). The decoder
// runs ITER iterations (default one) with P parallel SISO lanes per
// constituent decoder (default two), whose memory accesses the QPP
// permutation keeps free of bank conflicts.
//
// Encoder: in_valid/in_bit/in_ready take N information bits; out_valid /
// out_bit / out_last give 3N code bits. Decoder: in_valid/in_sym/in_ready
// take 3N channel LLRs (signed, FRAC fractional bits); out_valid/out_bit/
// out_last give the N decoded bits in natural order. See turbo_encoder and
// turbo_decoder for the cycle counts.
module turbo_codec
  import turbo_pkg::*;
#(
  parameter int N    = 1024,
  parameter int F1   = 31,
  parameter int F2   = 64,
  parameter int ITER = 1,
  parameter int P    = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // encoder
  input  logic       enc_in_valid,
  input  logic       enc_in_bit,
  output logic       enc_in_ready,
  output logic       enc_out_valid,
  output logic       enc_out_bit,
  output logic       enc_out_last,
  // decoder
  input  logic       dec_in_valid,
  input  ch_t        dec_in_sym,
  output logic       dec_in_ready,
  output logic       dec_out_valid,
  output logic       dec_out_bit,
  output logic       dec_out_last,
  output logic       dec_busy,
  output logic [7:0] dec_iter_done
);

  turbo_encoder #(.N(N), .F1(F1), .F2(F2)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_bit(enc_in_bit), .in_ready(enc_in_ready),
    .out_valid(enc_out_valid), .out_bit(enc_out_bit), .out_last(enc_out_last)
  );

  turbo_decoder #(.N(N), .F1(F1), .F2(F2), .ITER(ITER), .P(P)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_sym(dec_in_sym), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_bit(dec_out_bit), .out_last(dec_out_last),
    .busy(dec_busy), .iter_done(dec_iter_done)
  );

endmodule
