// rs_codec_top: 802.16 Reed-Solomon outer-code codec, encoder and decoder.
//
// The encoder turns K = N-2T message symbols into an N-symbol systematic
// codeword; the decoder takes N received symbols and returns the corrected
// word. The two sides are independent (transmit and receive paths of one
// modem) and share only the clock and reset; a channel, or a loop-back in
// a test, connects enc_out_* to dec_in_*. Defaults: RS(255,239), T = 8.
// The published design implements the two halves as separate circuits; this
// top only puts them side by side. See rs_encoder and rs_decoder for the
// interface timing of each side.
module rs_codec_top
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic clk,
  input  logic rst_n,
  // encoder: message in, codeword out
  input  logic enc_in_valid,
  output logic enc_in_ready,
  input  sym_t enc_in_data,
  output logic enc_out_valid,
  output sym_t enc_out_data,
  output logic enc_out_sof,
  output logic enc_out_eof,
  // decoder: received word in, corrected word out
  input  logic dec_in_valid,
  input  logic dec_in_sof,
  input  sym_t dec_in_data,
  output logic dec_out_valid,
  output sym_t dec_out_data,
  output logic dec_out_sof,
  output logic dec_out_eof,
  output logic dec_out_corrected,
  output logic [$clog2(N+1)-1:0] dec_out_err_cnt,
  output logic dec_out_fail,
  output logic dec_out_clean
);

  rs_encoder #(.N(N), .T(T)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_data(enc_out_data),
    .out_sof(enc_out_sof), .out_eof(enc_out_eof)
  );

  rs_decoder #(.N(N), .T(T)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_sof(dec_in_sof), .in_data(dec_in_data),
    .out_valid(dec_out_valid), .out_data(dec_out_data),
    .out_sof(dec_out_sof), .out_eof(dec_out_eof),
    .out_corrected(dec_out_corrected), .out_err_cnt(dec_out_err_cnt),
    .out_fail(dec_out_fail), .out_clean(dec_out_clean)
  );

endmodule
