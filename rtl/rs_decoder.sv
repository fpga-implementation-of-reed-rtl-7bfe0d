// rs_decoder: pipelined Reed-Solomon decoder, RS(N, N-2T) over GF(2^8).
//
// Three stages work on three consecutive codewords at once:
//   rs_syndrome      computes S_1 .. S_2T while a word streams in,
//   rs_bm            solves the key equation for the previous word,
//   rs_chien_forney  finds the error positions and values of the word
//                    before that and corrects it on its way out,
// while rs_delay_fifo holds the received symbols until their error values
// are ready. Stages hand over through valid/ready registers, so a word whose
// key-equation result is ready before the Chien stage is free simply waits.
//
// Defaults N = 255, T = 8 give the 802.16 RS(255,239) decoder; T = 6 gives
// RS(255,243), the two decoders of the published design, whose block chain
// (syndrome, Berlekamp-Massey, Chien/Forney, delay block) is kept here.
// Generator roots are alpha^1 .. alpha^2T.
//
// Interface: one received symbol per clock with in_valid, in_sof on the
// first symbol of each word (highest power first); words may follow one
// another without gaps, and gaps between or inside words are allowed. There
// is no back-pressure. The corrected word comes out in the same order with
// out_sof/out_eof; out_err_cnt, out_fail and out_clean are valid with
// out_eof. Latency from the last input symbol of a word to its first output
// symbol is 3T+6 clocks when the Chien stage is free (6 for a word with an
// all-zero syndrome, for which the key-equation iterations are bypassed). rst_n is active-low synchronous.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int unsigned N     = 255,
  parameter int unsigned T     = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  sym_t in_data,
  output logic out_valid,
  output sym_t out_data,
  output logic out_sof,
  output logic out_eof,
  output logic out_corrected,
  output logic [$clog2(N+1)-1:0] out_err_cnt,
  output logic out_fail,
  output logic out_clean
);
  localparam int unsigned RW = $clog2(2*T + 1);

  logic syn_valid, syn_ready, syn_zero;
  sym_t syn [2*T];

  logic kes_valid, kes_ready, kes_fail, kes_clean;
  sym_t lambda [T+1];
  sym_t omega  [T];
  logic [RW-1:0] num_err;

  logic rd_en;
  sym_t rd_data;
  logic fifo_full, fifo_empty;
  logic [$clog2(DEPTH):0] fifo_level;

  rs_syndrome #(.N(N), .T(T)) u_syn (
    .clk, .rst_n,
    .in_valid, .in_sof, .in_data,
    .syn_valid, .syn_ready, .syn, .syn_zero
  );

  rs_bm #(.T(T)) u_bm (
    .clk, .rst_n,
    .syn_valid, .syn_ready, .syn, .syn_zero,
    .kes_valid, .kes_ready, .lambda, .omega, .num_err,
    .fail(kes_fail), .clean(kes_clean)
  );

  rs_delay_fifo #(.W(SYM_W), .DEPTH(DEPTH)) u_dly (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_data(in_data),
    .rd_en, .rd_data,
    .full(fifo_full), .empty(fifo_empty), .level(fifo_level)
  );

  rs_chien_forney #(.N(N), .T(T)) u_chien (
    .clk, .rst_n,
    .kes_valid, .kes_ready, .lambda, .omega, .num_err,
    .kes_fail, .kes_clean,
    .rd_en, .rd_data,
    .out_valid, .out_data, .out_sof, .out_eof, .out_corrected,
    .out_err_cnt, .out_fail, .out_clean
  );

  // The delay buffer must never overflow at one symbol per clock: it holds
  // at most one word plus the key-equation latency, and it is never read
  // when empty.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !fifo_full)
    else $error("rs_decoder: delay buffer overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   int'(fifo_level) <= int'(N + 3*T + 6))
    else $error("rs_decoder: delay buffer holds %0d symbols", fifo_level);
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !fifo_empty)
    else $error("rs_decoder: correction stage ahead of the delay buffer");

endmodule
