// rs_encoder: systematic Reed-Solomon encoder, RS(N, N-2T) over GF(2^8).
//
// The parity CK(x) = x^(n-k) M(x) mod g(x) is formed by a linear-feedback
// shift register of 2T symbol registers, one constant GF multiplier per
// generator coefficient g_0 .. g_(2T-1) (the LFSR divider of the classic
// encoder figure). Each message symbol is XORed with the highest register to
// form the feedback, which is multiplied by every g_j and added into the
// shifted registers. The message symbols leave the encoder unaltered, highest
// power first; once K = N-2T symbols have gone in, the 2T parity symbols are
// shifted out, highest power first, and the registers are left cleared.
//
// Defaults follow the 802.16 outer code: N = 255, T = 8, i.e. RS(255,239),
// with g(x) having roots alpha^1 .. alpha^16. T = 4 and T = 6 give the other
// error-correcting capabilities. g(x) is computed at elaboration from T.
// The LFSR division structure, the code sizes and the generator follow the
// published 802.16 encoder design; the stream interface is this design's.
//
// Interface (own choices): a valid/ready input stream of message symbols
// and a registered output stream with start/end-of-codeword flags. in_ready
// is high for the K message symbols and low while the 2T parity symbols are
// emitted. Latency is one clock: a symbol accepted in cycle c is on out_data
// in cycle c+1. A codeword takes N clocks when the message arrives without
// gaps. rst_n is an active-low synchronous reset.
module rs_encoder
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic clk,
  input  logic rst_n,
  // message input
  input  logic in_valid,
  output logic in_ready,
  input  sym_t in_data,
  // codeword output
  output logic out_valid,
  output sym_t out_data,
  output logic out_sof,
  output logic out_eof
);
  localparam int unsigned K   = N - 2*T;
  localparam int unsigned CW  = $clog2(N + 1);

  initial assert (N <= FIELD_N && T >= 1 && T <= 16 && N > 2*T)
    else $error("rs_encoder: unsupported N=%0d T=%0d", N, T);

  logic [CW-1:0] cnt;          // symbol index within the codeword
  sym_t          par [2*T];    // LFSR registers, par[j] ~ coefficient of x^j
  sym_t          fb;           // feedback symbol
  sym_t          fb_g [2*T];   // fb * g_j
  logic          msg_phase;
  logic          fire;

  assign msg_phase = (cnt < CW'(K));
  assign in_ready  = msg_phase;
  assign fire      = in_valid && msg_phase;
  assign fb        = fire ? (in_data ^ par[2*T-1]) : '0;

  for (genvar j = 0; j < 2*T; j++) begin : g_mul
    gf_mul u_mul (.a(fb), .b(gen_coef(T, j)), .y(fb_g[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      for (int j = 0; j < 2*T; j++) par[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      if (fire) begin
        // message symbol: pass through and divide
        out_valid <= 1'b1;
        out_data  <= in_data;
        out_sof   <= (cnt == '0);
        cnt       <= cnt + 1'b1;
        par[0]    <= fb_g[0];
        for (int j = 1; j < 2*T; j++) par[j] <= par[j-1] ^ fb_g[j];
      end else if (!msg_phase) begin
        // parity symbol: shift out the remainder, zeros shift in
        out_valid <= 1'b1;
        out_data  <= par[2*T-1];
        out_eof   <= (cnt == CW'(N - 1));
        cnt       <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
        par[0]    <= '0;
        for (int j = 1; j < 2*T; j++) par[j] <= par[j-1];
      end
    end
  end

endmodule
