// gf_mul: combinational GF(2^8) multiplier.
//
// Computes y = a * b in GF(2^8) with field polynomial x^8+x^4+x^3+x^2+1
// (the 802.16 field). Addition in the field is XOR; the product is the
// carry-less product of a and b reduced modulo the field polynomial, which
// synthesizes to an AND/XOR array of about 64 ANDs and 70-80 XORs. Purely
// combinational, no clock. Every constant and variable multiplier of the
// encoder and decoder is an instance of this module. The field follows the
// 802.16 code; a gate-level product instead of log/antilog tables is this
// design's choice.
module gf_mul
  import rs_pkg::*;
(
  input  sym_t a,
  input  sym_t b,
  output sym_t y
);
  always_comb y = rs_pkg::gf_mul(a, b);
endmodule
