// rs_chien_forney: Chien search, Forney error values and symbol correction.
//
// For every position j of the received word, in the order the symbols were
// received (j = N-1 down to 0), it evaluates at x = alpha^-j
//   Lambda(x), Lambda_odd(x) = x*Lambda'(x) and x*Omega(x).
// Each polynomial term is a register that is multiplied by a constant
// alpha^i every clock (the Chien cells), so one position is evaluated per
// clock; the sums are XOR trees. A root, Lambda(alpha^-j) = 0, marks symbol
// j as wrong, and Forney's formula for codes whose generator roots start at
// alpha^1 gives its error value
//   e_j = Omega(x) / Lambda'(x) = x*Omega(x) / Lambda_odd(x).
// The division uses a 256-entry inverse table computed at elaboration. The
// evaluation is pipelined in three register stages:
//   stage 0  Chien term registers, read request to the delay buffer
//   stage 1  sums Lambda(x), Lambda_odd(x), x*Omega(x); symbol from buffer
//   stage 2  inverse, product, root test: the error value
//   output   corrected symbol = received symbol XOR error value
// Latency from a position's stage 0 to its corrected symbol is 3 clocks.
// Chien search with Forney correction and a pipelined evaluation follow the
// published decoder; the stage split and the odd-term form of Forney are
// this design's choice.
//
// Per word, the number of corrected symbols and a failure flag come out with
// out_eof: fail is set when the key equation reported more than T errors or
// when the number of roots found differs from the degree of Lambda. When the
// key equation already reported fail, no symbol is altered. These flags and
// the valid/ready handshake on the key-equation side are this design's own
// choices. kes_ready is high when idle and in the clock that issues the last
// position, so consecutive words leave without a gap. rst_n is active-low
// synchronous.
module rs_chien_forney
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic clk,
  input  logic rst_n,
  // key equation result
  input  logic kes_valid,
  output logic kes_ready,
  input  sym_t lambda [T+1],
  input  sym_t omega  [T],
  input  logic [$clog2(2*T+1)-1:0] num_err,
  input  logic kes_fail,
  input  logic kes_clean,
  // delay buffer read port (data one clock after rd_en)
  output logic rd_en,
  input  sym_t rd_data,
  // corrected output stream
  output logic out_valid,
  output sym_t out_data,
  output logic out_sof,
  output logic out_eof,
  output logic out_corrected,  // this symbol was changed
  output logic [$clog2(N+1)-1:0] out_err_cnt,  // with out_eof
  output logic out_fail,       // with out_eof
  output logic out_clean       // with out_eof: syndrome was all zero
);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned RW = $clog2(2*T + 1);
  localparam inv_table_t  INV = gf_inv_table();

  // alpha^-(i*(N-1)): value of x^i at the first position, j = N-1
  function automatic sym_t start_pow(input int unsigned i);
    return gf_pow_alpha(FIELD_N - ((i * (N - 1)) % FIELD_N));
  endfunction

  // ---------------- stage 0: Chien cells ----------------
  logic          busy;
  logic [CW-1:0] pos;
  logic          last_pos;
  logic          load;
  sym_t          lt [T+1];       // Lambda_i x^i
  sym_t          ot [T];         // Omega_i x^(i+1)
  sym_t          lt_ld [T+1], lt_st [T+1];
  sym_t          ot_ld [T],   ot_st [T];
  logic [RW-1:0] blk_nerr;
  logic          blk_fail, blk_clean;

  assign last_pos  = busy && (pos == '0);
  assign kes_ready = !busy || last_pos;
  assign load      = kes_valid && kes_ready;
  assign rd_en     = busy;

  for (genvar i = 0; i <= T; i++) begin : g_lcell
    gf_mul u_ld (.a(lambda[i]), .b(start_pow(i)),  .y(lt_ld[i]));
    gf_mul u_st (.a(lt[i]),     .b(gf_pow_alpha(i)), .y(lt_st[i]));
  end
  for (genvar i = 0; i < T; i++) begin : g_ocell
    gf_mul u_ld (.a(omega[i]), .b(start_pow(i + 1)),  .y(ot_ld[i]));
    gf_mul u_st (.a(ot[i]),    .b(gf_pow_alpha(i + 1)), .y(ot_st[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      pos       <= '0;
      blk_nerr  <= '0;
      blk_fail  <= 1'b0;
      blk_clean <= 1'b0;
      for (int i = 0; i <= T; i++) lt[i] <= '0;
      for (int i = 0; i < T; i++)  ot[i] <= '0;
    end else if (load) begin
      busy      <= 1'b1;
      pos       <= CW'(N - 1);
      blk_nerr  <= num_err;
      blk_fail  <= kes_fail;
      blk_clean <= kes_clean;
      for (int i = 0; i <= T; i++) lt[i] <= lt_ld[i];
      for (int i = 0; i < T; i++)  ot[i] <= ot_ld[i];
    end else if (busy) begin
      busy <= !last_pos;
      pos  <= pos - 1'b1;
      for (int i = 0; i <= T; i++) lt[i] <= lt_st[i];
      for (int i = 0; i < T; i++)  ot[i] <= ot_st[i];
    end
  end

  // ---------------- stage 1: polynomial sums ----------------
  typedef struct packed {
    logic          sof;
    logic          eof;
    logic [RW-1:0] nerr;
    logic          fail;
    logic          clean;
  } tag_t;

  logic v1;
  tag_t tag1;
  sym_t lam1, odd1, om1;
  sym_t lam_sum, odd_sum, om_sum;

  always_comb begin
    lam_sum = '0;
    odd_sum = '0;
    om_sum  = '0;
    for (int i = 0; i <= T; i++) begin
      lam_sum ^= lt[i];
      if (i % 2 == 1) odd_sum ^= lt[i];
    end
    for (int i = 0; i < T; i++) om_sum ^= ot[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      tag1 <= '0;
      lam1 <= '0;
      odd1 <= '0;
      om1  <= '0;
    end else begin
      v1   <= busy;
      tag1 <= '{sof: busy && pos == CW'(N - 1), eof: last_pos,
                nerr: blk_nerr, fail: blk_fail, clean: blk_clean};
      lam1 <= lam_sum;
      odd1 <= odd_sum;
      om1  <= om_sum;
    end
  end

  // ---------------- stage 2: Forney error value ----------------
  logic v2;
  tag_t tag2;
  sym_t sym2;
  sym_t err2;
  logic root2;
  sym_t inv1;
  sym_t eval1;

  assign inv1 = INV[odd1*SYM_W +: SYM_W];
  gf_mul u_forney (.a(om1), .b(inv1), .y(eval1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2    <= 1'b0;
      tag2  <= '0;
      sym2  <= '0;
      err2  <= '0;
      root2 <= 1'b0;
    end else begin
      v2    <= v1;
      tag2  <= tag1;
      sym2  <= rd_data;
      root2 <= v1 && (lam1 == '0) && !tag1.fail;
      err2  <= (v1 && (lam1 == '0) && !tag1.fail) ? eval1 : '0;
    end
  end

  // ---------------- output: correction and word status ----------------
  logic [CW-1:0] roots;        // roots found so far in the current word
  logic [CW-1:0] roots_now;

  assign roots_now = (tag2.sof ? '0 : roots) + CW'(root2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_data      <= '0;
      out_sof       <= 1'b0;
      out_eof       <= 1'b0;
      out_corrected <= 1'b0;
      out_err_cnt   <= '0;
      out_fail      <= 1'b0;
      out_clean     <= 1'b0;
      roots         <= '0;
    end else begin
      out_valid     <= v2;
      out_sof       <= v2 && tag2.sof;
      out_eof       <= v2 && tag2.eof;
      out_data      <= sym2 ^ err2;
      out_corrected <= v2 && (err2 != '0);
      if (v2) roots <= roots_now;
      if (v2 && tag2.eof) begin
        out_err_cnt <= roots_now;
        out_fail    <= tag2.fail || (roots_now != CW'(tag2.nerr));
        out_clean   <= tag2.clean;
      end
    end
  end

endmodule
