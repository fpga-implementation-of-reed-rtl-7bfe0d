// rs_bm: Berlekamp-Massey key equation solver of the Reed-Solomon decoder.
//
// From the 2T syndromes it finds the error locator Lambda(x) and the error
// evaluator Omega(x) that satisfy Lambda(x) S(x) = Omega(x) mod x^2T, with
// S(x) = S_1 + S_2 x + ... + S_2T x^(2T-1). The algorithm is the
// inversion-free form of Berlekamp-Massey: one iteration per clock for
// r = 0 .. 2T-1,
//   delta    = sum_j Lambda_j S_(r-j+1)
//   Lambda  <= gamma*Lambda + delta * x*B
//   if delta != 0 and k >= 0 : B <= Lambda, gamma <= delta, k <= -k-1
//   else                      : B <= x*B,   k <= k+1
// so it needs no GF divider. Lambda comes out multiplied by a non-zero
// constant, which cancels in the Forney ratio. Omega_i = sum_j Lambda_j
// S_(i-j+1), i = 0 .. T-1, is then formed on the same dot-product unit,
// one coefficient per clock. The number of errors found is
// L = (2T - k)/2; L > T marks an uncorrectable word (fail). When the
// syndrome block reports an all-zero syndrome the iterations are bypassed
// and Lambda = 1, Omega = 0 are offered at once.
//
// Datapath: T+1 multipliers for the discrepancy / Omega dot product and
// 2(T+1) for the Lambda update. Timing: syn_ready is high in the idle state;
// the result is offered on kes_valid 3T+1 clocks after a syndrome vector is
// taken (one clock after a zero syndrome), and held until kes_ready.
// The published decoder names Berlekamp-Massey as its key-equation solver;
// the inversion-free form, the Omega pass, the zero-syndrome bypass and the
// handshake are this design's choices. rst_n is active-low synchronous.
module rs_bm
  import rs_pkg::*;
#(
  parameter int unsigned T = 8
) (
  input  logic clk,
  input  logic rst_n,
  // syndromes, syn[i] = S_(i+1)
  input  logic syn_valid,
  output logic syn_ready,
  input  sym_t syn [2*T],
  input  logic syn_zero,
  // key equation result
  output logic kes_valid,
  input  logic kes_ready,
  output sym_t lambda [T+1],   // lambda[j] = coefficient of x^j
  output sym_t omega  [T],     // omega[i]  = coefficient of x^i
  output logic [$clog2(2*T+1)-1:0] num_err,  // L, degree of Lambda
  output logic fail,           // L > T: more errors than can be corrected
  output logic clean           // all syndromes were zero
);
  localparam int unsigned RW = $clog2(2*T + 1);
  localparam int unsigned KW = RW + 2;      // signed k, range -2T .. 2T

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OMEGA, S_DONE} state_t;
  state_t state;

  sym_t               s     [2*T];
  sym_t               b     [T+1];
  sym_t               gamma;
  logic signed [KW-1:0] k;
  logic [RW-1:0]      r;

  // dot product sum_j lambda_j * s[r-j]
  sym_t dot_a [T+1];
  sym_t dot_p [T+1];
  sym_t dot;
  // lambda update products
  sym_t gl    [T+1];
  sym_t db    [T+1];

  for (genvar j = 0; j <= T; j++) begin : g_dp
    always_comb begin
      dot_a[j] = '0;
      for (int i = 0; i < 2*T; i++)
        if (int'(r) - j == i) dot_a[j] = s[i];
    end
    gf_mul u_dot (.a(lambda[j]), .b(dot_a[j]), .y(dot_p[j]));
    gf_mul u_gl  (.a(gamma),     .b(lambda[j]), .y(gl[j]));
    if (j == 0) begin : g_b0
      assign db[j] = '0;
    end else begin : g_bj
      gf_mul u_db (.a(dot), .b(b[j-1]), .y(db[j]));
    end
  end

  always_comb begin
    dot = '0;
    for (int j = 0; j <= T; j++) dot ^= dot_p[j];
  end

  assign syn_ready = (state == S_IDLE);
  assign kes_valid = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      r       <= '0;
      k       <= '0;
      gamma   <= '0;
      num_err <= '0;
      fail    <= 1'b0;
      clean   <= 1'b0;
      for (int i = 0; i < 2*T; i++) s[i] <= '0;
      for (int j = 0; j <= T; j++) begin
        lambda[j] <= '0;
        b[j]      <= '0;
      end
      for (int i = 0; i < T; i++) omega[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (syn_valid) begin
          for (int i = 0; i < 2*T; i++) s[i] <= syn[i];
          for (int j = 0; j <= T; j++) begin
            lambda[j] <= (j == 0) ? 8'h01 : 8'h00;
            b[j]      <= (j == 0) ? 8'h01 : 8'h00;
          end
          for (int i = 0; i < T; i++) omega[i] <= '0;
          gamma   <= 8'h01;
          k       <= '0;
          r       <= '0;
          clean   <= syn_zero;
          num_err <= '0;
          fail    <= 1'b0;
          state   <= syn_zero ? S_DONE : S_ITER;
        end
        S_ITER: begin
          for (int j = 0; j <= T; j++) lambda[j] <= gl[j] ^ db[j];
          if (dot != '0 && k >= 0) begin
            for (int j = 0; j <= T; j++) b[j] <= lambda[j];
            gamma <= dot;
            k     <= -k - 1;
          end else begin
            b[0] <= '0;
            for (int j = 1; j <= T; j++) b[j] <= b[j-1];
            k    <= k + 1;
          end
          if (r == RW'(2*T - 1)) begin
            r     <= '0;
            state <= S_OMEGA;
          end else begin
            r <= r + 1'b1;
          end
        end
        S_OMEGA: begin
          for (int i = 0; i < T; i++) if (r == RW'(i)) omega[i] <= dot;
          if (r == RW'(T - 1)) begin
            // L = (2T - k) / 2
            num_err <= RW'((KW'(2*T) - k) >>> 1);
            fail    <= ((KW'(2*T) - k) >>> 1) > KW'(T);
            state   <= S_DONE;
          end
          r <= r + 1'b1;
        end
        S_DONE: if (kes_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
