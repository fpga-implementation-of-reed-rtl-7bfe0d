// rs_decoder_chk: streams WORDS received words into one rs_decoder of
// capability T and checks the output. Word w carries w mod (T+4) symbol
// errors at random positions, so words with no error, with 1..T errors and
// with more than T errors all occur. Up to T errors the output must be the
// transmitted codeword with the right count; beyond T the word must be
// flagged as failed. Input is gapless, or with random idle clocks when GAPS
// is set. The latency from the last input symbol of a word to its first
// output symbol must be 6 clocks for the error-free first word (key
// equation bypassed) and 3T+6 clocks for the second word.
module rs_decoder_chk #(
  parameter int N = 255,
  parameter int T = 8,
  parameter int WORDS = 24,
  parameter bit GAPS = 0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import rs_ref_pkg::*;

  logic in_valid, in_sof;
  logic [7:0] in_data;
  logic out_valid, out_sof, out_eof, out_corrected, out_fail, out_clean;
  logic [7:0] out_data;
  logic [$clog2(N+1)-1:0] out_err_cnt;

  rs_decoder #(.N(N), .T(T)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_data,
    .out_valid, .out_data, .out_sof, .out_eof, .out_corrected,
    .out_err_cnt, .out_fail, .out_clean);

  sym8_t exp_d [$];
  int    exp_n [$];
  int    oidx, words_out, cyc;
  int    last_in_cyc [2], first_out_cyc [2];
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    sym8_t d;
    int n;
    d = exp_d[0]; exp_d.delete(0);
    n = exp_n[0];
    if (words_out < 2 && oidx == 0) first_out_cyc[words_out] = cyc;
    if (n <= T) begin
      checks++;
      if (out_data !== d || out_sof !== (oidx == 0) || out_eof !== (oidx == N - 1)) begin
        failures++;
        if (failures < 20)
          $display("FAIL T=%0d word %0d sym %0d: %02h expected %02h", T, words_out, oidx, out_data, d);
      end
    end
    if (out_eof) begin
      exp_n.delete(0);
      checks++;
      if (n <= T) begin
        if (out_fail !== 0 || out_err_cnt !== n || out_clean !== (n == 0)) begin
          failures++;
          $display("FAIL T=%0d word %0d: count %0d (expected %0d) fail %0d clean %0d",
                   T, words_out, out_err_cnt, n, out_fail, out_clean);
        end
      end else if (out_fail !== 1) begin
        failures++;
        $display("FAIL T=%0d word %0d: %0d errors not flagged", T, words_out, n);
      end
      words_out++;
    end
    oidx = (oidx == N - 1) ? 0 : oidx + 1;
  end

  initial begin
    sym8_t msg [];
    word_t cw, rx;
    int pw [16];
    int ne;
    checks = 0; failures = 0; done = 0; oidx = 0; words_out = 0; cyc = 0;
    in_valid = 0; in_sof = 0; in_data = 0;
    wait (tables_ready);
    @(posedge rst_n);
    for (int w = 0; w < WORDS; w++) begin
      ne = w % (T + 4);
      msg = new[N - 2*T];
      foreach (msg[i]) msg[i] = sym8_t'($urandom);
      encode(N, T, msg, cw);
      rx = cw;
      add_errors(N, ne, rx, pw);
      for (int q = 0; q < N; q++) exp_d.push_back(cw[q]);
      exp_n.push_back(ne);
      for (int q = 0; q < N; q++) begin
        if (GAPS && $urandom_range(15) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_sof = (q == 0); in_data = rx[q];
        if (w < 2 && q == N - 1) last_in_cyc[w] = cyc;
      end
      if (GAPS) repeat ($urandom_range(40)) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
    while (exp_d.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
    checks += 3;
    if (words_out != WORDS) begin failures++; $display("FAIL T=%0d: %0d words out", T, words_out); end
    // word 0 is error-free (key equation bypassed), word 1 has one error
    if (first_out_cyc[0] - last_in_cyc[0] != 6) begin
      failures++;
      $display("FAIL T=%0d: clean-word latency %0d, expected 6", T, first_out_cyc[0] - last_in_cyc[0]);
    end
    if (first_out_cyc[1] - last_in_cyc[1] != 3*T + 6) begin
      failures++;
      $display("FAIL T=%0d: latency %0d, expected %0d", T, first_out_cyc[1] - last_in_cyc[1], 3*T + 6);
    end
    done = 1;
  end
endmodule
