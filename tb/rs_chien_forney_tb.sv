// rs_chien_forney_tb: gives rs_chien_forney (N = 255, T = 8) error locator
// and evaluator polynomials built from known error positions (scaled by a
// random constant, as the key-equation solver delivers them) and serves the
// received symbols from a queue model of the delay buffer. Checks that the
// output word equals the transmitted codeword, the per-symbol corrected flag,
// the error count, the fail flag (forced by a wrong error count and by a
// key-equation failure, which must leave the word untouched), the 4-clock
// start latency and gapless back-to-back words.
module rs_chien_forney_tb;
  import rs_ref_pkg::*;
  localparam int N = 255, T = 8, CASES = 24;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic kes_valid = 0, kes_ready, kes_fail = 0, kes_clean = 0;
  logic [7:0] lambda [T+1];
  logic [7:0] omega [T];
  logic [$clog2(2*T+1)-1:0] num_err = 0;
  logic rd_en;
  logic [7:0] rd_data = 0;
  logic out_valid, out_sof, out_eof, out_corrected, out_fail, out_clean;
  logic [7:0] out_data;
  logic [$clog2(N+1)-1:0] out_err_cnt;

  rs_chien_forney #(.N(N), .T(T)) dut (
    .clk, .rst_n, .kes_valid, .kes_ready, .lambda, .omega, .num_err,
    .kes_fail, .kes_clean, .rd_en, .rd_data,
    .out_valid, .out_data, .out_sof, .out_eof, .out_corrected,
    .out_err_cnt, .out_fail, .out_clean);

  // delay buffer model
  sym8_t rx_q [$];
  always @(posedge clk) if (rst_n && rd_en) begin
    if (rx_q.size() == 0) begin failures++; $display("FAIL read from empty buffer"); end
    else begin rd_data <= rx_q[0]; rx_q.delete(0); end
  end

  // expected output
  sym8_t exp_d [$];
  bit    exp_c [$];
  int    exp_cnt [$];
  bit    exp_f [$];
  int    oidx = 0, words_out = 0, prev_eof_cyc = -10, cyc = 0, gapless = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    sym8_t d;
    bit c;
    d = exp_d[0]; exp_d.delete(0);
    c = exp_c[0]; exp_c.delete(0);
    checks += 2;
    if (out_data !== d || out_sof !== (oidx == 0) || out_eof !== (oidx == N - 1)) begin
      failures++;
      if (failures < 20) $display("FAIL word %0d sym %0d: %02h expected %02h", words_out, oidx, out_data, d);
    end
    if (out_corrected !== c) begin
      failures++;
      if (failures < 20) $display("FAIL word %0d sym %0d corrected flag", words_out, oidx);
    end
    if (oidx == 0 && prev_eof_cyc == cyc - 1) gapless++;
    if (out_eof) begin
      int n;
      bit f;
      n = exp_cnt[0]; exp_cnt.delete(0);
      f = exp_f[0];   exp_f.delete(0);
      checks += 2;
      if (out_fail !== f) begin failures++; $display("FAIL word %0d fail flag %0d", words_out, out_fail); end
      if (!f && out_err_cnt !== n) begin
        failures++; $display("FAIL word %0d err count %0d expected %0d", words_out, out_err_cnt, n);
      end
      prev_eof_cyc = cyc;
      words_out++;
    end
    oidx = (oidx == N - 1) ? 0 : oidx + 1;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym8_t msg [];
    word_t cw, rx;
    sym8_t s [32];
    sym8_t lam [33];
    sym8_t om [32];
    int pw [16];
    int ne, lat;
    sym8_t sc;
    bit bad_cnt, bad_kes;
    for (int j = 0; j <= T; j++) lambda[j] = 0;
    for (int i = 0; i < T; i++) omega[i] = 0;
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CASES; c++) begin
      ne = c % (T + 1);
      bad_cnt = (c == 20);
      bad_kes = (c == 21);
      msg = new[N - 2*T];
      foreach (msg[i]) msg[i] = sym8_t'($urandom);
      encode(N, T, msg, cw);
      rx = cw;
      add_errors(N, ne, rx, pw);
      syndromes(N, T, rx, s);
      locator(ne, pw, lam);
      evaluator(T, lam, s, om);
      sc = sym8_t'($urandom_range(255, 1));
      for (int q = 0; q < N; q++) begin
        rx_q.push_back(rx[q]);
        exp_d.push_back(bad_kes ? rx[q] : cw[q]);
        exp_c.push_back(!bad_kes && rx[q] != cw[q]);
      end
      exp_cnt.push_back(ne);
      exp_f.push_back(bad_cnt || bad_kes);
      while (!kes_ready) @(negedge clk);
      kes_valid = 1;
      for (int j = 0; j <= T; j++) lambda[j] = mul(lam[j], sc);
      for (int i = 0; i < T; i++) omega[i] = mul(om[i], sc);
      num_err   = ($clog2(2*T+1))'(bad_cnt ? ne + 1 : ne);
      kes_fail  = bad_kes;
      kes_clean = (ne == 0);
      @(negedge clk);
      kes_valid = 0;
      if (c == 0) begin
        lat = 1;
        while (!out_valid) begin @(negedge clk); lat++; end
        checks++;
        if (lat != 4) begin failures++; $display("FAIL start latency %0d", lat); end
      end
    end
    wait (exp_d.size() == 0);
    repeat (5) @(negedge clk);
    checks += 2;
    if (words_out != CASES) begin failures++; $display("FAIL %0d words out", words_out); end
    if (gapless < CASES - 2) begin failures++; $display("FAIL only %0d gapless words", gapless); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
