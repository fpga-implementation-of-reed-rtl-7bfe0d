// rs_bm_tb: gives rs_bm (T = 8) the syndromes of words with 0..8 errors at
// random positions and compares Lambda and Omega, each divided by Lambda_0
// to remove the scale of the inversion-free algorithm, with the locator
// prod(1 + X_k x) built from the known error positions and with
// Lambda*S mod x^2T. Also checks the error count, the fail flag (also for
// 9..12 errors, where it must be raised or the count must be wrong), the
// bypass of an all-zero syndrome, the 3T+1 clock latency and that the
// result is held while kes_ready is low.
module rs_bm_tb;
  import rs_ref_pkg::*;
  localparam int N = 255, T = 8, CASES = 60;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic syn_valid = 0, syn_ready, syn_zero = 0;
  logic [7:0] syn [2*T];
  logic kes_valid, kes_ready = 0, fail, clean;
  logic [7:0] lambda [T+1];
  logic [7:0] omega [T];
  logic [$clog2(2*T+1)-1:0] num_err;

  rs_bm #(.T(T)) dut (.clk, .rst_n, .syn_valid, .syn_ready, .syn, .syn_zero,
                      .kes_valid, .kes_ready, .lambda, .omega, .num_err,
                      .fail, .clean);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym8_t msg [];
    word_t cw;
    sym8_t s [32];
    sym8_t lam [33];
    sym8_t om [32];
    int pw [16];
    int ne, lat, fails_over;
    sym8_t l0i;
    fails_over = 0;
    for (int i = 0; i < 2*T; i++) syn[i] = 0;
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CASES; c++) begin
      ne = c % 13;
      msg = new[N - 2*T];
      foreach (msg[i]) msg[i] = sym8_t'($urandom);
      encode(N, T, msg, cw);
      add_errors(N, ne, cw, pw);
      syndromes(N, T, cw, s);
      locator(ne, pw, lam);
      evaluator(T, lam, s, om);
      while (!syn_ready) @(negedge clk);
      syn_valid = 1;
      syn_zero  = (ne == 0);
      for (int i = 0; i < 2*T; i++) syn[i] = s[i];
      @(negedge clk);
      syn_valid = 0;
      for (int i = 0; i < 2*T; i++) syn[i] = 8'($urandom);  // must have been captured
      lat = 1;
      while (!kes_valid) begin @(negedge clk); lat++; end
      checks++;
      if (lat != ((ne == 0) ? 1 : 3*T + 1)) begin
        failures++; $display("FAIL case %0d latency %0d", c, lat);
      end
      repeat ($urandom_range(3)) @(negedge clk);   // result must be held
      checks++;
      if (!kes_valid) begin failures++; $display("FAIL case %0d result dropped", c); end
      l0i = inv(lambda[0]);
      if (ne <= T) begin
        checks += 3;
        if (fail !== 0 || num_err !== ne || clean !== (ne == 0)) begin
          failures++;
          $display("FAIL case %0d ne=%0d: num_err=%0d fail=%0d clean=%0d", c, ne, num_err, fail, clean);
        end
        for (int j = 0; j <= T; j++) begin
          checks++;
          if (mul(lambda[j], l0i) !== lam[j]) begin
            failures++; $display("FAIL case %0d ne=%0d lambda[%0d]", c, ne, j);
          end
        end
        for (int i = 0; i < T; i++) begin
          checks++;
          if (mul(omega[i], l0i) !== om[i]) begin
            failures++; $display("FAIL case %0d ne=%0d omega[%0d]", c, ne, i);
          end
        end
      end else begin
        // beyond the capability: either flagged, or the count is not ne
        checks++;
        if (fail) fails_over++;
        if (!fail && num_err == ne) begin
          failures++; $display("FAIL case %0d: %0d errors reported as correctable", c, ne);
        end
      end
      @(negedge clk); kes_ready = 1;
      @(negedge clk); kes_ready = 0;
      checks++;
      if (kes_valid) begin failures++; $display("FAIL case %0d result not released", c); end
    end
    // directed: only S_2T non-zero gives L = 2T, which must be flagged
    while (!syn_ready) @(negedge clk);
    syn_valid = 1; syn_zero = 0;
    for (int i = 0; i < 2*T; i++) syn[i] = (i == 2*T - 1) ? 8'h5A : 8'h00;
    @(negedge clk); syn_valid = 0;
    while (!kes_valid) @(negedge clk);
    checks++;
    if (fail) fails_over++;
    if (!fail || num_err != 2*T) begin
      failures++; $display("FAIL directed L=2T case: fail=%0d num_err=%0d", fail, num_err);
    end
    kes_ready = 1; @(negedge clk); kes_ready = 0;
    checks++;
    if (fails_over == 0) begin failures++; $display("FAIL fail flag never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
