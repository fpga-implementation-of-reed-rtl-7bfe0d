// rs_syndrome_tb: feeds codewords with 0..10 symbol errors, back to back and
// with gaps, into rs_syndrome (RS(255,239)) and compares the 2T syndromes and
// the zero flag with a direct polynomial evaluation. Also checks that the
// result appears one clock after the last symbol and that in_sof restarts a
// word that was cut short.
module rs_syndrome_tb;
  import rs_ref_pkg::*;
  localparam int N = 255, T = 8, WORDS = 12;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sof = 0, syn_valid, syn_ready = 0, syn_zero;
  logic [7:0] in_data = 0;
  logic [7:0] syn [2*T];

  rs_syndrome #(.N(N), .T(T)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_data,
                                   .syn_valid, .syn_ready, .syn, .syn_zero);

  sym8_t exp_s [$];
  bit    exp_z [$];
  int    last_cyc [$];
  int    cyc = 0;
  int    got = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: accepts each result after a random delay
  initial begin
    forever begin
      @(negedge clk);
      syn_ready = 0;
      if (syn_valid) begin
        int lc;
        bit z;
        lc = last_cyc.pop_front();
        checks++;
        if (cyc - lc != 1) begin
          failures++; $display("FAIL syndrome latency %0d", cyc - lc);
        end
        repeat ($urandom_range(20)) @(negedge clk);
        for (int i = 0; i < 2*T; i++) begin
          sym8_t e;
          e = exp_s.pop_front();
          checks++;
          if (syn[i] !== e) begin
            failures++; $display("FAIL word %0d S%0d = %02h, expected %02h", got, i + 1, syn[i], e);
          end
        end
        z = exp_z.pop_front();
        checks++;
        if (syn_zero !== z) begin failures++; $display("FAIL word %0d zero flag", got); end
        syn_ready = 1;
        got++;
        @(negedge clk);
      end
    end
  end

  initial begin
    sym8_t msg [];
    word_t cw;
    sym8_t s [32];
    int pw [16];
    bit z;
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a truncated word that in_sof must discard
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); in_valid = 1; in_sof = (i == 0); in_data = 8'($urandom);
    end
    for (int w = 0; w < WORDS; w++) begin
      msg = new[N - 2*T];
      foreach (msg[i]) msg[i] = sym8_t'($urandom);
      encode(N, T, msg, cw);
      add_errors(N, (w == 0) ? 0 : w - 1, cw, pw);
      syndromes(N, T, cw, s);
      z = 1;
      for (int i = 0; i < 2*T; i++) begin exp_s.push_back(s[i]); if (s[i] != 0) z = 0; end
      exp_z.push_back(z);
      for (int q = 0; q < N; q++) begin
        if (w >= 6 && $urandom_range(7) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_sof = (q == 0); in_data = cw[q];
        if (q == N - 1) last_cyc.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0; in_sof = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (got != WORDS) begin failures++; $display("FAIL got %0d results", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
