// rs_encoder_chk: drives one rs_encoder instance of capability T with random
// messages (some sent with gaps) and compares every output symbol with a
// long-division reference encoder. Also checks the start/end flags, that
// in_ready drops for exactly 2T clocks per word, and that a gapless word
// takes N clocks. Reports its counts on output ports when done.
module rs_encoder_chk #(
  parameter int N = 255,
  parameter int T = 8,
  parameter int WORDS = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import rs_ref_pkg::*;

  logic in_valid, in_ready, out_valid, out_sof, out_eof;
  logic [7:0] in_data, out_data;

  rs_encoder #(.N(N), .T(T)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_data, .out_sof, .out_eof
  );

  sym8_t exp_q [$];   // expected output symbols, in order
  sym8_t want;
  int    oidx;
  int    busy_low;
  int    first_cyc, last_cyc;
  int    cyc;

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // output monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    if (oidx == 0) first_cyc = cyc;
    want = 8'h00;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL T=%0d: unexpected output", T);
    end else begin
      want = exp_q[0];
      exp_q.delete(0);
    end
    checks++;
    if (out_data !== want || out_sof !== (oidx == 0) || out_eof !== (oidx == N - 1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL T=%0d sym %0d: got %02h sof=%0b eof=%0b, expected %02h",
                 T, oidx, out_data, out_sof, out_eof, want);
    end
    oidx = (oidx == N - 1) ? 0 : oidx + 1;
    if (oidx == 0) last_cyc = cyc;
  end

  initial begin
    sym8_t msg [];
    word_t cw;
    checks = 0; failures = 0; done = 0; oidx = 0;
    in_valid = 0; in_data = 0;
    wait (tables_ready);
    @(posedge rst_n);
    for (int w = 0; w < WORDS; w++) begin
      bit gaps;
      int low;
      gaps = (w % 2 == 1);
      msg = new[N - 2*T];
      foreach (msg[i]) msg[i] = (w == 0) ? sym8_t'(i + 1) : sym8_t'($urandom);
      encode(N, T, msg, cw);
      for (int q = 0; q < N; q++) exp_q.push_back(cw[q]);
      for (int i = 0; i < N - 2*T; i++) begin
        if (gaps && ($urandom_range(3) == 0)) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1; in_data = msg[i];
        checks++;
        if (!in_ready) begin failures++; $display("FAIL T=%0d: not ready in message", T); end
      end
      @(negedge clk); in_valid = 0;
      // parity phase: ready stays low for 2T clocks
      low = 0;
      while (!in_ready) begin low++; @(negedge clk); end
      checks++;
      if (low != 2*T) begin
        failures++; $display("FAIL T=%0d: ready low %0d clocks, expected %0d", T, low, 2*T);
      end
      @(posedge clk); #1;
      if (!gaps) begin
        checks++;
        if (last_cyc - first_cyc != N - 1) begin
          failures++;
          $display("FAIL T=%0d: word took %0d clocks, expected %0d", T, last_cyc - first_cyc + 1, N);
        end
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || oidx != 0) begin failures++; $display("FAIL T=%0d: words missing", T); end
    done = 1;
  end
endmodule
