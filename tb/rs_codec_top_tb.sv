// rs_codec_top_tb: end-to-end test of the codec at its default size,
// RS(255,239). Random messages go into the encoder without gaps; a channel
// model flips a chosen number of symbols of each encoded word and passes it
// on, one symbol per clock, to the decoder. Encoder output and decoder
// output are both compared with a long-division reference encoding of the
// message. The error counts per word cycle through 0, 1, T, 0, T+1, T, 0,
// T+4; in the sixth word of each cycle the T errors form one burst of
// consecutive symbols. The run exercises, and counts:
//   parity   encoder parity phase (input held off for 2T clocks)
//   bypass   all-zero syndrome, key-equation iterations skipped
//   correct  symbols corrected by Chien search / Forney
//   fullcap  words with exactly T errors corrected
//   burst    words with a burst of T consecutive symbol errors corrected
//   fail     words with more than T errors flagged as uncorrectable
//   wait     key-equation result held because the Chien stage was busy
// Each must happen at least once.
module rs_codec_top_tb;
  import rs_ref_pkg::*;
  localparam int N = 255, T = 8, K = N - 2*T, WORDS = 16;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic enc_in_valid = 0, enc_in_ready, enc_out_valid, enc_out_sof, enc_out_eof;
  logic [7:0] enc_in_data = 0, enc_out_data;
  logic dec_in_valid = 0, dec_in_sof = 0;
  logic [7:0] dec_in_data = 0;
  logic dec_out_valid, dec_out_sof, dec_out_eof, dec_out_corrected, dec_out_fail, dec_out_clean;
  logic [7:0] dec_out_data;
  logic [$clog2(N+1)-1:0] dec_out_err_cnt;

  rs_codec_top dut (
    .clk, .rst_n,
    .enc_in_valid, .enc_in_ready, .enc_in_data,
    .enc_out_valid, .enc_out_data, .enc_out_sof, .enc_out_eof,
    .dec_in_valid, .dec_in_sof, .dec_in_data,
    .dec_out_valid, .dec_out_data, .dec_out_sof, .dec_out_eof,
    .dec_out_corrected, .dec_out_err_cnt, .dec_out_fail, .dec_out_clean);

  int n_parity = 0, n_bypass = 0, n_correct = 0, n_fullcap = 0, n_fail = 0, n_wait = 0, n_burst = 0;

  function automatic int errs_of(int w);
    int pat [8];
    pat = '{0, 1, T, 0, T + 1, T, 0, T + 4};
    return pat[w % 8];
  endfunction

  // reference codewords and error masks, filled by the stimulus process
  word_t ref_cw [WORDS];
  word_t mask   [WORDS];
  int    enc_w = 0, enc_i = 0, dec_w = 0, dec_i = 0;
  int    in_end_cyc [WORDS];   // clock of the last decoder input symbol
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // encoder output check and channel: corrupt and forward to the decoder
  always @(negedge clk) begin
    dec_in_valid = 0;
    dec_in_sof   = 0;
    if (rst_n && enc_out_valid) begin
      checks++;
      if (enc_out_data !== ref_cw[enc_w][enc_i] || enc_out_sof !== (enc_i == 0)) begin
        failures++;
        if (failures < 20) $display("FAIL encoder word %0d sym %0d", enc_w, enc_i);
      end
      dec_in_valid = 1;
      dec_in_sof   = (enc_i == 0);
      dec_in_data  = enc_out_data ^ mask[enc_w][enc_i];
      if (enc_i == N - 1) begin
        in_end_cyc[enc_w] = cyc;
        enc_i = 0;
        enc_w++;
      end else enc_i++;
    end
    if (rst_n && !enc_in_ready) n_parity++;
  end

  // decoder output check
  always @(negedge clk) if (rst_n && dec_out_valid) begin
    int ne;
    ne = errs_of(dec_w);
    if (ne <= T) begin
      checks++;
      if (dec_out_data !== ref_cw[dec_w][dec_i] || dec_out_sof !== (dec_i == 0)) begin
        failures++;
        if (failures < 20) $display("FAIL decoder word %0d sym %0d", dec_w, dec_i);
      end
    end
    if (dec_out_corrected) n_correct++;
    // an error-free word leaves 6 clocks after its last input symbol unless
    // its key-equation result had to wait for the Chien stage
    if (dec_i == 0 && ne == 0 && cyc - in_end_cyc[dec_w] > 6) n_wait++;
    if (dec_out_eof) begin
      checks++;
      if (ne <= T) begin
        if (dec_out_fail || dec_out_err_cnt != ne) begin
          failures++; $display("FAIL word %0d: %0d errors, count %0d fail %0d", dec_w, ne, dec_out_err_cnt, dec_out_fail);
        end
        if (ne == T && !dec_out_fail) n_fullcap++;
        if (dec_w % 8 == 5 && !dec_out_fail) n_burst++;
      end else if (!dec_out_fail) begin
        failures++; $display("FAIL word %0d: %0d errors not flagged", dec_w, ne);
      end else n_fail++;
      if (dec_out_clean) n_bypass++;
      checks++;
      if (dec_out_clean !== (ne == 0)) begin failures++; $display("FAIL word %0d clean flag", dec_w); end
    end
    if (dec_i == N - 1) begin dec_i = 0; dec_w++; end else dec_i++;
  end

  initial begin
    repeat (WORDS * N + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym8_t msg [];
    int pw [16];
    init();
    for (int w = 0; w < WORDS; w++) begin
      word_t rx;
      msg = new[K];
      foreach (msg[i]) msg[i] = sym8_t'($urandom);
      encode(N, T, msg, ref_cw[w]);
      rx = ref_cw[w];
      if (w % 8 == 5) begin
        int q0;
        q0 = $urandom_range(N - T);
        for (int q = q0; q < q0 + T; q++) rx[q] ^= sym8_t'($urandom_range(255, 1));
      end else add_errors(N, errs_of(w), rx, pw);
      for (int q = 0; q < N; q++) mask[w][q] = rx[q] ^ ref_cw[w][q];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      for (int q = 0; q < K; q++) begin
        @(negedge clk);
        while (!enc_in_ready) begin enc_in_valid = 0; @(negedge clk); end
        enc_in_valid = 1;
        enc_in_data  = ref_cw[w][q];
      end
    end
    @(negedge clk); enc_in_valid = 0;
    while (dec_w < WORDS) @(negedge clk);
    checks += 7;
    if (n_parity  == 0) begin failures++; $display("FAIL parity phase never seen"); end
    if (n_bypass  == 0) begin failures++; $display("FAIL zero-syndrome bypass never seen"); end
    if (n_correct == 0) begin failures++; $display("FAIL no symbol corrected"); end
    if (n_fullcap == 0) begin failures++; $display("FAIL no word with T errors corrected"); end
    if (n_fail    == 0) begin failures++; $display("FAIL no uncorrectable word flagged"); end
    if (n_burst   == 0) begin failures++; $display("FAIL no burst corrected"); end
    if (n_wait    == 0) begin failures++; $display("FAIL key-equation result never waited"); end
    $display("mechanisms: parity=%0d bypass=%0d correct=%0d fullcap=%0d burst=%0d fail=%0d wait=%0d",
             n_parity, n_bypass, n_correct, n_fullcap, n_burst, n_fail, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
