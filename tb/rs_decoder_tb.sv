// rs_decoder_tb: runs the two 802.16 decoders, RS(255,239) (T = 8) with
// gapless input and RS(255,243) (T = 6) with random gaps, on words with
// 0 to T+3 symbol errors each.
module rs_decoder_tb;
  import rs_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  int   c8, f8, c6, f6;
  logic d8, d6;
  always #5 clk = ~clk;

  rs_decoder_chk #(.T(8), .WORDS(24), .GAPS(0)) u8 (.clk, .rst_n, .checks(c8), .failures(f8), .done(d8));
  rs_decoder_chk #(.T(6), .WORDS(20), .GAPS(1)) u6 (.clk, .rst_n, .checks(c6), .failures(f6), .done(d6));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d8 && d6);
    checks = c8 + c6;
    failures = f8 + f6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
