// rs_encoder_tb: RS encoder test for error-correcting capabilities 8, 6 and 4
// (RS(255,239), RS(255,243), RS(255,247)). Checks the generator polynomial
// coefficients of t = 8 and t = 6 against the published 802.16 values and
// the reference construction, then encodes random messages on each size.
module rs_encoder_tb;
  import rs_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  int   c8, f8, c6, f6, c4, f4;
  logic d8, d6, d4;

  always #5 clk = ~clk;

  rs_encoder_chk #(.T(8)) u8 (.clk, .rst_n, .checks(c8), .failures(f8), .done(d8));
  rs_encoder_chk #(.T(6)) u6 (.clk, .rst_n, .checks(c6), .failures(f6), .done(d6));
  rs_encoder_chk #(.T(4)) u4 (.clk, .rst_n, .checks(c4), .failures(f4), .done(d4));

  // g(x) coefficients, x^0 first (802.16 outer code)
  localparam logic [7:0] G8 [17] = '{8'h4F, 8'h2C, 8'h51, 8'h64, 8'h31, 8'hB7, 8'h38, 8'h11,
                                     8'hE8, 8'hBB, 8'h7E, 8'h68, 8'h1F, 8'h67, 8'h34, 8'h76, 8'h01};
  localparam logic [7:0] G6 [13] = '{8'h78, 8'hFC, 8'hAF, 8'h84, 8'hAA, 8'hA7, 8'h93, 8'h82,
                                     8'h33, 8'h22, 8'hC1, 8'h88, 8'h01};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym8_t g [33];
    init();
    gen_poly(8, g);
    for (int j = 0; j <= 16; j++) begin
      checks++;
      if (rs_pkg::gen_coef(8, j) !== G8[j] || g[j] !== G8[j]) begin
        failures++; $display("FAIL g8[%0d] = %02h", j, rs_pkg::gen_coef(8, j));
      end
    end
    gen_poly(6, g);
    for (int j = 0; j <= 12; j++) begin
      checks++;
      if (rs_pkg::gen_coef(6, j) !== G6[j] || g[j] !== G6[j]) begin
        failures++; $display("FAIL g6[%0d] = %02h", j, rs_pkg::gen_coef(6, j));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d8 && d6 && d4);
    checks += c8 + c6 + c4;
    failures += f8 + f6 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
