// gf_mul_tb: exhaustive check of the GF(2^8) multiplier against
// log/antilog-table products, 65536 operand pairs.
module gf_mul_tb;
  import rs_ref_pkg::*;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  gf_mul dut (.a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (y !== mul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %02h*%02h = %02h, expected %02h", a, b, y, mul(a, b));
        end
      end
    // spot values: alpha^8 = 0x1D, alpha^7*alpha = 0x80*2
    a = 8'h80; b = 8'h02; #1; checks++; if (y !== 8'h1D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
