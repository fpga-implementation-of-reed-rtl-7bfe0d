// rs_delay_fifo_tb: random simultaneous writes and reads on rs_delay_fifo,
// compared with a queue model: data order, one-clock read latency, level,
// and the full and empty flags, including filling it to DEPTH.
module rs_delay_fifo_tb;
  localparam int W = 8, DEPTH = 512;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = 0, rd_data;
  logic [$clog2(DEPTH):0] level;

  rs_delay_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data,
                                             .rd_en, .rd_data, .full, .empty, .level);

  logic [W-1:0] model [$];
  logic [W-1:0] want;
  bit   pend = 0;
  int   saw_full = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit w, bit r);
    @(negedge clk);
    if (pend) begin
      checks++;
      if (rd_data !== want) begin
        failures++; $display("FAIL read %02h, expected %02h", rd_data, want);
      end
    end
    checks += 3;
    if (level !== model.size()) begin failures++; $display("FAIL level %0d vs %0d", level, model.size()); end
    if (full !== (model.size() == DEPTH)) begin failures++; $display("FAIL full flag"); end
    if (empty !== (model.size() == 0)) begin failures++; $display("FAIL empty flag"); end
    if (full) saw_full++;
    wr_en = w && !full;
    rd_en = r && !empty;
    wr_data = W'($urandom);
    pend = rd_en;
    if (rd_en) begin want = model[0]; model.delete(0); end
    if (wr_en) model.push_back(wr_data);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) step($urandom_range(3) != 0, $urandom_range(1));
    for (int i = 0; i < DEPTH + 20; i++) step(1, 0);
    for (int i = 0; i < 200; i++) step(1, 1);
    for (int i = 0; i < DEPTH + 20; i++) step(0, 1);
    for (int i = 0; i < 3000; i++) step($urandom_range(1), $urandom_range(1));
    step(0, 0);
    checks++;
    if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
