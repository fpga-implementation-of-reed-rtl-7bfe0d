// rs_delay_fifo: delay buffer of the Reed-Solomon decoder.
//
// While the syndrome, key-equation and Chien stages work on a codeword, its
// received symbols wait here until the matching error values come out of
// the Chien/Forney stage. The buffer is a first-in first-out queue in a
// simple dual-port memory of DEPTH symbols (an array that maps onto one
// block RAM), with write and read pointers one bit wider than the address
// so that full and empty can be told apart.
//
// Timing: a write and a read can happen in the same clock. Reads are
// synchronous: rd_data holds the symbol one clock after rd_en. Writing when
// full or reading when empty is a protocol error caught by assertions.
// DEPTH = 512 holds one 255-symbol word plus the key-equation latency with
// margin; it is this design's choice. The published decoder calls for a
// delay block here but gives no structure or size; the FIFO form lets the
// stages stall. rst_n is active-low synchronous.
module rs_delay_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp;
  logic [AW:0]  rp;

  assign level = wp - rp;
  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rp[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en) wp <= wp + 1'b1;
      if (rd_en) rp <= rp + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("rs_delay_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("rs_delay_fifo: read while empty");

endmodule
