// rs_syndrome: syndrome calculator of the Reed-Solomon decoder.
//
// Computes the 2T syndromes S_i = R(alpha^i), i = 1 .. 2T, of a received
// word R(x) = R_0 + R_1 x + ... + R_(N-1) x^(N-1) whose first symbol is
// R_(N-1). Each syndrome has its own Horner cell acc_i <= acc_i*alpha^i + r,
// one constant GF multiplier and one register per syndrome, all 2T cells
// working in parallel on the same symbol. After the last symbol the 2T
// results are copied to an output register and a new word can start at once
// (no gap between codewords). syn_zero flags an all-zero syndrome vector,
// i.e. a valid codeword with no error to correct.
//
// Interface (own choice): in_valid/in_sof qualify one received symbol per
// clock; the N-th symbol after in_sof ends the word. The output register is
// offered with syn_valid and held until syn_ready; it must be taken before
// the next word is complete, which an assertion checks. Latency: syn_valid
// rises one clock after the last symbol. rst_n is active-low synchronous.
// syn[0] holds S_1, syn[2T-1] holds S_2T. The syndrome definition follows
// the published decoder; the Horner cells and the handshake are this
// design's choice.
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  sym_t in_data,
  output logic syn_valid,
  input  logic syn_ready,
  output sym_t syn [2*T],
  output logic syn_zero
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] cnt;               // symbols of the current word seen so far
  sym_t          acc  [2*T];
  sym_t          prod [2*T];
  sym_t          acc_in [2*T];
  logic          first;
  logic          last;
  sym_t          nxt  [2*T];

  // on the first symbol the accumulators restart from zero
  assign first = in_valid && (in_sof || cnt == '0);
  assign last  = in_valid && ((first ? CW'(0) : cnt) == CW'(N - 1));

  for (genvar i = 0; i < 2*T; i++) begin : g_cell
    assign acc_in[i] = first ? '0 : acc[i];
    gf_mul u_mul (.a(acc_in[i]), .b(gf_pow_alpha(i + 1)), .y(prod[i]));
    assign nxt[i] = prod[i] ^ in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      syn_valid <= 1'b0;
      syn_zero  <= 1'b0;
      for (int i = 0; i < 2*T; i++) begin
        acc[i] <= '0;
        syn[i] <= '0;
      end
    end else begin
      if (syn_valid && syn_ready) syn_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < 2*T; i++) acc[i] <= nxt[i];
        cnt <= last ? '0 : (first ? CW'(1) : cnt + 1'b1);
        if (last) begin
          syn_valid <= 1'b1;
          syn_zero  <= 1'b1;
          for (int i = 0; i < 2*T; i++) begin
            syn[i] <= nxt[i];
            if (nxt[i] != '0) syn_zero <= 1'b0;
          end
        end
      end
    end
  end

  // A finished word must not overwrite a result that is still pending.
  assert property (@(posedge clk) disable iff (!rst_n)
                   last |-> (!syn_valid || syn_ready))
    else $error("rs_syndrome: syndrome result overrun");

endmodule
