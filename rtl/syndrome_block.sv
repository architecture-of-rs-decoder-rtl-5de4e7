// syndrome_block: the 2T syndrome cells (six for RS(23,17)) of the decoder.
//
// Cell i (i = 0..5) computes S_(i+1) = v(alpha^(i+1)). A symbol counter marks
// the first of the N_SYM symbols of a word and raises `load` in the clock after
// the last one has been absorbed; the output registers then take the six
// syndromes and shift them out through the chain 0 -> cell0 -> ... -> cell5 ->
// syn_out, one per clock, so S6 leaves first and S1 last (highest power of
// S(x) = S1 + S2 x + ... + S6 x^5 first). While these six values are shifted
// out, the accumulators already take the next word, so words can follow each
// other without a gap.
//
// Interface: sym_valid/sym_in carry one received symbol per clock, v_22 first.
// syn_valid marks the six clocks in which syn_out holds S6, S5, ..., S1;
// syn_first marks S6. Timing: the last symbol of a word enters at clock c,
// S6 is on syn_out at c+2 and S1 at c+7.
//
// The six cells and their output chain, read out through the last cell, follow
// the published block diagram; the symbol counter that raises `load` is this
// design's own.
module syndrome_block
  import rs_pkg::*;
#(
  parameter int unsigned N_SYM = N_CODE, // symbols per codeword
  parameter int unsigned T     = T_CORR  // correctable errors; 2T syndromes
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_valid,
  input  sym_t sym_in,
  output logic syn_valid,
  output logic syn_first,
  output sym_t syn_out
);

  logic [$clog2(N_SYM)-1:0] cnt;
  logic                     load;
  logic [2*T-1:0]         out_cnt;   // one-hot shift marker of the output chain
  sym_t                     chain [2*T+1];

  wire sym_first = (cnt == '0);
  wire sym_last  = (32'(cnt) == N_SYM - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      load    <= 1'b0;
      out_cnt <= '0;
    end else begin
      load <= sym_valid && sym_last;
      if (sym_valid) cnt <= sym_last ? '0 : cnt + 1'b1;
      out_cnt <= load ? (2*T)'(1) : (out_cnt << 1);
    end
  end

  assign chain[0] = '0;

  for (genvar i = 0; i < 2*T; i++) begin : g_cell
    syndrome_cell #(.ROOT_EXP(i + 1)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .sym_en   (sym_valid),
      .sym_first(sym_first),
      .sym_in   (sym_in),
      .load     (load),
      .s_prev   (chain[i]),
      .s_out    (chain[i+1])
    );
  end

  assign syn_out   = chain[2*T];
  assign syn_valid = |out_cnt;
  assign syn_first = out_cnt[0];

endmodule
