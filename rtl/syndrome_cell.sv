// syndrome_cell: one cell of the syndrome calculation block.
//
// The cell evaluates the received polynomial v(x) at alpha^ROOT_EXP by Horner's
// rule while the symbols arrive highest power first: acc <- acc*alpha^ROOT_EXP
// + v_n. A constant multiplier, an adder (XOR) and the accumulator register
// follow the document's cell; the `first` input, which drops the old
// accumulator at the first symbol of a codeword, is this design's way of
// starting a new word without a reset cycle.
//
// The output register is loaded through a 2:1 multiplexer: with `load` high it
// takes the finished accumulator (select 1), otherwise it takes the output of
// the previous cell, s_prev (select 0), so the six output registers of the
// syndrome block form a shift chain.
//
// Timing: a symbol presented with sym_en is in acc one clock later. s_out
// changes one clock after load or, when load is low, one clock after s_prev.
module syndrome_cell
  import rs_pkg::*;
#(
  parameter int unsigned ROOT_EXP = 1   // this cell computes v(alpha^ROOT_EXP)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sym_en,    // absorb sym_in this cycle
  input  logic sym_first, // sym_in is the first (highest power) symbol
  input  sym_t sym_in,
  input  logic load,      // copy the accumulated syndrome to the output register
  input  sym_t s_prev,    // output of the preceding cell in the chain
  output sym_t s_out
);

  localparam sym_t ROOT = gf_pow(ROOT_EXP);

  sym_t acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      s_out <= '0;
    end else begin
      if (sym_en) acc <= (sym_first ? sym_t'('0) : gf_mul(acc, ROOT)) ^ sym_in;
      s_out <= load ? acc : s_prev;
    end
  end

endmodule
