// inv_rom: inverse ROM of GF(2^8) with a registered output.
//
// data = addr^-1 one clock after addr (synchronous read), with 0 mapped to 0.
// The 255 non-zero words are the inverses alpha^(255-i) of alpha^i; the table
// is computed at elaboration time from the field definition in rs_pkg, so no
// data file is needed. The published design specifies a ROM of 255 words of 8
// bits; the extra word at address 0 and the registered read are this design's
// choices.
module inv_rom
  import rs_pkg::*;
(
  input  logic clk,
  input  sym_t addr,
  output sym_t data
);

  localparam inv_table_t ROM = gf_inv_table();

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
