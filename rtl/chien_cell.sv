// chien_cell: one Chien search cell.
//
// On `load` the register takes the coefficient c_in, premultiplied by the
// constant alpha^INIT_EXP; on every other clock it multiplies its content by
// the constant alpha^STEP_EXP. For a term c*x^j of a polynomial evaluated at
// x = alpha^n, n = n0, n0+1, ..., use INIT_EXP = j*n0 and STEP_EXP = j: the
// output then is c*alpha^(j*n) on the n-th clock after load. STEP_EXP = 0 gives
// a plain hold register. The multiplexer, register and constant multiplier
// follow the document's cell; the premultiplication at the input is this
// design's way of starting the search at n0 instead of n = 0.
//
// Timing: c_out shows the loaded value one clock after load and advances one
// step per clock.
module chien_cell
  import rs_pkg::*;
#(
  parameter int unsigned STEP_EXP = 1,
  parameter int unsigned INIT_EXP = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  sym_t c_in,
  output sym_t c_out
);

  localparam sym_t STEP = gf_pow(STEP_EXP);
  localparam sym_t INIT = gf_pow(INIT_EXP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    c_out <= '0;
    else if (load) c_out <= gf_mul(c_in, INIT);
    else           c_out <= gf_mul(c_out, STEP);
  end

endmodule
