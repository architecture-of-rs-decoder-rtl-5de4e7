// chien_block: Chien search over the N_SYM positions of a shortened word.
//
// After `load`, the block evaluates the error locator
// Lambda(x) = l0 + l1 x + ... + lT x^T (T = 3: l0 + l1 x + l2 x^2 + l3 x^3) at
// x = alpha^n for
// n = 256-N_SYM, ..., 255 (233..255 for RS(23,17)), one point per clock.
// Position n belongs to received symbol v_(255-n), so the first point tests
// v_22, the first symbol received.
//
// Lambda is split into its even and odd parts. Since the derivative of an even
// power vanishes in GF(2^m), Lambda'(x) = l1 + l3 x^2 + l5 x^4 + ... and the odd
// part is x*Lambda'(x). l0 and l1 sit in hold registers; each even term lj x^j
// has a Chien cell of step alpha^j, each odd term lj (j >= 3) a cell of step
// alpha^(j-1) that forms lj x^(j-1) for Lambda'; one more cell of step alpha
// generates x itself. Lambda(alpha^n) = even part + x*Lambda'(x). For T = 3
// these are three cells: step alpha^2 for l2 x^2 and l3 x^2, and the x cell.
//
// Interface and timing: eval_valid is high on the N_SYM clocks that follow
// load, with eval_first on the first of them; lam_val and der_val are then
// Lambda(alpha^n) and Lambda'(alpha^n). A new load may arrive on the last
// evaluation clock, so words can follow each other every N_SYM clocks.
//
// The even/odd split and the three cells follow the published block diagram;
// the premultiplied start (see chien_cell) and the evaluation counter are this
// design's.
module chien_block
  import rs_pkg::*;
#(
  parameter int unsigned N_SYM = N_CODE,
  parameter int unsigned T     = T_CORR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  sym_t lambda [T+1],
  output logic eval_valid,
  output logic eval_first,
  output sym_t lam_val,
  output sym_t der_val
);

  localparam int unsigned N0 = 256 - N_SYM;  // first evaluation exponent

  sym_t term [T+1];   // term[j]: lj x^j (even j) or lj x^(j-1) (odd j)
  sym_t x_q;

  chien_cell #(.STEP_EXP(0), .INIT_EXP(0)) u_c0 (.clk, .rst_n, .load, .c_in(lambda[0]), .c_out(term[0]));
  chien_cell #(.STEP_EXP(0), .INIT_EXP(0)) u_c1 (.clk, .rst_n, .load, .c_in(lambda[1]), .c_out(term[1]));
  for (genvar j = 2; j <= T; j++) begin : g_term
    localparam int unsigned P = (j % 2 == 0) ? j : j - 1;  // power formed by the cell
    chien_cell #(.STEP_EXP(P), .INIT_EXP(P * N0)) u_c (.clk, .rst_n, .load, .c_in(lambda[j]), .c_out(term[j]));
  end
  chien_cell #(.STEP_EXP(1), .INIT_EXP(N0)) u_cx (.clk, .rst_n, .load, .c_in(8'h01), .c_out(x_q));

  always_comb begin
    sym_t even, odd_d;
    even  = '0;
    odd_d = '0;
    for (int j = 0; j <= T; j++) begin
      if (j % 2 == 0) even  ^= term[j];
      else            odd_d ^= term[j];
    end
    der_val = odd_d;
    lam_val = even ^ gf_mul(x_q, odd_d);
  end

  logic [$clog2(N_SYM+1)-1:0] left;   // evaluations still to come

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left       <= '0;
      eval_first <= 1'b0;
    end else begin
      eval_first <= load;
      if (load)            left <= ($clog2(N_SYM+1))'(N_SYM);
      else if (left != '0) left <= left - 1'b1;
    end
  end
  assign eval_valid = (left != '0);

endmodule
