// forney_corrector: Forney error evaluation and error correction.
//
// Omega(x) = w0 + w1 x + ... + w(T-1) x^(T-1) is evaluated at the same points
// x = alpha^n as the Chien search, with the same kind of cells: a hold register
// for w0 and a cell of step alpha^j for each wj (for T = 3: step alpha for w1
// and alpha^2 for w2). The error value is
// Y = Omega(alpha^n) / Lambda'(alpha^n); the division is an inverse ROM lookup
// and one multiplication. Y passes an AND gate that is open only when
// Lambda(alpha^n) = 0 (an error location) and is XORed onto the received
// symbol that leaves the FIFO.
//
// Timing: load arrives together with the Chien block's load. On each of the
// following clocks the Chien block supplies Lambda(alpha^n) and
// Lambda'(alpha^n) (eval_valid). Omega(alpha^n), the zero flag of
// Lambda(alpha^n) and the ROM output are registered, so one clock later the
// FIFO is popped (fifo_rd) and the corrected symbol is formed; it leaves the
// output register one clock after that with out_valid (two clocks after the
// evaluation). corr_flag marks a symbol that was changed.
//
// The cells, the inverse ROM, the NOR/register zero flag, the AND switch and the
// XOR follow the published block diagram; the output register after the XOR
// (which brings the decoder latency to 46) and corr_flag are this design's.
module forney_corrector
  import rs_pkg::*;
#(
  parameter int unsigned N_SYM = N_CODE,
  parameter int unsigned T     = T_CORR
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  sym_t omega [T],
  input  logic eval_valid,
  input  logic eval_first,
  input  sym_t lam_val,
  input  sym_t der_val,
  output logic fifo_rd,
  input  sym_t fifo_data,
  output logic out_valid,
  output logic out_first,
  output sym_t out_sym,
  output logic corr_flag
);

  localparam int unsigned N0 = 256 - N_SYM;

  sym_t wterm [T];   // wj x^j
  sym_t om_sum;

  for (genvar j = 0; j < T; j++) begin : g_w
    chien_cell #(.STEP_EXP(j), .INIT_EXP(j * N0)) u_w (.clk, .rst_n, .load, .c_in(omega[j]), .c_out(wterm[j]));
  end

  always_comb begin
    om_sum = '0;
    for (int j = 0; j < T; j++) om_sum ^= wterm[j];
  end

  sym_t om_q;      // Omega(alpha^n), one clock after evaluation
  logic zero_q;    // Lambda(alpha^n) == 0
  logic v_q, f_q;
  sym_t inv_q;     // 1 / Lambda'(alpha^n)

  inv_rom u_rom (.clk(clk), .addr(der_val), .data(inv_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      om_q   <= '0;
      zero_q <= 1'b0;
      v_q    <= 1'b0;
      f_q    <= 1'b0;
    end else begin
      om_q   <= om_sum;
      zero_q <= ~|lam_val;
      v_q    <= eval_valid;
      f_q    <= eval_first;
    end
  end

  sym_t err_val;
  assign err_val = gf_mul(om_q, inv_q) & {SYM_W{zero_q}};
  assign fifo_rd = v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_sym   <= '0;
      corr_flag <= 1'b0;
    end else begin
      out_valid <= v_q;
      out_first <= f_q;
      out_sym   <= fifo_data ^ err_val;
      corr_flag <= v_q && (err_val != '0);
    end
  end

endmodule
