// rs_decoder: RS(23,17) decoder for the MB-OFDM UWB PLCP header.
//
// Received symbols stream in one per clock, highest power first (v_22 .. v_0).
// The datapath is:
//   syndrome_block  -> six syndromes, shifted out serially (S6 first)
//   syndrome_s2p    -> S(x) in parallel
//   me_block        -> modified Euclidean key equation solver, six 2-clock cells,
//                      gives Lambda(x) and Omega(x)
//   chien_block     -> Lambda(alpha^n), Lambda'(alpha^n) for n = 233..255
//   forney_corrector-> Y = Omega/Lambda' gated by Lambda = 0, XORed onto the
//                      received symbol taken from
//   sym_fifo        -> dual-port RAM FIFO as deep as the latency (46 words)
//
// Timing: the corrected symbol v_j leaves out_sym exactly N_SYM + 6T + 5 = 46 clocks
// after v_j entered in_sym, with out_valid; out_first marks v_22. Words may
// follow each other without gaps (one word every 23 clocks); gaps between
// words are allowed too. word_done pulses when a word's key equation result
// is known, with word_fail set if the word had more than t = 3 errors that the
// solver could detect (such a word leaves with only what the Chien search
// found, usually uncorrected). corr_flag marks each corrected symbol and
// stop_cell tells which ME cell first met the stop rule for the word.
//
// Parameters: N_SYM and T default to RS(23,17) with t = 3. The same blocks
// build the RS(255,239) data-field decoder (N_SYM = 255, T = 8), the extension
// the published architecture was also evaluated with; the latency is then
// N_SYM + 6T + 5 = 308 clocks and the FIFO follows it.
//
// The chain of blocks, the six two-clock ME cells, the inverse ROM, the FIFO
// sized to the latency and the latency of 46 clocks follow the published
// architecture. The streaming interface without back-pressure, the status
// outputs and the exact split of the 46 clocks between the stages are this
// design's choices.
module rs_decoder
  import rs_pkg::*;
#(
  parameter  int unsigned N_SYM      = N_CODE,          // code length (23)
  parameter  int unsigned T          = T_CORR,          // correctable errors (3)
  parameter  int unsigned FIFO_DEPTH = N_SYM + 6 * T + 5, // = latency, 46 for RS(23,17)
  localparam int unsigned CW         = $clog2(2 * T + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sym_t       in_sym,
  output logic       out_valid,
  output logic       out_first,
  output sym_t       out_sym,
  output logic       corr_flag,
  output logic       word_done,
  output logic       word_fail,
  output logic [CW-1:0] stop_cell,
  output logic       fifo_overflow
);

  logic syn_valid, syn_first;
  sym_t syn;
  syndrome_block #(.N_SYM(N_SYM), .T(T)) u_syn (
    .clk, .rst_n,
    .sym_valid(in_valid), .sym_in(in_sym),
    .syn_valid, .syn_first, .syn_out(syn)
  );

  logic s_valid;
  sym_t s_poly [2*T];
  syndrome_s2p #(.T(T)) u_s2p (
    .clk, .rst_n,
    .syn_valid, .syn_first, .syn_in(syn),
    .s_valid, .s_poly
  );

  logic me_valid;
  sym_t lambda [T+1];
  sym_t omega  [T];
  me_block #(.T(T)) u_me (
    .clk, .rst_n,
    .s_valid, .s_poly,
    .out_valid(me_valid), .lambda, .omega,
    .fail(word_fail), .stop_cell
  );
  assign word_done = me_valid;

  logic eval_valid, eval_first;
  sym_t lam_val, der_val;
  chien_block #(.N_SYM(N_SYM), .T(T)) u_chien (
    .clk, .rst_n,
    .load(me_valid), .lambda,
    .eval_valid, .eval_first, .lam_val, .der_val
  );

  logic fifo_rd;
  sym_t fifo_data;
  logic fifo_empty, fifo_full;
  sym_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(SYM_W)) u_fifo (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_data(in_sym),
    .rd_en(fifo_rd), .rd_data(fifo_data),
    .empty(fifo_empty), .full(fifo_full), .overflow(fifo_overflow)
  );

  forney_corrector #(.N_SYM(N_SYM), .T(T)) u_forney (
    .clk, .rst_n,
    .load(me_valid), .omega,
    .eval_valid, .eval_first, .lam_val, .der_val,
    .fifo_rd, .fifo_data,
    .out_valid, .out_first, .out_sym, .corr_flag
  );

endmodule
