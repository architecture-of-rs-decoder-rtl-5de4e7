// me_block: key equation solver, a systolic array of 2t ME cells (six for t = 3).
//
// A syndrome polynomial S(x) presented with s_valid starts the recursion with
// R = x^(2t), Q = S(x), L = 0, U = 1 and nominal degrees dR = 2t, dQ = 2t-1.
// Each me_cell performs one step in two clocks, so the array has a latency of
// 2 * N_CELL = 12 clocks and accepts a new word every clock.
//
// The control part watches the STOP signal of every cell. For each word it
// records the first cell whose output met the stop rule deg R < t (so the
// number of steps the word needed) and whether the last cell stopped at all.
// When the word leaves the last cell, the output buffer takes
// Lambda(x) = L(x) (coefficients 0..t) and Omega(x) = R(x) (coefficients
// 0..t-1), so the key equation result appears 13 clocks after s_valid with
// out_valid. fail is high for a word that did not meet the stop rule after the
// last cell: more than t errors. A word whose syndromes are all zero never
// starts the recursion (L stays zero); it is error-free and not a failure.
//
// Six cells of two clocks each, the control watching the STOP signals and the
// output buffer follow the published design. Taking all coefficients in
// parallel, and the stop_cell/fail bookkeeping, are this design's choices.
module me_block
  import rs_pkg::*;
#(
  parameter  int unsigned T      = T_CORR,
  parameter  int unsigned N_CELL = 2 * T,                 // one cell per step; the design uses 2t
  localparam int unsigned PL     = 2 * T + 1,
  localparam int unsigned DW     = $clog2(2 * T + 1) + 1,
  localparam int unsigned SW     = 4 * PL * SYM_W + 2 * DW,
  localparam int unsigned CW     = $clog2(N_CELL + 1)    // width of stop_cell
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  input  sym_t          s_poly [2*T],   // s_poly[k] = S_(k+1)
  output logic          out_valid,
  output sym_t          lambda [T+1],
  output sym_t          omega  [T],
  output logic          fail,
  output logic [CW-1:0] stop_cell       // 1..N_CELL: first cell whose output stopped; 0: none
);

  typedef logic [PL-1:0][SYM_W-1:0] cpoly_t;
  typedef logic signed [DW-1:0]     cdeg_t;
  typedef struct packed {
    cpoly_t r;
    cpoly_t q;
    cpoly_t l;
    cpoly_t u;
    cdeg_t  dr;
    cdeg_t  dq;
  } cstate_t;

  logic    start [N_CELL+1];
  cstate_t st    [N_CELL+1];
  logic    stop  [N_CELL+1];

  always_comb begin
    st[0]          = '0;
    st[0].r[2*T]   = 8'h01;
    for (int k = 0; k < 2 * T; k++) st[0].q[k] = s_poly[k];
    st[0].u[0]     = 8'h01;
    st[0].dr       = cdeg_t'(2 * T);
    st[0].dq       = cdeg_t'(2 * T - 1);
  end
  assign start[0] = s_valid;
  assign stop[0]  = 1'b0;

  for (genvar i = 0; i < N_CELL; i++) begin : g_pe
    logic [SW-1:0] st_out;
    me_cell #(.T(T)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_start (start[i]),
      .in_st    (SW'(st[i])),
      .out_start(start[i+1]),
      .out_st   (st_out),
      .stop_out (stop[i+1])
    );
    assign st[i+1] = cstate_t'(st_out);
  end

  // Control: a per-word record of the first stopping cell travels with the
  // word. rec[i] belongs to the word that enters cell i.
  logic [CW-1:0] rec   [N_CELL+1];
  logic [CW-1:0] rec_d [N_CELL];
  assign rec[0] = '0;
  for (genvar i = 0; i < N_CELL; i++) begin : g_ctl
    // two clocks later the record leaves with the word, updated by the STOP
    // of that cell
    logic [CW-1:0] pipe;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pipe     <= '0;
        rec_d[i] <= '0;
      end else begin
        pipe     <= rec[i];
        rec_d[i] <= pipe;
      end
    end
    assign rec[i+1] = (rec_d[i] == '0 && stop[i+1]) ? CW'(i + 1) : rec_d[i];
  end

  // Output buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fail      <= 1'b0;
      stop_cell <= '0;
      for (int k = 0; k <= T; k++) lambda[k] <= '0;
      for (int k = 0; k < T; k++)  omega[k]  <= '0;
    end else begin
      out_valid <= start[N_CELL];
      if (start[N_CELL]) begin
        fail      <= !stop[N_CELL] && (st[N_CELL].l != '0);
        stop_cell <= rec[N_CELL];
        for (int k = 0; k <= T; k++) lambda[k] <= st[N_CELL].l[k];
        for (int k = 0; k < T; k++)  omega[k]  <= st[N_CELL].r[k];
      end
    end
  end

endmodule
