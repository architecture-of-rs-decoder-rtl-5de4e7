// me_cell: one processing cell of the modified Euclidean (ME) key equation
// solver, a two-stage pipeline.
//
// The cell performs one step of the recursion on the polynomials R, Q, L, U,
// whose degrees are carried as nominal degrees dR and dQ (upper bounds; the
// coefficient at the nominal degree may be zero).
//
// Stage 1, degree computation: a = R[dR], b = Q[dQ]. If dR < t the recursion has
//   stopped and everything passes. If a = 0, R is only re-labelled one degree
//   lower (dR - 1). If b = 0, likewise Q (dQ - 1). Otherwise sigma = (dR >= dQ)
//   sets the swap multiplexers: the polynomial of larger degree becomes "hi",
//   the other "lo", l = |dR - dQ|, and the two leading coefficients are
//   latched. These results are registered.
// Stage 2, processing arithmetic: new R = lead(lo)*hi + lead(hi)*x^l*lo,
//   new L likewise from the L/U pair; new Q = lo and new U = its partner; the
//   new dR is the degree of hi minus one, since the leading terms cancel.
//   The results are registered.
//
// The recursion and the stop rule (deg R < t) follow the document; the two
// zero-coefficient rules, which keep each step invertible when a leading
// coefficient is zero, are this design's reading of its "zero" signal.
//
// Timing: a word presented with in_start appears at the outputs with out_start
// two clocks later; a word can be accepted every clock. stop_out is high when
// the output state satisfies the stop condition.
//
// Interface: the state is a flat vector with the layout of a packed struct
// {R, Q, L, U, dR, dQ}, each polynomial 2T+1 coefficients (index = power of x,
// highest first in the vector) and each degree a signed DW-bit number. For
// t = 3 this is exactly rs_pkg::me_state_t.
module me_cell
  import rs_pkg::*;
#(
  parameter  int unsigned T  = T_CORR,
  localparam int unsigned PL = 2 * T + 1,              // coefficients per polynomial
  localparam int unsigned DW = $clog2(2 * T + 1) + 1,  // signed degree width
  localparam int unsigned SW = 4 * PL * SYM_W + 2 * DW // state width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_start,
  input  logic [SW-1:0] in_st,
  output logic          out_start,
  output logic [SW-1:0] out_st,
  output logic          stop_out
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

  localparam cdeg_t T_DEG = cdeg_t'(T);

  typedef struct packed {
    logic   start;
    logic   upd;      // arithmetic step (else pass through)
    cpoly_t hi;
    cpoly_t lo;
    cpoly_t hi_l;
    cpoly_t lo_l;
    sym_t   c_hi;     // multiplies hi: leading coefficient of lo
    sym_t   c_lo;     // multiplies x^l*lo: leading coefficient of hi
    logic [DW-2:0] sh; // l
    cdeg_t  dr;
    cdeg_t  dq;
  } stage1_t;

  // coefficient of x^d, zero when d is out of range
  function automatic sym_t lead(cpoly_t p, cdeg_t d);
    sym_t c;
    c = '0;
    for (int k = 0; k < PL; k++) if (int'(d) == k) c = p[k];
    return c;
  endfunction

  cstate_t in_s;
  assign in_s = cstate_t'(in_st);

  stage1_t s1_d, s1_q;

  // ---------------- stage 1: degree computation and swap ----------------
  always_comb begin
    sym_t a, b;
    logic sigma;
    a = lead(in_s.r, in_s.dr);
    b = lead(in_s.q, in_s.dq);
    sigma = (in_s.dr >= in_s.dq);

    s1_d       = '0;
    s1_d.start = in_start;
    s1_d.hi    = in_s.r;
    s1_d.lo    = in_s.q;
    s1_d.hi_l  = in_s.l;
    s1_d.lo_l  = in_s.u;
    s1_d.dr    = in_s.dr;
    s1_d.dq    = in_s.dq;

    if (in_s.dr < T_DEG) begin
      // stopped: pass
    end else if (a == '0) begin
      s1_d.dr = in_s.dr - cdeg_t'(1);
    end else if (b == '0) begin
      s1_d.dq = in_s.dq - cdeg_t'(1);
    end else begin
      s1_d.upd = 1'b1;
      if (sigma) begin
        s1_d.c_hi = b;
        s1_d.c_lo = a;
        s1_d.sh   = (DW-1)'(in_s.dr - in_s.dq);
        s1_d.dr   = in_s.dr - cdeg_t'(1);
        s1_d.dq   = in_s.dq;
      end else begin
        s1_d.hi   = in_s.q;
        s1_d.lo   = in_s.r;
        s1_d.hi_l = in_s.u;
        s1_d.lo_l = in_s.l;
        s1_d.c_hi = a;
        s1_d.c_lo = b;
        s1_d.sh   = (DW-1)'(in_s.dq - in_s.dr);
        s1_d.dr   = in_s.dq - cdeg_t'(1);
        s1_d.dq   = in_s.dr;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_q <= '0;
    else        s1_q <= s1_d;
  end

  // ---------------- stage 2: processing arithmetic ----------------
  cstate_t st2_d;

  always_comb begin
    cpoly_t xs, xsl;
    xs  = s1_q.lo   << (SYM_W * s1_q.sh);
    xsl = s1_q.lo_l << (SYM_W * s1_q.sh);
    st2_d.q  = s1_q.lo;
    st2_d.u  = s1_q.lo_l;
    st2_d.dr = s1_q.dr;
    st2_d.dq = s1_q.dq;
    if (s1_q.upd) begin
      for (int k = 0; k < PL; k++) begin
        st2_d.r[k] = gf_mul(s1_q.c_hi, s1_q.hi[k])   ^ gf_mul(s1_q.c_lo, xs[k]);
        st2_d.l[k] = gf_mul(s1_q.c_hi, s1_q.hi_l[k]) ^ gf_mul(s1_q.c_lo, xsl[k]);
      end
    end else begin
      st2_d.r = s1_q.hi;
      st2_d.l = s1_q.hi_l;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_start <= 1'b0;
      out_st    <= '0;
      stop_out  <= 1'b0;
    end else begin
      out_start <= s1_q.start;
      out_st    <= SW'(st2_d);
      stop_out  <= (s1_q.dr < T_DEG);
    end
  end

endmodule
