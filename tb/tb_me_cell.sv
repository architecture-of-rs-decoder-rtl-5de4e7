// tb_me_cell: drives one random ME state per clock into a cell and compares
// each result, two clocks later, with a reference step written out here:
// stop when dR < 3; relabel R (dR-1) when its leading coefficient is zero;
// relabel Q (dQ-1) when its leading coefficient is zero; otherwise the
// cross-multiplied update with a swap when dR < dQ. The states include forced
// zero leading coefficients, stopped states and dQ = -1, and the test counts
// how often each case occurred.
module tb_me_cell;
  import rs_pkg::me_state_t;
  import rs_pkg::poly_t;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_start = 0, out_start, stop_out;
  me_state_t in_st, out_st;

  me_cell dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_stop = 0, n_zr = 0, n_zq = 0, n_upd = 0, n_swap = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic poly_t shl(poly_t p, int n);
    poly_t o;
    for (int k = 0; k < 7; k++) o[k] = (k - n >= 0) ? p[k - n] : 8'h00;
    return o;
  endfunction

  function automatic me_state_t ref_step(me_state_t s, output int kind);
    me_state_t o;
    byte_t a, b;
    o = s;
    a = (s.dr >= 0) ? s.r[s.dr] : 0;
    b = (s.dq >= 0) ? s.q[s.dq] : 0;
    if (s.dr < 3) kind = 0;
    else if (a == 0) begin kind = 1; o.dr = s.dr - 1; end
    else if (b == 0) begin kind = 2; o.dq = s.dq - 1; end
    else if (s.dr >= s.dq) begin
      poly_t xq, xu;
      kind = 3;
      xq = shl(s.q, s.dr - s.dq);
      xu = shl(s.u, s.dr - s.dq);
      for (int k = 0; k < 7; k++) begin
        o.r[k] = rmul(b, s.r[k]) ^ rmul(a, xq[k]);
        o.l[k] = rmul(b, s.l[k]) ^ rmul(a, xu[k]);
      end
      o.dr = s.dr - 1;
    end else begin
      poly_t xr, xl;
      kind = 4;
      xr = shl(s.r, s.dq - s.dr);
      xl = shl(s.l, s.dq - s.dr);
      for (int k = 0; k < 7; k++) begin
        o.r[k] = rmul(a, s.q[k]) ^ rmul(b, xr[k]);
        o.l[k] = rmul(a, s.u[k]) ^ rmul(b, xl[k]);
      end
      o.q = s.r; o.u = s.l;
      o.dr = s.dq - 1; o.dq = s.dr;
    end
    return o;
  endfunction

  me_state_t exp_q [$];

  always @(posedge clk) if (rst_n && out_start) begin
    me_state_t e;
    e = exp_q.pop_front();
    check(out_st == e, $sformatf("state mismatch dr %0d/%0d dq %0d/%0d", out_st.dr, e.dr, out_st.dq, e.dq));
    check(stop_out == (e.dr < 3), "stop_out");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      me_state_t s;
      int kind;
      for (int k = 0; k < 7; k++) begin
        s.r[k] = byte_t'($urandom); s.q[k] = byte_t'($urandom);
        s.l[k] = byte_t'($urandom); s.u[k] = byte_t'($urandom);
      end
      s.dr = 4'($urandom_range(0, 6));
      s.dq = 4'($urandom_range(0, 7)) - 4'sd1;
      for (int k = s.dr + 1; k < 7; k++) s.r[k] = 0;
      for (int k = s.dq + 1; k < 7; k++) if (k >= 0) s.q[k] = 0;
      if ($urandom_range(0, 5) == 0) s.r[s.dr] = 0;
      if ($urandom_range(0, 5) == 0 && s.dq >= 0) s.q[s.dq] = 0;
      exp_q.push_back(ref_step(s, kind));
      case (kind)
        0: n_stop++;
        1: n_zr++;
        2: n_zq++;
        3: n_upd++;
        default: n_swap++;
      endcase
      in_start <= 1; in_st <= s;
      @(posedge clk);
    end
    in_start <= 0;
    repeat (4) @(posedge clk);
    check(exp_q.size() == 0, "all results seen");
    check(n_stop > 0 && n_zr > 0 && n_zq > 0 && n_upd > 0 && n_swap > 0, "all cases covered");
    $display("cases: stop=%0d zeroR=%0d zeroQ=%0d update=%0d swap=%0d", n_stop, n_zr, n_zq, n_upd, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
