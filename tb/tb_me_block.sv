// tb_me_block: random error patterns of 0 to 3 errors at random positions of
// a 23-symbol word give syndromes that are fed to the key equation solver, one
// word per clock in bursts. For every result the test checks, 13 clocks after
// the input: Lambda(alpha^-p) = 0 exactly at the error positions p among
// 0..22, Lambda(0) != 0, Omega(X^-1)/Lambda'(X^-1) equals the error value at
// every error position, fail is low, and stop_cell is 0 only for error-free
// words. Every 40th word instead carries the six-error pattern
// c*(x - a^2)...(x - a^6), whose only non-zero syndrome is S1: there fail must
// be high and stop_cell 0.
module tb_me_block;
  import tb_ref_pkg::*;

  localparam int NW = 600;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0;
  logic [7:0] s_poly [6];
  logic out_valid, fail;
  logic [7:0] lambda [4];
  logic [7:0] omega [3];
  logic [2:0] stop_cell;

  me_block dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  word_t  errs  [NW];
  longint t_in  [NW];
  int     ow = 0;
  int     n_by_err [4];
  int     n_fail = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    poly7_t lam, om, der;
    int ne;
    ne = 0;
    for (int k = 0; k < 7; k++) begin lam[k] = 0; om[k] = 0; der[k] = 0; end
    for (int k = 0; k < 4; k++) lam[k] = lambda[k];
    for (int k = 0; k < 3; k++) om[k] = omega[k];
    der[0] = lambda[1]; der[2] = lambda[3];
    check(cyc - t_in[ow] == 13, $sformatf("latency %0d", cyc - t_in[ow]));
    for (int p = 0; p < 23; p++) if (errs[ow][p] != 0) ne++;
    if (ne > 3) begin
      check(fail && stop_cell == 0, "fail on the pattern with only S1 non-zero");
      n_fail++;
    end else begin
    check(!fail, "fail");
    if (ne == 0) begin
      check(lam[0] == 0 && lam[1] == 0 && lam[2] == 0 && lam[3] == 0, "Lambda = 0 for an error-free word");
      check(om[0] == 0 && om[1] == 0 && om[2] == 0, "Omega = 0 for an error-free word");
    end else begin
      for (int p = 0; p < 23; p++) begin
        byte_t xi, lv;
        xi = rpow(-p);
        lv = peval(lam, 4, xi);
        if (errs[ow][p] != 0) begin
          check(lv == 0, $sformatf("word %0d: no root at error position %0d", ow, p));
          check(rmul(peval(om, 3, xi), rinv(peval(der, 3, xi))) == errs[ow][p],
                $sformatf("word %0d: error value at %0d", ow, p));
        end else begin
          check(lv != 0, $sformatf("word %0d: root at clean position %0d", ow, p));
        end
      end
    end
    if (ne > 0) check(lam[0] != 0, "Lambda(0) != 0");
    check((stop_cell == 0) == (ne == 0), $sformatf("stop_cell %0d with %0d errors", stop_cell, ne));
    n_by_err[ne]++;
    end
    ow++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < NW; w++) begin
      word_t zero, e;
      synd_t s;
      foreach (zero[p]) zero[p] = 0;
      if (w % 40 == 20) e = only_s1_pattern(byte_t'($urandom_range(1, 255)));
      else e = corrupt(zero, (w < 4) ? w : $urandom_range(0, 3));
      errs[w] = e;
      s = syndromes(e);
      s_valid <= 1;
      for (int k = 0; k < 6; k++) s_poly[k] <= s[k];
      @(posedge clk);
      t_in[w] = cyc;
      if (w % 7 == 6) begin
        s_valid <= 0;
        repeat ($urandom_range(1, 5)) @(posedge clk);
      end
    end
    s_valid <= 0;
    repeat (20) @(posedge clk);
    check(ow == NW, "all words out");
    check(n_fail > 0, "failure case");
    check(n_by_err[0] > 0 && n_by_err[1] > 0 && n_by_err[2] > 0 && n_by_err[3] > 0, "all error counts");
    $display("words by error count: %0d %0d %0d %0d", n_by_err[0], n_by_err[1], n_by_err[2], n_by_err[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW * 4 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
