// tb_rs255_workload: the decoder built for RS(255,239), t = 8.
//
// The same RTL as the RS(23,17) decoder, instantiated with N_SYM = 255 and
// T = 8: sixteen key equation cells, eight syndrome and Chien cells, and a
// FIFO of 255 + 6*8 + 5 = 308 words. Random 239-byte messages are encoded
// systematically with the generator (x - a)(x - a^2)...(x - a^16), which the
// test builds itself from the reference multiplier. Then 0 to 8 random symbol
// errors are added, plus some words with 9 to 16 errors whose output is not
// checked. Every 10th word, from word 14 on, carries instead the pattern
// c*(x - a^2)...(x - a^16): its only non-zero syndrome is S1, the solver cannot
// finish it in 16 steps, and word_fail must be raised with stop_cell = 0.
// The words are streamed in back to back or with gaps.
// Checks:
// - every word with at most 8 errors comes out equal to the codeword;
// - each output symbol leaves exactly 308 clocks after it entered;
// - out_first marks the first symbol of each word;
// - corr_flag pulses once per error;
// - word_fail stays low on correctable words and is raised on the S1-only
//   pattern;
// - the solver stops early (before the last cell) at least once;
// - the FIFO never overflows.
// Field products are done with log and antilog tables. The test fills the
// tables by repeated multiplication with tb_ref_pkg::rmul, not from the design.
module tb_rs255_workload;
  import tb_ref_pkg::rmul;

  localparam int N       = 255;
  localparam int TC      = 8;
  localparam int NPAR    = 2 * TC;
  localparam int K       = N - NPAR;
  localparam int NWORDS  = 40;
  localparam int LATENCY = N + 6 * TC + 5;   // 308

  typedef logic [7:0] b8_t;
  typedef b8_t cw_t [N];

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  b8_t        in_sym = '0;
  logic       out_valid, out_first, corr_flag, word_done, word_fail, fifo_overflow;
  b8_t        out_sym;
  logic [4:0] stop_cell;

  rs_decoder #(.N_SYM(N), .T(TC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // antilog / log tables
  b8_t alog [255];
  int  lg   [256];
  function automatic b8_t fmul(b8_t a, b8_t b);
    if (a == 0 || b == 0) return 8'h00;
    return alog[(lg[a] + lg[b]) % 255];
  endfunction

  b8_t gen [NPAR + 1];   // gen[k]: coefficient of x^k

  // cw[p]: coefficient of x^p; cw[N-1] is sent first
  function automatic cw_t encode(b8_t msg [K]);
    cw_t cw, rem;
    for (int p = 0; p < N; p++) rem[p] = 0;
    for (int i = 0; i < K; i++) rem[N - 1 - i] = msg[i];
    cw = rem;
    for (int i = N - 1; i >= NPAR; i--) begin
      b8_t c;
      c = rem[i];
      if (c != 0) for (int k = 0; k <= NPAR; k++) rem[i - NPAR + k] ^= fmul(c, gen[k]);
    end
    for (int p = 0; p < NPAR; p++) cw[p] = rem[p];
    return cw;
  endfunction

  cw_t    sent [NWORDS];
  cw_t    recv [NWORDS];
  int     nerr [NWORDS];
  longint t_in [NWORDS][N];

  int m_b2b = 0, m_gap = 0, m_clean = 0, m_corr = 0, m_fail = 0, m_early_stop = 0;

  int out_word = 0, out_pos = 0, corr_in_word = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      automatic int p = N - 1 - out_pos;
      if (out_word < NWORDS) begin
        check(out_first == (out_pos == 0), "out_first");
        check(cyc - t_in[out_word][out_pos] == longint'(LATENCY),
              $sformatf("latency %0d", cyc - t_in[out_word][out_pos]));
        if (nerr[out_word] <= TC)
          check(out_sym == sent[out_word][p],
                $sformatf("word %0d pos %0d got %h exp %h", out_word, p, out_sym, sent[out_word][p]));
        if (corr_flag) corr_in_word++;
      end
      out_pos++;
      if (out_pos == N) begin
        if (out_word < NWORDS && nerr[out_word] <= TC)
          check(corr_in_word == nerr[out_word],
                $sformatf("corrections %0d exp %0d", corr_in_word, nerr[out_word]));
        m_corr += corr_in_word;
        corr_in_word = 0;
        out_pos = 0;
        out_word++;
      end
    end
    check(!fifo_overflow, "fifo overflow");
  end

  int done_word = 0;
  always @(posedge clk) if (rst_n && word_done) begin
    if (done_word < NWORDS) begin
      if (nerr[done_word] <= TC) check(!word_fail, "word_fail on a correctable word");
      if (nerr[done_word] == 99) check(word_fail && stop_cell == 0, "word_fail on the pattern with only S1 non-zero");
      if (word_fail) m_fail++;
      if (nerr[done_word] == 0) m_clean++;
      if (stop_cell != 0 && 32'(stop_cell) < 2 * TC) m_early_stop++;
    end
    done_word++;
  end

  initial begin
    // tables
    alog[0] = 8'h01;
    for (int i = 1; i < 255; i++) alog[i] = rmul(alog[i-1], 8'h02);
    lg[0] = 0;
    for (int i = 0; i < 255; i++) lg[alog[i]] = i;
    // generator polynomial with roots a^1 .. a^16
    for (int k = 0; k <= NPAR; k++) gen[k] = 0;
    gen[0] = 8'h01;
    for (int i = 1; i <= NPAR; i++)
      for (int k = i; k >= 0; k--)
        gen[k] = (k > 0 ? gen[k-1] : 8'h00) ^ fmul(gen[k], alog[i]);
    // words
    for (int w = 0; w < NWORDS; w++) begin
      b8_t msg [K];
      logic [N-1:0] used;
      foreach (msg[i]) msg[i] = b8_t'($urandom);
      sent[w] = encode(msg);
      if (w % 10 == 4 && w > 10) nerr[w] = 99;
      else if (w % 10 == 9) nerr[w] = $urandom_range(TC + 1, 2 * TC);
      else if (w <= TC) nerr[w] = w;
      else              nerr[w] = $urandom_range(0, TC);
      recv[w] = sent[w];
      used = '0;
      if (nerr[w] == 99) begin
        // c * prod_{i=2..2t} (x - a^i), built up one factor at a time
        b8_t e [NPAR];
        foreach (e[k]) e[k] = 0;
        e[0] = b8_t'($urandom_range(1, 255));
        for (int i = 2; i <= NPAR; i++)
          for (int k = i - 1; k >= 0; k--)
            e[k] = (k > 0 ? e[k-1] : 8'h00) ^ fmul(e[k], alog[i]);
        foreach (e[k]) recv[w][k] ^= e[k];
      end else
      for (int e = 0; e < nerr[w]; e++) begin
        int p;
        do p = $urandom_range(0, N - 1); while (used[p]);
        used[p] = 1'b1;
        recv[w][p] ^= b8_t'($urandom_range(1, 255));
      end
    end
    // the codewords have zero syndromes S1..S16
    begin
      bit ok;
      ok = 1'b1;
      for (int j = 1; j <= NPAR; j++) begin
        b8_t s;
        s = 0;
        for (int p = 0; p < N; p++) s ^= fmul(sent[0][p], alog[(j * p) % 255]);
        if (s != 0) ok = 1'b0;
      end
      check(ok, "reference encoder");
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      int gap;
      for (int p = N - 1; p >= 0; p--) begin
        in_valid <= 1'b1;
        in_sym   <= recv[w][p];
        @(posedge clk);
        t_in[w][N - 1 - p] = cyc;
      end
      gap = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 40) : 0;
      if (gap == 0) m_b2b++; else m_gap++;
      if (gap > 0) begin
        in_valid <= 1'b0;
        repeat (gap) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 50) @(posedge clk);
    check(out_word == NWORDS, $sformatf("words out %0d", out_word));
    $display("b2b=%0d gap=%0d clean=%0d corrected=%0d fail=%0d early_stop=%0d",
             m_b2b, m_gap, m_clean, m_corr, m_fail, m_early_stop);
    check(m_b2b > 0 && m_gap > 0, "no back-to-back or gap");
    check(m_clean > 0, "no error-free word");
    check(m_corr > 0, "no correction");
    check(m_fail > 0, "no decoding failure");
    check(m_early_stop > 0, "no early stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * (N + 45) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
