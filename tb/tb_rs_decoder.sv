// tb_rs_decoder: end-to-end test of the RS(23,17) decoder at its default size.
//
// Random 17-byte messages are encoded by the reference encoder, 0 to 3 random
// symbol errors are added (plus some words with 4 to 6 errors), and the words
// are streamed into the decoder, partly back to back and partly with gaps.
// Checks: each corrected word equals the transmitted codeword (words with at
// most 3 errors), every output symbol appears exactly 46 clocks after the
// matching input symbol, out_first marks the first symbol of each word, the
// number of corr_flag pulses equals the number of errors, and the FIFO never
// overflows. The test also counts the mechanisms of the key equation solver
// (swap step, plain update, zero-coefficient steps of R and of Q, early stop)
// and of the data flow (back-to-back words, gaps, error-free words, corrected
// symbols, decoding failures) and counts a failure for any that never
// happened. Every 50th word carries the six-error pattern
// c*(x - a^2)...(x - a^6), whose only non-zero syndrome is S1; the solver
// cannot finish it in six steps, and word_fail must be raised.
module tb_rs_decoder;
  import tb_ref_pkg::*;

  localparam int NWORDS  = 400;
  localparam int LATENCY = 46;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] in_sym = '0;
  logic       out_valid, out_first, corr_flag, word_done, word_fail, fifo_overflow;
  logic [7:0] out_sym;
  logic [2:0] stop_cell;

  rs_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(negedge clk) cyc++;

  // expected output stream
  word_t  sent   [NWORDS];
  word_t  recv   [NWORDS];
  int     nerr   [NWORDS];
  longint t_in   [NWORDS][23];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // mechanism counters
  int m_swap = 0, m_update = 0, m_zero_r = 0, m_zero_q = 0, m_early_stop = 0;
  int m_fail = 0, m_b2b = 0, m_gap = 0, m_clean = 0, m_corr = 0;
  int stop_hist [7];

  // watch the key equation cells through the hierarchy
  for (genvar i = 0; i < 6; i++) begin : g_watch
    always @(posedge clk) if (rst_n && dut.u_me.start[i]) begin
      automatic logic signed [3:0] dr = dut.u_me.st[i].dr;
      automatic logic signed [3:0] dq = dut.u_me.st[i].dq;
      automatic logic [7:0] a = (dr >= 0) ? dut.u_me.st[i].r[dr[2:0]] : 8'h00;
      automatic logic [7:0] b = (dq >= 0) ? dut.u_me.st[i].q[dq[2:0]] : 8'h00;
      if (dr >= 3) begin
        if (a == 0)       m_zero_r++;
        else if (b == 0)  m_zero_q++;
        else if (dr < dq) m_swap++;
        else              m_update++;
      end
    end
  end

  // output monitor
  int out_word = 0, out_pos = 0, corr_in_word = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      automatic int p = 22 - out_pos;
      if (out_word < NWORDS) begin
        check(out_first == (out_pos == 0), "out_first");
        check(cyc - t_in[out_word][out_pos] == LATENCY,
              $sformatf("latency %0d", cyc - t_in[out_word][out_pos]));
        if (nerr[out_word] <= 3)
          check(out_sym == sent[out_word][p],
                $sformatf("word %0d pos %0d got %h exp %h", out_word, p, out_sym, sent[out_word][p]));
        if (corr_flag) corr_in_word++;
      end
      out_pos++;
      if (out_pos == 23) begin
        if (out_word < NWORDS && nerr[out_word] <= 3)
          check(corr_in_word == nerr[out_word], $sformatf("corrections %0d exp %0d", corr_in_word, nerr[out_word]));
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
      if (nerr[done_word] <= 3) check(!word_fail, "word_fail on a correctable word");
      if (word_fail) m_fail++;
      if (nerr[done_word] == 99) check(word_fail && stop_cell == 0, "word_fail on the pattern with only S1 non-zero");
      stop_hist[stop_cell > 6 ? 0 : stop_cell]++;
      if (nerr[done_word] == 0) m_clean++;
      if (stop_cell != 0 && stop_cell < 6) m_early_stop++;
    end
    done_word++;
  end

  initial begin
    for (int w = 0; w < NWORDS; w++) begin
      msg_t m;
      m = random_msg();
      sent[w] = encode(m);
      if (w % 50 == 30) nerr[w] = 99;  // uncorrectable pattern, see below
      else if (w % 25 == 7) nerr[w] = $urandom_range(4, 6);
      else if (w < 8)  nerr[w] = w % 4;
      else             nerr[w] = $urandom_range(0, 3);
      if (nerr[w] == 99) begin
        word_t e;
        e = only_s1_pattern(byte_t'($urandom_range(1, 255)));
        foreach (e[p]) recv[w][p] = sent[w][p] ^ e[p];
      end else begin
        recv[w] = corrupt(sent[w], nerr[w]);
      end
    end
    // the generator polynomial printed in the standard
    begin
      gen_t g;
      g = gen_poly();
      check(g[5] == 126 && g[4] == 4 && g[3] == 158 && g[2] == 58 && g[1] == 49 && g[0] == 117,
            "generator polynomial");
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      int gap;
      for (int p = 22; p >= 0; p--) begin
        in_valid <= 1'b1;
        in_sym   <= recv[w][p];
        @(posedge clk);
        t_in[w][22 - p] = cyc;
      end
      gap = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 30) : 0;
      if (gap == 0) m_b2b++; else m_gap++;
      if (gap > 0) begin
        in_valid <= 1'b0;
        repeat (gap) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (200) @(posedge clk);
    check(out_word == NWORDS, $sformatf("words out %0d", out_word));
    $display("mechanisms: update=%0d swap=%0d zeroR=%0d zeroQ=%0d early_stop=%0d fail=%0d b2b=%0d gap=%0d clean=%0d corrected=%0d",
             m_update, m_swap, m_zero_r, m_zero_q, m_early_stop, m_fail, m_b2b, m_gap, m_clean, m_corr);
    $display("first stopping cell histogram (0 = none): %0d %0d %0d %0d %0d %0d %0d",
             stop_hist[0], stop_hist[1], stop_hist[2], stop_hist[3], stop_hist[4], stop_hist[5], stop_hist[6]);
    check(m_update > 0, "no plain update step");
    check(m_swap > 0, "no swap step");
    check(m_zero_r > 0, "no zero-R step");
    check(m_zero_q > 0, "no zero-Q step");
    check(m_early_stop > 0, "no early stop");
    check(m_b2b > 0 && m_gap > 0, "no back-to-back or gap");
    check(m_clean > 0, "no error-free word");
    check(m_fail > 0, "no decoding failure");
    check(m_corr > 0, "no correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * 60 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
