// tb_syndrome_cell: checks one syndrome cell (root alpha^1) and one with root
// alpha^5. Random 23-symbol words are absorbed highest power first; after
// `load` the output register must hold sum_p v_p alpha^(j*p), computed by the
// reference arithmetic, one clock later. With load low the output register
// must copy s_prev one clock later (shift chain).
module tb_syndrome_cell;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sym_en = 0, sym_first = 0, load = 0;
  logic [7:0] sym_in = 0, s_prev = 0;
  logic [7:0] s1, s5;

  syndrome_cell #(.ROOT_EXP(1)) dut1 (.clk, .rst_n, .sym_en, .sym_first, .sym_in, .load, .s_prev, .s_out(s1));
  syndrome_cell #(.ROOT_EXP(5)) dut5 (.clk, .rst_n, .sym_en, .sym_first, .sym_in, .load, .s_prev, .s_out(s5));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 50; w++) begin
      word_t r;
      synd_t s;
      foreach (r[p]) r[p] = byte_t'($urandom);
      s = syndromes(r);
      for (int p = 22; p >= 0; p--) begin
        sym_en <= 1; sym_first <= (p == 22); sym_in <= r[p];
        @(posedge clk);
      end
      sym_en <= 0; load <= 1;
      @(posedge clk);
      load <= 0; s_prev <= byte_t'($urandom);
      #1;
      check(s1 == s[0], $sformatf("S1 %h exp %h", s1, s[0]));
      check(s5 == s[4], $sformatf("S5 %h exp %h", s5, s[4]));
      @(posedge clk);
      #1;
      check(s1 == s_prev && s5 == s_prev, "shift from s_prev");
    end
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
