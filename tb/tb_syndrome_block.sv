// tb_syndrome_block: streams random words (back to back and with gaps) into
// the syndrome block and checks that S6, S5, ..., S1 come out serially on six
// consecutive clocks, the first of them two clocks after the last symbol,
// with the values of the reference syndrome computation.
module tb_syndrome_block;
  import tb_ref_pkg::*;

  localparam int NW = 60;
  logic clk = 0, rst_n = 0;
  logic sym_valid = 0;
  logic [7:0] sym_in = 0;
  logic syn_valid, syn_first;
  logic [7:0] syn_out;

  syndrome_block dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  synd_t  exp_s [NW];
  longint t_last [NW];
  int ow = 0, oi = 0;

  always @(posedge clk) if (rst_n && syn_valid) begin
    check(syn_first == (oi == 0), "syn_first");
    if (oi == 0) check(cyc - t_last[ow] == 2, $sformatf("S6 timing %0d", cyc - t_last[ow]));
    check(syn_out == exp_s[ow][5 - oi], $sformatf("word %0d S%0d %h exp %h", ow, 6 - oi, syn_out, exp_s[ow][5 - oi]));
    oi++;
    if (oi == 6) begin oi = 0; ow++; end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < NW; w++) begin
      word_t r;
      r = corrupt(encode(random_msg()), $urandom_range(0, 3));
      exp_s[w] = syndromes(r);
      for (int p = 22; p >= 0; p--) begin
        sym_valid <= 1; sym_in <= r[p];
        @(posedge clk);
      end
      t_last[w] = cyc;
      if (w % 3 == 1) begin
        sym_valid <= 0;
        repeat ($urandom_range(1, 9)) @(posedge clk);
      end
    end
    sym_valid <= 0;
    repeat (20) @(posedge clk);
    check(ow == NW, "all syndromes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW * 40 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
