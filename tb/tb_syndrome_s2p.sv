// tb_syndrome_s2p: feeds groups of six serial syndromes (highest first, with
// and without idle clocks between groups) and checks that s_poly[k] holds
// S_(k+1) with s_valid exactly one clock after the last value.
module tb_syndrome_s2p;
  import rs_pkg::*;

  logic clk = 0, rst_n = 0;
  logic syn_valid = 0, syn_first = 0;
  logic [7:0] syn_in = 0;
  logic s_valid;
  logic [7:0] s_poly [6];

  syndrome_s2p dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nvalid = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (s_valid) nvalid++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int g = 0; g < 40; g++) begin
      logic [7:0] s [6];
      foreach (s[k]) s[k] = 8'($urandom);
      for (int k = 5; k >= 0; k--) begin
        syn_valid <= 1; syn_first <= (k == 5); syn_in <= s[k];
        @(posedge clk);
        #1 check(s_valid == (k == 0), "s_valid only in the clock after S1");
      end
      syn_valid <= 0; syn_first <= 0;
      for (int k = 0; k < 6; k++) check(s_poly[k] == s[k], $sformatf("S%0d", k + 1));
      @(posedge clk);
      repeat (g % 3) @(posedge clk);
    end
    check(nvalid == 40, "one s_valid per group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
