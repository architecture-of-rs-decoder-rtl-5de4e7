// tb_chien_block: loads random error locators (words back to back and with
// gaps) and checks, on each of the 23 clocks after load, that lam_val is
// Lambda(alpha^n) and der_val is l1 + l3 alpha^(2n) for n = 233..255, with
// eval_valid high on exactly those clocks and eval_first on the first.
module tb_chien_block;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] lambda [4];
  logic eval_valid, eval_first;
  logic [7:0] lam_val, der_val;

  chien_block dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, roots = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 40; w++) begin
      poly7_t l;
      for (int k = 0; k < 7; k++) l[k] = (k < 4) ? byte_t'($urandom) : 8'h00;
      if (w % 2 == 0) begin
        // a locator with roots alpha^-p1, alpha^-p2: (1 + alpha^p1 x)(1 + alpha^p2 x)
        int p1, p2;
        p1 = $urandom_range(0, 22); p2 = (p1 + 1 + $urandom_range(0, 20)) % 23;
        l[0] = 8'h01; l[1] = rpow(p1) ^ rpow(p2); l[2] = rmul(rpow(p1), rpow(p2)); l[3] = 0;
      end
      load <= 1;
      for (int k = 0; k < 4; k++) lambda[k] <= l[k];
      @(posedge clk);
      load <= 0;
      for (int k = 0; k < 4; k++) lambda[k] <= byte_t'($urandom);
      for (int n = 233; n <= 255; n++) begin
        #1;
        check(eval_valid, "eval_valid");
        check(eval_first == (n == 233), "eval_first");
        check(lam_val == peval(l, 4, rpow(n)), $sformatf("Lambda at n=%0d", n));
        check(der_val == (l[1] ^ rmul(l[3], rpow(2 * n))), $sformatf("Lambda' at n=%0d", n));
        if (lam_val == 0) roots++;
        if (n < 255 || w % 3 != 0) @(posedge clk);
      end
      if (w % 3 != 0) begin
        #1 check(!eval_valid, "eval_valid low after 23 clocks");
        repeat (w % 4) @(posedge clk);
      end
    end
    check(roots >= 40, "roots found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
