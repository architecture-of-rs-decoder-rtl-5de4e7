// tb_forney_corrector: plays the part of the Chien block and the FIFO. After
// each load of a random Omega it supplies 23 evaluation points with random
// Lambda values (some zero) and random Lambda' values, and answers fifo_rd
// with random received symbols. Each output must appear two clocks after its
// evaluation point and equal the received symbol XOR
// Omega(alpha^n)/Lambda'(alpha^n) where Lambda(alpha^n) = 0, unchanged
// elsewhere, with corr_flag high exactly for changed symbols.
module tb_forney_corrector;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] omega [3];
  logic eval_valid = 0, eval_first = 0;
  logic [7:0] lam_val = 0, der_val = 0;
  logic fifo_rd;
  logic [7:0] fifo_data;
  logic out_valid, out_first, corr_flag;
  logic [7:0] out_sym;

  forney_corrector dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, ncorr = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  byte_t fifo_q [$];
  byte_t exp_q  [$];
  logic  expf_q [$];
  logic  expc_q [$];

  // FIFO model: fall-through data, advance on fifo_rd
  int rd_idx = 0;
  assign fifo_data = (rd_idx < fifo_q.size()) ? fifo_q[rd_idx] : 8'h00;
  always @(posedge clk) if (rst_n && fifo_rd) rd_idx <= rd_idx + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    check(exp_q.size() > 0, "unexpected output");
    if (exp_q.size() > 0) begin
      check(out_sym == exp_q[0], $sformatf("out %h exp %h", out_sym, exp_q[0]));
      check(out_first == expf_q[0], "out_first");
      check(corr_flag == expc_q[0], "corr_flag");
      void'(exp_q.pop_front()); void'(expf_q.pop_front()); void'(expc_q.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 40; w++) begin
      poly7_t om;
      for (int k = 0; k < 7; k++) om[k] = (k < 3) ? byte_t'($urandom) : 8'h00;
      load <= 1;
      for (int k = 0; k < 3; k++) omega[k] <= om[k];
      @(posedge clk);
      load <= 0;
      for (int n = 233; n <= 255; n++) begin
        byte_t lv, dv, rx, y;
        lv = ($urandom_range(0, 3) == 0) ? 8'h00 : byte_t'($urandom_range(1, 255));
        dv = byte_t'($urandom);
        rx = byte_t'($urandom);
        y  = (lv == 0) ? rmul(peval(om, 3, rpow(n)), rinv(dv)) : 8'h00;
        fifo_q.push_back(rx);
        exp_q.push_back(rx ^ y);
        expf_q.push_back(n == 233);
        expc_q.push_back(y != 0);
        if (y != 0) ncorr++;
        eval_valid <= 1; eval_first <= (n == 233); lam_val <= lv; der_val <= dv;
        @(posedge clk);
        // the output of this point is due two clocks later
      end
      eval_valid <= 0; eval_first <= 0;
      @(posedge clk);
      #1 check(exp_q.size() == 1, $sformatf("output timing: %0d pending", exp_q.size()));
      @(posedge clk);
      #1 check(exp_q.size() == 0, "all outputs seen");
    end
    check(ncorr > 0, "corrections happened");
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
