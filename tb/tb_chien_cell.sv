// tb_chien_cell: a cell with step alpha^2 and start exponent 2*233 must show
// c*alpha^(2n) for n = 233, 234, ... on the clocks after load; a cell with
// step alpha^0 must hold its value.
module tb_chien_cell;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] c_in = 0, c2, c0;

  chien_cell #(.STEP_EXP(2), .INIT_EXP(466)) dut2 (.clk, .rst_n, .load, .c_in, .c_out(c2));
  chien_cell #(.STEP_EXP(0), .INIT_EXP(0))   dut0 (.clk, .rst_n, .load, .c_in, .c_out(c0));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 20; w++) begin
      byte_t c;
      c = byte_t'($urandom);
      load <= 1; c_in <= c;
      @(posedge clk);
      load <= 0; c_in <= byte_t'($urandom);
      for (int n = 233; n <= 255; n++) begin
        #1;
        check(c2 == rmul(c, rpow(2 * n)), $sformatf("n=%0d %h exp %h", n, c2, rmul(c, rpow(2 * n))));
        check(c0 == c, "hold");
        @(posedge clk);
      end
    end
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
