// tb_inv_rom: reads all 256 addresses and checks that data * addr = 1 (data 0
// for address 0), one clock after the address.
module tb_inv_rom;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic [7:0] addr = 0, data;

  inv_rom dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    @(posedge clk);
    for (int a = 0; a < 256; a++) begin
      addr <= 8'(a);
      @(posedge clk);
      #1;
      checks++;
      if (a == 0 ? (data != 0) : (rmul(data, 8'(a)) != 8'h01)) begin
        failures++;
        $display("FAIL: inv(%h) = %h", a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
