// tb_sym_fifo: random writes and reads against a queue model at the default
// depth of 46 words: the read data, empty and full must follow the model, and
// a run that fills the FIFO completely must keep all 46 words in order. The
// overflow flag must stay low since the test never writes into a full FIFO
// without reading.
module tb_sym_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic empty, full, overflow;

  sym_fifo dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nfull = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [7:0] model [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      bit w, r;
      #1;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == 46), "full");
      check(!overflow, "overflow");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("rd_data %h exp %h", rd_data, model[0]));
      if (full) nfull++;
      // phases: fill, drain, random
      if ((i / 200) % 3 == 0)      begin w = 1; r = (model.size() == 46) && $urandom_range(0, 1); end
      else if ((i / 200) % 3 == 1) begin w = $urandom_range(0, 3) == 0; r = model.size() > 0; end
      else                         begin w = $urandom_range(0, 1) && (model.size() < 46); r = $urandom_range(0, 1) && model.size() > 0; end
      if (model.size() == 46 && !r) w = 0;
      if (model.size() == 0) r = 0;
      wr_en <= w; rd_en <= r; wr_data <= 8'($urandom);
      @(posedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(wr_data);
      wr_en <= 0; rd_en <= 0;
    end
    check(nfull > 0, "FIFO was full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
