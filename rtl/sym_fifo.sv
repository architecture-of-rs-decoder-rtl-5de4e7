// sym_fifo: FIFO of received symbols, a dual-port RAM with DEPTH words.
//
// The decoder needs every received symbol again when its error value is known,
// LATENCY clocks later; the FIFO holds them in the meantime. It is a circular
// buffer: one port writes at wr_ptr, the other reads at rd_ptr, and rd_data
// shows the oldest word without a clock of delay (first-word fall-through).
// Reading and writing in the same clock is allowed, also when the FIFO is full.
// DEPTH defaults to the decoder latency of 46 symbol clocks, which is exactly
// enough for back-to-back words. overflow is a sticky flag set by a write into
// a full FIFO that is not read in the same clock; the assertions flag the same
// misuse and a read of an empty FIFO in simulation. That the FIFO is a
// dual-port RAM as deep as the latency follows the published design; the
// pointer and counter organisation is this design's own.
module sym_fifo #(
  parameter int unsigned DEPTH = 46,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;

  wire do_wr = wr_en && (!full || rd_en);
  wire do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && !do_wr) overflow <= 1'b1;
    end
  end

  assign rd_data = mem[rd_ptr];
  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en))
    else $error("sym_fifo: write into a full FIFO");
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("sym_fifo: read from an empty FIFO");

endmodule
