// syndrome_s2p: serial-to-parallel converter between the syndrome block and the
// key equation solver.
//
// The syndrome block delivers S_2T, ..., S1 (S6 .. S1 for t = 3) on 2T
// consecutive clocks. This
// converter shifts them into a register so that, one clock after S1 arrived,
// s_poly holds the syndrome polynomial with s_poly[k] = S_(k+1) (the
// coefficient of x^k) and s_valid is high for one clock. The document names the
// converter in its block diagram only; the shift register is this design's.
module syndrome_s2p
  import rs_pkg::*;
#(
  parameter int unsigned T = T_CORR   // 2T syndromes per word
) (
  input  logic clk,
  input  logic rst_n,
  input  logic syn_valid,
  input  logic syn_first,
  input  sym_t syn_in,
  output logic s_valid,
  output sym_t s_poly [2*T]
);

  sym_t                     sh [2*T];
  logic [$clog2(2*T+1)-1:0] cnt;       // syndromes received of this word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      s_valid <= 1'b0;
      for (int k = 0; k < 2*T; k++) begin
        sh[k]     <= '0;
        s_poly[k] <= '0;
      end
    end else begin
      s_valid <= 1'b0;
      if (syn_valid) begin
        // highest power first: older values move towards the top index
        for (int k = 1; k < 2*T; k++) sh[k] <= sh[k-1];
        sh[0] <= syn_in;
        cnt   <= syn_first ? ($clog2(2*T+1))'(1) : cnt + 1'b1;
        if (!syn_first && 32'(cnt) == 2*T - 1) begin
          s_valid <= 1'b1;
          for (int k = 1; k < 2*T; k++) s_poly[k] <= sh[k-1];
          s_poly[0] <= syn_in;
        end
      end
    end
  end

endmodule
