// dct4_postrec: recursive output computation of the post-processing stage.
//
// From T(k) in natural order (k = 1..N-1), x_a(0) and X(0) it produces the unscaled
// DCT-IV outputs X(0), X(1), ..., X(N-1) on consecutive cycles:
//   T_C(k) = [x_a(0) + 2 T(k)] cos(2k pi / (4N))
//   X(k)   = 2 T_C(k) - X(k-1)
// Pipeline: stage 1 forms x_a(0) + 2T(k); stage 2 multiplies by the cosine; the output
// register closes the recursion on itself (it holds X(k-1) when X(k) is formed). X(0) is
// put on the output one cycle before X(1).
// Interface: in_valid/in_k/in_t (k = 1 starts a block), side inputs xa0/x0 valid for the
// whole block, side_pop pulses when the block's side values are no longer needed.
// Timing: X(0) appears two cycles after T(1) is presented; blocks must be at least N
// cycles apart (N outputs per block).
// The equations are the document's; the pipeline is this design's choice.
module dct4_postrec
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  idx_t  in_k,
  input  word_t in_t,
  input  word_t xa0,
  input  word_t x0,
  output logic  side_pop,
  output logic  out_valid,
  output idx_t  out_k,
  output word_t out_x
);

  localparam coef_tab_t POST = post_cos_tab(N);

  logic  s1_valid, s2_valid;
  idx_t  s1_k, s2_k;
  word_t s1_u, s2_tc, x0_r;

  assign side_pop = in_valid && in_k == idx_t'(N - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_k <= '0; s1_u <= '0;
      s2_valid <= 1'b0; s2_k <= '0; s2_tc <= '0;
      x0_r <= '0;
      out_valid <= 1'b0; out_k <= '0; out_x <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_k <= in_k;
        s1_u <= xa0 + (in_t <<< 1);
        if (in_k == idx_t'(1)) x0_r <= x0;
      end
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_k  <= s1_k;
        s2_tc <= mul_wc(s1_u, POST[s1_k]);
      end
      if (s1_valid && s1_k == idx_t'(1)) begin
        out_valid <= 1'b1;
        out_k     <= '0;
        out_x     <= x0_r;
      end else if (s2_valid) begin
        out_valid <= 1'b1;
        out_k     <= s2_k;
        out_x     <= (s2_tc <<< 1) - out_x;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  a_block_gap: assert property (@(posedge clk) disable iff (!rst_n)
      (s1_valid && s1_k == idx_t'(1)) |-> !s2_valid)
    else $error("dct4_postrec: blocks closer than N cycles");

endmodule
