// dct4_premult: multiplication module of the pre-processing stage.
//
// Samples x(0..N-1) of a block arrive one per accepted cycle in natural order; each is
// converted to the internal word format and multiplied by cos((2i+1) pi / (4N)), giving
// x_c(i). An internal counter supplies i, so blocks simply follow one another.
// Interface: valid/ready on both sides (ready passes back through the single output
// register). Timing: one cycle latency, one sample per cycle.
// The operation is the document's; the single registered multiplier with a
// coefficient table indexed by a counter is this design's choice.
module dct4_premult
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] in_x,
  output logic                 out_valid,
  input  logic                 out_ready,
  output word_t                out_xc,
  output idx_t                 out_idx,
  output logic                 out_last
);

  localparam coef_tab_t PRE = pre_cos_tab(N);

  idx_t  i;
  word_t xw;

  assign in_ready = !out_valid || out_ready;
  assign xw       = word_t'(in_x) <<< FB;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i         <= '0;
      out_valid <= 1'b0;
      out_xc    <= '0;
      out_idx   <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_xc   <= mul_wc(xw, PRE[i]);
        out_idx  <= i;
        out_last <= (i == idx_t'(N - 1));
        i        <= (i == idx_t'(N - 1)) ? '0 : i + 1'b1;
      end
    end
  end

endmodule
