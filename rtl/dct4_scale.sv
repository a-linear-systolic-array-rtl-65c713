// dct4_scale: output scaling multiplier.
//
// The transform is computed without its normalisation factor; this stage multiplies each
// output by sqrt(2/N) (a constant rounded to the coefficient format) so that the result
// is the orthonormal DCT-IV. Registered, one value per cycle, one cycle latency; the
// index travels alongside. Placing one multiplier at the end of the chain follows the
// document.
module dct4_scale
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  idx_t  in_k,
  input  word_t in_x,
  output logic  out_valid,
  output idx_t  out_k,
  output word_t out_x
);

  localparam coef_t SCALE = to_coef($sqrt(2.0 / real'(N)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      out_x     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_k <= in_k;
        out_x <= mul_wc(in_x, SCALE);
      end
    end
  end

endmodule
