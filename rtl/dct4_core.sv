// dct4_core: circular-correlation kernel of the DCT-IV, the tag-control unit
// (dct4_tagctrl) driving a linear array of M = (N-1)/2 PEs (dct4_array).
//
// It takes one block as M operand pairs (x_e1 = x_a(<g^j>) + x_a(<g^(j+M)>),
// x_e2 = x_a(<g^j>) - x_a(<g^(j+M)>), j = 1..M) on consecutive cycles and returns the
// N-1 values T(<g^r>), r = 1..N-1, one per cycle, from the far end of the array:
//   T(k) = sum_{i=1}^{N-1} x_a(i) cos(pi i k / N).
// The source must present pair j = pair_sel + 1 in every cycle (the order rotates with
// the coefficient phase, see dct4_tagctrl); a block that starts at phase 0 is loaded in
// the order j = 1..M.
// Latency: T(<g^1>) appears 2M-1 cycles after the first pair is accepted. Blocks are
// accepted at least MIN_GAP cycles apart: N-1 gives back-to-back blocks; the default N
// matches the serial input and the N outputs per block of the rest of the chain.
module dct4_core
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT,
  parameter int G = G_DEFAULT,
  parameter int MIN_GAP = N,
  localparam int M = (N - 1) / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  output logic  blk_start,
  output idx_t  pair_sel,   // pair index j-1 the source must present this cycle
  input  word_t in_xe1,
  input  word_t in_xe2,
  output logic  out_valid,
  output idx_t  out_r,      // T(<g^out_r>) is on out_t
  output word_t out_t
);

  coef_t c;
  logic  tc, take;
  sign_t sign [M];
  word_t xe1, xe2;

  dct4_tagctrl #(.N(N), .G(G), .MIN_GAP(MIN_GAP)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_take(take), .blk_start, .pair_sel,
    .c_o(c), .tc_o(tc), .sign_o(sign), .out_valid, .out_r
  );

  // idle slots carry zeros
  assign xe1 = take ? in_xe1 : '0;
  assign xe2 = take ? in_xe2 : '0;

  dct4_array #(.N(N)) u_array (
    .clk, .rst_n, .xe1_i(xe1), .xe2_i(xe2), .c_i(c), .tc_i(tc), .sign_i(sign), .y_o(out_t)
  );

endmodule
