// dct4_array: linear systolic array of M = (N-1)/2 processing elements (dct4_pe).
//
// All streams enter at PE 1 and travel towards PE M: the operand sum/difference pair,
// the coefficient stream c and the loading tag tc. Each PE has its own sign input.
// The partial result enters PE 1 as zero and leaves PE M after M cycles, so the array
// has I/O only at its two ends. y_o is the registered output of PE M.
module dct4_array
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT,
  localparam int M = (N - 1) / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t xe1_i,
  input  word_t xe2_i,
  input  coef_t c_i,
  input  logic  tc_i,
  input  sign_t sign_i [M],   // sign_i[0] drives PE 1
  output word_t y_o
);

  word_t xe1 [M+1];
  word_t xe2 [M+1];
  coef_t c   [M+1];
  logic  tc  [M+1];
  word_t y   [M+1];

  assign xe1[0] = xe1_i;
  assign xe2[0] = xe2_i;
  assign c[0]   = c_i;
  assign tc[0]  = tc_i;
  assign y[0]   = '0;

  for (genvar j = 0; j < M; j++) begin : g_pe
    dct4_pe u_pe (
      .clk, .rst_n,
      .xe1_i(xe1[j]), .xe2_i(xe2[j]), .c_i(c[j]), .tc_i(tc[j]), .sign_i(sign_i[j]), .y_i(y[j]),
      .xe1_o(xe1[j+1]), .xe2_o(xe2[j+1]), .c_o(c[j+1]), .tc_o(tc[j+1]), .y_o(y[j+1])
    );
  end

  assign y_o = y[M];

endmodule
