// dct4_top: prime-length type IV DCT processor built around a linear systolic array.
//
// Samples x(0..N-1) of each block enter serially (valid/ready) and the orthonormal
// DCT-IV coefficients X(0..N-1) leave serially in natural order:
//   X(k) = sqrt(2/N) sum_i x(i) cos((2i+1)(2k+1) pi / (4N)).
// Chain (all stages stream one word per cycle):
//   dct4_premult   x_c(i) = x(i) cos((2i+1) pi/(4N))
//   dct4_presub    x_a(i) = x_c(i) - x_a(i+1) (backwards), X(0) = sum x_c(i)
//   dct4_preperm   pairs x_a(<g^j>), x_a(<g^(j+M)>), j = 1..M
//   dct4_addsub    sum and difference of each pair
//   dct4_core      M-PE systolic array: T(k) = sum_i x_a(i) cos(pi i k / N), k = <g^r>
//   dct4_postperm  back to natural order k = 1..N-1
//   dct4_postrec   X(k) = 2 [x_a(0) + 2T(k)] cos(2k pi/(4N)) - X(k-1), X(0) first
//   dct4_scale     times sqrt(2/N)
// x_a(0) and X(0) ride beside the kernel in dct4_sidefifo.
// Output format: out_x is a DW-bit signed word with FB fraction bits (input samples are
// XW-bit integers). Timing for N = 11: X(0) of a block leaves 46 cycles after the
// block's first sample is accepted; at full load one block is accepted every N cycles,
// which matches one serial input and one serial output word per cycle (the kernel alone
// accepts one block every N-1 cycles, see dct4_tagctrl).
// The decomposition and the chain of stages follow the document; number formats,
// handshakes and block spacing are this design's choices.
module dct4_top
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT,
  parameter int G = G_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] in_x,
  output logic                 out_valid,
  output idx_t                 out_k,
  output word_t                out_x
);

  // pre-processing
  logic  xc_valid, xc_ready, xc_last;
  word_t xc;
  idx_t  xc_idx;
  logic  xa_valid, xa_ready;
  word_t xa [N];
  word_t x0;
  logic  pr_valid, pr_ready, pr_first;
  word_t pr_a, pr_b, pr_xa0, pr_x0;
  word_t xe1, xe2;
  // kernel
  logic  blk_start, t_valid;
  idx_t  pair_sel;
  idx_t  t_r;
  word_t t;
  // post-processing
  logic  n_valid;
  idx_t  n_k;
  word_t n_t;
  word_t side_xa0, side_x0;
  logic  side_pop, side_empty;
  logic  r_valid;
  idx_t  r_k;
  word_t r_x;

  dct4_premult #(.N(N)) u_premult (
    .clk, .rst_n, .in_valid, .in_ready, .in_x,
    .out_valid(xc_valid), .out_ready(xc_ready), .out_xc(xc), .out_idx(xc_idx), .out_last(xc_last)
  );

  dct4_presub #(.N(N)) u_presub (
    .clk, .rst_n, .in_valid(xc_valid), .in_ready(xc_ready), .in_xc(xc), .in_last(xc_last),
    .out_valid(xa_valid), .out_ready(xa_ready), .out_xa(xa), .out_x0(x0)
  );

  dct4_preperm #(.N(N), .G(G)) u_preperm (
    .clk, .rst_n, .in_valid(xa_valid), .in_ready(xa_ready), .in_xa(xa), .in_x0(x0),
    .out_valid(pr_valid), .out_ready(pr_ready), .sel(pair_sel), .out_a(pr_a), .out_b(pr_b), .out_first(pr_first),
    .out_xa0(pr_xa0), .out_x0(pr_x0)
  );

  dct4_addsub u_addsub (.a(pr_a), .b(pr_b), .xe1, .xe2);

  dct4_core #(.N(N), .G(G)) u_core (
    .clk, .rst_n, .in_valid(pr_valid), .in_ready(pr_ready), .blk_start, .pair_sel,
    .in_xe1(xe1), .in_xe2(xe2), .out_valid(t_valid), .out_r(t_r), .out_t(t)
  );

  dct4_sidefifo #(.DEPTH(4)) u_side (
    .clk, .rst_n, .push(blk_start), .push_xa0(pr_xa0), .push_x0(pr_x0),
    .pop(side_pop), .head_xa0(side_xa0), .head_x0(side_x0), .empty(side_empty)
  );

  dct4_postperm #(.N(N), .G(G)) u_postperm (
    .clk, .rst_n, .in_valid(t_valid), .in_t(t), .out_valid(n_valid), .out_k(n_k), .out_t(n_t)
  );

  dct4_postrec #(.N(N)) u_postrec (
    .clk, .rst_n, .in_valid(n_valid), .in_k(n_k), .in_t(n_t), .xa0(side_xa0), .x0(side_x0),
    .side_pop, .out_valid(r_valid), .out_k(r_k), .out_x(r_x)
  );

  dct4_scale #(.N(N)) u_scale (
    .clk, .rst_n, .in_valid(r_valid), .in_k(r_k), .in_x(r_x), .out_valid, .out_k, .out_x
  );

  // the kernel takes pairs in order; the sample index and row tags are only checked here
  a_first_pair: assert property (@(posedge clk) disable iff (!rst_n) blk_start |-> pr_first)
    else $error("dct4_top: kernel block started on a pair other than the first");
  a_last_index: assert property (@(posedge clk) disable iff (!rst_n)
                                 xc_valid |-> (xc_last == (xc_idx == idx_t'(N - 1))))
    else $error("dct4_top: block end marker not on the last sample");
  a_row_range: assert property (@(posedge clk) disable iff (!rst_n)
                                t_valid |-> (t_r >= idx_t'(1) && t_r <= idx_t'(N - 1)))
    else $error("dct4_top: kernel row number out of range");
  a_side_ready: assert property (@(posedge clk) disable iff (!rst_n) n_valid |-> !side_empty)
    else $error("dct4_top: side values missing for a block");

  initial begin
    assert (N >= 3 && N < MAXN) else $fatal(1, "dct4_top: N out of range");
  end

endmodule
