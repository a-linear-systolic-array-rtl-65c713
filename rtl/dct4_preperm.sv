// dct4_preperm: permutation module of the pre-processing stage.
//
// It latches a whole block x_a(0..N-1) (and X(0)) in parallel and then reads it in the
// order of the powers of the primitive root g: on M = (N-1)/2 consecutive accepted
// cycles it presents pairs
//   out_a = x_a(<g^j>_N),  out_b = x_a(<g^(j+M)>_N) = x_a(N - <g^j>_N),
// which the add/sub module turns into the kernel's sum and difference operands
// (for N = 11, g = 2: j = 1..5 gives (2,9), (4,7), (8,3), (5,6), (10,1)). The kernel
// names the pair it needs each cycle (sel = j-1, rotating with its coefficient phase);
// a block starting at sel = 0 goes out in the order j = 1..M. x_a(0) and X(0) are held on
// side outputs for the post-processing stage. A new block can be latched in the cycle
// the last pair is taken. The addressing is the document's; the handshake and the
// rotation are this design's own.
module dct4_preperm
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT,
  parameter int G = G_DEFAULT,
  localparam int M = (N - 1) / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_xa [N],
  input  word_t in_x0,
  output logic  out_valid,
  input  logic  out_ready,
  input  idx_t  sel,
  output word_t out_a,
  output word_t out_b,
  output logic  out_first,
  output word_t out_xa0,
  output word_t out_x0
);

  localparam idx_tab_t POW = pow_tab(N, G);
  localparam int AW = $clog2(N);     // bank address width

  word_t bank [N];
  logic  have;
  idx_t  n;             // pairs of this block already taken
  int    j;
  logic  last_take;

  assign j         = int'(sel) + 1;
  assign last_take = have && out_ready && n == idx_t'(M - 1);
  assign in_ready  = !have || last_take;
  assign out_valid = have;
  assign out_a     = bank[POW[j][AW-1:0]];
  assign out_b     = bank[POW[j + M][AW-1:0]];
  assign out_first = (n == '0);
  assign out_xa0   = bank[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have   <= 1'b0;
      n      <= '0;
      out_x0 <= '0;
      for (int i = 0; i < N; i++) bank[i] <= '0;
    end else begin
      if (have && out_ready) n <= last_take ? '0 : n + 1'b1;
      if (in_valid && in_ready) begin
        bank   <= in_xa;
        out_x0 <= in_x0;
        have   <= 1'b1;
      end else if (last_take) begin
        have <= 1'b0;
      end
    end
  end

endmodule
