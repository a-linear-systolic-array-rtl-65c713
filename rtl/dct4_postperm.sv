// dct4_postperm: permutation block of the post-processing stage.
//
// The kernel delivers T(<g^r>_N) for r = 1..N-1, one per cycle, in the order of the
// powers of g. They are shifted serially into an (N-1)-word shift register; in the cycle
// the last one arrives the whole register (with that word) is loaded in parallel into a
// latch bank, and a multiplexer then reads the bank in natural order, T(1), T(2), ...,
// T(N-1), one per cycle. Meanwhile the next block can already shift in, so there is no
// dead time between blocks. The multiplexer select for T(k) is the word position of
// r = log_g(k), taken from an elaboration-time discrete-logarithm table.
// Interface: in_valid/in_t from the kernel (no back-pressure); out_valid/out_k/out_t.
// Timing: T(1) appears one cycle after the last input word of the block. Blocks must be
// at least N-1 input cycles apart and the bank is emptied before the next load.
// Shift register, parallel latches and multiplexer follow the document; sizes and the
// select table are this design's.
module dct4_postperm
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT,
  parameter int G = G_DEFAULT,
  localparam int L = N - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_t,
  output logic  out_valid,
  output idx_t  out_k,
  output word_t out_t
);

  localparam idx_tab_t DLOG = dlog_tab(N, G);

  word_t sr    [L];
  word_t bank  [L];
  idx_t  scnt;
  logic  load, emit;
  idx_t  k;

  assign load = in_valid && scnt == idx_t'(L - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scnt <= '0;
      emit <= 1'b0;
      k    <= idx_t'(1);
      for (int i = 0; i < L; i++) begin
        sr[i]   <= '0;
        bank[i] <= '0;
      end
    end else begin
      if (in_valid) begin
        sr[0] <= in_t;
        for (int i = 1; i < L; i++) sr[i] <= sr[i-1];
        scnt <= load ? '0 : scnt + 1'b1;
      end
      if (load) begin
        bank[0] <= in_t;
        for (int i = 1; i < L; i++) bank[i] <= sr[i-1];
        emit <= 1'b1;
        k    <= idx_t'(1);
      end else if (emit) begin
        if (k == idx_t'(L)) emit <= 1'b0;
        k <= k + 1'b1;
      end
    end
  end

  // after the load, T(<g^r>) sits in bank[L - r]
  assign out_valid = emit;
  assign out_k     = k;
  assign out_t     = bank[L - int'(DLOG[k])];

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      load |-> (!emit || k == idx_t'(L)))
    else $error("dct4_postperm: next block loaded before the previous one was read out");

endmodule
