// dct4_presub: subtraction module of the pre-processing stage.
//
// It turns a block of x_c(0..N-1) into the auxiliary sequence
//   x_a(N-1) = x_c(N-1),   x_a(i) = x_c(i) - x_a(i+1),  i = N-2 .. 0,
// which runs from the last sample back to the first, so the whole block is collected
// first. Two register banks overlap the work: bank A collects the next block (and sums
// it into X(0) = sum x_c(i)) while bank B holds the current block and replaces it, one
// subtraction per cycle from i = N-2 down to 0, by x_a (x_a(N-1) = x_c(N-1) is already in
// place). When done, bank B is offered in parallel on out_xa together with X(0) until the
// permutation stage takes it.
// Timing: a block is accepted in N cycles and blocks can follow back to back; x_a is
// offered N cycles after the last sample was taken.
// The recursion is the document's; the two banks, the handshake and computing X(0) here
// (where the samples pass) are this design's choices.
module dct4_presub
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_xc,
  input  logic  in_last,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_xa [N],
  output word_t out_x0
);

  word_t bank_a [N];
  word_t bank_b [N];
  idx_t  acnt;
  localparam int AW = $clog2(N);     // bank address width
  word_t asum;
  logic  a_full;
  logic  b_busy, b_full;
  idx_t  bi;
  word_t prev;
  logic  xfer, take;

  assign xfer     = a_full && !b_busy && (!b_full || out_ready);
  assign in_ready = !a_full || xfer;
  assign take     = in_valid && in_ready;
  assign out_valid = b_full;
  assign out_xa   = bank_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acnt   <= '0;
      asum   <= '0;
      a_full <= 1'b0;
      b_busy <= 1'b0;
      b_full <= 1'b0;
      bi     <= '0;
      prev   <= '0;
      out_x0 <= '0;
      for (int i = 0; i < N; i++) begin
        bank_a[i] <= '0;
        bank_b[i] <= '0;
      end
    end else begin
      // bank A: collect
      if (xfer) begin
        bank_b <= bank_a;
        out_x0 <= asum;
        b_busy <= 1'b1;
        bi     <= idx_t'(N - 2);          // x_a(N-1) = x_c(N-1) needs no step
        prev   <= bank_a[N-1];
      end
      if (take) begin
        bank_a[acnt[AW-1:0]] <= in_xc;
        acnt <= (acnt == idx_t'(N - 1)) ? '0 : acnt + 1'b1;
      end
      if (xfer)      asum <= take ? in_xc : '0;
      else if (take) asum <= asum + in_xc;
      if (take && acnt == idx_t'(N - 1)) a_full <= 1'b1;
      else if (xfer)                     a_full <= 1'b0;
      // bank B: x_a(i) = x_c(i) - x_a(i+1), i = N-2 .. 0
      if (b_busy) begin
        bank_b[bi[AW-1:0]] <= bank_b[bi[AW-1:0]] - prev;
        prev       <= bank_b[bi[AW-1:0]] - prev;
        if (bi == '0) begin
          b_busy <= 1'b0;
          b_full <= 1'b1;
        end else begin
          bi <= bi - 1'b1;
        end
      end
      if (b_full && out_ready) b_full <= 1'b0;
    end
  end

  a_last_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      take |-> (in_last == (acnt == idx_t'(N - 1))))
    else $error("dct4_presub: block boundary marker out of step with the sample count");

endmodule
