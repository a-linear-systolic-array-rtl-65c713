// dct4_top_run: one end-to-end run of the DCT-IV processor at a given size, used by the
// size sweep in dct4_top_sizes_tb.
//
// It instantiates dct4_top with parameters N and G, streams NB random full-scale blocks
// (16-bit samples) in with in_valid held high, and compares every output with the
// orthonormal DCT-IV of the block computed in floating point. It also checks the output
// order k = 0..N-1 and that consecutive blocks leave exactly N cycles apart.
// Interface: shares the clock and reset of the parent; raises done once all NB*N outputs
// have been seen, with its own check and failure counts on checks/failures.
// The tolerance grows with N (0.25 + 0.02 N input LSBs) because more rounded products
// add up in the correlation and the output recursion.
module dct4_top_run
  import dct4_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int NB = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam real PI_R = 3.14159265358979323846;

  logic in_valid = 1'b0;
  logic in_ready, out_valid;
  logic signed [XW-1:0] in_x = '0;
  idx_t  out_k;
  word_t out_x;
  int xs [NB][N];
  int nout = 0;
  int cycle = 0;
  int last_x0 = 0;
  real max_err = 0.0;

  dct4_top #(.N(N), .G(G)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .out_valid, .out_k, .out_x);

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++)
        xs[b][i] = int'($urandom_range(0, 65535)) - 32768;
    @(posedge rst_n);
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_x = XW'(xs[b][i]);
        while (!in_ready) @(negedge clk);
      end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid && !done) begin
      int b, k;
      real ref_x, err, got;
      b = nout / N;
      k = nout % N;
      ref_x = 0.0;
      for (int i = 0; i < N; i++)
        ref_x += real'(xs[b][i]) * $cos(PI_R * real'((2 * i + 1) * (2 * k + 1)) / real'(4 * N));
      ref_x = ref_x * $sqrt(2.0 / real'(N));
      got = real'(out_x) / real'(1 << FB);
      err = (got > ref_x) ? got - ref_x : ref_x - got;
      if (err > max_err) max_err = err;
      check(int'(out_k) == k, $sformatf("block %0d: output %0d tagged k=%0d", b, k, out_k));
      check(err < 0.25 + 0.02 * real'(N),
            $sformatf("block %0d X(%0d) = %f, expected %f", b, k, got, ref_x));
      if (k == 0) begin
        if (b > 0) check(cycle - last_x0 == N,
            $sformatf("block %0d came %0d cycles after the previous one", b, cycle - last_x0));
        last_x0 = cycle;
      end
      nout++;
      if (nout == NB * N) begin
        $display("N=%0d g=%0d: blocks=%0d max_abs_error=%f", N, G, NB, max_err);
        done = 1'b1;
      end
    end
  end

endmodule
