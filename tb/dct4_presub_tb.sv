// dct4_presub_tb: self-checking test of the subtraction module.
//
// Blocks of random x_c words are offered with random gaps and taken with random delays.
// For each block the parallel output must equal x_a computed by the backward recursion
// x_a(N-1) = x_c(N-1), x_a(i) = x_c(i) - x_a(i+1), and out_x0 the block sum, exactly.
// The test also requires that a block was collected while the previous one was being
// recursed, and that at full input rate the N+1-cycle recursion is hidden.
module dct4_presub_tb;
  import dct4_pkg::*;

  localparam int N  = 11;
  localparam int NB = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready, in_last = 1'b0, out_valid, out_ready = 1'b0;
  word_t in_xc = '0;
  word_t out_xa [N];
  word_t out_x0;
  int checks = 0, failures = 0;
  longint xc [NB][N];
  int nin = 0, nblk = 0, n_overlap = 0, n_stall_full_rate = 0;

  always #5 clk = ~clk;

  dct4_presub #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_xc, .in_last,
                            .out_valid, .out_ready, .out_xa, .out_x0);

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) xc[b][i] = longint'($urandom_range(0, 1 << 24)) - (1 << 23);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  always @(negedge clk) if (rst_n) begin
    out_ready = (nblk < 4) ? 1'b1 : ($urandom_range(0, 7) == 0);
    if (nin < NB * N) begin
      in_valid = (nin < 3 * N) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_xc    = word_t'(xc[nin / N][nin % N]);
      in_last  = (nin % N == N - 1);
    end else in_valid = 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    // a complete block not yet offered is being recursed (or waiting to be)
    if (nin < 3 * N && in_valid && !in_ready) n_stall_full_rate++;
    if (in_valid && in_ready && nin / N > nblk + int'(out_valid)) n_overlap++;
    if (out_valid && out_ready) begin
      longint a, s;
      a = 0;
      s = 0;
      for (int i = N - 1; i >= 0; i--) begin
        a = xc[nblk][i] - a;
        s += xc[nblk][i];
        checks++;
        if (longint'(out_xa[i]) != a) begin
          failures++;
          $display("FAIL: block %0d x_a(%0d) = %0d expected %0d", nblk, i, out_xa[i], a);
        end
      end
      checks++;
      if (longint'(out_x0) != s) begin failures++; $display("FAIL: block %0d X(0)", nblk); end
      nblk++;
      if (nblk == NB) begin
        checks++;
        if (n_overlap == 0) begin failures++; $display("FAIL: no collection during recursion"); end
        checks++;
        if (n_stall_full_rate != 0) begin failures++; $display("FAIL: input stalled at full rate"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    if (in_valid && in_ready) nin++;
  end

  initial begin
    #40000;
    failures++;
    $display("FAIL: watchdog, %0d blocks", nblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
