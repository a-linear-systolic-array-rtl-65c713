// dct4_postrec_tb: self-checking test of the recursive output stage.
//
// For random T(1..N-1), x_a(0) and X(0), blocks are presented in natural order N cycles
// apart. The outputs X(0..N-1) must follow X(k) = 2 [x_a(0) + 2T(k)] cos(k pi/(2N)) - X(k-1)
// (computed in floating point) within the accumulated rounding, in order k = 0..N-1 on
// consecutive cycles, X(0) two cycles after T(1); side_pop must fire once per block.
module dct4_postrec_tb;
  import dct4_pkg::*;

  localparam int N  = 11;
  localparam int NB = 6;
  localparam real PI_R = 3.14159265358979323846;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, side_pop, out_valid;
  idx_t  in_k = '0, out_k;
  word_t in_t = '0, xa0 = '0, x0 = '0, out_x;
  int checks = 0, failures = 0, cycle = 0;
  longint tv [NB][N];
  longint xa0s [NB], x0s [NB];
  int t1_cyc [NB];
  int nout = 0, npop = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct4_postrec #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_k, .in_t, .xa0, .x0, .side_pop,
                             .out_valid, .out_k, .out_x);

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int k = 1; k < N; k++) tv[b][k] = longint'($urandom_range(0, 1 << 26)) - (1 << 25);
      xa0s[b] = longint'($urandom_range(0, 1 << 26)) - (1 << 25);
      x0s[b]  = longint'($urandom_range(0, 1 << 26)) - (1 << 25);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      for (int k = 1; k < N; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_k = idx_t'(k);
        in_t = word_t'(tv[b][k]);
        xa0 = word_t'(xa0s[b]);
        x0 = word_t'(x0s[b]);
        if (k == 1) t1_cyc[b] = cycle;
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_k = '0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (side_pop) npop++;
    if (out_valid) begin
      int b, k;
      real e, err;
      b = nout / N;
      k = nout % N;
      e = real'(x0s[b]);
      for (int m = 1; m <= k; m++)
        e = 2.0 * (real'(xa0s[b]) + 2.0 * real'(tv[b][m])) * $cos(PI_R * real'(m) / real'(2 * N)) - e;
      err = real'(out_x) - e;
      checks += 2;
      if (err > 64.0 || err < -64.0) begin failures++; $display("FAIL: block %0d X(%0d) = %0d, expected %f", b, k, out_x, e); end
      if (int'(out_k) != k) begin failures++; $display("FAIL: block %0d index %0d", b, out_k); end
      if (k == 0) begin
        checks++;
        if (cycle - t1_cyc[b] != 2) begin failures++; $display("FAIL: block %0d latency %0d", b, cycle - t1_cyc[b]); end
      end
      nout++;
      if (nout == NB * N) begin
        checks++;
        if (npop != NB) begin failures++; $display("FAIL: side_pop fired %0d times", npop); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog, %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
