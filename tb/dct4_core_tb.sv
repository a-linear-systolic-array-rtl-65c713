// dct4_core_tb: self-checking test of the circular-correlation kernel (tag control + PE array).
//
// Random auxiliary blocks x_a(1..N-1) are packed into the M sum/difference pairs the
// kernel expects; in every cycle the driver presents the pair the kernel names. The first
// half of the blocks is offered back to back, the rest after random idle gaps so that
// blocks also start at nonzero coefficient phases. Each returned T(<g^r>) is compared with
// sum_i x_a(i) cos(pi i k / N) computed in floating point, the row order r = 1..N-1 is
// checked, the first result of a block must come 2M-1 cycles after its first pair, and
// with MIN_GAP = N-1 back-to-back blocks must start exactly N-1 cycles apart.
module dct4_core_tb;
  import dct4_pkg::*;

  localparam int N  = 11;
  localparam int G  = 2;
  localparam int M  = (N - 1) / 2;
  localparam int NB = 16;
  localparam real PI_R = 3.14159265358979323846;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  logic  in_ready, blk_start, out_valid;
  idx_t  pair_sel;
  word_t in_xe1 = '0, in_xe2 = '0, out_t;
  idx_t  out_r;

  int checks = 0, failures = 0, cycle = 0;
  real xa [NB][N];
  int  start_cyc [NB];
  int  nout = 0, n_rot = 0, n_zero = 0;
  bit  gap_before [NB];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct4_core #(.N(N), .G(G), .MIN_GAP(N - 1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .blk_start, .pair_sel, .in_xe1, .in_xe2, .out_valid, .out_r, .out_t
  );

  function automatic int pw(input int e);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * G) % N;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // stimulus
  initial begin
    for (int b = 0; b < NB; b++) begin
      xa[b][0] = 0.0;
      for (int i = 1; i < N; i++) xa[b][i] = real'($signed($urandom_range(0, 131072)) - 65536);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      gap_before[b] = (b >= NB / 2);
      if (gap_before[b]) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat ($urandom_range(0, 2 * M)) @(negedge clk);
      end
      for (int n = 0; n < M; n++) begin
        int j;
        @(negedge clk);
        // the first block starts at phase 0, the loading order of the published example
        if (b == 0 && n == 0) while (pair_sel != '0) @(negedge clk);
        in_valid = 1'b1;
        while (!in_ready) @(negedge clk);
        j = int'(pair_sel) + 1;
        in_xe1 = word_t'($rtoi(xa[b][pw(j)] + xa[b][pw(j + M)]));
        in_xe2 = word_t'($rtoi(xa[b][pw(j)] - xa[b][pw(j + M)]));
        if (n == 0) begin
          start_cyc[b] = cycle;
          if (pair_sel != '0) n_rot++; else n_zero++;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int b, r, k;
      real ref_t, tol;
      b = nout / (N - 1);
      r = nout % (N - 1) + 1;
      k = pw(r);
      ref_t = 0.0;
      for (int i = 1; i < N; i++) ref_t += xa[b][i] * $cos(PI_R * real'(i * k) / real'(N));
      tol = real'(M) * 2.0 + 1.0;
      check(int'(out_r) == r, $sformatf("block %0d: row %0d reported as %0d", b, r, out_r));
      check((real'(out_t) - ref_t) < tol && (ref_t - real'(out_t)) < tol,
            $sformatf("block %0d T(%0d) = %0d, expected %f", b, k, out_t, ref_t));
      if (r == 1) begin
        check(cycle - start_cyc[b] == 2 * M - 1,
              $sformatf("block %0d latency %0d, expected %0d", b, cycle - start_cyc[b], 2 * M - 1));
        if (b > 0 && !gap_before[b]) check(start_cyc[b] - start_cyc[b-1] == N - 1,
              $sformatf("block %0d started %0d cycles after the previous one", b, start_cyc[b] - start_cyc[b-1]));
      end
      nout++;
      if (nout == NB * (N - 1)) begin
        $display("blocks=%0d results=%0d phase0_starts=%0d rotated_starts=%0d", NB, nout, n_zero, n_rot);
        check(n_zero > 0, "no block started at phase 0");
        check(n_rot > 0, "no block started at a nonzero phase");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog, %0d results seen", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
