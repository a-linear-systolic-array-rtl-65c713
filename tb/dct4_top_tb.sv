// dct4_top_tb: end-to-end test of the DCT-IV processor at its default size (N = 11, g = 2).
//
// Random full-scale 16-bit blocks (plus an all-zero, an impulse and a constant block) are
// streamed in with in_valid held high, then a few more after idle gaps. Every output is
// compared with the orthonormal DCT-IV computed in floating point, the output order
// k = 0..N-1 is checked, and back-to-back blocks must leave exactly N cycles apart (the
// serial input rate). The test counts how often each mechanism of the design acted:
// collection overlapping the backward recursion, tag loads, kernel blocks starting at
// coefficient phase 0 and at a rotated phase, overlapping kernel blocks, shifting into the
// output permutation while the latch bank is read, and each of the four sign tags; one
// that never acted counts as a failure. Input stalls are counted too but are not
// required: at full input rate the chain keeps up.
module dct4_top_tb;
  import dct4_pkg::*;

  localparam int N  = N_DEFAULT;
  localparam int M  = (N - 1) / 2;
  localparam int NB = 30;
  localparam int NGAP = 24;   // blocks from here on follow idle gaps
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready, out_valid;
  logic signed [XW-1:0] in_x = '0;
  idx_t  out_k;
  word_t out_x;

  int checks = 0, failures = 0, cycle = 0;
  int xs [NB][N];
  int nout = 0;
  int first_in [NB];
  int first_out [NB];
  real max_err = 0.0;
  int n_stall = 0, n_overlap_pre = 0, n_tag = 0, n_kernel_overlap = 0, n_shift_read = 0;
  int n_phase0 = 0, n_rotated = 0;
  int n_sign [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct4_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .out_valid, .out_k, .out_x);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++)
        case (b)
          0:       xs[b][i] = 0;
          1:       xs[b][i] = (i == 3) ? 32767 : 0;
          2:       xs[b][i] = -32768;
          default: xs[b][i] = int'($urandom_range(0, 65535)) - 32768;
        endcase
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++) begin
        if (b >= NGAP && i == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          repeat ($urandom_range(1, 3 * N)) @(negedge clk);
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_x = XW'(xs[b][i]);
        while (!in_ready) @(negedge clk);
        if (i == 0) first_in[b] = cycle;
      end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // mechanism counters
  always @(negedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (dut.u_presub.b_busy && dut.u_presub.take) n_overlap_pre++;
    if (dut.u_core.u_ctrl.tc_o) n_tag++;
    if (dut.u_core.blk_start && dut.pair_sel == '0) n_phase0++;
    if (dut.u_core.blk_start && dut.pair_sel != '0) n_rotated++;
    if (dut.u_core.blk_start && dut.u_core.u_ctrl.rv[M-1]) n_kernel_overlap++;
    if (dut.t_valid && dut.n_valid) n_shift_read++;
    for (int j = 0; j < M; j++)
      if (dut.u_core.u_ctrl.rv[j]) n_sign[dut.u_core.u_ctrl.sign_o[j]]++;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
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
      check(err < 0.25, $sformatf("block %0d X(%0d) = %f, expected %f", b, k, got, ref_x));
      if (k == 0) begin
        first_out[b] = cycle;
        if (b >= 1 && b < NGAP) check(first_out[b] - first_out[b-1] == N,
            $sformatf("block %0d came %0d cycles after the previous one, expected %0d",
                      b, first_out[b] - first_out[b-1], N));
      end
      nout++;
      if (nout == NB * N) finish_test();
    end
  end

  task automatic finish_test();
    $display("blocks=%0d outputs=%0d max_abs_error=%f latency(first sample->X(0))=%0d",
             NB, nout, max_err, first_out[0] - first_in[0]);
    $display("mechanisms: input_stall=%0d collect_during_recursion=%0d tag_loads=%0d phase0_starts=%0d rotated_starts=%0d kernel_overlap=%0d shift_during_readout=%0d sign00=%0d sign01=%0d sign10=%0d sign11=%0d",
             n_stall, n_overlap_pre, n_tag, n_phase0, n_rotated, n_kernel_overlap, n_shift_read, n_sign[0], n_sign[1], n_sign[2], n_sign[3]);
    check(first_out[0] - first_in[0] == 46, "latency of the first block differs from 46 cycles");
    check(n_phase0 > 0, "no kernel block started at phase 0");
    check(n_rotated > 0, "no kernel block started at a rotated phase");
    check(n_overlap_pre > 0, "collection never overlapped the recursion");
    check(n_tag == NB, "tag loads differ from the block count");
    check(n_kernel_overlap > 0, "kernel blocks never overlapped");
    check(n_shift_read > 0, "output permutation never shifted during readout");
    for (int s = 0; s < 4; s++) check(n_sign[s] > 0, $sformatf("sign tag %0d never used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog, %0d outputs seen", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
