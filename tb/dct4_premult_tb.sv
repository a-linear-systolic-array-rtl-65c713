// dct4_premult_tb: self-checking test of the pre-multiplication module.
//
// Random samples are offered with random gaps while the consumer applies random
// back-pressure. Each accepted output must be x(i) 2^FB cos((2i+1) pi/(4N)) within one
// rounding step, carry the right index i (counting 0..N-1 across blocks) and mark i = N-1
// as the last sample. No sample may be lost or duplicated.
module dct4_premult_tb;
  import dct4_pkg::*;

  localparam int N = 11;
  localparam int NS = 5 * N;
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_last;
  logic signed [XW-1:0] in_x = '0;
  word_t out_xc;
  idx_t  out_idx;
  int checks = 0, failures = 0;
  int xs [NS];
  int nin = 0, nout = 0, n_bp = 0;

  always #5 clk = ~clk;

  dct4_premult #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .out_valid, .out_ready,
                             .out_xc, .out_idx, .out_last);

  initial begin
    for (int s = 0; s < NS; s++) xs[s] = int'($urandom_range(0, 65535)) - 32768;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  // drive at negedge, observe at the following posedge
  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(0, 3) != 0);
    if (nin < NS) begin
      in_valid = ($urandom_range(0, 4) != 0);
      in_x = XW'(xs[nin]);
    end else in_valid = 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_bp++;
    if (out_valid && out_ready) begin
      int i;
      real e, err;
      i = nout % N;
      e = real'(xs[nout]) * real'(1 << FB) * $cos(PI_R * real'(2 * i + 1) / real'(4 * N));
      err = real'(out_xc) - e;
      checks += 3;
      if (err > 1.5 || err < -1.5) begin failures++; $display("FAIL: sample %0d: %0d expected %f", nout, out_xc, e); end
      if (int'(out_idx) != i) begin failures++; $display("FAIL: sample %0d index %0d", nout, out_idx); end
      if (out_last != (i == N - 1)) begin failures++; $display("FAIL: sample %0d last flag", nout); end
      nout++;
      if (nout == NS) begin
        checks++;
        if (n_bp == 0) begin failures++; $display("FAIL: back-pressure never applied"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    if (in_valid && in_ready) nin++;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog, %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
