// dct4_postperm_tb: self-checking test of the output permutation block.
//
// Blocks of N-1 random words arrive in kernel order (T(<g^r>), r = 1..N-1) on consecutive
// cycles, N cycles apart, so each block shifts in while the previous one is read out.
// The outputs must be T(1), T(2), ..., T(N-1) in natural order, T(1) one cycle after the
// last word of its block.
module dct4_postperm_tb;
  import dct4_pkg::*;

  localparam int N  = 11;
  localparam int G  = 2;
  localparam int L  = N - 1;
  localparam int NB = 6;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, out_valid;
  word_t in_t = '0, out_t;
  idx_t  out_k;
  int checks = 0, failures = 0, cycle = 0;
  longint tv [NB][N];       // tv[b][k] = T(k)
  int last_in [NB];
  int nout = 0, n_overlap = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct4_postperm #(.N(N), .G(G)) dut (.clk, .rst_n, .in_valid, .in_t, .out_valid, .out_k, .out_t);

  function automatic int pw(input int e);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * G) % N;
    return r;
  endfunction

  initial begin
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N; k++) tv[b][k] = longint'($urandom_range(0, 1 << 30)) - (1 << 29);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      for (int r = 1; r <= L; r++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_t = word_t'(tv[b][pw(r)]);
        if (r == L) last_in[b] = cycle;
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (in_valid && out_valid) n_overlap++;
    if (out_valid) begin
      int b, k;
      b = nout / L;
      k = nout % L + 1;
      checks += 2;
      if (int'(out_k) != k) begin failures++; $display("FAIL: block %0d index %0d, expected %0d", b, out_k, k); end
      if (longint'(out_t) != tv[b][k]) begin failures++; $display("FAIL: block %0d T(%0d) = %0d", b, k, out_t); end
      if (k == 1) begin
        checks++;
        if (cycle - last_in[b] != 1) begin failures++; $display("FAIL: block %0d latency %0d", b, cycle - last_in[b]); end
      end
      nout++;
      if (nout == NB * L) begin
        checks++;
        if (n_overlap == 0) begin failures++; $display("FAIL: never shifted during readout"); end
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
