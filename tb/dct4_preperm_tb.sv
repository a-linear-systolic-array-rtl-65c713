// dct4_preperm_tb: self-checking test of the input permutation module.
//
// Blocks of distinct words are offered in parallel; the consumer takes pairs with random
// delays while a free-running counter names the pair it wants (sel, 0..M-1). Each pair
// must be (x_a(<g^j>), x_a(<g^(j+M)>)) with j = sel + 1, every block must deliver M pairs
// with the first-pair flag on the first, and x_a(0), X(0) must appear on the side outputs.
// For N = 11, g = 2 the first operand indices must be 2, 4, 8, 5, 10 as in the published
// example.
module dct4_preperm_tb;
  import dct4_pkg::*;

  localparam int N  = 11;
  localparam int G  = 2;
  localparam int M  = (N - 1) / 2;
  localparam int NB = 6;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_first;
  word_t in_xa [N];
  word_t in_x0 = '0;
  idx_t  sel = '0;
  word_t out_a, out_b, out_xa0, out_x0;
  int checks = 0, failures = 0;
  longint xa [NB][N];
  longint x0s [NB];
  int nin = 0, nblk = 0, npair = 0;
  int first_idx [5] = '{2, 4, 8, 5, 10};

  always #5 clk = ~clk;

  dct4_preperm #(.N(N), .G(G)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_xa, .in_x0,
      .out_valid, .out_ready, .sel, .out_a, .out_b, .out_first, .out_xa0, .out_x0);

  function automatic int pw(input int e);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * G) % N;
    return r;
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < N; i++) xa[b][i] = longint'(b * 1000 + i * 10 + 1) * (((i + b) % 2 == 1) ? -1 : 1);
      x0s[b] = longint'($urandom_range(0, 1 << 20));
    end
    for (int i = 0; i < N; i++) in_xa[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom_range(0, 2) != 0);
    sel = (sel == idx_t'(M - 1)) ? '0 : sel + 1'b1;
    in_valid = (nin < NB);
    if (nin < NB) begin
      for (int i = 0; i < N; i++) in_xa[i] = word_t'(xa[nin][i]);
      in_x0 = word_t'(x0s[nin]);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int j;
      j = int'(sel) + 1;
      checks += 5;
      if (longint'(out_a) != xa[nblk][pw(j)] || longint'(out_b) != xa[nblk][pw(j + M)]) begin
        failures++;
        $display("FAIL: block %0d pair %0d = (%0d, %0d)", nblk, j, out_a, out_b);
      end
      if (out_first != (npair == 0)) begin failures++; $display("FAIL: first flag at pair %0d", npair); end
      if (longint'(out_xa0) != xa[nblk][0] || longint'(out_x0) != x0s[nblk]) begin
        failures++; $display("FAIL: side values of block %0d", nblk);
      end
      if (pw(j) != first_idx[j - 1]) begin failures++; $display("FAIL: index order"); end
      if (pw(j + M) != N - pw(j)) begin failures++; $display("FAIL: partner index"); end
      npair++;
      if (npair == M) begin
        npair = 0;
        nblk++;
        if (nblk == NB) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
    if (in_valid && in_ready) nin++;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog, %0d blocks", nblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
