// dct4_scale_tb: self-checking test of the sqrt(2/N) output multiplier: random words in,
// each output must equal the input times sqrt(2/N) within the coefficient rounding, one
// cycle later, with its index.
module dct4_scale_tb;
  import dct4_pkg::*;

  localparam int N = 11;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, out_valid;
  idx_t  in_k = '0, out_k;
  word_t in_x = '0, out_x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct4_scale #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_k, .in_x, .out_valid, .out_k, .out_x);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      real expect_x, err, tol;
      in_valid = ($urandom_range(0, 3) != 0);
      in_k = idx_t'($urandom_range(0, N - 1));
      in_x = word_t'($signed($urandom_range(0, 1 << 30)) - (1 << 29));
      expect_x = real'(in_x) * $sqrt(2.0 / real'(N));
      tol = 1.0 + ((in_x < 0) ? -real'(in_x) : real'(in_x)) / real'(1 << CF);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin failures++; $display("FAIL: valid t=%0d", t); end
      if (in_valid) begin
        err = real'(out_x) - expect_x;
        checks += 2;
        if (err > tol || -err > tol) begin
          failures++;
          $display("FAIL: t=%0d %0d -> %0d, expected %f", t, in_x, out_x, expect_x);
        end
        if (out_k != in_k) begin failures++; $display("FAIL: index t=%0d", t); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
