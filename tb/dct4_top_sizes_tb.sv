// dct4_top_sizes_tb: size sweep of the DCT-IV processor.
//
// The tables of the processor (cosines, sign tags, permutations, discrete logarithm) are
// all derived from the transform length N and the primitive root g at elaboration. This
// test runs the complete processor at N = 5, 7, 13, 17 and 31 (with g = 2, 3, 2, 3, 3),
// one dct4_top_run instance per size in parallel, and checks every output value, the
// output order and the block spacing of N cycles. The default size N = 11 is covered by
// dct4_top_tb. A watchdog ends the run if any instance stalls.
module dct4_top_sizes_tb;
  localparam int NS = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [NS];
  int   chk [NS];
  int   fail [NS];

  always #5 clk = ~clk;

  dct4_top_run #(.N(5),  .G(2), .NB(8)) u_n5  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  dct4_top_run #(.N(7),  .G(3), .NB(8)) u_n7  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  dct4_top_run #(.N(13), .G(2), .NB(6)) u_n13 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  dct4_top_run #(.N(17), .G(3), .NB(6)) u_n17 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  dct4_top_run #(.N(31), .G(3), .NB(4)) u_n31 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]));

  function automatic bit all_done();
    for (int s = 0; s < NS; s++) if (!done[s]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int total(input int v [NS]);
    int t = 0;
    for (int s = 0; s < NS; s++) t += v[s];
    return t;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog, not every size finished");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end

endmodule
