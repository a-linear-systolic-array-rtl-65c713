// dct4_addsub_tb: self-checking test of the addition/subtraction module with random and
// extreme operand pairs.
module dct4_addsub_tb;
  import dct4_pkg::*;

  word_t a, b, xe1, xe2;
  int checks = 0, failures = 0;

  dct4_addsub dut (.a, .b, .xe1, .xe2);

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint la, lb;
      la = longint'($signed($urandom_range(0, 1 << 30))) - (1 << 29);
      lb = longint'($signed($urandom_range(0, 1 << 30))) - (1 << 29);
      if (t == 0) begin la = 0; lb = 0; end
      if (t == 1) begin la = (longint'(1) << 33); lb = -(longint'(1) << 33); end
      a = word_t'(la);
      b = word_t'(lb);
      #1;
      checks += 2;
      if (longint'(xe1) != la + lb) begin failures++; $display("FAIL: %0d + %0d = %0d", la, lb, xe1); end
      if (longint'(xe2) != la - lb) begin failures++; $display("FAIL: %0d - %0d = %0d", la, lb, xe2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
