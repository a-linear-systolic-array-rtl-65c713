// dct4_addsub: addition/subtraction module of the pre-processing stage.
//
// It forms the two operand channels of the kernel from one permuted pair:
//   xe1 = a + b (used when the sign tag asks for addition inside the bracket),
//   xe2 = a - b (used when it asks for subtraction).
// Purely combinational, so the kernel's ready reaches the permutation stage in the same
// cycle; both channels enter the first PE side by side as in the published array.
module dct4_addsub
  import dct4_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t xe1,
  output word_t xe2
);

  assign xe1 = a + b;
  assign xe2 = a - b;

endmodule
