// dct4_pe: processing element of the circular-correlation systolic kernel.
//
// Each PE keeps one operand pair (x_i1 = sum, x_i2 = difference of two permuted
// auxiliary inputs) and adds one signed product per cycle to the partial result y that
// moves through it. The loading tag tc marks the cycle at which the pair passing on
// x_e1/x_e2 belongs to this PE: the PE then uses x_e directly and stores it in x_i.
// The 2-bit sign tag picks operand and sign:
//   sign 00: y + x1*c   01: y + x2*c   10: y - x1*c   11: y - x2*c
// where x1/x2 are x_e1/x_e2 when tc = 1 and x_i1/x_i2 when tc = 0. This operation table
// and the pass-through of x_e, c and tc follow the published PE description.
//
// Timing (this design's choice; the number of registers per PE is not given):
//   y  and tc pass through one register per PE,
//   c  and x_e1/x_e2 pass through two registers per PE.
// With these speeds a row meets, in successive PEs, successive coefficients of the cyclic
// stream in descending order, and the tag travelling with the first row of a block loads
// the last pair of the block into the first PE and the first pair into the last PE.
module dct4_pe
  import dct4_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t xe1_i,    // sum operand passing through
  input  word_t xe2_i,    // difference operand passing through
  input  coef_t c_i,      // coefficient stream
  input  logic  tc_i,     // loading tag
  input  sign_t sign_i,   // operand / sign selection for the row now in this PE
  input  word_t y_i,      // partial result in
  output word_t xe1_o,
  output word_t xe2_o,
  output coef_t c_o,
  output logic  tc_o,
  output word_t y_o       // partial result out, one cycle later
);

  word_t xi1, xi2;                 // stationary operand pair
  word_t xe1_d, xe2_d;             // first of the two x_e registers
  coef_t c_d;                      // first of the two c registers
  word_t op, prod;

  always_comb begin
    unique case ({tc_i, sign_i[0]})
      2'b00:   op = xi1;
      2'b01:   op = xi2;
      2'b10:   op = xe1_i;
      default: op = xe2_i;
    endcase
    prod = mul_wc(op, c_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xi1 <= '0; xi2 <= '0;
      xe1_d <= '0; xe2_d <= '0; xe1_o <= '0; xe2_o <= '0;
      c_d <= '0; c_o <= '0; tc_o <= 1'b0; y_o <= '0;
    end else begin
      if (tc_i) begin
        xi1 <= xe1_i;
        xi2 <= xe2_i;
      end
      y_o   <= sign_i[1] ? (y_i - prod) : (y_i + prod);
      tc_o  <= tc_i;
      xe1_d <= xe1_i;  xe1_o <= xe1_d;
      xe2_d <= xe2_i;  xe2_o <= xe2_d;
      c_d   <= c_i;    c_o   <= c_d;
    end
  end

endmodule
