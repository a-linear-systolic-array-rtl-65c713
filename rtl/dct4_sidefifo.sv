// dct4_sidefifo: small FIFO carrying x_a(0) and X(0) of each block from the point where
// the block enters the kernel to the point where the post-processing stage uses them.
// Depth DEPTH (power of two) covers the blocks in flight between the two; a push to a
// full FIFO or a pop from an empty one is flagged by an assertion. The head is visible
// on the outputs without a read latency.
module dct4_sidefifo
  import dct4_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  word_t push_xa0,
  input  word_t push_x0,
  input  logic  pop,
  output word_t head_xa0,
  output word_t head_x0,
  output logic  empty
);

  localparam int AW = $clog2(DEPTH);

  word_t          mem_xa0 [DEPTH];
  word_t          mem_x0  [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;

  assign empty    = (cnt == '0);
  assign head_xa0 = mem_xa0[rp];
  assign head_x0  = mem_x0[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem_xa0[i] <= '0;
        mem_x0[i]  <= '0;
      end
    end else begin
      if (push) begin
        mem_xa0[wp] <= push_xa0;
        mem_x0[wp]  <= push_x0;
        wp <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> (cnt < (AW+1)'(DEPTH) || pop))
    else $error("dct4_sidefifo: overflow");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("dct4_sidefifo: underflow");

endmodule
