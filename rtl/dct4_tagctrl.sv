// dct4_tagctrl: tag-control unit of the circular-correlation kernel.
//
// It produces every control stream that enters the PE array:
//   - the coefficient stream c: a free-running cycle c(g^2), c(g^3), ..., c(g^(M+1)) with
//     c(e) = cos(pi <g^e>_N / N), one entry per cycle (phase 0..M-1), so the rows of two
//     overlapping blocks always see one continuous stream;
//   - the loading tag tc, raised with the M-th operand pair of a block; travelling one
//     register per PE against two for the operands, it loads the M-th pair into PE 1, the
//     (M-1)-th into PE 2, ..., the first pair into PE M;
//   - one 2-bit sign stream per PE. Row r (output T(<g^r>), r = 1..N-1) enters PE 1 with
//     the tag and reaches PE j j-1 cycles later; its sign there is the tag of row r and the
//     pair held by PE j, read from an elaboration-time table.
//
// Phase-rotated loading: the pair presented while the coefficient phase is p must be pair
// j = p + 1 (pair_sel = p). A block that starts at phase 0 is therefore loaded in the order
// 1, 2, ..., M of the published array drawing; a block starting at phase p0 is loaded in
// rotated order and PE j then holds pair ((M - j + p0) mod M) + 1, which the sign lookup
// accounts for. This lets a block start at any cycle instead of waiting for phase 0.
// Generating the sign columns from a row counter (rather than feeding them from outside
// the array) and the rotation are this design's choices; the stream layout for phase 0
// follows the published drawing.
//
// Handshake: a block is M operand pairs on consecutive cycles. in_ready rises for the
// first pair once MIN_GAP cycles have passed since the previous block started, and stays
// high for the remaining M-1 pairs. MIN_GAP = N-1 lets blocks follow back to back.
// Output: out_valid/out_r mark the cycle at which the array output holds T(<g^r>);
// the first row of a block appears 2M-1 cycles after the block's first pair.
module dct4_tagctrl
  import dct4_pkg::*;
#(
  parameter int N = N_DEFAULT,
  parameter int G = G_DEFAULT,
  parameter int MIN_GAP = N,
  localparam int M = (N - 1) / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  output logic  in_take,        // operand pair on the inputs is consumed this cycle
  output logic  blk_start,      // first pair of a block consumed this cycle
  output idx_t  pair_sel,       // pair (0-based) that must be presented this cycle
  output coef_t c_o,
  output logic  tc_o,
  output sign_t sign_o [M],
  output logic  out_valid,
  output idx_t  out_r
);

  localparam coef_tab_t CTAB = core_cos_tab(N, G);
  localparam sign_tab_t STAB = sign_tab(N, G);

  idx_t       phase;
  logic [7:0] since;       // cycles since the last block start (saturating)
  logic       lact;        // loading the remaining pairs of a block
  logic [7:0] lcnt;        // index of the pair expected next
  logic       loading;
  logic [7:0] lpos;
  idx_t       phi_r;       // phase at which the loading block started
  idx_t       phi_now;
  logic       ract;        // rows 2..N-1 of a block entering PE 1
  idx_t       rcnt;
  idx_t       rphi;
  logic       rv [M];      // a row is in PE j+1
  idx_t       rn [M];      // its number r
  idx_t       rp [M];      // start phase of its block

  assign in_ready  = lact || since >= 8'(MIN_GAP);
  assign in_take   = in_valid && in_ready;
  assign blk_start = in_take && !lact;
  assign loading   = blk_start || lact;
  assign lpos      = lact ? lcnt : 8'd0;
  assign phi_now   = lact ? phi_r : phase;
  assign tc_o      = loading && lpos == 8'(M - 1);
  assign c_o       = CTAB[phase];
  assign pair_sel  = phase;

  // row now in PE 1: row 1 enters with the tag, the others follow on successive cycles
  assign rv[0] = tc_o || ract;
  assign rn[0] = tc_o ? idx_t'(1) : rcnt;
  assign rp[0] = tc_o ? phi_now : rphi;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      since <= 8'(MIN_GAP);
      lact  <= 1'b0;
      lcnt  <= '0;
      phi_r <= '0;
      ract  <= 1'b0;
      rcnt  <= '0;
      rphi  <= '0;
    end else begin
      phase <= (phase == idx_t'(M - 1)) ? '0 : phase + 1'b1;
      if (blk_start)                  since <= 8'd1;
      else if (since < 8'(MIN_GAP))   since <= since + 8'd1;
      if (blk_start) phi_r <= phase;
      if (loading) begin
        lact <= (lpos != 8'(M - 1));
        lcnt <= lpos + 8'd1;
      end
      if (tc_o) begin
        ract <= 1'b1;
        rcnt <= idx_t'(2);
        rphi <= phi_now;
      end else if (ract) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == idx_t'(N - 1)) ract <= 1'b0;
      end
    end
  end

  // row position skewed by one cycle per PE
  for (genvar j = 1; j < M; j++) begin : g_skew
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        rv[j] <= 1'b0;
        rn[j] <= '0;
        rp[j] <= '0;
      end else begin
        rv[j] <= rv[j-1];
        rn[j] <= rn[j-1];
        rp[j] <= rp[j-1];
      end
    end
  end

  // PE j+1 holds pair ((M - 1 - j + p0) mod M) + 1
  for (genvar j = 0; j < M; j++) begin : g_sign
    int pair;
    assign pair      = ((M - 1 - j + int'(rp[j])) % M) + 1;
    assign sign_o[j] = rv[j] ? STAB[int'(rn[j]) * SROW + pair] : 2'b00;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_r     <= '0;
    end else begin
      out_valid <= rv[M-1];
      out_r     <= rn[M-1];
    end
  end

  // a block's pairs arrive back to back
  a_pairs_contiguous: assert property (@(posedge clk) disable iff (!rst_n) lact |-> in_valid)
    else $error("dct4_tagctrl: operand pair missing inside a block");

  initial begin
    assert (N >= 5 && N < MAXN && N % 2 == 1) else $fatal(1, "dct4_tagctrl: N must be an odd prime, 5 <= N < MAXN");
    assert (MIN_GAP >= 2 * M && MIN_GAP < 256) else $fatal(1, "dct4_tagctrl: MIN_GAP out of range");
  end

endmodule
