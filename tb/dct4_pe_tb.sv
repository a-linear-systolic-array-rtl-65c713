// dct4_pe_tb: self-checking test of one processing element.
//
// Random operands, coefficients, partial results, tags and sign codes are applied every
// cycle. A reference model of the PE (stored pair, operation table, pass-through delays:
// one cycle for y and tc, two for c and x_e) predicts every output one cycle ahead.
module dct4_pe_tb;
  import dct4_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  word_t xe1_i = '0, xe2_i = '0, y_i = '0;
  coef_t c_i = '0;
  logic  tc_i = 1'b0;
  sign_t sign_i = '0;
  word_t xe1_o, xe2_o, y_o;
  coef_t c_o;
  logic  tc_o;

  int checks = 0, failures = 0, cycle = 0;
  longint m_x1 = 0, m_x2 = 0;
  longint m_y;
  logic   m_tc;
  longint e1 [2], e2 [2], cc [2];
  int n_load = 0;

  always #5 clk = ~clk;

  dct4_pe dut (.clk, .rst_n, .xe1_i, .xe2_i, .c_i, .tc_i, .sign_i, .y_i,
               .xe1_o, .xe2_o, .c_o, .tc_o, .y_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic longint rmul(input longint a, input longint c);
    return (a * c + (longint'(1) <<< (CF - 1))) >>> CF;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    e1 = '{0, 0}; e2 = '{0, 0}; cc = '{0, 0};
    for (int t = 0; t < 400; t++) begin
      longint op, p;
      // drive
      xe1_i  = word_t'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      xe2_i  = word_t'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      y_i    = word_t'($signed($urandom_range(0, 1 << 28)) - (1 << 27));
      c_i    = coef_t'($signed($urandom_range(0, 1 << 23)) - (1 << 22));
      tc_i   = ($urandom_range(0, 3) == 0);
      sign_i = sign_t'($urandom_range(0, 3));
      // model
      if (tc_i) op = sign_i[0] ? longint'(xe2_i) : longint'(xe1_i);
      else      op = sign_i[0] ? m_x2 : m_x1;
      p   = rmul(op, longint'(c_i));
      m_y = sign_i[1] ? longint'(y_i) - p : longint'(y_i) + p;
      m_tc = tc_i;
      if (tc_i) begin
        m_x1 = longint'(xe1_i);
        m_x2 = longint'(xe2_i);
        n_load++;
      end
      @(posedge clk);
      #1;
      check(longint'(y_o) == m_y, $sformatf("t=%0d y_o=%0d expected %0d", t, y_o, m_y));
      check(tc_o == m_tc, $sformatf("t=%0d tc_o", t));
      check(longint'(xe1_o) == e1[0] && longint'(xe2_o) == e2[0], $sformatf("t=%0d x_e delay", t));
      check(longint'(c_o) == cc[0], $sformatf("t=%0d c delay", t));
      e1[1] = e1[0]; e2[1] = e2[0]; cc[1] = cc[0];
      e1[0] = longint'(xe1_i); e2[0] = longint'(xe2_i); cc[0] = longint'(c_i);
      @(negedge clk);
    end
    check(n_load > 0, "operand pair never loaded");
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
