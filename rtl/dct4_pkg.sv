// dct4_pkg: shared number formats, fixed-point helpers and elaboration-time tables of the
// prime-length DCT-IV processor.
//
// The transform X(k) = sqrt(2/N) * sum_i x(i) cos((2i+1)(2k+1)pi/(4N)) is split into
//   x_c(i) = x(i) cos((2i+1)alpha)                   alpha = pi/(4N)
//   x_a(N-1) = x_c(N-1),  x_a(i) = x_c(i) - x_a(i+1)
//   T(k)   = sum_{i=1}^{N-1} x_a(i) cos(pi i k / N)    (a circular correlation for prime N)
//   X(0)   = sum x_c(i),  X(k) = 2 [x_a(0) + 2 T(k)] cos(2k alpha) - X(k-1)
// With a primitive root g and M = (N-1)/2, row r of the correlation (output T(<g^r>)) and
// pair j (operands x_a(<g^j>) +/- x_a(<g^(j+M)>)) meet the coefficient c(e) = cos(pi <g^e>/N)
// with e = ((j + r - 2) mod M) + 2, under a 2-bit sign tag {sign before the bracket,
// subtraction inside the bracket}. All tables below are computed from N and g at
// elaboration time, so the design works for any odd prime N < MAXN with primitive root g.
//
// Number formats are this design's choice: samples are XW-bit signed integers, internal
// words DW-bit signed with FB fraction bits, coefficients CW-bit signed with CF fraction bits.
package dct4_pkg;

  localparam int N_DEFAULT = 11;   // transform length of the worked example
  localparam int G_DEFAULT = 2;    // primitive root of the worked example
  localparam int MAXN      = 64;   // table capacity: N must be below this

  localparam int XW = 16;          // input sample width
  localparam int DW = 36;          // internal word width
  localparam int FB = 8;           // fraction bits of internal words
  localparam int CW = 24;          // coefficient width
  localparam int CF = 22;          // coefficient fraction bits
  localparam int KW = 6;           // width of a sample / coefficient index

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic [1:0]           sign_t;   // {minus before bracket, subtract inside bracket}
  typedef logic [KW-1:0]        idx_t;

  typedef coef_t coef_tab_t [MAXN];
  typedef idx_t  idx_tab_t  [MAXN];
  localparam int SROW = MAXN / 2;  // row stride of the sign table
  typedef sign_t sign_tab_t [MAXN*SROW];  // entry [r*SROW + j]

  // ---- fixed point -------------------------------------------------------------------
  function automatic coef_t to_coef(input real v);
    return coef_t'($rtoi(v * real'(1 << CF) + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // word * coefficient, rounded to nearest, back in word format
  function automatic word_t mul_wc(input word_t a, input coef_t c);
    logic signed [DW+CW-1:0] p;
    p = (DW+CW)'(a) * (DW+CW)'(c);
    p = p + (DW+CW)'(1 << (CF - 1));
    return word_t'(p >>> CF);
  endfunction

  // ---- number theory -----------------------------------------------------------------
  function automatic int modpow(input int g, input int e, input int n);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * g) % n;
    return r;
  endfunction

  // ---- tables ------------------------------------------------------------------------
  // pre-multiplication: cos((2i+1) pi / (4N)), i = 0..N-1
  function automatic coef_tab_t pre_cos_tab(input int n);
    coef_tab_t t;
    for (int i = 0; i < MAXN; i++)
      t[i] = (i < n) ? to_coef($cos(PI * real'(2 * i + 1) / real'(4 * n))) : '0;
    return t;
  endfunction

  // post-multiplication: cos(2k pi / (4N)), k = 0..N-1
  function automatic coef_tab_t post_cos_tab(input int n);
    coef_tab_t t;
    for (int k = 0; k < MAXN; k++)
      t[k] = (k < n) ? to_coef($cos(PI * real'(2 * k) / real'(4 * n))) : '0;
    return t;
  endfunction

  // kernel coefficient stream: phase p (0..M-1) carries c(g^(p+2)) = cos(pi <g^(p+2)>_N / N)
  function automatic coef_tab_t core_cos_tab(input int n, input int g);
    coef_tab_t t;
    for (int p = 0; p < MAXN; p++)
      t[p] = (p < (n - 1) / 2) ? to_coef($cos(PI * real'(modpow(g, p + 2, n)) / real'(n))) : '0;
    return t;
  endfunction

  // sign tags: entry r*SROW + j for row r = 1..N-1 (output T(<g^r>)) and pair j = 1..M
  function automatic sign_tab_t sign_tab(input int n, input int g);
    sign_tab_t t;
    int m, k, gj, q, s, wrap;
    m = (n - 1) / 2;
    for (int i = 0; i < MAXN * SROW; i++) t[i] = 2'b00;
    for (int r = 1; r < n; r++) begin
      k = modpow(g, r, n);
      for (int j = 1; j <= m; j++) begin
        gj   = modpow(g, j, n);
        q    = (gj * k) / n;                  // cos(pi(qN+m)/N) = (-1)^q cos(pi m/N)
        s    = (j + r) % (n - 1);             // exponent of the reduced index
        wrap = (s >= 2 && s <= m + 1) ? 0 : 1; // outside g^2..g^(M+1): use N - index, flip sign
        t[r * SROW + j] = {1'((q + wrap) & 1), 1'(k & 1)};
      end
    end
    return t;
  endfunction

  // discrete logarithm: dlog[k] = r in 1..N-1 with <g^r>_N = k
  function automatic idx_tab_t dlog_tab(input int n, input int g);
    idx_tab_t t;
    for (int k = 0; k < MAXN; k++) t[k] = '0;
    for (int r = 1; r < n; r++) t[modpow(g, r, n)] = idx_t'(r);
    return t;
  endfunction

  // pair operand addresses: index <g^j>_N for j = 0..N-1
  function automatic idx_tab_t pow_tab(input int n, input int g);
    idx_tab_t t;
    for (int j = 0; j < MAXN; j++) t[j] = (j < n) ? idx_t'(modpow(g, j, n)) : '0;
    return t;
  endfunction

endpackage
