// xbar_pkg: constants and elaboration-time functions shared by the
// algebraic crossbar switches.
//
// Galois field GF(2^m) elements are held as logic vectors in which bit i is
// the coefficient of a^i (a is the root of the field polynomial F(X)). The
// customary printed form lists the coefficients a^0 first, so a^4 = 1 + a is
// printed "1100" and held as 4'b0011. A field polynomial is held as an
// integer whose bit i is the coefficient of X^i, so X^4 + X + 1 is 5'b10011.
//
// Receiver numbers follow the printed form read as an ordinary binary number
// with the a^0 coefficient as its most significant bit: a^9 = "0101" selects
// receiver 5. gf_to_index() performs that bit reversal.
//
// Hadamard code words are held as logic vectors in which bit j is the j-th
// printed column (leftmost column = bit 0). Row r (counting from 1) of the
// Sylvester-ordered matrix H(n) has a 1 in column j exactly when
// (r-1) & j has an even number of set bits; this reproduces H(8) row by row.
// -H(n) is the bitwise complement of H(n).
//
// The functions are used only to compute constants at elaboration time.
package xbar_pkg;

  // Widest field supported by the functions below.
  localparam int unsigned MAX_M = 16;
  // Widest Hadamard code word supported by the functions below.
  localparam int unsigned MAX_HN = 64;

  // Default field: GF(2^4) with F(X) = X^4 + X + 1.
  localparam int unsigned GF_M_DEFAULT    = 4;
  localparam int unsigned GF_POLY_DEFAULT = 32'h13;

  typedef logic [MAX_M-1:0]  gf_word_t;
  typedef logic [MAX_HN-1:0] hd_word_t;

  // Multiply x by a (shift up one power) and reduce modulo poly.
  function automatic gf_word_t gf_times_a(gf_word_t x, int unsigned m, int unsigned poly);
    logic [MAX_M:0] t;
    gf_word_t r;
    t = {1'b0, x} << 1;
    if (t[m]) t = t ^ (MAX_M+1)'(poly);
    r = '0;
    for (int unsigned i = 0; i < m; i++) r[i] = t[i];
    return r;
  endfunction

  // a^k for k >= 0.
  function automatic gf_word_t gf_pow(int unsigned k, int unsigned m, int unsigned poly);
    gf_word_t x;
    x = gf_word_t'(1);
    for (int unsigned i = 0; i < k; i++) x = gf_times_a(x, m, poly);
    return x;
  endfunction

  // Product of two field elements (shift-and-add reference).
  function automatic gf_word_t gf_mul_f(gf_word_t x, gf_word_t y, int unsigned m, int unsigned poly);
    gf_word_t acc, sh;
    acc = '0;
    sh  = x;
    for (int unsigned i = 0; i < m; i++) begin
      if (y[i]) acc = acc ^ sh;
      sh = gf_times_a(sh, m, poly);
    end
    return acc;
  endfunction

  // True when a has order 2^m - 1, i.e. a^1 .. a^(2^m-1) are all different.
  // Only then do distinct senders map to distinct receivers.
  function automatic bit gf_is_primitive(int unsigned m, int unsigned poly);
    gf_word_t x;
    int unsigned n;
    if (m < 2 || m > MAX_M) return 1'b0;
    if (((poly >> m) & 1) == 0) return 1'b0;
    n = (1 << m) - 1;
    x = gf_word_t'(1);
    for (int unsigned i = 1; i <= n; i++) begin
      x = gf_times_a(x, m, poly);
      if (x == gf_word_t'(1)) return (i == n);
    end
    return 1'b0;
  endfunction

  // Receiver number of an element: printed form read with a^0 as the MSB.
  function automatic int unsigned gf_to_index(gf_word_t x, int unsigned m);
    int unsigned v;
    v = 0;
    for (int unsigned i = 0; i < m; i++) v = (v << 1) | int'(x[i]);
    return v;
  endfunction

  // Element whose receiver number is idx (inverse of gf_to_index).
  function automatic gf_word_t gf_from_index(int unsigned idx, int unsigned m);
    gf_word_t x;
    x = '0;
    for (int unsigned i = 0; i < m; i++) x[i] = idx[m-1-i];
    return x;
  endfunction

  // Column j of row r (1-based) of the Sylvester Hadamard matrix H(n).
  function automatic bit hd_bit(int unsigned r, int unsigned j);
    return ~(^((r - 1) & j));
  endfunction

  // Code word of receiver r (1-based) of a Hadamard switch of order n.
  // Receivers 1..n use the rows of H(n); receivers n+1..2n-1 use rows
  // 2..n of -H(n) (the extended (2n-1)-receiver switch).
  function automatic hd_word_t hd_code(int unsigned r, int unsigned n);
    hd_word_t w;
    w = '0;
    for (int unsigned j = 0; j < n; j++) begin
      if (r <= n) w[j] = hd_bit(r, j);
      else        w[j] = ~hd_bit(r - n + 1, j);
    end
    return w;
  endfunction

endpackage
