// hadamard_decoder: decodes an N-bit Hadamard code word to a one-hot
// receiver code, correcting errors.
//
// The code words are the rows of the Sylvester Hadamard matrix H(N) written
// with 1/0 (receivers 1..N) and, when EXT = 1, also rows 2..N of its
// complement -H(N) (receivers N+1..2N-1). All of them, and the all-zero idle
// word, are at least N/2 apart, so up to T = (N/2 - 1) / 2 wrong bits are
// corrected (T = 1 for N = 8). Output r is 1 when the input is within T bits
// of code word r. `err` flags a word that is neither within T of a code word
// nor within T of the idle word: a detected, uncorrectable error.
//
// The correction follows the published design; the separate error output
// and the XOR/ones-count implementation are this implementation's choices.
//
// Implementation: for each code word an XOR with the constant word and a
// "no more than T ones" test; for the error flag the same test against zero.
//
// Ports: code (bit j = printed column j), dst (bit r-1 = receiver r), err.
// Purely combinational.
module hadamard_decoder #(
  parameter int unsigned N   = 8,   // order of the Hadamard matrix
  parameter bit          EXT = 0,   // 1: also decode rows 2..N of -H(N)
  parameter int unsigned N_RX = EXT ? 2 * N - 1 : N
) (
  input  logic [N-1:0]    code,
  output logic [N_RX-1:0] dst,
  output logic            err
);
  import xbar_pkg::*;

  localparam int unsigned T = (N / 2 - 1) / 2;   // correctable errors

  if (N < 2 || N > MAX_HN || (N & (N - 1)) != 0) begin : g_bad_n
    $error("hadamard_decoder: N must be a power of two");
  end

  typedef logic [N-1:0] word_t;
  typedef word_t [N_RX-1:0] book_t;

  function automatic book_t code_book();
    book_t b;
    for (int unsigned r = 1; r <= N_RX; r++) b[r-1] = word_t'(hd_code(r, N));
    return b;
  endfunction

  localparam book_t BOOK = code_book();

  function automatic logic within_t(word_t diff);
    int unsigned ones;
    ones = 0;
    for (int i = 0; i < int'(N); i++) ones += int'(diff[i]);
    return ones <= T;
  endfunction

  logic idle;

  always_comb begin
    for (int r = 0; r < int'(N_RX); r++) dst[r] = within_t(code ^ BOOK[r]);
    idle = within_t(code);
    err  = ~idle & ~(|dst);
  end

endmodule
