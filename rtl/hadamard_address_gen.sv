// hadamard_address_gen: receiver number to Hadamard code word.
//
// Produces the word a sender puts on its address lines to reach receiver
// `dst` of a Hadamard switch of order N: row dst of H(N) for 1..N, and for
// the extended switch (EXT = 1) row dst-N+1 of -H(N) for N+1..2N-1. dst = 0
// (or out of range) gives the all-zero word, which reaches no receiver.
// A constant look-up table built at elaboration. Combinational.
module hadamard_address_gen #(
  parameter int unsigned N    = 8,
  parameter bit          EXT  = 0,
  parameter int unsigned N_RX = EXT ? 2 * N - 1 : N,
  parameter int unsigned DW   = $clog2(N_RX + 1)    // width of dst
) (
  input  logic [DW-1:0] dst,
  output logic [N-1:0]  code
);
  import xbar_pkg::*;

  typedef logic [N-1:0] word_t;
  typedef word_t [N_RX:0] tab_t;

  function automatic tab_t code_table();
    tab_t t;
    t[0] = '0;
    for (int unsigned r = 1; r <= N_RX; r++) t[r] = word_t'(hd_code(r, N));
    return t;
  endfunction

  localparam tab_t TAB = code_table();

  always_comb begin
    if (32'(dst) <= N_RX) code = TAB[dst];
    else                  code = '0;
  end

endmodule
