// gf_encoder: one-hot source code to GF(2^M) element encoder (block E of
// the synchronous switch).
//
// Source k (bit k-1 of `onehot`, 1 <= k <= N) is represented by the field
// element a^(k-1). Output bit i is the OR of all sources whose element has a
// 1 at bit i, so the encoder is M OR gates (four for GF(2^4)). With no source
// active the output is the zero element. With several active the output is
// their modulo-2 sum ORed bitwise, which is meaningless; the switch that uses
// it activates at most one source at a time.
// Purely combinational.
module gf_encoder #(
  parameter int unsigned M    = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned POLY = xbar_pkg::GF_POLY_DEFAULT,
  parameter int unsigned N    = (1 << M) - 1
) (
  input  logic [N-1:0] onehot,
  output logic [M-1:0] elem
);
  import xbar_pkg::*;

  typedef logic [N-1:0] col_t;

  // members(i): the sources whose element has bit i set.
  function automatic col_t members(int unsigned i);
    col_t c;
    gf_word_t e;
    for (int unsigned k = 0; k < N; k++) begin
      e = gf_pow(k, M, POLY);
      c[k] = e[i];
    end
    return c;
  endfunction

  for (genvar i = 0; i < int'(M); i++) begin : g_or
    localparam col_t MEMBERS = members(i);
    assign elem[i] = |(onehot & MEMBERS);
  end

endmodule
