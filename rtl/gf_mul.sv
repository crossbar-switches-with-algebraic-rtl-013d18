// gf_mul: combinational multiplier of two elements of GF(2^M).
//
// The structure is the two-level one of the printed GF(2^4) scheme: every
// pair of coefficients a_i, b_j meets in one AND gate (M*M gates, 16 for
// M = 4), and each product bit p_t is a modulo-2 sum (parity gate) of those
// AND outputs whose power a^(i+j), reduced modulo F(X), has a 1 at bit t.
// For M = 4 and F(X) = X^4 + X + 1 this gives exactly
//   p0 = a0b0 + a1b3 + a2b2 + a3b1
//   p1 = a0b1 + a1b0 + a1b3 + a2b2 + a2b3 + a3b2 + a3b1
//   p2 = a0b2 + a1b1 + a2b0 + a2b3 + a3b2 + a3b3
//   p3 = a0b3 + a1b2 + a2b1 + a3b0 + a3b3
// Gate count grows with M*M while the depth stays one AND plus one parity
// tree. The selection masks are computed at elaboration time from POLY, so
// any field size and polynomial can be used; an elaboration error is raised
// if F(X) is not primitive.
//
// Ports: a, b are field elements (bit i = coefficient of a^i); p = a*b.
// Purely combinational, no clock.
module gf_mul #(
  parameter int unsigned M    = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned POLY = xbar_pkg::GF_POLY_DEFAULT
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);
  import xbar_pkg::*;

  if (!gf_is_primitive(M, POLY)) begin : g_bad_poly
    $error("gf_mul: POLY is not a primitive polynomial of degree M");
  end

  // mask[t][i*M+j] = 1 when a^(i+j) has a 1 at bit t.
  typedef logic [M*M-1:0] mask_t;

  function automatic mask_t sel_mask(int unsigned t);
    mask_t mk;
    gf_word_t e;
    mk = '0;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < M; j++) begin
        e = gf_pow(i + j, M, POLY);
        mk[i*M+j] = e[t];
      end
    return mk;
  endfunction

  logic [M*M-1:0] pp;   // AND gate outputs a_i & b_j

  always_comb begin
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        pp[i*M+j] = a[i] & b[j];
  end

  for (genvar t = 0; t < int'(M); t++) begin : g_sum
    localparam mask_t MASK = sel_mask(t);
    assign p[t] = ^(pp & MASK);
  end

endmodule
