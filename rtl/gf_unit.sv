// gf_unit: one sender unit of the one-bit crossbar switch over GF(2^M).
//
// The sender's data bit is encoded as the field element a^(SRC-1) (sender 1
// is a^0): the encoder is only wiring, the data bit driving the lines where
// that element has a 1 and the others tied to 0. The element is multiplied
// by the control element `ctrl` chosen for the wanted receiver, and the
// product, read as a binary number with its a^0 coefficient as the MSB, is
// decoded to one of N_DST receiver lines. Data bit 0 gives the zero element
// and therefore no output; ctrl = 0 disconnects the sender.
//
// Example (M = 4): sender 2 (a^1) with ctrl = a^8 gives a^9 = "0101",
// which selects receiver 5.
//
// Ports: din (data bit), ctrl (field element, bit i = coefficient of a^i),
// dst (bit r-1 = receiver r). Purely combinational: one multiplier and one
// decoder deep.
module gf_unit #(
  parameter int unsigned M     = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned POLY  = xbar_pkg::GF_POLY_DEFAULT,
  parameter int unsigned SRC   = 1,               // sender number, 1-based
  parameter int unsigned N_DST = (1 << M) - 1
) (
  input  logic             din,
  input  logic [M-1:0]     ctrl,
  output logic [N_DST-1:0] dst
);
  import xbar_pkg::*;

  localparam gf_word_t SRC_ELEM_W = gf_pow(SRC - 1, M, POLY);
  localparam logic [M-1:0] SRC_ELEM = SRC_ELEM_W[M-1:0];

  logic [M-1:0] enc;      // encoder output: a^(SRC-1) or zero
  logic [M-1:0] prod;     // multiplier output
  logic [M-1:0] rx_num;   // product as a receiver number (a^0 is the MSB)

  assign enc = {M{din}} & SRC_ELEM;

  gf_mul #(.M(M), .POLY(POLY)) u_mul (
    .a (enc),
    .b (ctrl),
    .p (prod)
  );

  always_comb begin
    for (int i = 0; i < int'(M); i++) rx_num[M-1-i] = prod[i];
  end

  bin_decoder #(.W(M), .N(N_DST)) u_dec (
    .sel (rx_num),
    .y   (dst)
  );

endmodule
