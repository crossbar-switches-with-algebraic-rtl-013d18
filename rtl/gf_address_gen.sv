// gf_address_gen: control element for a (sender, receiver) pair of the
// GF(2^M) switches; the hardware form of looking up the multiplication table.
//
// Sender s is encoded as a^(s-1) and receiver r is reached by the element
// whose printed form, read as a binary number with a^0 as the MSB, equals r.
// The control element is therefore ctrl = e(r) * a^-(s-1). The inverse powers
// a^((2^M-1-(s-1)) mod (2^M-1)) are a constant table chosen by `src`; one
// gf_mul forms the product. src = 0, src > 2^M-1 or dst = 0 give ctrl = 0,
// which connects the sender nowhere.
//
// The published design leaves this look-up to whoever drives the switch;
// building it in hardware is this implementation's choice.
//
// Ports: src (sender number, binary), dst (receiver number, binary),
// ctrl (field element). Combinational.
module gf_address_gen #(
  parameter int unsigned M    = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned POLY = xbar_pkg::GF_POLY_DEFAULT
) (
  input  logic [M-1:0] src,
  input  logic [M-1:0] dst,
  output logic [M-1:0] ctrl
);
  import xbar_pkg::*;

  localparam int unsigned NEL = (1 << M) - 1;   // nonzero elements

  typedef logic [M-1:0] elem_t;
  typedef elem_t [NEL:0] inv_tab_t;

  // inv[s] = a^-(s-1) for s = 1 .. NEL; inv[0] = 0.
  function automatic inv_tab_t inv_table();
    inv_tab_t t;
    t[0] = '0;
    for (int unsigned s = 1; s <= NEL; s++) t[s] = elem_t'(gf_pow((NEL - (s - 1)) % NEL, M, POLY));
    return t;
  endfunction

  localparam inv_tab_t INV = inv_table();

  elem_t inv_src;   // a^-(src-1)
  elem_t rx_elem;   // element whose receiver number is dst

  always_comb begin
    inv_src = INV[src];
    for (int i = 0; i < int'(M); i++) rx_elem[i] = dst[M-1-i];
  end

  gf_mul #(.M(M), .POLY(POLY)) u_mul (
    .a (rx_elem),
    .b (inv_src),
    .p (ctrl)
  );

endmodule
