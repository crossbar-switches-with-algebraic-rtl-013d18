// sync_switch: one-bit N x N synchronous switch over GF(2^M).
//
// For one source at a time: a counter holds the source number, a decoder D
// turns it into one-hot gate enables, and the AND gates pass only that
// source's data bit. The encoder E (M OR gates) turns the open gate into the
// source's field element a^(s-1), or zero when the data bit is 0. A GF(2^M)
// multiplier multiplies it by the receiver address element `addr2`, and a
// second decoder D turns the product, read as a binary number with a^0 as
// the MSB, into a pulse on one receiver line. A row of flip-flops captures
// the receiver lines every clock.
//
// Example (M = 4): source 2 (a^1) and addr2 = a^4 give a^5 = "0110", a
// pulse on receiver 6.
//
// Ports: clk; rst_n (active low, synchronous); load/addr1 load the source
// counter with a binary source number; count_en steps it to the next source
// each clock; din (bit s-1 = source s); addr2 (field element); dout (bit
// r-1 = receiver r); src (current source number).
// Timing: the source selected in a cycle and its din bit in that cycle
// appear on dout after the next rising edge (one clock of latency).
module sync_switch #(
  parameter int unsigned M    = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned POLY = xbar_pkg::GF_POLY_DEFAULT,
  parameter int unsigned N    = (1 << M) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] addr1,
  input  logic         count_en,
  input  logic [N-1:0] din,
  input  logic [M-1:0] addr2,
  output logic [N-1:0] dout,
  output logic [M-1:0] src
);
  logic [N-1:0] src_sel;    // decoder D outputs (gate enables)
  logic [N-1:0] gated;      // AND gates &1 .. &N
  logic [M-1:0] src_elem;   // encoder E output
  logic [M-1:0] prod;       // multiplier output
  logic [M-1:0] rx_num;     // product as a receiver number
  logic [N-1:0] rx_line;    // output decoder D

  src_counter #(.W(M), .N(N)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .addr  (addr1),
    .en    (count_en),
    .q     (src)
  );

  bin_decoder #(.W(M), .N(N)) u_src_dec (
    .sel (src),
    .y   (src_sel)
  );

  assign gated = din & src_sel;

  gf_encoder #(.M(M), .POLY(POLY), .N(N)) u_enc (
    .onehot (gated),
    .elem   (src_elem)
  );

  gf_mul #(.M(M), .POLY(POLY)) u_mul (
    .a (src_elem),
    .b (addr2),
    .p (prod)
  );

  always_comb begin
    for (int i = 0; i < int'(M); i++) rx_num[M-1-i] = prod[i];
  end

  bin_decoder #(.W(M), .N(N)) u_rx_dec (
    .sel (rx_num),
    .y   (rx_line)
  );

  strobe_reg #(.W(N)) u_out (
    .clk    (clk),
    .rst_n  (rst_n),
    .strobe (1'b1),
    .d      (rx_line),
    .q      (dout)
  );

  // At most one gate may be open, or the encoder output is meaningless.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(src_sel))
    else $error("sync_switch: more than one source gate open");

endmodule
