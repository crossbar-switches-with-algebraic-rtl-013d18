// hadamard_unit: one sender unit of the one-bit Hadamard-structured switch.
//
// N AND gates combine the sender's data bit with the N address lines, which
// carry the code word of the wanted receiver (a row of H(N), or of -H(N) in
// the extended switch). A data bit of 1 puts that code word on the decoder,
// which names the receiver; a data bit of 0 gives the idle all-zero word and
// no output. Because the decoder corrects up to T wrong bits, a fault on a
// few address or gate lines still reaches the right receiver, and larger
// faults raise `err`.
//
// Ports: din, addr (code word, bit j = printed column j), dst (bit r-1 =
// receiver r), err. Combinational: one AND level plus the decoder.
module hadamard_unit #(
  parameter int unsigned N    = 8,
  parameter bit          EXT  = 0,
  parameter int unsigned N_RX = EXT ? 2 * N - 1 : N
) (
  input  logic            din,
  input  logic [N-1:0]    addr,
  output logic [N_RX-1:0] dst,
  output logic            err
);
  logic [N-1:0] gated;   // AND gate outputs

  assign gated = {N{din}} & addr;

  hadamard_decoder #(.N(N), .EXT(EXT), .N_RX(N_RX)) u_dec (
    .code (gated),
    .dst  (dst),
    .err  (err)
  );

endmodule
