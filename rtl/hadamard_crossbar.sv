// hadamard_crossbar: crossbar switch with Hadamard matrix structure.
//
// N_RX senders and N_RX receivers, N_RX = N for the basic switch (8 x 8 with
// H(8)) or 2N-1 for the extended one (15 x 15 from H(8) and -H(8) without its
// zero row), with no more logic per unit than the 8 x 8 switch. Each sender
// owns one hadamard_unit per data bit; corresponding receiver outputs of
// all units are ORed. Senders address receivers by putting the receiver's
// code word on their address lines. The switch has no storage, so no clock
// is needed inside it; a registered output is added outside.
//
// All bit slices of a sender share its address lines, so a WIDTH-bit word
// moves to one receiver. Two senders addressing one receiver are ORed.
//
// Ports: din[s] (data of sender s+1), addr[s] (code word of sender s+1),
// dout[r] (data of receiver r+1), err[s] (uncorrectable error detected in
// any bit slice of sender s+1). Combinational.
module hadamard_crossbar #(
  parameter int unsigned N     = 8,
  parameter bit          EXT   = 0,
  parameter int unsigned N_RX  = EXT ? 2 * N - 1 : N,
  parameter int unsigned WIDTH = 1
) (
  input  logic [N_RX-1:0][WIDTH-1:0] din,
  input  logic [N_RX-1:0][N-1:0]     addr,
  output logic [N_RX-1:0][WIDTH-1:0] dout,
  output logic [N_RX-1:0]            err
);
  logic [WIDTH-1:0][N_RX-1:0][N_RX-1:0] unit_out;  // [bit][sender][receiver]
  logic [N_RX-1:0][WIDTH-1:0]           unit_err;  // [sender][bit]

  for (genvar w = 0; w < int'(WIDTH); w++) begin : g_bit
    for (genvar s = 0; s < int'(N_RX); s++) begin : g_src
      hadamard_unit #(.N(N), .EXT(EXT), .N_RX(N_RX)) u_unit (
        .din  (din[s][w]),
        .addr (addr[s]),
        .dst  (unit_out[w][s]),
        .err  (unit_err[s][w])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < int'(N_RX); r++)
      for (int w = 0; w < int'(WIDTH); w++) begin
        dout[r][w] = 1'b0;
        for (int s = 0; s < int'(N_RX); s++) dout[r][w] |= unit_out[w][s][r];
      end
    for (int s = 0; s < int'(N_RX); s++) err[s] = |unit_err[s];
  end

endmodule
