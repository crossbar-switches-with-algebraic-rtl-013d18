// gf_crossbar: N_SRC x N_DST crossbar switch over GF(2^M).
//
// Each sender owns one gf_unit per data bit. Sender s applies a control
// element ctrl[s]; its data bit, encoded as a^(s-1), is multiplied by that
// element and decoded to a receiver line. The receiver lines of all units
// of one data bit are ORed, so receiver r sees the OR of all senders routed
// to it. What is switched is therefore the address of an active sender, not
// the data path itself, and the whole switch is combinational logic with a
// delay of one multiplier plus one decoder.
//
// A WIDTH-bit switch is WIDTH one-bit switches side by side; here all bit
// slices of a sender share the sender's control element, so a sender moves
// a WIDTH-bit word to one receiver. Routing two senders to one receiver
// ORs their data; the controller is expected to avoid that.
//
// Ports: din[s] (data word of sender s+1), ctrl[s] (control element of
// sender s+1), dout[r] (data word of receiver r+1). Combinational.
module gf_crossbar #(
  parameter int unsigned M     = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned POLY  = xbar_pkg::GF_POLY_DEFAULT,
  parameter int unsigned N_SRC = (1 << M) - 1,
  parameter int unsigned N_DST = (1 << M) - 1,
  parameter int unsigned WIDTH = 1
) (
  input  logic [N_SRC-1:0][WIDTH-1:0] din,
  input  logic [N_SRC-1:0][M-1:0]     ctrl,
  output logic [N_DST-1:0][WIDTH-1:0] dout
);

  if (N_SRC > (1 << M) - 1 || N_DST > (1 << M) - 1) begin : g_bad_size
    $error("gf_crossbar: at most 2^M-1 senders and receivers");
  end

  // unit_out[w][s][r]: receiver line r+1 of sender s+1, bit slice w
  logic [WIDTH-1:0][N_SRC-1:0][N_DST-1:0] unit_out;

  for (genvar w = 0; w < int'(WIDTH); w++) begin : g_bit
    for (genvar s = 0; s < int'(N_SRC); s++) begin : g_src
      gf_unit #(.M(M), .POLY(POLY), .SRC(s + 1), .N_DST(N_DST)) u_unit (
        .din  (din[s][w]),
        .ctrl (ctrl[s]),
        .dst  (unit_out[w][s])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < int'(N_DST); r++)
      for (int w = 0; w < int'(WIDTH); w++) begin
        dout[r][w] = 1'b0;
        for (int s = 0; s < int'(N_SRC); s++) dout[r][w] |= unit_out[w][s][r];
      end
  end

endmodule
