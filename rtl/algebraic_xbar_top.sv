// algebraic_xbar_top: the three algebraic switches side by side.
//
// 1. Hadamard crossbar (HD_N = 8: 8 x 8, or 15 x 15 with HD_EXT = 1).
//    Each sender gives the number of its receiver (hd_dest, 0 = none); a
//    table turns it into the receiver's Hadamard code word, which drives the
//    sender's AND gates. hd_addr_fault is XORed onto those address lines: it
//    models faults on the address wiring and is tied to 0 in normal use.
//    Single faults per sender are corrected; hd_err reports detected
//    uncorrectable ones.
// 2. Crossbar over GF(2^GF_M) (15 x 15 for GF(2^4), F(X) = X^4 + X + 1).
//    Each sender gives its receiver number (gf_dest, 0 = none); an address
//    generator forms the control element, which the sender's unit
//    multiplies with the sender's own element before decoding.
// 3. Synchronous switch over GF(2^GF_M): one source at a time, chosen by a
//    loadable counter (ss_load/ss_addr1, ss_count_en), routed to receiver
//    ss_dest; the receiver element is generated from ss_dest and the
//    current source number.
//
// The two crossbars are combinational; their outputs (and hd_err) are
// captured in output registers on a clock edge with hd_strobe / gf_strobe
// high, so results appear one clock after the strobed edge. The synchronous
// switch registers its receiver lines every clock (one clock latency).
// rst_n is active low and synchronous. All bit slices of a crossbar sender
// share its address (WIDTH-bit words).
module algebraic_xbar_top #(
  parameter int unsigned HD_N    = 8,
  parameter bit          HD_EXT  = 0,
  parameter int unsigned HD_NRX  = HD_EXT ? 2 * HD_N - 1 : HD_N,
  parameter int unsigned HD_DW   = $clog2(HD_NRX + 1),
  parameter int unsigned GF_M    = xbar_pkg::GF_M_DEFAULT,
  parameter int unsigned GF_POLY = xbar_pkg::GF_POLY_DEFAULT,
  parameter int unsigned GF_N    = (1 << GF_M) - 1,
  parameter int unsigned WIDTH   = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Hadamard crossbar
  input  logic [HD_NRX-1:0][WIDTH-1:0]  hd_din,
  input  logic [HD_NRX-1:0][HD_DW-1:0]  hd_dest,
  input  logic [HD_NRX-1:0][HD_N-1:0]   hd_addr_fault,
  input  logic                          hd_strobe,
  output logic [HD_NRX-1:0][WIDTH-1:0]  hd_dout,
  output logic [HD_NRX-1:0]             hd_err,
  // GF(2^m) crossbar
  input  logic [GF_N-1:0][WIDTH-1:0]    gf_din,
  input  logic [GF_N-1:0][GF_M-1:0]     gf_dest,
  input  logic                          gf_strobe,
  output logic [GF_N-1:0][WIDTH-1:0]    gf_dout,
  // synchronous switch
  input  logic                          ss_load,
  input  logic [GF_M-1:0]               ss_addr1,
  input  logic                          ss_count_en,
  input  logic [GF_N-1:0]               ss_din,
  input  logic [GF_M-1:0]               ss_dest,
  output logic [GF_N-1:0]               ss_dout,
  output logic [GF_M-1:0]               ss_src
);

  // ---------------- Hadamard crossbar ----------------
  logic [HD_NRX-1:0][HD_N-1:0]  hd_addr;
  logic [HD_NRX-1:0][WIDTH-1:0] hd_xout;
  logic [HD_NRX-1:0]            hd_xerr;

  for (genvar s = 0; s < int'(HD_NRX); s++) begin : g_hd_addr
    logic [HD_N-1:0] code;
    hadamard_address_gen #(.N(HD_N), .EXT(HD_EXT), .N_RX(HD_NRX), .DW(HD_DW)) u_gen (
      .dst  (hd_dest[s]),
      .code (code)
    );
    assign hd_addr[s] = code ^ hd_addr_fault[s];
  end

  hadamard_crossbar #(.N(HD_N), .EXT(HD_EXT), .N_RX(HD_NRX), .WIDTH(WIDTH)) u_hd (
    .din  (hd_din),
    .addr (hd_addr),
    .dout (hd_xout),
    .err  (hd_xerr)
  );

  strobe_reg #(.W(HD_NRX * WIDTH + HD_NRX)) u_hd_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .strobe (hd_strobe),
    .d      ({hd_xout, hd_xerr}),
    .q      ({hd_dout, hd_err})
  );

  // ---------------- GF(2^m) crossbar ----------------
  logic [GF_N-1:0][GF_M-1:0]  gf_ctrl;
  logic [GF_N-1:0][WIDTH-1:0] gf_xout;

  for (genvar s = 0; s < int'(GF_N); s++) begin : g_gf_addr
    gf_address_gen #(.M(GF_M), .POLY(GF_POLY)) u_gen (
      .src  (GF_M'(s + 1)),
      .dst  (gf_dest[s]),
      .ctrl (gf_ctrl[s])
    );
  end

  gf_crossbar #(.M(GF_M), .POLY(GF_POLY), .N_SRC(GF_N), .N_DST(GF_N), .WIDTH(WIDTH)) u_gf (
    .din  (gf_din),
    .ctrl (gf_ctrl),
    .dout (gf_xout)
  );

  strobe_reg #(.W(GF_N * WIDTH)) u_gf_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .strobe (gf_strobe),
    .d      (gf_xout),
    .q      (gf_dout)
  );

  // ---------------- synchronous switch ----------------
  logic [GF_M-1:0] ss_addr2;

  gf_address_gen #(.M(GF_M), .POLY(GF_POLY)) u_ss_gen (
    .src  (ss_src),
    .dst  (ss_dest),
    .ctrl (ss_addr2)
  );

  sync_switch #(.M(GF_M), .POLY(GF_POLY), .N(GF_N)) u_ss (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (ss_load),
    .addr1    (ss_addr1),
    .count_en (ss_count_en),
    .din      (ss_din),
    .addr2    (ss_addr2),
    .dout     (ss_dout),
    .src      (ss_src)
  );

endmodule
