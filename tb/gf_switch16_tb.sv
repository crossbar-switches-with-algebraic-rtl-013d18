// gf_switch16_tb: a 16 x 16 one-bit switch built over GF(2^5)
// (F(X) = X^5 + X^2 + 1), the way to reach a power-of-two port count with a
// field of 31 nonzero elements. Senders 1..16 use a^0..a^15; control
// elements for random permutations and random many-to-one settings are
// computed here with a shift-and-add GF(2^5) reference.
module gf_switch16_tb;
  int checks = 0, failures = 0;

  localparam int M = 5;

  logic [15:0][0:0] din;
  logic [15:0][4:0] ctrl;
  logic [15:0][0:0] dout;
  int dest [16];

  gf_crossbar #(.M(5), .POLY(32'h25), .N_SRC(16), .N_DST(16)) dut (.din(din), .ctrl(ctrl), .dout(dout));

  function automatic logic [4:0] mul5(logic [4:0] x, logic [4:0] y);
    logic [4:0] acc;
    logic [5:0] sh;
    acc = '0;
    sh = {1'b0, x};
    for (int i = 0; i < 5; i++) begin
      if (y[i]) acc ^= sh[4:0];
      sh = sh << 1;
      if (sh[5]) sh ^= 6'b100101;
    end
    return acc;
  endfunction

  function automatic logic [4:0] pow5(int k);
    logic [4:0] x;
    x = 5'b1;
    for (int i = 0; i < k % 31; i++) x = mul5(x, 5'b00010);
    return x;
  endfunction

  // receiver number of an element: a^0 coefficient is the MSB
  function automatic int rx_of(logic [4:0] e);
    return {e[0], e[1], e[2], e[3], e[4]};
  endfunction

  // control element taking sender s to receiver r: search the field
  function automatic logic [4:0] ctrl_for(int s, int r);
    if (r == 0) return '0;
    for (int k = 0; k < 31; k++)
      if (rx_of(mul5(pow5(s - 1), pow5(k))) == r) return pow5(k);
    return '0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [15:0][0:0] exp;
      for (int s = 0; s < 16; s++) dest[s] = (t < 150) ? s + 1 : $urandom_range(16, 0);
      if (t < 150)
        for (int s = 15; s > 0; s--) begin
          int j, tmp;
          j = $urandom_range(s, 0);
          tmp = dest[s]; dest[s] = dest[j]; dest[j] = tmp;
        end
      exp = '0;
      for (int s = 0; s < 16; s++) begin
        din[s] = 1'($urandom);
        ctrl[s] = ctrl_for(s + 1, dest[s]);
        if (dest[s] != 0) exp[dest[s]-1] |= din[s];
      end
      #1 checks++;
      if (dout !== exp) begin failures++; $display("FAIL t%0d got %h exp %h", t, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
