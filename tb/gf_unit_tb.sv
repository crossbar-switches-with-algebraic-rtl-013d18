// gf_unit_tb: sender units 1, 3 and 15 of the GF(2^4) switch, all data
// bits and control elements. Sender s carries a^(s-1); the expected
// receiver is the printed form of a^(s-1) * ctrl read as a binary number.
// Includes the published example a^2 * a^7 = a^9 = 0101 -> receiver 5.
module gf_unit_tb;
  int checks = 0, failures = 0;
  `include "tb/gf_tables.svh"

  logic        din;
  logic [3:0]  ctrl;
  logic [14:0] y1, y3, y15;

  gf_unit #(.SRC(1))  u1  (.din(din), .ctrl(ctrl), .dst(y1));
  gf_unit #(.SRC(3))  u3  (.din(din), .ctrl(ctrl), .dst(y3));
  gf_unit #(.SRC(15)) u15 (.din(din), .ctrl(ctrl), .dst(y15));

  function automatic logic [14:0] expect_rx(int s, logic d, logic [3:0] c);
    int lc;
    lc = -1;
    for (int k = 0; k < 15; k++) if (elem_of_pow(k) == c) lc = k;
    if (!d || lc < 0) return '0;
    return 15'(1) << (int'(PRINTED[(s - 1 + lc) % 15]) - 1);
  endfunction

  task automatic chk(logic [14:0] got, logic [14:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int c = 0; c < 16; c++) begin
        din = 1'(d); ctrl = 4'(c);
        #1;
        chk(y1,  expect_rx(1,  din, ctrl), $sformatf("s1 d%0d c%0d", d, c));
        chk(y3,  expect_rx(3,  din, ctrl), $sformatf("s3 d%0d c%0d", d, c));
        chk(y15, expect_rx(15, din, ctrl), $sformatf("s15 d%0d c%0d", d, c));
      end
    // a^2 * a^7 = a^9 = 0101: receiver 5.
    din = 1'b1; ctrl = elem_of_pow(7);
    #1 chk(y3, 15'b1 << 4, "a^2*a^7 -> 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
