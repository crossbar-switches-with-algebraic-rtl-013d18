// hadamard_crossbar_tb: 8 x 8 one-bit and 15 x 15 three-bit Hadamard
// crossbars. Random permutations, with a random single wrong address line
// on some senders, must deliver every word to its receiver with no error;
// random many-to-one settings must OR the data; a sender with two wrong
// address lines and nonzero data must raise its err bit.
module hadamard_crossbar_tb;
  int checks = 0, failures = 0;
  `include "tb/hd_tables.svh"

  logic [7:0][0:0]   din8;
  logic [7:0][7:0]   addr8;
  logic [7:0][0:0]   dout8;
  logic [7:0]        err8;
  logic [14:0][2:0]  din15;
  logic [14:0][7:0]  addr15;
  logic [14:0][2:0]  dout15;
  logic [14:0]       err15;
  int dest [15];

  hadamard_crossbar dut8 (.din(din8), .addr(addr8), .dout(dout8), .err(err8));
  hadamard_crossbar #(.EXT(1), .WIDTH(3)) dut15 (.din(din15), .addr(addr15), .dout(dout15), .err(err15));

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic run(bit perm, int t);
    logic [7:0][0:0]  e8;
    logic [14:0][2:0] e15;
    for (int s = 0; s < 15; s++) dest[s] = perm ? s + 1 : $urandom_range(15, 0);
    if (perm)
      for (int s = 14; s > 0; s--) begin
        int j, tmp;
        j = $urandom_range(s, 0);
        tmp = dest[s]; dest[s] = dest[j]; dest[j] = tmp;
      end
    e15 = '0;
    for (int s = 0; s < 15; s++) begin
      din15[s] = 3'($urandom);
      addr15[s] = hd8_code(dest[s]);
      if (dest[s] != 0 && $urandom_range(1, 0) == 1) addr15[s][$urandom_range(7, 0)] ^= 1'b1;
      if (dest[s] != 0) e15[dest[s]-1] |= din15[s];
    end
    // 8 x 8: senders use receivers 1..8 only
    e8 = '0;
    for (int s = 0; s < 8; s++) begin
      int d;
      d = perm ? s + 1 : $urandom_range(8, 0);
      if (perm) d = ((s + t) % 8) + 1;
      din8[s] = 1'($urandom);
      addr8[s] = hd8_code(d);
      if (d != 0 && $urandom_range(1, 0) == 1) addr8[s][$urandom_range(7, 0)] ^= 1'b1;
      if (d != 0) e8[d-1] |= din8[s];
    end
    #1;
    chk(64'(dout15), 64'(e15), $sformatf("15x15 t%0d", t));
    chk(64'(err15), 64'h0, "15x15 err");
    chk(64'(dout8), 64'(e8), $sformatf("8x8 t%0d", t));
    chk(64'(err8), 64'h0, "8x8 err");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) run(1'b1, t);
    for (int t = 0; t < 200; t++) run(1'b0, t);
    // two wrong lines on sender 4
    for (int s = 0; s < 8; s++) begin din8[s] = 1'b0; addr8[s] = '0; end
    din8[3] = 1'b1;
    addr8[3] = hd8_code(6) ^ 8'b0001_0010;
    #1;
    chk(64'(err8), 64'h08, "8x8 double error flagged");
    chk(64'(dout8), 64'h0, "8x8 double error not delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
