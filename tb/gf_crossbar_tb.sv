// gf_crossbar_tb: 15 x 15 one-bit GF(2^4) crossbar and a 4-bit-wide copy.
// Random permutations (every sender to a different receiver) must deliver
// every data word to its receiver; random many-to-one settings must OR the
// data of all senders routed to a receiver; control 0 disconnects.
module gf_crossbar_tb;
  int checks = 0, failures = 0;
  `include "tb/gf_tables.svh"

  logic [14:0][0:0] din1;
  logic [14:0][3:0] din4;
  logic [14:0][3:0] ctrl;
  logic [14:0][0:0] dout1;
  logic [14:0][3:0] dout4;
  int dest [15];

  gf_crossbar dut1 (.din(din1), .ctrl(ctrl), .dout(dout1));
  gf_crossbar #(.WIDTH(4)) dut4 (.din(din4), .ctrl(ctrl), .dout(dout4));

  task automatic apply_and_check(string what);
    logic [14:0][3:0] exp4;
    logic [14:0][0:0] exp1;
    exp4 = '0; exp1 = '0;
    for (int s = 0; s < 15; s++) begin
      ctrl[s] = ctrl_for(s + 1, dest[s]);
      if (dest[s] != 0) begin
        exp4[dest[s]-1] |= din4[s];
        exp1[dest[s]-1] |= din1[s];
      end
    end
    #1;
    checks++;
    if (dout1 !== exp1) begin failures++; $display("FAIL %s 1-bit got %h exp %h", what, dout1, exp1); end
    checks++;
    if (dout4 !== exp4) begin failures++; $display("FAIL %s 4-bit got %h exp %h", what, dout4, exp4); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0;
    for (int t = 0; t < 200; t++) begin
      // random permutation
      for (int s = 0; s < 15; s++) dest[s] = s + 1;
      for (int s = 14; s > 0; s--) begin
        int j, tmp;
        j = $urandom_range(s, 0);
        tmp = dest[s]; dest[s] = dest[j]; dest[j] = tmp;
      end
      for (int s = 0; s < 15; s++) begin
        din1[s] = 1'($urandom);
        din4[s] = 4'($urandom);
      end
      apply_and_check($sformatf("perm %0d", t));
    end
    for (int t = 0; t < 200; t++) begin
      for (int s = 0; s < 15; s++) begin
        dest[s] = $urandom_range(15, 0);
        din1[s] = 1'($urandom);
        din4[s] = 4'($urandom);
      end
      apply_and_check($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
