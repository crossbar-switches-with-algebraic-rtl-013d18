// gf_address_gen_tb: for every sender and receiver number the generated
// control element must be the one the multiplication table gives
// (a^(s-1) * ctrl = element of receiver r); 0 in either gives 0. Also the
// published case: sender 2 to receiver 6 needs a^4 (a^1 * a^4 = a^5 = 0110).
module gf_address_gen_tb;
  int checks = 0, failures = 0;
  `include "tb/gf_tables.svh"

  logic [3:0] src, dst, ctrl;

  gf_address_gen dut (.src(src), .dst(dst), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++)
      for (int r = 0; r < 16; r++) begin
        src = 4'(s); dst = 4'(r);
        #1 checks++;
        if (ctrl !== ctrl_for(s, r)) begin
          failures++;
          $display("FAIL src %0d dst %0d ctrl %b exp %b", s, r, ctrl, ctrl_for(s, r));
        end
      end
    src = 4'd2; dst = 4'd6;
    #1 checks++;
    if (ctrl !== elem_of_pow(4)) begin failures++; $display("FAIL 2->6 ctrl %b", ctrl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
