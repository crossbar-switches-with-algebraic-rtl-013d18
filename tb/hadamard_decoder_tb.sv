// hadamard_decoder_tb: the 8-input decoder (8 and 15 outputs) over all 256
// input words, against minimum-distance decoding of the published H(8)
// rows with one-error correction; and a 16-input decoder (H(16) built
// here by the doubling rule) with up to three errors corrected.
module hadamard_decoder_tb;
  int checks = 0, failures = 0;
  `include "tb/hd_tables.svh"

  logic [7:0]  code;
  logic [7:0]  d8;
  logic [14:0] d15;
  logic        e8, e15;
  logic [15:0] code16;
  logic [15:0] d16;
  logic        e16;

  hadamard_decoder dut8 (.code(code), .dst(d8), .err(e8));
  hadamard_decoder #(.EXT(1)) dut15 (.code(code), .dst(d15), .err(e15));
  hadamard_decoder #(.N(16)) dut16 (.code(code16), .dst(d16), .err(e16));

  // H(16) rows from H(8) by H(2n) = [H H; H -H]; column j in bit j.
  function automatic logic [15:0] h16(int r);
    logic [7:0] lo;
    lo = rev8(H8_PRINTED[(r - 1) % 8]);
    if (r <= 8) return {lo, lo};
    return {~lo, lo};
  endfunction

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code16 = '0;
    for (int v = 0; v < 256; v++) begin
      logic [14:0] exp15;
      logic        any;
      code = 8'(v);
      exp15 = '0;
      for (int r = 1; r <= 15; r++)
        if ($countones(code ^ hd8_code(r)) <= 1) exp15[r-1] = 1'b1;
      #1;
      chk(16'(d15), 16'(exp15), $sformatf("ext word %b", code));
      any = |exp15;
      chk(16'(e15), 16'(!any && $countones(code) > 1), $sformatf("ext err %b", code));
      chk(16'(d8), 16'(exp15[7:0]), $sformatf("word %b", code));
      chk(16'(e8), 16'(!(|exp15[7:0]) && $countones(code) > 1), $sformatf("err %b", code));
    end
    // published example: 11111111 and its one-error variants go to output 1
    code = 8'hFF;   #1 chk(16'(d8), 16'h1, "11111111");
    code = 8'hFE;   #1 chk(16'(d8), 16'h1, "01111111");
    code = 8'hFD;   #1 chk(16'(d8), 16'h1, "10111111");
    // order 16: up to three errors corrected, four detected
    for (int t = 0; t < 400; t++) begin
      int r, ne;
      logic [15:0] flip;
      r = $urandom_range(16, 1);
      ne = $urandom_range(3, 0);
      flip = '0;
      while ($countones(flip) < ne) flip[$urandom_range(15, 0)] = 1'b1;
      code16 = h16(r) ^ flip;
      #1;
      chk(d16, 16'(1) << (r - 1), $sformatf("h16 r%0d flip %h", r, flip));
      chk(16'(e16), 16'h0, "h16 err");
    end
    for (int t = 0; t < 100; t++) begin
      int r;
      logic [15:0] flip;
      r = $urandom_range(16, 2);
      flip = '0;
      while ($countones(flip) < 4) flip[$urandom_range(15, 0)] = 1'b1;
      code16 = h16(r) ^ flip;
      #1;
      // distance 4 from row r: no other row or the idle word is within 3
      chk(16'(d16[r-1]), 16'h0, "h16 4 errors not accepted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
