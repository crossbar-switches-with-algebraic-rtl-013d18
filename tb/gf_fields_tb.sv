// gf_fields_tb: multipliers for the larger fields used for n = 63 .. 1023
// port switches, each with a primitive polynomial: m = 6 (X^6+X+1),
// m = 7 (X^7+X+1), m = 8 (X^8+X^4+X^3+X^2+1), m = 9 (X^9+X^4+1) and
// m = 10 (X^10+X^3+1). Random products are compared with a shift-and-add
// reference written here; a^(2^m-1) must equal 1.
module gf_fields_tb;
  int checks = 0, failures = 0;

  logic [5:0] a6, b6, p6;
  logic [6:0] a7, b7, p7;
  logic [7:0] a8, b8, p8;
  logic [8:0] a9, b9, p9;
  logic [9:0] a10, b10, p10;

  gf_mul #(.M(6),  .POLY(32'h43))  u6  (.a(a6),  .b(b6),  .p(p6));
  gf_mul #(.M(7),  .POLY(32'h83))  u7  (.a(a7),  .b(b7),  .p(p7));
  gf_mul #(.M(8),  .POLY(32'h11D)) u8  (.a(a8),  .b(b8),  .p(p8));
  gf_mul #(.M(9),  .POLY(32'h211)) u9  (.a(a9),  .b(b9),  .p(p9));
  gf_mul #(.M(10), .POLY(32'h409)) u10 (.a(a10), .b(b10), .p(p10));

  function automatic int unsigned ref_mul(int unsigned x, int unsigned y, int m, int unsigned poly);
    int unsigned acc, sh;
    acc = 0;
    sh = x;
    for (int i = 0; i < m; i++) begin
      if ((y >> i) & 1) acc ^= sh;
      sh = sh << 1;
      if ((sh >> m) & 1) sh ^= poly;
    end
    return acc;
  endfunction

  task automatic chk(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a6 = 6'($urandom);  b6 = 6'($urandom);
      a7 = 7'($urandom);  b7 = 7'($urandom);
      a8 = 8'($urandom);  b8 = 8'($urandom);
      a9 = 9'($urandom);  b9 = 9'($urandom);
      a10 = 10'($urandom); b10 = 10'($urandom);
      #1;
      chk(p6,  ref_mul(a6,  b6,  6,  32'h43),  "m6");
      chk(p7,  ref_mul(a7,  b7,  7,  32'h83),  "m7");
      chk(p8,  ref_mul(a8,  b8,  8,  32'h11D), "m8");
      chk(p9,  ref_mul(a9,  b9,  9,  32'h211), "m9");
      chk(p10, ref_mul(a10, b10, 10, 32'h409), "m10");
    end
    // a has order 2^m - 1 in the m = 10 field: walk a^k through the DUT
    a10 = 10'd1; b10 = 10'd2;
    for (int k = 1; k <= 1023; k++) begin
      #1;
      if (k < 1023 && p10 == 10'd1) begin failures++; $display("FAIL order %0d", k); end
      a10 = p10;
    end
    #1 chk(a10, 1, "a^1023 = 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
