// gf_mul_tb: exhaustive check of the GF(2^4) multiplier against the
// published product equations and the element table (a^i * a^j =
// a^((i+j) mod 15)), and of a GF(2^5) instance (F(X) = X^5 + X^2 + 1)
// against a shift-and-add reference written here.
module gf_mul_tb;
  int checks = 0, failures = 0;

  // Printed forms of a^0 .. a^14 (leftmost digit = a^0 coefficient).
  localparam logic [3:0] PRINTED [15] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001,
    4'b1100, 4'b0110, 4'b0011, 4'b1101, 4'b1010, 4'b0101, 4'b1110, 4'b0111,
    4'b1111, 4'b1011, 4'b1001};

  function automatic logic [3:0] held(logic [3:0] printed);
    return {printed[0], printed[1], printed[2], printed[3]};
  endfunction

  logic [3:0] a4, b4, p4;
  logic [4:0] a5, b5, p5;

  gf_mul dut4 (.a(a4), .b(b4), .p(p4));
  gf_mul #(.M(5), .POLY(32'h25)) dut5 (.a(a5), .b(b5), .p(p5));

  function automatic logic [3:0] eq4(logic [3:0] A, logic [3:0] B);
    logic [3:0] P;
    P[0] = A[0]&B[0] ^ A[1]&B[3] ^ A[2]&B[2] ^ A[3]&B[1];
    P[1] = A[0]&B[1] ^ A[1]&B[0] ^ A[1]&B[3] ^ A[2]&B[2] ^ A[2]&B[3] ^ A[3]&B[2] ^ A[3]&B[1];
    P[2] = A[0]&B[2] ^ A[1]&B[1] ^ A[2]&B[0] ^ A[2]&B[3] ^ A[3]&B[2] ^ A[3]&B[3];
    P[3] = A[0]&B[3] ^ A[1]&B[2] ^ A[2]&B[1] ^ A[3]&B[0] ^ A[3]&B[3];
    return P;
  endfunction

  function automatic logic [4:0] ref5(logic [4:0] x, logic [4:0] y);
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

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a5 = '0; b5 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1 check(8'(p4), 8'(eq4(a4, b4)), $sformatf("eq %0d*%0d", i, j));
      end
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 15; j++) begin
        a4 = held(PRINTED[i]); b4 = held(PRINTED[j]);
        #1 check(8'(p4), 8'(held(PRINTED[(i + j) % 15])), $sformatf("a^%0d*a^%0d", i, j));
      end
    // Zero annihilates.
    a4 = 4'b0; b4 = 4'b1011; #1 check(8'(p4), 8'h0, "0*b");
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1 check(8'(p5), 8'(ref5(a5, b5)), $sformatf("gf32 %0d*%0d", i, j));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
