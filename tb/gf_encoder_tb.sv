// gf_encoder_tb: each single active source k must give the element
// a^(k-1) of the published GF(2^4) table; no source gives zero.
module gf_encoder_tb;
  int checks = 0, failures = 0;

  localparam logic [3:0] PRINTED [15] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001,
    4'b1100, 4'b0110, 4'b0011, 4'b1101, 4'b1010, 4'b0101, 4'b1110, 4'b0111,
    4'b1111, 4'b1011, 4'b1001};

  logic [14:0] oh;
  logic [3:0]  e;

  gf_encoder dut (.onehot(oh), .elem(e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh = '0;
    #1 checks++;
    if (e !== 4'b0) begin failures++; $display("FAIL idle e=%b", e); end
    for (int k = 1; k <= 15; k++) begin
      logic [3:0] exp;
      oh = 15'(1) << (k - 1);
      exp = {PRINTED[k-1][0], PRINTED[k-1][1], PRINTED[k-1][2], PRINTED[k-1][3]};
      #1 checks++;
      if (e !== exp) begin failures++; $display("FAIL source %0d e=%b exp=%b", k, e, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
