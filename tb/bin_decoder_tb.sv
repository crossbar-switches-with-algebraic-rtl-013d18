// bin_decoder_tb: exhaustive check of the 4-to-15 decoder and of a
// 3-input decoder with 5 outputs (values above 5 select nothing).
module bin_decoder_tb;
  int checks = 0, failures = 0;
  logic [3:0]  s4;
  logic [14:0] y4;
  logic [2:0]  s3;
  logic [4:0]  y3;

  bin_decoder dut4 (.sel(s4), .y(y4));
  bin_decoder #(.W(3), .N(5)) dut3 (.sel(s3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s3 = '0;
    for (int v = 0; v < 16; v++) begin
      logic [14:0] exp;
      s4 = 4'(v);
      exp = (v == 0) ? 15'd0 : 15'(1) << (v - 1);
      #1 checks++;
      if (y4 !== exp) begin failures++; $display("FAIL W=4 sel=%0d y=%b", v, y4); end
    end
    for (int v = 0; v < 8; v++) begin
      logic [4:0] exp;
      s3 = 3'(v);
      exp = (v == 0 || v > 5) ? 5'd0 : 5'(1) << (v - 1);
      #1 checks++;
      if (y3 !== exp) begin failures++; $display("FAIL W=3 sel=%0d y=%b", v, y3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
