// strobe_reg_tb: the register must clear on reset, load on strobed clock
// edges and hold otherwise (compared with a model kept here).
module strobe_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, strobe;
  logic [11:0] d, q, model;

  strobe_reg #(.W(12)) dut (.clk(clk), .rst_n(rst_n), .strobe(strobe), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; strobe = 1'b1; d = 12'hABC;
    @(posedge clk); #1;
    checks++; if (q !== 12'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      strobe = 1'($urandom);
      d = 12'($urandom);
      @(posedge clk);
      if (strobe) model = d;
      #1 checks++;
      if (q !== model) begin failures++; $display("FAIL t%0d q=%h exp %h", t, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
