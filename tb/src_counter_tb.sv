// src_counter_tb: reset to 0, load of every source number, counting
// 1..15 with wrap from 15 to 1, hold with en low, load over count.
module src_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, load, en;
  logic [3:0] addr, q;
  int model;

  src_counter dut (.clk(clk), .rst_n(rst_n), .load(load), .addr(addr), .en(en), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic l, logic [3:0] a, logic e);
    load = l; addr = a; en = e;
    @(posedge clk);
    if (l) model = int'(a);
    else if (e) model = (model >= 15) ? 1 : model + 1;
    #1 checks++;
    if (int'(q) != model) begin failures++; $display("FAIL q=%0d exp %0d", q, model); end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; en = 1'b1; addr = '0;
    @(posedge clk); #1;
    checks++; if (q !== 4'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = 0;
    for (int a = 1; a <= 15; a++) step(1'b1, 4'(a), 1'b0);
    step(1'b1, 4'd1, 1'b0);
    for (int i = 0; i < 40; i++) step(1'b0, 4'd0, 1'b1);   // wraps twice
    step(1'b0, 4'd0, 1'b0);
    step(1'b0, 4'd0, 1'b0);
    step(1'b1, 4'd9, 1'b1);                                 // load wins
    for (int i = 0; i < 300; i++) step(1'($urandom_range(3, 0) == 0), 4'($urandom_range(15, 1)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
