// hadamard_unit_tb: one 8 x 8 unit (and an extended 15-output unit). For
// every receiver the published address row must reach it when the data bit
// is 1, also with any single address line wrong; a 0 data bit reaches
// nothing; two wrong address lines raise err and reach nothing.
module hadamard_unit_tb;
  int checks = 0, failures = 0;
  `include "tb/hd_tables.svh"

  logic        din;
  logic [7:0]  addr;
  logic [7:0]  d8;
  logic [14:0] d15;
  logic        e8, e15;

  hadamard_unit u8 (.din(din), .addr(addr), .dst(d8), .err(e8));
  hadamard_unit #(.EXT(1)) u15 (.din(din), .addr(addr), .dst(d15), .err(e15));

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
    for (int r = 1; r <= 15; r++) begin
      for (int f = -1; f < 8; f++) begin
        addr = hd8_code(r);
        if (f >= 0) addr[f] = ~addr[f];
        din = 1'b1;
        #1;
        chk(16'(d15), 16'(1) << (r - 1), $sformatf("ext r%0d f%0d", r, f));
        chk(16'(e15), 16'h0, $sformatf("ext err r%0d f%0d", r, f));
        if (r <= 8) begin
          chk(16'(d8), 16'(1) << (r - 1), $sformatf("r%0d f%0d", r, f));
          chk(16'(e8), 16'h0, $sformatf("err r%0d f%0d", r, f));
        end
        din = 1'b0;
        #1;
        chk(16'(d15), 16'h0, "ext din 0");
        chk(16'(d8), 16'h0, "din 0");
        chk(16'({e8, e15}), 16'h0, "din 0 err");
      end
      // two wrong lines
      addr = hd8_code(r);
      addr[0] = ~addr[0];
      addr[5] = ~addr[5];
      din = 1'b1;
      #1;
      chk(16'(d15), 16'h0, $sformatf("ext 2 errors r%0d", r));
      chk(16'(e15), 16'h1, $sformatf("ext 2 errors err r%0d", r));
      chk(16'(e8), 16'h1, $sformatf("2 errors err r%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
