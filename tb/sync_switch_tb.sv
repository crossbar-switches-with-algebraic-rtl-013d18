// sync_switch_tb: one-bit 15 x 15 synchronous switch over GF(2^4).
//  - every (source, receiver) pair by loading the source counter, with a
//    one-clock latency from inputs to the registered receiver lines;
//  - the published case source 2 -> receiver 6 with receiver element a^4;
//  - counting mode: the counter steps through all sources, one per clock;
//  - the detector workload of the 7-channel example: at time step t
//    detector i holds the event for receiver t-i+1 (receivers A..G = 1..7);
//    each step the switch visits every detector holding an event and the
//    event bit must arrive at its receiver.
module sync_switch_tb;
  int checks = 0, failures = 0;
  `include "tb/gf_tables.svh"

  logic clk = 0, rst_n, load, count_en;
  logic [3:0]  addr1, addr2, src;
  logic [14:0] din, dout;
  int events = 0;

  sync_switch dut (.clk(clk), .rst_n(rst_n), .load(load), .addr1(addr1),
                   .count_en(count_en), .din(din), .addr2(addr2),
                   .dout(dout), .src(src));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [14:0] got, logic [14:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  // Load source s, then in the next cycle switch its bit d to receiver r.
  task automatic route(int s, int r, logic d);
    load = 1'b1; addr1 = 4'(s); count_en = 1'b0;
    @(posedge clk); #1;
    load = 1'b0;
    din = 15'($urandom);
    din[s-1] = d;
    addr2 = ctrl_for(s, r);
    @(posedge clk); #1;
    chk(dout, d ? 15'(1) << (r - 1) : 15'h0, $sformatf("route %0d->%0d d%0d", s, r, d));
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; count_en = 1'b0; addr1 = '0; addr2 = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 chk(dout, 15'h0, "reset");
    rst_n = 1'b1;
    // counter at 0 selects no source
    din = '1; addr2 = 4'b0001;
    @(posedge clk); #1 chk(dout, 15'h0, "no source selected");
    for (int s = 1; s <= 15; s++)
      for (int r = 1; r <= 15; r++) route(s, r, 1'($urandom_range(3, 0) != 0));
    // published case: source 2, element a^1, receiver element a^4 -> a^5 = 0110 = 6
    load = 1'b1; addr1 = 4'd2; @(posedge clk); #1 load = 1'b0;
    din = 15'b10; addr2 = elem_of_pow(4);
    @(posedge clk); #1 chk(dout, 15'(1) << 5, "source 2 -> receiver 6");
    // counting mode: each clock the next source goes to receiver 16 - s
    load = 1'b1; addr1 = 4'd1; @(posedge clk); #1;
    load = 1'b0; count_en = 1'b1;
    for (int i = 0; i < 30; i++) begin
      int s;
      s = (i % 15) + 1;
      checks++;
      if (int'(src) != s) begin failures++; $display("FAIL count src=%0d exp %0d", src, s); end
      din = '0; din[s-1] = 1'b1;
      addr2 = ctrl_for(s, 16 - s);
      @(posedge clk); #1;
      chk(dout, 15'(1) << (15 - s), $sformatf("scan source %0d", s));
    end
    count_en = 1'b0;
    // detector workload, 7 detectors and receivers A..G
    for (int t = 1; t <= 13; t++)
      for (int i = 1; i <= 7; i++) begin
        int r;
        r = t - i + 1;
        if (r >= 1 && r <= 7) begin
          route(i, r, 1'b1);
          events++;
        end
      end
    checks++;
    if (events != 49) begin failures++; $display("FAIL workload events %0d", events); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
