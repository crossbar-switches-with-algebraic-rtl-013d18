// algebraic_xbar_top_tb: end-to-end test of the three switches at their
// default sizes (8 x 8 Hadamard, 15 x 15 over GF(2^4), 15-source
// synchronous switch). Every clock the stimulus is random; the expected
// register contents are computed here from receiver numbers, data and the
// injected address faults, and compared one clock later.
// Mechanisms counted (each must occur): Hadamard delivery, single-fault
// correction, detected double fault; GF delivery, two senders ORed on one
// receiver, disconnected sender; output register hold with strobe low;
// synchronous switch load, counter step and counter wrap.
module algebraic_xbar_top_tb;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n;
  logic [7:0][0:0]   hd_din;
  logic [7:0][3:0]   hd_dest;
  logic [7:0][7:0]   hd_addr_fault;
  logic              hd_strobe;
  logic [7:0][0:0]   hd_dout;
  logic [7:0]        hd_err;
  logic [14:0][0:0]  gf_din;
  logic [14:0][3:0]  gf_dest;
  logic              gf_strobe;
  logic [14:0][0:0]  gf_dout;
  logic              ss_load, ss_count_en;
  logic [3:0]        ss_addr1, ss_dest, ss_src;
  logic [14:0]       ss_din, ss_dout;

  algebraic_xbar_top dut (.*);

  always #5 clk = ~clk;

  // expected register contents
  logic [7:0]  hd_exp, hd_err_exp;
  logic [14:0] gf_exp, ss_exp;
  int          ss_model;

  int n_hd_deliver = 0, n_hd_correct = 0, n_hd_detect = 0;
  int n_gf_deliver = 0, n_gf_or = 0, n_gf_off = 0, n_hold = 0;
  int n_ss_load = 0, n_ss_step = 0, n_ss_wrap = 0, n_ss_deliver = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic count(string name, int n);
    checks++;
    $display("mechanism %-22s %0d times", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    rst_n = 1'b0;
    hd_din = '0; hd_dest = '0; hd_addr_fault = '0; hd_strobe = 1'b0;
    gf_din = '0; gf_dest = '0; gf_strobe = 1'b0;
    ss_load = 1'b0; ss_count_en = 1'b0; ss_addr1 = '0; ss_dest = '0; ss_din = '0;
    repeat (2) @(posedge clk);
    #1;
    chk(64'({hd_dout, hd_err, gf_dout, ss_dout}), 64'h0, "reset");
    rst_n = 1'b1;
    hd_exp = '0; hd_err_exp = '0; gf_exp = '0; ss_exp = '0; ss_model = 0;

    for (int t = 0; t < 3000; t++) begin
      logic [14:0] gf_hits;
      int ss_s;
      // ---- Hadamard stimulus and its expected result ----
      hd_strobe = 1'($urandom_range(3, 0) != 0);
      if (hd_strobe) begin hd_exp = '0; hd_err_exp = '0; end
      for (int s = 0; s < 8; s++) begin
        int nf;
        hd_din[s] = 1'($urandom);
        hd_dest[s] = 4'($urandom_range(8, 0));
        nf = $urandom_range(9, 0);
        nf = (nf < 6) ? 0 : (nf < 9) ? 1 : 2;
        hd_addr_fault[s] = '0;
        while ($countones(hd_addr_fault[s]) < nf) hd_addr_fault[s][$urandom_range(7, 0)] = 1'b1;
        if (hd_strobe && hd_din[s]) begin
          if (nf == 2) begin
            hd_err_exp[s] = 1'b1;
            n_hd_detect++;
          end else if (hd_dest[s] != 0) begin
            hd_exp[hd_dest[s]-1] = 1'b1;
            n_hd_deliver++;
            if (nf == 1) n_hd_correct++;
          end
        end
      end
      // ---- GF crossbar ----
      gf_strobe = 1'($urandom_range(3, 0) != 0);
      gf_hits = '0;
      if (gf_strobe) gf_exp = '0;
      for (int s = 0; s < 15; s++) begin
        gf_din[s] = 1'($urandom);
        gf_dest[s] = 4'($urandom_range(15, 0));
        if (gf_strobe) begin
          if (gf_dest[s] == 0) n_gf_off++;
          else if (gf_din[s]) begin
            if (gf_hits[gf_dest[s]-1]) n_gf_or++;
            gf_hits[gf_dest[s]-1] = 1'b1;
            gf_exp[gf_dest[s]-1] = 1'b1;
            n_gf_deliver++;
          end
        end
      end
      if (!hd_strobe || !gf_strobe) n_hold++;
      // ---- synchronous switch: source this cycle is the counter value ----
      ss_s = ss_model;
      ss_din = 15'($urandom);
      ss_dest = 4'($urandom_range(15, 0));
      ss_exp = '0;
      if (ss_s != 0 && ss_dest != 0 && ss_din[ss_s-1]) begin
        ss_exp[ss_dest-1] = 1'b1;
        n_ss_deliver++;
      end
      chk(64'(ss_src), 64'(ss_s), "ss source");
      ss_load = 1'($urandom_range(7, 0) == 0);
      ss_addr1 = 4'($urandom_range(15, 1));
      ss_count_en = 1'($urandom_range(3, 0) != 0);
      if (ss_load) begin ss_model = int'(ss_addr1); n_ss_load++; end
      else if (ss_count_en) begin
        n_ss_step++;
        if (ss_model >= 15) begin ss_model = 1; n_ss_wrap++; end
        else ss_model++;
      end
      @(posedge clk);
      #1;
      chk(64'(hd_dout), 64'(hd_exp), $sformatf("hd_dout t%0d", t));
      chk(64'(hd_err), 64'(hd_err_exp), $sformatf("hd_err t%0d", t));
      chk(64'(gf_dout), 64'(gf_exp), $sformatf("gf_dout t%0d", t));
      chk(64'(ss_dout), 64'(ss_exp), $sformatf("ss_dout t%0d", t));
    end
    count("hd delivery", n_hd_deliver);
    count("hd corrected fault", n_hd_correct);
    count("hd detected fault", n_hd_detect);
    count("gf delivery", n_gf_deliver);
    count("gf senders ORed", n_gf_or);
    count("gf sender off", n_gf_off);
    count("register hold", n_hold);
    count("ss load", n_ss_load);
    count("ss step", n_ss_step);
    count("ss wrap", n_ss_wrap);
    count("ss delivery", n_ss_deliver);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
