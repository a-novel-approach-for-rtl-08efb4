// tb_ks_prefix_tree: the 16-column Kogge-Stone tree against a serial
// carry recurrence c[j+1] = g[j] | p[j] & c[j], c[0] = cin. Generate and
// propagate are driven as free random bits (including g = p = 1, which the
// operator must also handle), plus the all-propagate chain with cin = 1
// that needs every level of the tree. The internal group signals of the
// relations listed for testing with the original tree are checked too:
// level 1 GP(7:6), level 2 GP(11:8), level 3 GP(14:7), level 4 G(7:-1).
module tb_ks_prefix_tree;
  localparam int W = 16;
  logic [W-2:0] g, p;
  logic         cin;
  logic [W-1:0] c;
  int checks = 0, failures = 0;

  ks_prefix_tree dut (.g(g), .p(p), .cin(cin), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference group generate/propagate over bits lo .. hi (lo = -1 is the
  // carry-in, whose propagate is 0), by a serial scan from the bottom.
  function automatic logic [1:0] ref_gp(input int hi, input int lo);
    logic gg, pp;
    gg = 1'b0;
    pp = 1'b1;
    for (int i = lo; i <= hi; i++) begin
      logic bg, bp;
      bg = (i < 0) ? cin : g[i];
      bp = (i < 0) ? 1'b0 : p[i];
      gg = bg | (bp & gg);
      pp = bp & pp;
    end
    return {gg, pp};
  endfunction

  // Tree column j holds bit j-1.
  task automatic check_table();
    checks++;
    if ({dut.g_lvl[1].go[8], dut.g_lvl[1].po[8]} !== ref_gp(7, 6)) begin
      failures++;
      $display("FAIL GP(7:6) g=%h p=%h", g, p);
    end
    checks++;
    if ({dut.g_lvl[2].go[12], dut.g_lvl[2].po[12]} !== ref_gp(11, 8)) begin
      failures++;
      $display("FAIL GP(11:8) g=%h p=%h", g, p);
    end
    checks++;
    if ({dut.g_lvl[3].go[15], dut.g_lvl[3].po[15]} !== ref_gp(14, 7)) begin
      failures++;
      $display("FAIL GP(14:7) g=%h p=%h", g, p);
    end
    checks++;
    if (dut.g_lvl[4].go[8] !== ref_gp(7, -1) >> 1) begin
      failures++;
      $display("FAIL G(7:-1) g=%h p=%h cin=%b", g, p, cin);
    end
  endtask

  task automatic check();
    logic [W-1:0] exp_c;
    #1;
    check_table();
    exp_c[0] = cin;
    for (int j = 0; j < W - 1; j++) exp_c[j+1] = g[j] | (p[j] & exp_c[j]);
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL g=%h p=%h cin=%b got c=%h want %h", g, p, cin, c, exp_c);
    end
  endtask

  initial begin
    g = '0; p = '1; cin = 1'b1; check();
    g = '0; p = '1; cin = 1'b0; check();
    g = 15'h0001; p = '1; cin = 1'b0; check();
    for (int n = 0; n < 3000; n++) begin
      g = (W-1)'($urandom);
      p = (W-1)'($urandom) | (W-1)'($urandom);  // long propagate runs
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
