// tb_sparse_ks_carry: the sparse Kogge-Stone network (16 bits, 4-bit
// slices) against a serial carry recurrence; only the carries into bits
// 0, 4, 8 and 12 are compared, as only those are produced.
module tb_sparse_ks_carry;
  localparam int W = 16;
  localparam int S = 4;
  logic [W-S-1:0] g, p;
  logic           cin;
  logic [W/S-1:0] cblk;
  int checks = 0, failures = 0;

  sparse_ks_carry dut (.g(g), .p(p), .cin(cin), .cblk(cblk));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-S:0] ser;  // ser[j] = carry into bit j
    logic [W/S-1:0] exp_c;
    #1;
    ser[0] = cin;
    for (int j = 0; j < W - S; j++) ser[j+1] = g[j] | (p[j] & ser[j]);
    for (int k = 0; k < W / S; k++) exp_c[k] = ser[k*S];
    checks++;
    if (cblk !== exp_c) begin
      failures++;
      $display("FAIL g=%h p=%h cin=%b got %b want %b", g, p, cin, cblk, exp_c);
    end
  endtask

  initial begin
    g = '0; p = '1; cin = 1'b1; check();
    g = '0; p = '1; cin = 1'b0; check();
    for (int n = 0; n < 3000; n++) begin
      g = (W-S)'($urandom);
      p = (W-S)'($urandom) | (W-S)'($urandom);
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
