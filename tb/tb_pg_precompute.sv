// tb_pg_precompute: random operands; each bit's generate must be set
// exactly when both operand bits are 1 and its propagate exactly when one
// of them is.
module tb_pg_precompute;
  localparam int W = 16;
  logic [W-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  pg_precompute dut (.a(a), .b(b), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        int ones;
        ones = int'(a[i]) + int'(b[i]);
        checks++;
        if (g[i] !== (ones == 2) || p[i] !== (ones == 1)) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h g=%h p=%h", i, a, b, g, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
