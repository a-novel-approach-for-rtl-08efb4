// tb_black_cell: exhaustive check of the fundamental carry operator.
// All 16 input combinations are applied; the expected (g, p) is worked out
// from the operator's definition as a truth-table case.
module tb_black_cell;
  logic gl, pl, gr, pr, g, p;
  int checks = 0, failures = 0;

  black_cell dut (.gl(gl), .pl(pl), .gr(gr), .pr(pr), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {gl, pl, gr, pr} = 4'(v);
      #1;
      // The merged group generates if the upper part generates, or if it
      // propagates a carry the lower part generates.
      exp_g = (gl == 1'b1) ? 1'b1 : (pl == 1'b1 && gr == 1'b1);
      exp_p = (pl == 1'b1 && pr == 1'b1);
      checks++;
      if (g !== exp_g || p !== exp_p) begin
        failures++;
        $display("FAIL gl=%b pl=%b gr=%b pr=%b: got g=%b p=%b want %b %b",
                 gl, pl, gr, pr, g, p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
