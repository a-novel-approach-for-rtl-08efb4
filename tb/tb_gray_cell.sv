// tb_gray_cell: exhaustive check of the generate-only carry operator.
module tb_gray_cell;
  logic gl, pl, gr, g;
  int checks = 0, failures = 0;

  gray_cell dut (.gl(gl), .pl(pl), .gr(gr), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {gl, pl, gr} = 3'(v);
      #1;
      exp_g = (gl == 1'b1) ? 1'b1 : (pl == 1'b1 && gr == 1'b1);
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL gl=%b pl=%b gr=%b: got %b want %b", gl, pl, gr, g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
