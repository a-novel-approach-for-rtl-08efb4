// tb_full_adder: exhaustive check of the one-bit full adder against the
// integer sum of its three inputs.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b: got co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
