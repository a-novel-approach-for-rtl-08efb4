// tb_rca: exhaustive check of the 4-bit ripple-carry slice. For every a, b
// and cin the sum must equal the low bits of a + b + cin, and the carry out
// of bit i must equal bit i+1 of the sum of the operands' bits 0 .. i.
module tb_rca;
  localparam int W = 4;
  logic [W-1:0] a, b, s, c;
  logic cin;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      int total;
      {a, b, cin} = (2 * W + 1)'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (s !== W'(total)) begin
        failures++;
        $display("FAIL sum a=%h b=%h cin=%b got %h", a, b, cin, s);
      end
      for (int i = 0; i < W; i++) begin
        int mask, part;
        mask = (1 << (i + 1)) - 1;
        part = (int'(a) & mask) + (int'(b) & mask) + int'(cin);
        checks++;
        if (c[i] !== part[i+1]) begin
          failures++;
          $display("FAIL carry %0d a=%h b=%h cin=%b got c=%b", i, a, b, cin, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
