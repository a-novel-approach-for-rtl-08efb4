// tb_stcla_carry: the spanning-tree carry network against integer
// addition. c4, c8 and c12 must equal the carry out of the low 4, 8 and 12
// bits of a + b + cin.
module tb_stcla_carry;
  logic [11:0] a, b;
  logic cin, c4, c8, c12;
  int checks = 0, failures = 0;

  stcla_carry dut (.a(a), .b(b), .cin(cin), .c4(c4), .c8(c8), .c12(c12));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [11:0] ta, input logic [11:0] tb, input logic tc);
    int s4, s8, s12;
    a = ta; b = tb; cin = tc;
    #1;
    s4  = int'(ta[3:0]) + int'(tb[3:0]) + int'(tc);
    s8  = int'(ta[7:0]) + int'(tb[7:0]) + int'(tc);
    s12 = int'(ta) + int'(tb) + int'(tc);
    checks++;
    if (c4 !== s4[4] || c8 !== s8[8] || c12 !== s12[12]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got c4=%b c8=%b c12=%b", ta, tb, tc, c4, c8, c12);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '0, 1'b0);
    apply(12'h0f0, 12'h00f, 1'b1);
    apply(12'h100, 12'h0ff, 1'b0);
    for (int n = 0; n < 4000; n++) apply(12'($urandom), 12'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
