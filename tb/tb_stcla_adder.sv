// tb_stcla_adder: the 16-bit spanning-tree carry-lookahead adder against integer
// addition. The sum must equal the low 16 bits of a + b + cin, and the
// carry vector must hold the carry out of every bit: the carry into bit
// i+1 is a[i+1] ^ b[i+1] ^ sum[i+1], and the carry out of bit 15 is bit 16
// of the total. Corner operands push a carry through every 4-bit slice.
module tb_stcla_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum, c;
  logic cin;
  int checks = 0, failures = 0;

  stcla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0]   total;
    logic [W-1:0] exp_c;
    a = ta; b = tb; cin = tc;
    #1;
    total = (W+1)'(ta) + (W+1)'(tb) + (W+1)'(tc);
    exp_c = {total[W], (ta[W-1:1] ^ tb[W-1:1] ^ total[W-1:1])};
    checks++;
    if (sum !== total[W-1:0]) begin
      failures++;
      $display("FAIL sum a=%h b=%h cin=%b got %h want %h", ta, tb, tc, sum, total[W-1:0]);
    end
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL carries a=%h b=%h cin=%b got %h want %h", ta, tb, tc, c, exp_c);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('0, '0, 1'b1);
    apply(16'h0fff, 16'h0001, 1'b0);
    apply(16'h00ff, 16'h0001, 1'b0);
    apply(16'h000f, 16'h0001, 1'b0);
    for (int i = 0; i < W; i++) apply(W'(1) << i, ~(W'(1) << i), 1'b1);
    for (int n = 0; n < 3000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
