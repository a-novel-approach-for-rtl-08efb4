// tb_ks_adder: the 16-bit Kogge-Stone adder against integer addition.
// {cout, sum} must equal a + b + cin for corner operands (all-ones chains,
// carry-in through every bit, zero) and for random operands. A second,
// 8-bit instance repeats the worst-case example 11111111 + 00000001, whose
// carry runs from the least to the most significant bit, and is checked
// exhaustively.
module tb_ks_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  ks_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  logic [7:0] a8, b8, sum8;
  logic       cin8, cout8;
  ks_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(sum8), .cout(cout8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb,
                       input logic tc);
    longint exp_total;
    a = ta; b = tb; cin = tc;
    #1;
    exp_total = longint'(ta) + longint'(tb) + longint'(tc);
    checks++;
    if ({cout, sum} !== (W+1)'(exp_total)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got cout=%b sum=%h want %h",
               ta, tb, tc, cout, sum, exp_total);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < W; i++) apply(W'(1) << i, ~(W'(1) << i), 1'b1);
    for (int n = 0; n < 3000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    // 8-bit instance: the worst-case carry chain, then every input.
    a8 = 8'hff; b8 = 8'h01; cin8 = 1'b0;
    #1;
    checks++;
    if ({cout8, sum8} !== 9'h100) begin
      failures++;
      $display("FAIL 8-bit ff+01: got cout=%b sum=%h", cout8, sum8);
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, cin8} = 17'(v);
      #1;
      checks++;
      if ({cout8, sum8} !== 9'(int'(a8) + int'(b8) + int'(cin8))) begin
        failures++;
        $display("FAIL 8-bit a=%h b=%h cin=%b got %b %h", a8, b8, cin8, cout8, sum8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
