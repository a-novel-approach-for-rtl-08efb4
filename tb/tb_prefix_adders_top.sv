// tb_prefix_adders_top: end-to-end test of the three adders at full size.
//
// The same operands go to all three adders (each has its own ports) and
// every result is compared with integer addition: the sum, the Kogge-Stone
// carry out, and the per-bit carry vectors of the two hybrids. The first
// vectors are the example additions shown in the original waveforms
// (5+15, 7+15, -1+-1 for Kogge-Stone; 5+6, 7+6, -1+-1 for the spanning
// tree; 5+7, 6+7, -1+-1 for sparse Kogge-Stone, all with cin = 0), checked
// against the values printed there. The test counts how often each
// mechanism of the design was exercised and fails if one never was:
// a carry out, a carry-in rippling through all 16 bits, and a lookahead
// carry entering each of the 4-bit ripple slices 1, 2 and 3.
module tb_prefix_adders_top;
  localparam int W = 16;

  logic [W-1:0] ks_a, ks_b, ks_sum;
  logic         ks_cin, ks_cout;
  logic [W-1:0] sks_a, sks_b, sks_s, sks_c;
  logic         sks_cin;
  logic [15:0]  st_a, st_b, st_sum, st_c;
  logic         st_cin;

  int checks = 0, failures = 0;
  int n_cout = 0, n_full_chain = 0;
  int n_slice_carry[1:3] = '{0, 0, 0};

  prefix_adders_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got,
                           input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // Drive all three adders with one addition and check every output.
  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b, input logic cin);
    logic [W:0]   total;
    logic [W-1:0] exp_c;
    ks_a = a;  ks_b = b;  ks_cin = cin;
    sks_a = a; sks_b = b; sks_cin = cin;
    st_a = a;  st_b = b;  st_cin = cin;
    #1;
    total = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
    exp_c = {total[W], (a[W-1:1] ^ b[W-1:1] ^ total[W-1:1])};
    expect_eq("ks sum",   32'(ks_sum),  32'(total[W-1:0]));
    expect_eq("ks cout",  32'(ks_cout), 32'(total[W]));
    expect_eq("sks sum",  32'(sks_s),   32'(total[W-1:0]));
    expect_eq("sks c",    32'(sks_c),   32'(exp_c));
    expect_eq("st sum",   32'(st_sum),  32'(total[W-1:0]));
    expect_eq("st c",     32'(st_c),    32'(exp_c));
    // Mechanism coverage, from the operands alone.
    if (total[W]) n_cout++;
    if (cin && (a ^ b) == '1) n_full_chain++;
    for (int k = 1; k <= 3; k++) begin
      logic [W:0] low;
      low = (W+1)'(a & ((W'(1) << (4 * k)) - 1)) + (W+1)'(b & ((W'(1) << (4 * k)) - 1))
          + (W+1)'(cin);
      if (low[4*k]) n_slice_carry[k]++;
    end
  endtask

  initial begin
    // Example additions from the published waveforms (cin = 0).
    apply(16'd5, 16'd15, 1'b0);
    expect_eq("fig ks 5+15",   32'(ks_sum), 32'd20);
    apply(16'd7, 16'd15, 1'b0);
    expect_eq("fig ks 7+15",   32'(ks_sum), 32'd22);
    apply(16'hffff, 16'hffff, 1'b0);
    expect_eq("fig ks -1+-1",  32'({ks_cout, ks_sum}), 32'h1fffe);
    expect_eq("fig st -1+-1",  32'({st_c, st_sum}), 32'hfffffffe);
    expect_eq("fig sks -1+-1", 32'({sks_c, sks_s}), 32'hfffffffe);
    apply(16'd5, 16'd6, 1'b0);
    expect_eq("fig st 5+6",    32'({st_c, st_sum}), {16'd4, 16'd11});
    apply(16'd7, 16'd6, 1'b0);
    expect_eq("fig st 7+6",    32'({st_c, st_sum}), {16'd6, 16'd13});
    expect_eq("fig sks 6+7",   32'({sks_c, sks_s}), {16'd6, 16'd13});
    apply(16'd5, 16'd7, 1'b0);
    expect_eq("fig sks 5+7",   32'({sks_c, sks_s}), {16'd7, 16'd12});

    // Carry-in rippling through every bit, and the carry crossing each slice.
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'h0fff, 16'h0000, 1'b1);
    apply(16'h00ff, 16'h0001, 1'b0);
    apply(16'h000f, 16'h0001, 1'b0);
    for (int n = 0; n < 5000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));

    $display("mechanisms: cout=%0d full_chain=%0d slice_carry=%0d/%0d/%0d",
             n_cout, n_full_chain, n_slice_carry[1], n_slice_carry[2], n_slice_carry[3]);
    checks++;
    if (n_cout == 0 || n_full_chain == 0 || n_slice_carry[1] == 0 ||
        n_slice_carry[2] == 0 || n_slice_carry[3] == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
