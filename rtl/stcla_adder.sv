// stcla_adder: 16-bit spanning-tree carry-lookahead adder.
//
// The spanning-tree network (stcla_carry) computes from bits 1 .. 12 the
// carries c4, c8 and c12 into bits 5, 9 and 13. Four 4-bit ripple-carry
// adders, FA1-FA4, FA5-FA8, FA9-FA12 and FA13-FA16, are started by cin, c4,
// c8 and c12 and produce the sum and the carry out of every bit; the
// carry out of FA16 is the adder's carry out (c[15]). Structure, sizes and
// the ports a, b, cin, sum, c (65 pins) follow the paper.
//
// Purely combinational: about four cell levels of lookahead to c12, then
// four full-adder carry stages.
module stcla_adder (
  input  logic [15:0] a,    // a[0] is bit 1 of the drawing
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic [15:0] c     // c[i] = carry out of bit i
);
  logic [3:0] cs;  // carry into each 4-bit ripple slice

  stcla_carry u_carry (
    .a  (a[11:0]),
    .b  (b[11:0]),
    .cin(cin),
    .c4 (cs[1]),
    .c8 (cs[2]),
    .c12(cs[3])
  );
  assign cs[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_slice
    rca #(.WIDTH(4)) u_rca (
      .a  (a[4*k +: 4]),
      .b  (b[4*k +: 4]),
      .cin(cs[k]),
      .s  (sum[4*k +: 4]),
      .c  (c[4*k +: 4])
    );
  end
endmodule
