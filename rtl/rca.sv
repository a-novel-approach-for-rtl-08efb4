// rca: ripple-carry adder slice that ends the two hybrid adders.
//
// WIDTH full adders in a chain; the carry into the slice enters bit 0 and
// each bit's carry out feeds the next. Every bit's carry out is brought out
// on c[], because the hybrid adders report the carry of every bit (their
// C outputs); c[WIDTH-1] is the slice's carry out. The 4-bit default is
// the paper's slice width. Purely combinational: the delay is WIDTH
// full-adder carry stages.
module rca #(
  parameter int unsigned WIDTH = adder_pkg::SLICE_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,  // carry into bit 0
  output logic [WIDTH-1:0] s,    // sum
  output logic [WIDTH-1:0] c     // c[i] = carry out of bit i
);
  logic [WIDTH:0] ch;  // ch[i] = carry into bit i
  assign ch[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(ch[i]),
      .s (s[i]),
      .co(ch[i+1])
    );
  end

  assign c = ch[WIDTH:1];
endmodule
