// ks_adder: Kogge-Stone parallel-prefix adder.
//
// Three stages, as in the paper. Pre-computation forms each bit's generate
// g and propagate p (p is also the temporary sum t). The Kogge-Stone tree
// (ks_prefix_tree) turns bits 0 .. WIDTH-2 and the carry-in into the carry
// into every bit, c[i] = G(i-1:-1). Post-computation forms the sum
// s[i] = t[i] ^ c[i] and the carry out g[n-1] | p[n-1] & G(n-2:-1), one
// more gray cell after the tree.
//
// Interface: a, b, cin in; sum, cout out (16 + 16 + 1 in, 16 + 1 out at
// the default width, as in the paper). Purely combinational: log2(WIDTH)
// prefix levels plus one XOR and, for cout, one more gray cell.
module ks_adder #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] g, p;  // bit generate and propagate (= temporary sum)
  logic [WIDTH-1:0] c;     // c[i] = carry into bit i

  pg_precompute #(.WIDTH(WIDTH)) u_pg (
    .a(a),
    .b(b),
    .g(g),
    .p(p)
  );

  ks_prefix_tree #(.WIDTH(WIDTH)) u_tree (
    .g  (g[WIDTH-2:0]),
    .p  (p[WIDTH-2:0]),
    .cin(cin),
    .c  (c)
  );

  // Post-computation.
  assign sum = p ^ c;

  gray_cell u_cout (
    .gl(g[WIDTH-1]),
    .pl(p[WIDTH-1]),
    .gr(c[WIDTH-1]),
    .g (cout)
  );
endmodule
