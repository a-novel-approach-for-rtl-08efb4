// sparse_ks_adder: sparse Kogge-Stone adder, a prefix / ripple hybrid.
//
// A thinned Kogge-Stone network (sparse_ks_carry) computes only the carry
// into every SPARSITY-bit slice; each slice is then added by its own
// ripple-carry adder (rca) started by that carry. The sum and the carry
// out of every bit come from the ripple adders, so c[WIDTH-1] is the
// adder's carry out. Sizes (16 bits, 4-bit slices) and the ports a, b,
// cin, s, c (65 pins at 16 bits) follow the paper.
//
// Purely combinational: the prefix network's levels plus SPARSITY
// full-adder carry stages.
module sparse_ks_adder #(
  parameter int unsigned WIDTH    = adder_pkg::ADDER_WIDTH,
  parameter int unsigned SPARSITY = adder_pkg::SLICE_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,  // sum
  output logic [WIDTH-1:0] c   // c[i] = carry out of bit i
);
  localparam int unsigned NB = WIDTH / SPARSITY;

  logic [WIDTH-SPARSITY-1:0] g, p;
  logic [NB-1:0]             cblk;  // carry into each slice

  pg_precompute #(.WIDTH(WIDTH - SPARSITY)) u_pg (
    .a(a[WIDTH-SPARSITY-1:0]),
    .b(b[WIDTH-SPARSITY-1:0]),
    .g(g),
    .p(p)
  );

  sparse_ks_carry #(.WIDTH(WIDTH), .SPARSITY(SPARSITY)) u_carry (
    .g   (g),
    .p   (p),
    .cin (cin),
    .cblk(cblk)
  );

  for (genvar k = 0; k < NB; k++) begin : g_slice
    rca #(.WIDTH(SPARSITY)) u_rca (
      .a  (a[k*SPARSITY +: SPARSITY]),
      .b  (b[k*SPARSITY +: SPARSITY]),
      .cin(cblk[k]),
      .s  (s[k*SPARSITY +: SPARSITY]),
      .c  (c[k*SPARSITY +: SPARSITY])
    );
  end
endmodule
