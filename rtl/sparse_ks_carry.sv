// sparse_ks_carry: sparse Kogge-Stone carry network.
//
// Only every SPARSITY-th carry is computed: the carry into each
// SPARSITY-bit ripple slice. First each slice below the top one is reduced
// to its group generate/propagate (group_pg, a binary tree of black cells).
// Those group signals then go through a Kogge-Stone tree (ks_prefix_tree)
// with the carry-in as its bit -1, so cblk[k] is the carry into bit
// SPARSITY*k; cblk[0] is cin itself. The top slice's own carry out comes
// from its ripple adder, so its bits are not needed here.
//
// The idea (a Kogge-Stone network thinned to every 4th carry, finished by
// 4-bit ripple adders) follows the paper; the cell-level arrangement, each
// slice reduced first and a Kogge-Stone tree over the slices after, is
// this design's own and gives the same carries.
// Purely combinational: log2(SPARSITY) + log2(WIDTH/SPARSITY) cell levels.
module sparse_ks_carry #(
  parameter int unsigned WIDTH    = adder_pkg::ADDER_WIDTH,
  parameter int unsigned SPARSITY = adder_pkg::SLICE_WIDTH
) (
  input  logic [WIDTH-SPARSITY-1:0]  g,    // bit generate, all slices but the top one
  input  logic [WIDTH-SPARSITY-1:0]  p,    // bit propagate, same bits
  input  logic                       cin,  // carry in
  output logic [WIDTH/SPARSITY-1:0]  cblk  // cblk[k] = carry into bit SPARSITY*k
);
  localparam int unsigned NB = WIDTH / SPARSITY;  // number of slices

  logic [NB-2:0] bg, bp;  // group generate/propagate of slices 0 .. NB-2

  for (genvar k = 0; k < NB - 1; k++) begin : g_slice
    group_pg #(.N(SPARSITY)) u_grp (
      .g (g[k*SPARSITY +: SPARSITY]),
      .p (p[k*SPARSITY +: SPARSITY]),
      .gg(bg[k]),
      .gp(bp[k])
    );
  end

  ks_prefix_tree #(.WIDTH(NB)) u_tree (
    .g  (bg),
    .p  (bp),
    .cin(cin),
    .c  (cblk)
  );

  initial assert (NB >= 2 && NB * SPARSITY == WIDTH)
    else $error("sparse_ks_carry needs WIDTH a multiple (>= 2) of SPARSITY");
endmodule
