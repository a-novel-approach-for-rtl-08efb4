// stcla_carry: carry network of the 16-bit spanning-tree carry-lookahead
// adder.
//
// Bits are numbered 1 .. 12 here as in the adder's drawing (a[0] is bit 1).
// Twelve bit cells gp1 .. gp12 form each bit's generate and propagate. A
// binary tree of GP cells reduces them to the 4-bit groups (4:1), (8:5) and
// (12:9); one more GP cell (GP10) merges (12:9) with (8:5) into (12:5).
// Three carry cells then give the carries into bits 5, 9 and 13:
//   c4  = G(4:1)  | P(4:1)  & cin
//   c8  = G(8:5)  | P(8:5)  & c4
//   c12 = G(12:5) | P(12:5) & c4
// so c8 and c12 both hang off c4 and are found in parallel. The cell names
// and the block structure follow the paper's figure; the exact carry
// equations and the gates inside the cells (the carry operator of
// black_cell / gray_cell) are this design's.
// Bits 13 .. 16 need no lookahead: their ripple adder makes their carries.
// Purely combinational; fixed at 16 bits like the drawing.
module stcla_carry (
  input  logic [11:0] a,    // operand A, bits 1 .. 12
  input  logic [11:0] b,    // operand B, bits 1 .. 12
  input  logic        cin,  // carry into bit 1
  output logic        c4,   // carry into bit 5
  output logic        c8,   // carry into bit 9
  output logic        c12   // carry into bit 13
);
  logic [11:0] g, p;          // gp1 .. gp12
  logic [2:0]  grp_g, grp_p;  // (4:1), (8:5), (12:9)
  logic        g12_5, p12_5;  // GP10: (12:5)

  pg_precompute #(.WIDTH(12)) u_gp (
    .a(a),
    .b(b),
    .g(g),
    .p(p)
  );

  for (genvar k = 0; k < 3; k++) begin : g_group
    group_pg #(.N(4)) u_grp (
      .g (g[4*k +: 4]),
      .p (p[4*k +: 4]),
      .gg(grp_g[k]),
      .gp(grp_p[k])
    );
  end

  black_cell u_gp10 (
    .gl(grp_g[2]),
    .pl(grp_p[2]),
    .gr(grp_g[1]),
    .pr(grp_p[1]),
    .g (g12_5),
    .p (p12_5)
  );

  gray_cell u_c4 (
    .gl(grp_g[0]),
    .pl(grp_p[0]),
    .gr(cin),
    .g (c4)
  );

  gray_cell u_c8 (
    .gl(grp_g[1]),
    .pl(grp_p[1]),
    .gr(c4),
    .g (c8)
  );

  gray_cell u_c12 (
    .gl(g12_5),
    .pl(p12_5),
    .gr(c4),
    .g (c12)
  );
endmodule
