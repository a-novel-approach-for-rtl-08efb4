// ks_prefix_tree: Kogge-Stone carry network with the carry-in as bit -1.
//
// The tree has WIDTH columns: column 0 is the carry-in (bit -1, with
// generate = cin and propagate = 0) and column j is bit j-1. Level l
// (l = 1 .. log2(WIDTH)) merges every column with the column 2^(l-1) places
// below it. A column whose lower partner already reaches bit -1 needs only
// the generate half of the operator (gray cell); the others need the full
// operator (black cell); columns that are already complete pass straight
// down. After the last level column j holds G(j-1:-1), which is the carry
// into bit j, so c[j] is the carry into bit j and c[0] = cin.
//
// For WIDTH = 16 this is exactly the 16-column, 4-level tree of the paper
// (bits 14 .. -1, spans 1, 2, 4, 8, fan-out at most 2). The most
// significant bit of an adder is not in the tree: its carry out is formed
// after it (see ks_adder), as in the paper. Any WIDTH >= 2 works.
// Purely combinational; the depth is log2(WIDTH) cells.
module ks_prefix_tree #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-2:0] g,    // generate of bits 0 .. WIDTH-2
  input  logic [WIDTH-2:0] p,    // propagate of bits 0 .. WIDTH-2
  input  logic             cin,  // carry in, bit -1
  output logic [WIDTH-1:0] c     // c[j] = carry into bit j
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  // Level 0: column j is bit j-1, column 0 is the carry-in.
  logic [WIDTH-1:0] g0, p0;
  assign g0 = {g, cin};
  assign p0 = {p, 1'b0};

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned D = 1 << (l - 1);  // span of this level
    logic [WIDTH-1:0] gi, pi;  // this level's inputs
    logic [WIDTH-1:0] go, po;  // this level's outputs

    if (l == 1) begin : g_from_bits
      assign gi = g0;
      assign pi = p0;
    end else begin : g_from_level
      assign gi = g_lvl[l-1].go;
      assign pi = g_lvl[l-1].po;
    end

    for (genvar j = 0; j < WIDTH; j++) begin : g_col
      if (j < D) begin : g_pass
        // Already reaches bit -1: carried straight down.
        assign go[j] = gi[j];
        assign po[j] = pi[j];
      end else if (j < 2 * D) begin : g_gray
        // Lower partner reaches bit -1: this column becomes a carry.
        gray_cell u_gc (
          .gl(gi[j]),
          .pl(pi[j]),
          .gr(gi[j-D]),
          .g (go[j])
        );
        assign po[j] = 1'b0;
      end else begin : g_black
        black_cell u_bc (
          .gl(gi[j]),
          .pl(pi[j]),
          .gr(gi[j-D]),
          .pr(pi[j-D]),
          .g (go[j]),
          .p (po[j])
        );
      end
    end
  end

  assign c = g_lvl[LEVELS].go;

  initial assert (WIDTH >= 2) else $error("ks_prefix_tree needs WIDTH >= 2");
endmodule
