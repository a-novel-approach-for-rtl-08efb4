// group_pg: generate and propagate of an N-bit group by a binary tree.
//
// Level 1 merges bit pairs (1:0), (3:2), ...; each further level merges
// neighbouring results, so after log2(N) levels of black cells the single
// remaining node is the whole group (N-1:0). For N = 4 this is the pair of
// GP cells followed by one GP cell that the spanning-tree adder of the
// paper uses for each 4-bit group; the sparse Kogge-Stone network uses the
// same reduction (this design's choice). N must be a power of two.
// Purely combinational, log2(N) cell levels.
module group_pg #(
  parameter int unsigned N = adder_pkg::SLICE_WIDTH
) (
  input  logic [N-1:0] g,   // bit generate, bit 0 least significant
  input  logic [N-1:0] p,   // bit propagate
  output logic         gg,  // group generate G(N-1:0)
  output logic         gp   // group propagate P(N-1:0)
);
  localparam int unsigned LEVELS = $clog2(N);

  if (LEVELS == 0) begin : g_single
    assign gg = g[0];
    assign gp = p[0];
  end else begin : g_tree
    for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
      localparam int unsigned M = N >> l;  // nodes at this level
      logic [2*M-1:0] gi, pi;
      logic [M-1:0]   go, po;

      if (l == 1) begin : g_from_bits
        assign gi = g;
        assign pi = p;
      end else begin : g_from_level
        assign gi = g_lvl[l-1].go;
        assign pi = g_lvl[l-1].po;
      end

      for (genvar k = 0; k < M; k++) begin : g_node
        black_cell u_bc (
          .gl(gi[2*k+1]),
          .pl(pi[2*k+1]),
          .gr(gi[2*k]),
          .pr(pi[2*k]),
          .g (go[k]),
          .p (po[k])
        );
      end
    end
    assign gg = g_lvl[LEVELS].go[0];
    assign gp = g_lvl[LEVELS].po[0];
  end

  initial assert (N == (1 << LEVELS)) else $error("group_pg needs a power-of-two N");
endmodule
