// black_cell: the fundamental carry operator (fco) of a prefix network.
//
// Combines a more significant group (gl, pl) with the adjacent less
// significant group (gr, pr):  (g, p) = (gl | pl & gr, pl & pr).
// The operator and the "black cell" name follow the paper.
// Purely combinational.
module black_cell (
  input  logic gl,  // generate of the left (upper) group
  input  logic pl,  // propagate of the left group
  input  logic gr,  // generate of the right (lower) group
  input  logic pr,  // propagate of the right group
  output logic g,   // generate of the merged group
  output logic p    // propagate of the merged group
);
  always_comb begin
    g = gl | (pl & gr);
    p = pl & pr;
  end
endmodule
