// gray_cell: generate-only half of the fundamental carry operator.
//
// Used where the lower group already reaches the carry-in, so the merged
// group's generate is a finished carry and its propagate is never needed:
//   g = gl | pl & gr.
// The cell and its role follow the paper. Purely combinational.
module gray_cell (
  input  logic gl,  // generate of the left (upper) group
  input  logic pl,  // propagate of the left group
  input  logic gr,  // generate of the right group, a carry
  output logic g    // carry out of the merged group
);
  always_comb g = gl | (pl & gr);
endmodule
