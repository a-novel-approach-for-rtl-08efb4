// full_adder: one-bit full adder, the cell of the ripple-carry slices.
//
// s = a ^ b ^ ci, co = a & b | ci & (a ^ b). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,  // carry in
  output logic s,   // sum
  output logic co   // carry out
);
  logic t;
  always_comb begin
    t  = a ^ b;
    s  = t ^ ci;
    co = (a & b) | (ci & t);
  end
endmodule
