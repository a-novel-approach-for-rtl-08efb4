// pg_precompute: pre-computation stage of a parallel-prefix adder.
//
// For every bit i it forms the carry generate g[i] = a[i] & b[i] and the
// propagate p[i] = a[i] ^ b[i]. The XOR propagate is also the bit's
// temporary sum t[i], which the post-computation stage XORs with the
// incoming carry. Using XOR (rather than OR) for the propagate is this
// design's choice; the paper names the signals but not their gates.
// Purely combinational, no clock.
module pg_precompute #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,  // bit generate
  output logic [WIDTH-1:0] p   // bit propagate = temporary sum
);
  always_comb begin
    g = a & b;
    p = a ^ b;
  end
endmodule
