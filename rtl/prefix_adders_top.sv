// prefix_adders_top: the three 16-bit parallel-prefix adders side by side.
//
// The design is a family of adders rather than one datapath, so each adder
// keeps its own operands and results:
//   ks_*   Kogge-Stone adder: sum and a single carry out;
//   sks_*  sparse Kogge-Stone adder: sum and the carry out of every bit;
//   st_*   spanning-tree carry-lookahead adder: sum and every bit's carry.
// The per-adder port sets match the paper's pin counts (50, 65 and 65).
// Purely combinational; nothing is shared between the three.
module prefix_adders_top #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  // Kogge-Stone
  input  logic [WIDTH-1:0] ks_a,
  input  logic [WIDTH-1:0] ks_b,
  input  logic             ks_cin,
  output logic [WIDTH-1:0] ks_sum,
  output logic             ks_cout,
  // Sparse Kogge-Stone
  input  logic [WIDTH-1:0] sks_a,
  input  logic [WIDTH-1:0] sks_b,
  input  logic             sks_cin,
  output logic [WIDTH-1:0] sks_s,
  output logic [WIDTH-1:0] sks_c,
  // Spanning-tree carry-lookahead (16 bits by construction)
  input  logic [15:0]      st_a,
  input  logic [15:0]      st_b,
  input  logic             st_cin,
  output logic [15:0]      st_sum,
  output logic [15:0]      st_c
);
  ks_adder #(.WIDTH(WIDTH)) u_ks (
    .a   (ks_a),
    .b   (ks_b),
    .cin (ks_cin),
    .sum (ks_sum),
    .cout(ks_cout)
  );

  sparse_ks_adder #(.WIDTH(WIDTH), .SPARSITY(adder_pkg::SLICE_WIDTH)) u_sks (
    .a  (sks_a),
    .b  (sks_b),
    .cin(sks_cin),
    .s  (sks_s),
    .c  (sks_c)
  );

  stcla_adder u_st (
    .a  (st_a),
    .b  (st_b),
    .cin(st_cin),
    .sum(st_sum),
    .c  (st_c)
  );
endmodule
