// three_operand_adder: four-stage parallel prefix adder for three N-bit operands.
//
// Computes s = a + b + c + cin without a separate carry-save adder followed by a two-operand
// adder. The four stages are:
//   1. bit_addition_logic  N full adders: a + b + c = S' + 2*cy        (no carry chain)
//   2. base_logic          N+1 saltire cells: G_i = S'_i & cy_(i-1), P_i = S'_i ^ cy_(i-1),
//                          with cin standing in for cy_(-1)
//   3. pg_logic            Han-Carlson prefix network producing G_i:0 for i = 0..N
//   4. sum_logic           S_0 = P_0, S_i = P_i ^ G_(i-1):0, Cout = G_N:0
// The stage-1 carries are absorbed into the generate/propagate signals of stage 2, so the only
// carry propagation is the log-depth prefix tree. The stages and equations follow the document.
// Output s = {Cout, S_N, ..., S_0} is N+2 bits wide. Purely combinational; the critical path is
// one full adder, one saltire cell, ceil(log2 N)+1 prefix cells and one XOR.
module three_operand_adder #(
  parameter int unsigned N = toa_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N+1:0] s
);

  logic [N-1:0] s_p;   // S'_i
  logic [N-1:0] cy;    // cy_i
  logic [N:0]   g;     // G_i
  logic [N:0]   p;     // P_i
  logic [N:0]   gpre;  // G_i:0

  bit_addition_logic #(.N(N)) u_bit_add (
    .a  (a),
    .b  (b),
    .c  (c),
    .s_p(s_p),
    .cy (cy)
  );

  base_logic #(.N(N)) u_base (
    .s_p(s_p),
    .cy (cy),
    .cin(cin),
    .g  (g),
    .p  (p)
  );

  pg_logic #(.N(N)) u_pg (
    .g   (g),
    .p   (p),
    .gpre(gpre)
  );

  sum_logic #(.N(N)) u_sum (
    .p   (p),
    .gpre(gpre),
    .s   (s)
  );

endmodule
