// base_logic: stage 2 of the three-operand adder, a row of N+1 "saltire" cells.
//
// Position i pairs the stage-1 sum bit S'_i with the carry bit cy_(i-1) of the position to its
// right and forms the bit generate and propagate of a two-operand addition:
//   G_i = S'_i & cy_(i-1),  P_i = S'_i ^ cy_(i-1).
// Position 0 uses the external carry-in in place of cy_(-1). Position N has no S' bit (the
// operands are only N bits wide), so it is treated as S'_N = 0: G_N = 0 and P_N = cy_(N-1);
// that reading of the top cell is this design's own. Purely combinational.
module base_logic #(
  parameter int unsigned N = toa_pkg::DEFAULT_N
) (
  input  logic [N-1:0] s_p,  // S'_i from bit addition logic
  input  logic [N-1:0] cy,   // cy_i from bit addition logic
  input  logic         cin,  // external carry-in
  output logic [N:0]   g,    // G_i
  output logic [N:0]   p     // P_i
);

  logic [N:0] sum_bit;    // S'_i, with S'_N = 0
  logic [N:0] carry_bit;  // cy_(i-1), with Cin at position 0

  always_comb begin
    sum_bit   = {1'b0, s_p};
    carry_bit = {cy, cin};
    g         = sum_bit & carry_bit;
    p         = sum_bit ^ carry_bit;
  end

endmodule
