// adder: top level of the three-operand adder, as it appears in the reference implementation.
//
// Adds three unsigned N-bit operands (N = 16 by default) and returns the exact N+2-bit sum
// S = a + b + c, which cannot overflow. The ports a, b, c and S and their widths match the
// document's schematic of the top, which has no carry-in; the external carry-in of the
// three_operand_adder core is therefore tied to 0 here (use the core directly where a carry-in is
// wanted). Purely combinational: S is valid one adder delay after the last operand changes.
module adder #(
  parameter int unsigned N = toa_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N+1:0] S
);

  three_operand_adder #(.N(N)) u_core (
    .a  (a),
    .b  (b),
    .c  (c),
    .cin(1'b0),
    .s  (S)
  );

endmodule
