// full_adder: one "F" cell of the bit addition logic (stage 1 of the three-operand adder).
//
// Compresses three bits of equal weight into a sum bit of the same weight and a carry bit of
// twice the weight: s = a ^ b ^ c, cy = a&b | b&c | c&a. The equations are the document's;
// writing them as plain gates is this design's choice. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,   // S'_i
  output logic cy   // cy_i
);

  always_comb begin
    s  = a ^ b ^ c;
    cy = (a & b) | (b & c) | (c & a);
  end

endmodule
