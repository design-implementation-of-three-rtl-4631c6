// bit_addition_logic: stage 1 of the three-operand adder.
//
// A row of N independent full adders, one per bit position. Bit i of a, b and c is reduced to
// S'_i (weight 2**i) and cy_i (weight 2**(i+1)), so a + b + c = s_p + 2*cy. No carry moves
// between positions here; that is left to the prefix stages. Purely combinational.
// The structure (one full adder per bit) follows the document; N defaults to its 16 bits.
module bit_addition_logic #(
  parameter int unsigned N = toa_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s_p,  // S'_i
  output logic [N-1:0] cy    // cy_i
);

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .s (s_p[i]),
      .cy(cy[i])
    );
  end

endmodule
