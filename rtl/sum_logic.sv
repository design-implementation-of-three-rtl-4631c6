// sum_logic: stage 4 of the three-operand adder.
//
// Forms the result from the base-logic propagates and the prefix carries G_i:0:
//   S_0 = P_0,  S_i = P_i ^ G_(i-1):0 for i = 1..N,  Cout = G_N:0.
// The output is packed as {Cout, S_N, ..., S_0}, N+2 bits, which is the full range of
// a + b + c + cin for N-bit operands. Purely combinational: N XOR gates.
module sum_logic #(
  parameter int unsigned N = toa_pkg::DEFAULT_N
) (
  input  logic [N:0]   p,     // P_i from base logic
  input  logic [N:0]   gpre,  // G_i:0 from PG logic
  output logic [N+1:0] s      // {Cout, S_N .. S_0}
);

  always_comb begin
    s[0]     = p[0];
    s[N:1]   = p[N:1] ^ gpre[N-1:0];
    s[N+1]   = gpre[N];
  end

endmodule
