// black_cell: full prefix operator of the PG logic (stage 3).
//
// Merges an upper group (i:k) with the adjacent lower group (k-1:j) into the group (i:j):
//   g = gk | (pk & gj)   i.e. G_i:j = G_i:k + P_i:k * G_k-1:j
//   p = pk & pj          i.e. P_i:j = P_i:k * P_k-1:j
// Pin names follow the document's gate-level drawing; the output names are this design's.
// Purely combinational: two AND gates and one OR gate.
module black_cell (
  input  logic gk,  // G_i:k
  input  logic pk,  // P_i:k
  input  logic gj,  // G_k-1:j
  input  logic pj,  // P_k-1:j
  output logic g,   // G_i:j
  output logic p    // P_i:j
);

  always_comb begin
    g = gk | (pk & gj);
    p = pk & pj;
  end

endmodule
