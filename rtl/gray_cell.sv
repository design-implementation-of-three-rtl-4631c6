// gray_cell: reduced prefix operator of the PG logic (stage 3).
//
// Used where the merged group ends at position 0, so its propagate is never needed:
//   g = gk | (pk & gj)   i.e. G_i:0 = G_i:k + P_i:k * G_k-1:0
// Pin names follow the document's gate-level drawing. Purely combinational: one AND, one OR.
module gray_cell (
  input  logic gk,  // G_i:k
  input  logic pk,  // P_i:k
  input  logic gj,  // G_k-1:0
  output logic g    // G_i:0
);

  always_comb g = gk | (pk & gj);

endmodule
