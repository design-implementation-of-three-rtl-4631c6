// pg_logic: stage 3 of the three-operand adder, a Han-Carlson carry prefix network.
//
// Inputs are the bit generate/propagate pairs (G_i, P_i) of positions 0..N; the output is the
// group generate G_i:0 of every position, i.e. the carry into position i+1.
//
// Structure, taken from the document's network drawing:
//   row 0        every odd position i merges with i-1            (1:0, 3:2, 5:4, ...)
//   rows 1..L-1  odd positions only, distance 2**r               (3:0, 5:2, ... then 5:0, 7:0, 9:2, ...)
//                a Kogge-Stone network on the odd lanes
//   last row     every even position i >= 2 merges with G_(i-1):0 (2:0, 4:0, ..., N:0)
// A merge whose result reaches position 0 only needs its generate and uses a gray_cell; every other
// merge uses a black_cell. Positions with nothing to merge in a row pass straight through. For
// N = 16 (17 positions) there are L = 4 odd rows and one even row: 5 cell delays.
// Applying the same rule to other widths is this design's generalisation. Purely combinational.
module pg_logic #(
  parameter int unsigned N = toa_pkg::DEFAULT_N
) (
  input  logic [N:0] g,     // G_i
  input  logic [N:0] p,     // P_i
  output logic [N:0] gpre   // G_i:0
);

  localparam int unsigned L = toa_pkg::hc_odd_levels(N);

  // gl[r] / pl[r]: group generate / propagate of each position after r rows.
  logic [N:0] gl [L+1];
  logic [N:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar r = 0; r < L; r++) begin : g_row
    localparam int unsigned D = 2 ** r;
    for (genvar i = 0; i <= N; i++) begin : g_pos
      if ((i % 2 == 1) && (i >= D)) begin : g_merge
        // After this row position i covers i down to max(0, i - 2**(r+1) + 1).
        if (i + 1 <= 2 * D) begin : g_gray
          gray_cell u_gray (
            .gk(gl[r][i]),
            .pk(pl[r][i]),
            .gj(gl[r][i-D]),
            .g (gl[r+1][i])
          );
          assign pl[r+1][i] = 1'b0;  // never read: group reaches position 0
        end else begin : g_black
          black_cell u_black (
            .gk(gl[r][i]),
            .pk(pl[r][i]),
            .gj(gl[r][i-D]),
            .pj(pl[r][i-D]),
            .g (gl[r+1][i]),
            .p (pl[r+1][i])
          );
        end
      end else begin : g_pass
        assign gl[r+1][i] = gl[r][i];
        assign pl[r+1][i] = pl[r][i];
      end
    end
  end

  // Last row: even positions take the finished carry of the odd position below them.
  for (genvar i = 0; i <= N; i++) begin : g_even
    if ((i % 2 == 0) && (i >= 2)) begin : g_merge
      gray_cell u_gray (
        .gk(gl[L][i]),
        .pk(pl[L][i]),
        .gj(gl[L][i-1]),
        .g (gpre[i])
      );
    end else begin : g_pass
      assign gpre[i] = gl[L][i];
    end
  end

endmodule
