// toa_pkg: constants shared by the three-operand adder.
//
// DEFAULT_N is the operand width of the reference configuration (16-bit a, b and c, giving an
// 18-bit result). hc_odd_levels() gives the number of prefix rows the Han-Carlson network needs on
// its odd positions before every odd position's group reaches position 0; the network then adds
// one more row of gray cells for the even positions. Row r (r = 0, 1, ...) combines over a
// distance of 2**r, so after row r an odd position i covers i down to max(0, i - 2**(r+1) + 1).
package toa_pkg;

  localparam int unsigned DEFAULT_N = 16;

  // Rows needed so that the highest odd position among 0..top_pos reaches position 0.
  function automatic int unsigned hc_odd_levels(int unsigned top_pos);
    int unsigned max_odd;
    int unsigned levels;
    max_odd = (top_pos % 2 == 1) ? top_pos : top_pos - 1;
    levels  = 1;
    while ((2 ** (levels)) < max_odd + 1) levels++;
    return levels;
  endfunction

endpackage
