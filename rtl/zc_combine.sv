// zc_combine: two-plane differential combination (third stage, upper part).
//
// Picks, for every pixel of a two-plane tile, the differential of the plane it
// belongs to. Only the seven low bits of each differential enter, since a tile
// that reached this block stores at most seven bits per differential.
// The plane mask comes from the combination case and the top break point: in
// each row the pixels from the break point rightwards take the second plane
// (the break point and everything after it in the row count as 1); rising and
// falling boundaries step one column left per row, vertical ones stay in their
// column, and a horizontal boundary gives the whole rows below it to the
// second plane. The second set is given in its own frame, which is the first
// frame rotated by 180 degrees, so pixel idx takes d1[63-idx].
//
// Purely combinational.
//
// Follows the original architecture: the 7-bit combination and the row-scan
// rule. Own choice: the region is derived from case and top break point
// instead of scanning the map.
`timescale 1ns/1ps
module zc_combine
  import zc_pkg::*;
(
  input  case_e      cs,
  input  logic [2:0] row,     // top break point, first-reference frame
  input  logic [2:0] col,
  input  cset_t      d0,      // first-reference differentials (low 7 bits)
  input  cset_t      d1,      // second-reference differentials (low 7 bits)
  output cset_t      slot     // combined differentials, first-reference frame
);

  map_t mask;                 // 1 = pixel coded from the second reference
  assign mask = plane_mask(cs, row, col);

  always_comb begin
    for (int i = 0; i < NPIX; i++)
      slot[i] = mask[i] ? d1[NPIX-1-i] : d0[i];
  end

endmodule
