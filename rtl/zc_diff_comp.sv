// zc_diff_comp: folded differential computation (first stage).
//
// One differential-computation block serves every reference corner. The
// input multiplexers reorder the tile into the canonical frame of the selected
// reference (upper-left, lower-right, lower-left or upper-right), so the same
// subtractors compute all four differential sets. Following the folded
// structure, the block handles half a tile per call: rows 0..3 of the frame
// when half=0, rows 4..7 when half=1, so a whole set takes two cycles.
//
// In the frame, with z(r,c) the reordered pixels:
//   (0,0)        0 (the reference itself is carried separately)
//   (0,1)        dH = z(0,1) - z(0,0)            horizontal 1st order
//   (1,0)        dV = z(1,0) - z(0,0)            vertical 1st order
//   (r,0), r>=2  z(r,0) - z(r-1,0) - dV          vertical 2nd order
//   other        z(r,c) - z(r,c-1) - dH          horizontal 2nd order
// These are the one-plane differentials of the HA scheme generalised from 4x4
// to 8x8. Each output uses one first-order subtractor shared with the
// neighbour row/column difference and one second-order subtractor.
//
// Purely combinational; the enclosing stage registers the result.
//
// Follows the original architecture: one folded unit, half a set per cycle.
// Own choice: the reorder is a multiplexer, not the data shift registers of
// the original, so no cycles are spent reordering.
`timescale 1ns/1ps
module zc_diff_comp
  import zc_pkg::*;
(
  input  tile_t             tile,     // original pixel order
  input  ref_e              ref_sel,  // reference corner
  input  logic              half,     // 0: frame rows 0..3, 1: rows 4..7
  output d_t [NPIX/2-1:0]   diff,     // differentials of the selected half, frame raster order
  output z_t                ref_val   // value of the reference pixel
);

  // data reorder: canonical frame of the selected reference
  tile_t zc;
  always_comb begin
    for (int r = 0; r < TS; r++)
      for (int c = 0; c < TS; c++)
        zc[r*TS+c] = tile[orig_idx(ref_sel, r, c)];
  end

  d_t d_h1, d_v1;
  always_comb begin
    d_h1 = d_t'(signed'({2'b00, zc[1]})) - d_t'(signed'({2'b00, zc[0]}));
    d_v1 = d_t'(signed'({2'b00, zc[TS]})) - d_t'(signed'({2'b00, zc[0]}));
  end

  assign ref_val = zc[0];

  always_comb begin
    for (int k = 0; k < NPIX/2; k++) begin
      int r, c;
      d_t cur, prev, first;
      r = k / TS + (half ? TS/2 : 0);
      c = k % TS;
      cur  = d_t'(signed'({2'b00, zc[r*TS+c]}));
      if (c == 0) begin
        prev  = (r == 0) ? cur : d_t'(signed'({2'b00, zc[(r == 0 ? 0 : r-1)*TS]}));
        first = (r >= 2) ? d_v1 : '0;
      end else begin
        prev  = d_t'(signed'({2'b00, zc[r*TS+c-1]}));
        first = (r == 0 && c == 1) ? '0 : d_h1;
      end
      diff[k] = (cur - prev) - first;
    end
  end

endmodule
