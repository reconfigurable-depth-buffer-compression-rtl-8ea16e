// zc_bp_gen: break-point map generation (first stage).
//
// Compares every first- and second-order differential of one reference frame
// with the range the 7-bit DDPCM scheme can hold, -64..63. A differential
// outside that range is a break point: its bit in the map is set. If any bit
// is set the tile cannot be coded as one plane and the two_plane output is
// raised (the tile may still end up uncompressed). Position 0, the reference
// pixel itself, is never a break point.
//
// Purely combinational.
//
// Follows the original architecture: one threshold compare per differential
// and the two-plane decision. Own choice: first-order differentials are
// checked as well, since they are stored in 7 bits.
`timescale 1ns/1ps
module zc_bp_gen
  import zc_pkg::*;
(
  input  dset_t diff,        // full differential set, frame raster order
  output map_t  bp_map,      // 1 = outside the 7-bit range
  output logic  two_plane    // some differential is out of range
);

  always_comb begin
    bp_map = '0;
    for (int i = 1; i < NPIX; i++)
      bp_map[i] = (int'(diff[i]) > THR_MAX) || (int'(diff[i]) < THR_MIN);
  end

  assign two_plane = |bp_map;

endmodule
