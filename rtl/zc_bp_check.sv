// zc_bp_check: break-point map check (second stage).
//
// Decides from a break-point map which combination case a tile follows and
// where its top break point lies. The top break point is the first set bit in
// raster order of the frame; its row and column are the coordinate. The map is
// then compared with the pattern each supported case would produce from that
// coordinate (the lookup table of break-point maps, generated here instead of
// stored):
//   CHK_UL      map of the upper-left frame; candidates horizontal (column 0
//               only), rising and vertical, tried in that order
//   CHK_LL      map of the lower-left frame; candidate falling (the rising
//               shape seen from the lower-left corner)
//   CHK_SECOND  map of the second reference (lower-right or upper-right
//               frame); must equal the pattern the already chosen case and
//               coordinate imply for the second plane (break-point match)
// A candidate is also rejected when the six reference and first-order pixels
// would not lie in their own plane, because such a tile cannot be packed.
// match=0 means the tile is uncompressed as far as this check is concerned.
//
// Purely combinational.
//
// Follows the original architecture: UL map first, LL map for falling, case
// and top break point as the result. Own choice: an exact compare with the
// map each shape predicts replaces the lookup table; the edge pixels of the
// shapes are read from the figures.
`timescale 1ns/1ps
module zc_bp_check
  import zc_pkg::*;
(
  input  chk_e       kind,
  input  map_t       bp_map,      // map in the frame being checked
  input  case_e      case_in,     // CHK_SECOND: case found earlier
  input  logic [2:0] row_in,      // CHK_SECOND: top break point found earlier
  input  logic [2:0] col_in,
  output logic       match,
  output case_e      case_out,
  output logic [2:0] row_out,
  output logic [2:0] col_out
);

  // coordinate of the top break point
  logic [5:0] top;
  always_comb begin
    top = '0;
    for (int i = NPIX-1; i >= 1; i--)
      if (bp_map[i]) top = 6'(i);
  end

  function automatic logic fits(map_t m, case_e cs, logic [2:0] r0, logic [2:0] c0);
    map_t pm;
    pm = plane_mask(cs, r0, c0);
    return mask_ok(pm) && (m == edge_first(pm));
  endfunction

  // plane region of the case found earlier (second-reference check)
  map_t pm_in;
  assign pm_in = plane_mask(case_in, row_in, col_in);

  always_comb begin
    match    = 1'b0;
    case_out = CASE_RISING;
    row_out  = top[5:3];
    col_out  = top[2:0];
    unique case (kind)
      CHK_UL: begin
        if (top[2:0] == 3'd0 && fits(bp_map, CASE_HORIZONTAL, top[5:3], 3'd0)) begin
          match = 1'b1; case_out = CASE_HORIZONTAL;
        end else if (fits(bp_map, CASE_RISING, top[5:3], top[2:0])) begin
          match = 1'b1; case_out = CASE_RISING;
        end else if (fits(bp_map, CASE_VERTICAL, top[5:3], top[2:0])) begin
          match = 1'b1; case_out = CASE_VERTICAL;
        end
        if (top == '0) match = 1'b0;
      end
      CHK_LL: begin
        match    = (top != '0) && fits(bp_map, CASE_FALLING, top[5:3], top[2:0]);
        case_out = CASE_FALLING;
      end
      default: begin
        match    = mask_ok(pm_in) && (rot_map(bp_map) == edge_second(pm_in));
        case_out = case_in;
        row_out  = row_in;
        col_out  = col_in;
      end
    endcase
  end

endmodule
