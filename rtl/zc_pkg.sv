// zc_pkg: shared types, constants and geometry functions of the reconfigurable
// depth-tile codec.
//
// A tile is 8x8 depth values of 16 bits, indexed idx = row*8 + col in raster
// order. Differentials are always computed in the "canonical frame" of a
// reference corner: the reference pixel sits at (0,0), the horizontal
// first-order differential at (0,1), the vertical one at (1,0). The four
// reference corners are upper-left, lower-right, lower-left and upper-right.
//
// Two-plane tiles are described by a combination case (rising, falling,
// vertical, horizontal; encodings as in the break-point lookup table) plus the
// row/column of the top break point, both given in the canonical frame of the
// first reference (upper-left for rising/vertical/horizontal, lower-left for
// falling). From these the plane mask is derived: bit idx set means the pixel
// is coded from the second reference, which sits at (7,7) of that frame.
// The second reference's own frame is the first one rotated by 180 degrees,
// so F0 index idx corresponds to index 63-idx of the second frame.
//
// Follows the original architecture: 8x8 tiles, 16-bit depth, 7-bit range,
// case codes of the lookup table. Own choices: the 18-bit internal
// differential width, the scheme codes and the shape formulas read from the
// figures.
`timescale 1ns/1ps
package zc_pkg;

  localparam int unsigned TS    = 8;            // tile side
  localparam int unsigned NPIX  = TS * TS;      // pixels per tile
  localparam int unsigned ZW    = 16;           // depth value width
  localparam int unsigned DW    = 18;           // full differential width
  localparam int unsigned CW    = 7;            // widest stored differential
  localparam int unsigned PKTW  = 1 + NPIX*ZW;  // longest packet (uncompressed)
  localparam int unsigned LENW  = 11;           // packet length field width
  localparam int unsigned NVS   = TS - 2;       // vertical-part slots (col 0, rows 2..7)

  // 7-bit DDPCM range that decides the break points
  localparam int signed   THR_MAX = 63;
  localparam int signed   THR_MIN = -64;

  typedef logic [ZW-1:0]            z_t;
  typedef z_t [NPIX-1:0]            tile_t;
  typedef logic signed [DW-1:0]     d_t;
  typedef d_t [NPIX-1:0]            dset_t;
  typedef logic [CW-1:0]            c_t;
  typedef c_t [NPIX-1:0]            cset_t;
  typedef logic [NPIX-1:0]          map_t;
  typedef logic [PKTW-1:0]          pkt_t;

  typedef enum logic [1:0] {
    REF_UL = 2'd0, REF_LR = 2'd1, REF_LL = 2'd2, REF_UR = 2'd3
  } ref_e;

  // encodings printed in the break-point lookup table
  typedef enum logic [1:0] {
    CASE_RISING = 2'b00, CASE_FALLING = 2'b01,
    CASE_VERTICAL = 2'b10, CASE_HORIZONTAL = 2'b11
  } case_e;

  // 2-bit compression-scheme field of the control-code
  typedef enum logic [1:0] {
    SCH_HA2 = 2'b00,   // 1-bit HA, differentials already in {0,1}
    SCH_HA1 = 2'b01,   // 1-bit HA, differentials in {-1,0}, stored +1
    SCH_D2  = 2'b10,   // 2-bit DDPCM, {-1,0,1}
    SCH_D7  = 2'b11    // 7-bit DDPCM, {-64..63}
  } sch_e;

  // which check the break-point check block performs
  typedef enum logic [1:0] {
    CHK_UL = 2'd0, CHK_LL = 2'd1, CHK_SECOND = 2'd2
  } chk_e;

  // original pixel index of canonical position (r,c) of a reference frame
  function automatic int unsigned orig_idx(ref_e rf, int unsigned r, int unsigned c);
    int unsigned rr, cc;
    rr = (rf == REF_LR || rf == REF_LL) ? (TS-1-r) : r;
    cc = (rf == REF_LR || rf == REF_UR) ? (TS-1-c) : c;
    return rr*TS + cc;
  endfunction

  // plane mask in F0 coordinates; falling uses the rising shape in the
  // lower-left frame
  function automatic map_t plane_mask(case_e cs, logic [2:0] r0, logic [2:0] c0);
    map_t m;
    m = '0;
    for (int r = 0; r < TS; r++) begin
      for (int c = 0; c < TS; c++) begin
        unique case (cs)
          // boundary steps one column left per row: c >= c0 - (r - r0), at least 0
          CASE_RISING, CASE_FALLING:
            m[r*TS+c] = (4'(r) >= {1'b0, r0}) && (5'(c + r) >= 5'(c0) + 5'(r0));
          CASE_VERTICAL:   m[r*TS+c] = (4'(r) >= {1'b0, r0}) && (4'(c) >= {1'b0, c0});
          CASE_HORIZONTAL: m[r*TS+c] = (4'(r) >= {1'b0, r0});
        endcase
      end
    end
    return m;
  endfunction

  // the six reference/first-order pixels must lie in their own plane
  function automatic logic mask_ok(map_t m);
    return !m[0] && !m[1] && !m[TS] && m[NPIX-1] && m[NPIX-2] && m[NPIX-1-TS];
  endfunction

  // expected break-point map of the first reference (F0 coordinates): pixels
  // of plane 1 whose first-reference predecessor lies in plane 0
  function automatic map_t edge_first(map_t m);
    map_t e;
    e = '0;
    for (int r = 0; r < TS; r++)
      for (int c = 0; c < TS; c++)
        if (!(r == 0 && c == 0))
          e[r*TS+c] = m[r*TS+c] && !((c > 0) ? m[r*TS+c-1] : m[(r-1)*TS]);
    return e;
  endfunction

  // expected break-point map of the second reference (F0 coordinates): pixels
  // of plane 0 whose second-reference predecessor lies in plane 1
  function automatic map_t edge_second(map_t m);
    map_t e;
    e = '0;
    for (int r = 0; r < TS; r++)
      for (int c = 0; c < TS; c++)
        if (!(r == TS-1 && c == TS-1))
          e[r*TS+c] = !m[r*TS+c] && ((c < TS-1) ? m[r*TS+c+1] : m[(r+1)*TS+TS-1]);
    return e;
  endfunction

  // 180-degree rotation between the two frames of a two-plane tile
  function automatic map_t rot_map(map_t m);
    map_t o;
    for (int i = 0; i < NPIX; i++) o[i] = m[NPIX-1-i];
    return o;
  endfunction

  // slot classification (F0 coordinates)
  function automatic logic is_vslot(int unsigned i);
    return (i % TS == 0) && (i >= 2*TS);
  endfunction

  function automatic logic is_special(int unsigned i, logic two_plane);
    return (i == 0) || (i == 1) || (i == TS) ||
           (two_plane && ((i == NPIX-1) || (i == NPIX-2) || (i == NPIX-1-TS)));
  endfunction

  // stored bits per differential of a scheme
  function automatic int unsigned sch_width(sch_e s);
    unique case (s)
      SCH_HA2, SCH_HA1: return 1;
      SCH_D2:           return 2;
      default:          return 7;
    endcase
  endfunction

  // packet length in bits (flag and control-code included)
  function automatic int unsigned packet_bits(logic uncomp, logic two_plane, sch_e sv, sch_e sh);
    if (uncomp) return PKTW;
    if (two_plane)
      return 6 + 8 + 2*ZW + 4*CW + NVS*sch_width(sv) + (NPIX-6-NVS)*sch_width(sh);
    return 6 + ZW + 2*CW + NVS*sch_width(sv) + (NPIX-3-NVS)*sch_width(sh);
  endfunction

  // ordinal of pixel i among the horizontal-part slots (raster order):
  // i minus the vertical slots and special positions that precede it
  function automatic int unsigned h_ord(int unsigned i, logic two_plane);
    return i - ((i <= 2*TS) ? 0 : (i - 1) / TS - 1)
             - (int'(i > 0) + int'(i > 1) + int'(i > TS))
             - (two_plane ? int'(i > NPIX-1-TS) + int'(i > NPIX-2) + int'(i > NPIX-1) : 0);
  endfunction

endpackage
