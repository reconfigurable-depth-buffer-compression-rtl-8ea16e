// zc_pack: packing block (third stage, output).
//
// Builds the packet of one tile, left-aligned in a 1025-bit word (bit 1024 is
// sent first), and reports its length in bits. Fields, first to last:
//   uncompressed: flag=1, then the 64 original depth values, pixel 0 first
//   one plane   : flag=0, plane=0, scheme(H), scheme(V), reference,
//                 dV (7b), 6 vertical differentials, dH (7b),
//                 55 horizontal differentials
//   two planes  : flag=0, plane=1, scheme(H), scheme(V), break point
//                 (case 2b, row 3b, column 3b), 1st reference,
//                 dV of plane 0 and of plane 1 (7b each), 6 vertical
//                 differentials, 2nd reference, dH of plane 0 and of plane 1,
//                 52 horizontal differentials
// Flag, plane bit and the two scheme fields form the 6-bit control-code.
// Vertical slots are column 0, rows 2..7 of the first-reference frame;
// horizontal slots are the other second-order positions in raster order.
// Differentials take 1, 2 or 7 bits by scheme. For the type-1 HA scheme the
// stored bit is the inverted LSB (the differential plus one) and the part's
// first-order differentials are stored minus one, so no adder is needed on
// the second-order path.
// Lengths match the mode table: 97..463 bits for one plane, 132..480 for two
// planes, 1025 uncompressed.
//
// Structure: the vertical and horizontal sections are laid out at every
// width (1, 2, 7 bits) with fixed positions and the scheme selects one; the
// sections are then joined right-aligned with shifts by their widths and the
// result is shifted to the top of the packet word.
//
// Purely combinational; the compressor registers the result.
//
// Follows the original architecture: flag first, control code, break point
// only for two planes, vertical part before horizontal part, inverters for
// HA type 1. Own choices: flag polarity (1 = uncompressed), the position of
// the first-order values and of the second reference, and the zero padding.
`timescale 1ns/1ps
module zc_pack
  import zc_pkg::*;
(
  input  logic       uncomp,
  input  logic       two_plane,
  input  sch_e       sch_v,
  input  sch_e       sch_h,
  input  case_e      cs,
  input  logic [2:0] row,
  input  logic [2:0] col,
  input  tile_t      tile,      // original pixels (uncompressed packet)
  input  z_t         ref0,
  input  z_t         ref1,
  input  cset_t      slot,      // differentials, first-reference frame
  output pkt_t       pkt,
  output logic [LENW-1:0] len
);

  localparam int unsigned NH  = NPIX - 3 - NVS;   // horizontal slots, one plane
  localparam int unsigned VSW = NVS * CW;         // widest vertical section
  localparam int unsigned HSW = NH * CW;          // widest horizontal section
  localparam int unsigned ACW = 512;              // longest compressed packet fits

  // stored form of a first-order differential
  function automatic logic [CW-1:0] enc1(logic [CW-1:0] d, sch_e s);
    return (s == SCH_HA1) ? d - 7'd1 : d;
  endfunction

  // section packing at each width, right-aligned
  logic [VSW-1:0] v1, v2, v7, vsec;
  logic [HSW-1:0] h1op, h2op, h7op, h1tp, h2tp, h7tp, hsec;

  always_comb begin
    v1 = '0; v2 = '0; v7 = '0;
    for (int r = 2; r < TS; r++) begin
      int unsigned k;
      k = NVS - 1 - (r - 2);                      // first slot is most significant
      v1[k]        = (sch_v == SCH_HA1) ? ~slot[r*TS][0] : slot[r*TS][0];
      v2[k*2 +: 2] = slot[r*TS][1:0];
      v7[k*CW +: CW] = slot[r*TS];
    end
    h1op = '0; h2op = '0; h7op = '0; h1tp = '0; h2tp = '0; h7tp = '0;
    for (int i = 0; i < NPIX; i++) begin
      if (!is_vslot(i) && !is_special(i, 1'b0)) begin
        int unsigned k;
        k = NH - 1 - h_ord(i, 1'b0);
        h1op[k]          = (sch_h == SCH_HA1) ? ~slot[i][0] : slot[i][0];
        h2op[k*2 +: 2]   = slot[i][1:0];
        h7op[k*CW +: CW] = slot[i];
      end
      if (!is_vslot(i) && !is_special(i, 1'b1)) begin
        int unsigned k;
        k = NH - 3 - 1 - h_ord(i, 1'b1);
        h1tp[k]          = (sch_h == SCH_HA1) ? ~slot[i][0] : slot[i][0];
        h2tp[k*2 +: 2]   = slot[i][1:0];
        h7tp[k*CW +: CW] = slot[i];
      end
    end
    unique case (sch_v)
      SCH_HA2, SCH_HA1: vsec = v1;
      SCH_D2:           vsec = v2;
      default:          vsec = v7;
    endcase
    unique case (sch_h)
      SCH_HA2, SCH_HA1: hsec = two_plane ? h1tp : h1op;
      SCH_D2:           hsec = two_plane ? h2tp : h2op;
      default:          hsec = two_plane ? h7tp : h7op;
    endcase
  end

  // join the sections
  logic [ACW-1:0]  acc;
  logic [LENW-1:0] clen;
  always_comb begin
    int unsigned wv, wh, nh;
    wv = sch_width(sch_v);
    wh = sch_width(sch_h);
    nh = two_plane ? NH - 3 : NH;
    if (two_plane)
      acc = ACW'({1'b0, 1'b1, sch_h, sch_v, cs, row, col, ref0,
                  enc1(slot[TS], sch_v), enc1(slot[NPIX-1-TS], sch_v)});
    else
      acc = ACW'({1'b0, 1'b0, sch_h, sch_v, ref0, enc1(slot[TS], sch_v)});
    acc = (acc << (NVS*wv)) | ACW'(vsec);
    if (two_plane)
      acc = (acc << (ZW + 2*CW)) | ACW'({ref1, enc1(slot[1], sch_h), enc1(slot[NPIX-2], sch_h)});
    else
      acc = (acc << CW) | ACW'(enc1(slot[1], sch_h));
    acc  = (acc << (nh*wh)) | ACW'(hsec);
    clen = LENW'(packet_bits(1'b0, two_plane, sch_v, sch_h));
  end

  always_comb begin
    if (uncomp) begin
      pkt[PKTW-1] = 1'b1;
      for (int i = 0; i < NPIX; i++)
        pkt[PKTW-2-i*ZW -: ZW] = tile[i];
      len = LENW'(PKTW);
    end else begin
      pkt = {acc, (PKTW-ACW)'(0)} << (ACW - int'(clen));
      len = clen;
    end
  end

endmodule
