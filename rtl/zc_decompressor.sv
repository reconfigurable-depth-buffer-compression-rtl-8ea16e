// zc_decompressor: rebuilds an 8x8 depth tile from its packet.
//
// Reads the packet fields in the order zc_pack writes them (flag, control-
// code, break point for two planes, references, first-order and second-order
// differentials of the vertical and horizontal parts), undoes the scheme
// encoding (type-1 HA: second-order bit minus one, first-order plus one) and
// accumulates the depth values:
//   plane 0 from its reference at (0,0) of the first frame, row by row to
//           the right, column 0 downwards;
//   plane 1 from its reference at (7,7) of the first frame, row by row to
//           the left, column 7 upwards.
// The plane mask derived from case and break point (the same rule the
// compressor uses) picks each pixel's plane, and the first frame (upper-left,
// or lower-left for falling tiles) is mapped back to raster order. An
// uncompressed packet is copied. Arithmetic is modulo 2^16, which is exact
// because the compressor only stores differentials it measured exactly.
//
// Field positions depend only on the plane type and the two scheme widths:
// the packet is shifted past the fixed prefix, the vertical section and the
// middle fields, and each section is read at fixed positions for each width.
//
// One packet per cycle: out_valid and tile follow in_valid by one clock edge.
//
// The original gives only the decoding data flow; this combinational decoder
// with an output register is an own design.
`timescale 1ns/1ps
module zc_decompressor
  import zc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pkt_t  pkt,
  output logic  out_valid,
  output tile_t tile
);

  localparam int unsigned BW  = 512;             // longest compressed packet fits

  function automatic z_t sx7(logic [CW-1:0] x);
    return {{(ZW-CW){x[CW-1]}}, x};
  endfunction

  // second-order value of a slot read at width w from the top of a section
  function automatic z_t dec2(logic [BW-1:0] sec, int unsigned k, sch_e s);
    return (s == SCH_D7)  ? sx7(sec[BW-1-CW*k -: CW]) :
           (s == SCH_D2)  ? {{14{sec[BW-1-2*k]}}, sec[BW-1-2*k -: 2]} :
           (s == SCH_HA1) ? (sec[BW-1-k] ? 16'h0000 : 16'hFFFF) :
                            {15'd0, sec[BW-1-k]};
  endfunction

  logic       uncomp, two;
  sch_e       sh, sv;
  case_e      cs;
  logic [2:0] r0, c0;
  z_t         ref0, ref1, dv0, dv1, dh0, dh1;
  logic [BW-1:0] top, body, body2, body3;
  z_t         s [NPIX];

  assign top    = pkt[PKTW-1 -: BW];
  assign uncomp = top[BW-1];
  assign two    = top[BW-2];
  assign sh     = sch_e'(top[BW-3 -: 2]);
  assign sv     = sch_e'(top[BW-5 -: 2]);
  assign cs     = case_e'(top[BW-7 -: 2]);
  assign r0     = two ? top[BW-9 -: 3]  : 3'd0;
  assign c0     = two ? top[BW-12 -: 3] : 3'd0;

  always_comb begin
    logic [CW-1:0] fv0, fv1, fh0, fh1;
    if (two) begin
      ref0 = top[BW-15 -: ZW];
      fv0  = top[BW-31 -: CW];
      fv1  = top[BW-38 -: CW];
      body = top << 44;
    end else begin
      ref0 = top[BW-7 -: ZW];
      fv0  = top[BW-23 -: CW];
      fv1  = '0;
      body = top << 29;
    end
    unique case (sv)
      SCH_HA2, SCH_HA1: body2 = body << NVS;
      SCH_D2:           body2 = body << (2*NVS);
      default:          body2 = body << (CW*NVS);
    endcase
    if (two) begin
      ref1  = body2[BW-1 -: ZW];
      fh0   = body2[BW-17 -: CW];
      fh1   = body2[BW-24 -: CW];
      body3 = body2 << (ZW + 2*CW);
    end else begin
      ref1  = '0;
      fh0   = body2[BW-1 -: CW];
      fh1   = '0;
      body3 = body2 << CW;
    end
    dv0 = sx7((sv == SCH_HA1) ? fv0 + 7'd1 : fv0);
    dv1 = sx7((sv == SCH_HA1) ? fv1 + 7'd1 : fv1);
    dh0 = sx7((sh == SCH_HA1) ? fh0 + 7'd1 : fh0);
    dh1 = sx7((sh == SCH_HA1) ? fh1 + 7'd1 : fh1);
  end

  // stored second-order value of every pixel; slot ordinals are constants
  for (genvar i = 0; i < NPIX; i++) begin : g_slot
    localparam int unsigned HO0 = h_ord(i, 1'b0);
    localparam int unsigned HO1 = h_ord(i, 1'b1);
    if (is_vslot(i)) begin : g_v
      assign s[i] = dec2(body, i / TS - 2, sv);
    end else if (is_special(i, 1'b0)) begin : g_ref
      assign s[i] = '0;
    end else if (is_special(i, 1'b1)) begin : g_ref1
      assign s[i] = two ? '0 : dec2(body3, HO0, sh);
    end else begin : g_h
      assign s[i] = two ? dec2(body3, HO1, sh) : dec2(body3, HO0, sh);
    end
  end

  // accumulation chains, one net per pixel
  z_t p0 [NPIX];
  z_t p1 [NPIX];
  for (genvar i = 0; i < NPIX; i++) begin : g_chain
    if (i == 0) begin : g_p0_ref
      assign p0[i] = ref0;
    end else if (i == 1 || i == TS) begin : g_p0_first
      assign p0[i] = ref0 + ((i == 1) ? dh0 : dv0);
    end else if (i % TS == 0) begin : g_p0_vert
      assign p0[i] = p0[i-TS] + dv0 + s[i];
    end else begin : g_p0_horz
      assign p0[i] = p0[i-1] + dh0 + s[i];
    end

    if (i == NPIX-1) begin : g_p1_ref
      assign p1[i] = ref1;
    end else if (i == NPIX-2 || i == NPIX-1-TS) begin : g_p1_first
      assign p1[i] = ref1 + ((i == NPIX-2) ? dh1 : dv1);
    end else if (i % TS == TS-1) begin : g_p1_vert
      assign p1[i] = p1[i+TS] + dv1 + s[i];
    end else begin : g_p1_horz
      assign p1[i] = p1[i+1] + dh1 + s[i];
    end
  end

  map_t  m;
  tile_t dec;
  assign m = two ? plane_mask(cs, r0, c0) : '0;

  // pixel of the first-reference frame, then back to the original order
  // (falling tiles were coded upside down)
  z_t    fr [NPIX];
  logic  flip;
  assign flip = two && cs == CASE_FALLING;
  always_comb begin
    for (int i = 0; i < NPIX; i++)
      fr[i] = m[i] ? p1[i] : p0[i];
    for (int r = 0; r < TS; r++)
      for (int c = 0; c < TS; c++)
        dec[r*TS+c] = uncomp ? pkt[PKTW-2-(r*TS+c)*ZW -: ZW] :
                      flip   ? fr[(TS-1-r)*TS+c] : fr[r*TS+c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) tile <= dec;
  end

endmodule
