// zc_compressor: reconfigurable depth-tile compressor (three stages).
//
// Accepts one 8x8 tile of 16-bit depth values when in_valid and ready are both
// high, and some cycles later presents its packet with a one-cycle out_valid
// pulse (the packet stays on pkt/pkt_len until the next one).
//
// Stage 1: zc_diff_comp computes half a differential set per cycle for the
//          current reference corner into the differential register
//          (two cycles per set).
// Stage 2: zc_bp_gen and zc_bp_check classify the set (one cycle):
//   - upper-left set, all in the 7-bit range        -> one plane
//   - upper-left set matches rising/vertical/horizontal
//                                  -> compute the lower-right set, match it
//   - otherwise                     -> compute the lower-left set; a falling
//                                  match computes the upper-right set and
//                                  matches it; no match -> uncompressed
//   - a failed second match         -> uncompressed
//   When the tile is classified, ready rises and the next tile can enter in
//   the next cycle while this one finishes in stage 3.
// Stage 3: two-plane tiles spend one cycle in zc_combine; then zc_css picks
//          the schemes (one cycle) and zc_pack builds the packet (one cycle).
//
// Cycles from the accepting edge to out_valid: one plane 5, two planes
// rising/vertical/horizontal 9, falling 12, uncompressed 8 (11 when a falling
// candidate fails its second match). Register enables stand in for the gated
// clocks of a silicon implementation: each register bank loads only in the
// cycles that use it.
//
// Follows the original architecture: three stages, one DC block, ready and
// out_valid, the cycle counts of the mode table. Own choices: the reset
// (asynchronous, active low), the handshake (accept when in_valid && ready)
// and the second-reference map check that can still send a tile raw.
`timescale 1ns/1ps
module zc_compressor
  import zc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  tile_t           in_tile,
  output logic            ready,
  output logic            out_valid,
  output pkt_t            pkt,
  output logic [LENW-1:0] pkt_len
);

  typedef enum logic [1:0] { S_IDLE, S_DC0, S_DC1, S_CHK } state_e;
  typedef enum logic [1:0] { P_UL, P_LL, P_SECOND } phase_e;

  state_e     state;
  phase_e     phase;
  ref_e       ref_q;
  tile_t      tile_q;
  dset_t      dq;

  // ---------------- stage 1 ----------------
  d_t [NPIX/2-1:0] dc_out;
  z_t              dc_ref;
  zc_diff_comp u_dc (
    .tile(tile_q), .ref_sel(ref_q), .half(state == S_DC1),
    .diff(dc_out), .ref_val(dc_ref)
  );

  map_t bp_map;
  logic any_out;
  zc_bp_gen u_bpg (.diff(dq), .bp_map(bp_map), .two_plane(any_out));

  // ---------------- stage 2 ----------------
  case_e      cand_case;     // case found by the first check
  logic [2:0] cand_row, cand_col;
  cset_t      d0_q;          // first-reference set, low bits
  z_t         ref0_q;

  chk_e       chk_kind;
  logic       chk_match;
  case_e      chk_case;
  logic [2:0] chk_row, chk_col;

  always_comb begin
    unique case (phase)
      P_UL:    chk_kind = CHK_UL;
      P_LL:    chk_kind = CHK_LL;
      default: chk_kind = CHK_SECOND;
    endcase
  end

  zc_bp_check u_chk (
    .kind(chk_kind), .bp_map(bp_map), .case_in(cand_case),
    .row_in(cand_row), .col_in(cand_col),
    .match(chk_match), .case_out(chk_case), .row_out(chk_row), .col_out(chk_col)
  );

  function automatic cset_t low_bits(dset_t d);
    cset_t o;
    for (int i = 0; i < NPIX; i++) o[i] = d[i][CW-1:0];
    return o;
  endfunction

  // stage-3 entry register (loaded when a tile is classified)
  logic       s3_valid, s3_uncomp, s3_two;
  case_e      s3_case;
  logic [2:0] s3_row, s3_col;
  cset_t      s3_d0, s3_d1;
  z_t         s3_ref0, s3_ref1;
  tile_t      s3_tile;

  logic decide;                     // stage 2 classifies the tile this cycle
  logic dec_uncomp, dec_two, next_dc;
  ref_e next_ref;
  phase_e next_phase;

  always_comb begin
    decide     = 1'b0;
    dec_uncomp = 1'b0;
    dec_two    = 1'b0;
    next_dc    = 1'b0;
    next_ref   = ref_q;
    next_phase = phase;
    if (state == S_CHK) begin
      unique case (phase)
        P_UL: begin
          if (!any_out) begin
            decide = 1'b1;
          end else if (chk_match) begin
            next_dc = 1'b1; next_ref = REF_LR; next_phase = P_SECOND;
          end else begin
            next_dc = 1'b1; next_ref = REF_LL; next_phase = P_LL;
          end
        end
        P_LL: begin
          if (chk_match) begin
            next_dc = 1'b1; next_ref = REF_UR; next_phase = P_SECOND;
          end else begin
            decide = 1'b1; dec_uncomp = 1'b1;
          end
        end
        default: begin
          decide     = 1'b1;
          dec_uncomp = !chk_match;
          dec_two    = chk_match;
        end
      endcase
    end
  end

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= P_UL;
      ref_q     <= REF_UL;
      s3_valid  <= 1'b0;
      cand_case <= CASE_RISING;
      cand_row  <= '0;
      cand_col  <= '0;
    end else begin
      s3_valid <= decide;
      unique case (state)
        S_IDLE: if (in_valid) begin
          state <= S_DC0;
          phase <= P_UL;
          ref_q <= REF_UL;
        end
        S_DC0: state <= S_DC1;
        S_DC1: state <= S_CHK;
        default: begin
          if (next_dc) begin
            state <= S_DC0;
            ref_q <= next_ref;
            phase <= next_phase;
            if (phase != P_SECOND) begin
              cand_case <= chk_case;
              cand_row  <= chk_row;
              cand_col  <= chk_col;
            end
          end else begin
            state <= S_IDLE;
          end
        end
      endcase
    end
  end

  // data registers (enables only, no reset needed)
  always_ff @(posedge clk) begin
    if (state == S_IDLE && in_valid) tile_q <= in_tile;
    if (state == S_DC0) dq[NPIX/2-1:0]    <= dc_out;
    if (state == S_DC1) dq[NPIX-1:NPIX/2] <= dc_out;
    if (state == S_DC0) begin
      if (phase != P_SECOND) ref0_q <= dc_ref;
    end
    if (next_dc && phase != P_SECOND) d0_q <= low_bits(dq);
    if (decide) begin
      s3_uncomp <= dec_uncomp;
      s3_two    <= dec_two;
      s3_case   <= cand_case;
      s3_row    <= cand_row;
      s3_col    <= cand_col;
      s3_d0     <= dec_two ? d0_q : low_bits(dq);
      s3_d1     <= low_bits(dq);
      s3_ref0   <= ref0_q;
      s3_ref1   <= tile_q[orig_idx(ref_q, 0, 0)];
      s3_tile   <= tile_q;
    end
  end

  // ---------------- stage 3 ----------------
  cset_t comb_slot;
  zc_combine u_comb (
    .cs(s3_case), .row(s3_row), .col(s3_col), .d0(s3_d0), .d1(s3_d1),
    .slot(comb_slot)
  );

  // combination register (two-plane tiles only)
  logic  a_valid;
  cset_t a_slot;

  // scheme-selection register
  logic       b_valid, b_uncomp, b_two;
  case_e      b_case;
  logic [2:0] b_row, b_col;
  cset_t      b_slot;
  z_t         b_ref0, b_ref1;
  tile_t      b_tile;
  sch_e       b_sch_v, b_sch_h;

  logic  css_two;
  cset_t css_in;
  sch_e  css_v, css_h;
  assign css_two = a_valid ? 1'b1 : s3_two;
  assign css_in  = a_valid ? a_slot : s3_d0;
  zc_css u_css (.slot(css_in), .two_plane(css_two), .sch_v(css_v), .sch_h(css_h));

  logic b_load;
  assign b_load = a_valid || (s3_valid && !s3_two);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid   <= 1'b0;
      b_valid   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      a_valid   <= s3_valid && s3_two;
      b_valid   <= b_load;
      out_valid <= b_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (s3_valid && s3_two) a_slot <= comb_slot;
    if (b_load) begin
      b_uncomp <= s3_uncomp;
      b_two    <= css_two;
      b_case   <= s3_case;
      b_row    <= s3_row;
      b_col    <= s3_col;
      b_slot   <= css_in;
      b_ref0   <= s3_ref0;
      b_ref1   <= s3_ref1;
      b_tile   <= s3_tile;
      b_sch_v  <= css_v;
      b_sch_h  <= css_h;
    end
  end

  pkt_t            pk;
  logic [LENW-1:0] pk_len;
  zc_pack u_pack (
    .uncomp(b_uncomp), .two_plane(b_two), .sch_v(b_sch_v), .sch_h(b_sch_h),
    .cs(b_case), .row(b_row), .col(b_col), .tile(b_tile),
    .ref0(b_ref0), .ref1(b_ref1), .slot(b_slot), .pkt(pk), .len(pk_len)
  );

  always_ff @(posedge clk) begin
    if (b_valid) begin
      pkt     <= pk;
      pkt_len <= pk_len;
    end
  end

endmodule
