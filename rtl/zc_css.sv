// zc_css: compression scheme selection (third stage, lower part).
//
// Each stored second-order differential is compared with -1, 0 and +1 and the
// results are reduced over the vertical part (column 0, rows 2..7 of the
// first-reference frame, 6 differentials) and over the horizontal part (every
// other second-order position: 55 for one plane, 52 for two planes). Per part
// the narrowest scheme that holds all its differentials is chosen:
//   all in {0,1}     1-bit HA, type 2 (stored as is)
//   all in {-1,0}    1-bit HA, type 1 (stored +1, first-order stored -1)
//   all in {-1,0,1}  2-bit DDPCM
//   otherwise        7-bit DDPCM
// Only the five vertical/horizontal pairs of the mode table exist: when the
// horizontal part needs more than one bit, the vertical part is raised to
// 7-bit DDPCM.
//
// Purely combinational.
//
// Follows the original architecture: the four schemes and their value sets.
// Own choices: the 2-bit codes and raising the vertical part to 7 bits.
`timescale 1ns/1ps
module zc_css
  import zc_pkg::*;
(
  input  cset_t  slot,        // stored differentials (7-bit two's complement)
  input  logic   two_plane,
  output sch_e   sch_v,
  output sch_e   sch_h
);

  function automatic sch_e pick(logic all01, logic allm10, logic allm11);
    if (all01)  return SCH_HA2;
    if (allm10) return SCH_HA1;
    if (allm11) return SCH_D2;
    return SCH_D7;
  endfunction

  logic v01, vm10, vm11, h01, hm10, hm11;
  sch_e need_v;

  always_comb begin
    v01 = 1'b1; vm10 = 1'b1; vm11 = 1'b1;
    h01 = 1'b1; hm10 = 1'b1; hm11 = 1'b1;
    for (int i = 0; i < NPIX; i++) begin
      logic eqm1, eq0, eqp1;
      eqm1 = (slot[i] == 7'h7F);
      eq0  = (slot[i] == 7'h00);
      eqp1 = (slot[i] == 7'h01);
      if (is_vslot(i)) begin
        v01  &= eq0 | eqp1;
        vm10 &= eq0 | eqm1;
        vm11 &= eq0 | eqp1 | eqm1;
      end else if (!is_special(i, two_plane)) begin
        h01  &= eq0 | eqp1;
        hm10 &= eq0 | eqm1;
        hm11 &= eq0 | eqp1 | eqm1;
      end
    end
    need_v = pick(v01, vm10, vm11);
    sch_h  = pick(h01, hm10, hm11);
    sch_v  = (sch_h == SCH_HA2 || sch_h == SCH_HA1) ? need_v : SCH_D7;
  end

endmodule
