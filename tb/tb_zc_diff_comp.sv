// tb_zc_diff_comp: checks both halves of the differential set for all four
// reference corners on random and planar tiles against differentials worked
// out directly from the mirrored pixel coordinates.
//
// Own test: expected values from direct pixel arithmetic on the mirrored tile.
`timescale 1ns/1ps
module tb_zc_diff_comp;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  tile_t tile;
  ref_e ref_sel;
  logic half;
  d_t [NPIX/2-1:0] diff;
  z_t ref_val;

  zc_diff_comp dut (.*);

  int checks = 0, failures = 0;

  function automatic int px(tile_t t, int rf, int r, int c);
    int rr = (rf == 1 || rf == 2) ? 7 - r : r;   // LR, LL flip rows
    int cc = (rf == 1 || rf == 3) ? 7 - c : c;   // LR, UR flip columns
    return int'(t[rr*8 + cc]);
  endfunction

  function automatic int expd(tile_t t, int rf, int r, int c);
    int dh = px(t, rf, 0, 1) - px(t, rf, 0, 0);
    int dv = px(t, rf, 1, 0) - px(t, rf, 0, 0);
    if (r == 0 && c == 0) return 0;
    if (r == 0 && c == 1) return dh;
    if (r == 1 && c == 0) return dv;
    if (c == 0) return px(t, rf, r, 0) - px(t, rf, r - 1, 0) - dv;
    return px(t, rf, r, c) - px(t, rf, r, c - 1) - dh;
  endfunction

  initial begin
    for (int n = 0; n < 200; n++) begin
      gen_t e;
      e = (n % 2) ? gen_one() : gen_rand();
      tile = e.t;
      for (int rf = 0; rf < 4; rf++)
        for (int h = 0; h < 2; h++) begin
          ref_sel = ref_e'(rf); half = h[0];
          #1;
          checks++;
          if (int'(ref_val) !== px(tile, rf, 0, 0)) begin failures++; $display("ERROR ref value"); end
          for (int k = 0; k < 32; k++) begin
            int r, c;
            r = k / 8 + 4*h; c = k % 8;
            checks++;
            if (int'(diff[k]) !== expd(tile, rf, r, c)) begin
              failures++;
              if (failures < 10) $display("ERROR ref %0d (%0d,%0d): %0d expected %0d", rf, r, c, int'(diff[k]), expd(tile, rf, r, c));
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
