// zc_tb_pkg: reference models and tile generators shared by the codec
// testbenches. Everything here is written independently of the RTL: plane
// regions from the geometric description of each case, scheme choice from the
// value sets, packet lengths from the mode table, and a bit-serial packer.
`timescale 1ns/1ps
package zc_tb_pkg;
  import zc_pkg::*;

  typedef struct {
    tile_t t;
    bit    uncomp, two;
    int    cs, r0, c0;
    int    lat, len, kind;   // kind: 0 one plane, 1 two planes, 2 random, 3 second map fails
    int    sv, sh;           // expected schemes 0 HA2, 1 HA1, 2 2b, 3 7b
    int    ref0, ref1, dh0, dv0, dh1, dv1;
    int    slot[64];         // stored second-order values, first-reference frame
  } gen_t;

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  function automatic int pick_val(int sch);
    case (sch)
      0: return rnd(0, 1);
      1: return rnd(-1, 0);
      2: return rnd(-1, 1);
      default: return rnd(-64, 63);
    endcase
  endfunction

  function automatic void build(int rv, int dh, int dv, int s[64], output int z[64]);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int i = r*8 + c;
        if (i == 0) z[i] = rv;
        else if (i == 1) z[i] = rv + dh;
        else if (i == 8) z[i] = rv + dv;
        else if (c == 0) z[i] = z[i-8] + dv + s[i];
        else z[i] = z[i-1] + dh + s[i];
      end
  endfunction

  function automatic bit in_p1(int cs, int r0, int c0, int r, int c);
    int start;
    if (r < r0) return 0;
    case (cs)
      2: return c >= c0;
      3: return 1;
      default: begin
        start = c0 - (r - r0);
        return c >= (start < 0 ? 0 : start);
      end
    endcase
  endfunction

  function automatic int need(int v[$]);
    bit a01 = 1, am10 = 1, am11 = 1;
    foreach (v[k]) begin
      if (!(v[k] == 0 || v[k] == 1)) a01 = 0;
      if (!(v[k] == 0 || v[k] == -1)) am10 = 0;
      if (v[k] < -1 || v[k] > 1) am11 = 0;
    end
    if (a01) return 0;
    if (am10) return 1;
    if (am11) return 2;
    return 3;
  endfunction

  function automatic int mode_len(bit two, int sv, int sh, output int sv_o);
    int nv = (sv >= 2) ? sv : 0;
    int nh = (sh >= 2) ? sh : 0;
    int op[5] = '{97, 103, 133, 188, 463};
    int tp[5] = '{132, 138, 168, 220, 480};
    int m;
    if (nh == 0) m = (nv == 0) ? 0 : (nv == 2 ? 1 : 2);
    else m = (nh == 2) ? 3 : 4;
    sv_o = (nh == 0) ? sv : 3;
    return two ? tp[m] : op[m];
  endfunction

  function automatic bit special(int i, bit two);
    return i == 0 || i == 1 || i == 8 || (two && (i == 63 || i == 62 || i == 55));
  endfunction

  function automatic gen_t gen_one();
    gen_t e;
    int s[64], z[64];
    int tv = rnd(0, 3), th = rnd(0, 3);
    int vv[$], hv[$];
    e.dh0 = rnd(-40, 40); e.dv0 = rnd(-40, 40); e.ref0 = rnd(20000, 40000);
    e.dh1 = 0; e.dv1 = 0; e.ref1 = 0;
    for (int i = 0; i < 64; i++) begin
      s[i] = 0;
      if (special(i, 0)) continue;
      if (i % 8 == 0) begin s[i] = pick_val(tv); vv.push_back(s[i]); end
      else begin s[i] = pick_val(th); hv.push_back(s[i]); end
    end
    build(e.ref0, e.dh0, e.dv0, s, z);
    for (int i = 0; i < 64; i++) begin e.t[i] = z_t'(z[i]); e.slot[i] = s[i]; end
    e.uncomp = 0; e.two = 0; e.cs = 0; e.r0 = 0; e.c0 = 0; e.lat = 5; e.kind = 0;
    e.sh = need(hv);
    e.len = mode_len(0, need(vv), e.sh, e.sv);
    return e;
  endfunction

  // two planes with opposite slopes, 9000 apart, differentials within +-3;
  // bad_dv gives the second plane a mismatched vertical slope and keeps it out
  // of column 0, so only the second reference's map fails (vertical, falling)
  function automatic gen_t gen_two(int cs, bit bad_dv);
    gen_t e;
    int s0[64], s1[64], p0[64], p1[64], zf[64];
    int tv = rnd(0, 3), th = rnd(0, 3);
    int vv[$], hv[$];
    e.dh0 = rnd(-30, 30); e.dv0 = rnd(-30, 30);
    e.ref0 = rnd(20000, 40000);
    case (cs)
      2: begin e.r0 = bad_dv ? rnd(2, 6) : rnd(0, 6); e.c0 = (e.r0 == 0) ? rnd(2, 6) : rnd(1, 6); end
      3: begin e.r0 = rnd(2, 6); e.c0 = 0; end
      default: begin
        e.r0 = bad_dv ? rnd(2, 5) : rnd(0, 5);
        e.c0 = bad_dv ? rnd(8 - e.r0, 7) : (e.r0 == 0) ? rnd(2, 7) : rnd(1, 7);
      end
    endcase
    if (bad_dv) e.dv0 = rnd(37, 40);
    for (int i = 0; i < 64; i++) begin
      s0[i] = (i % 8 == 0) ? pick_val(tv) : pick_val(th);
      s1[i] = (i % 8 == 0) ? pick_val(tv) : pick_val(th);
      if (s0[i] > 3) s0[i] = 3; if (s0[i] < -3) s0[i] = -3;
      if (s1[i] > 3) s1[i] = 3; if (s1[i] < -3) s1[i] = -3;
    end
    e.ref1 = e.ref0 + ((rnd(0, 1) == 1) ? 9000 : -9000);
    e.dh1 = -e.dh0;
    e.dv1 = bad_dv ? 100 - e.dv0 : -e.dv0;
    build(e.ref0, e.dh0, e.dv0, s0, p0);
    build(e.ref1, e.dh1, e.dv1, s1, p1);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int i = r*8 + c;
        bit m = in_p1(cs, e.r0, e.c0, r, c);
        zf[i] = m ? p1[63-i] : p0[i];
        e.slot[i] = special(i, 1) ? 0 : (m ? s1[63-i] : s0[i]);
        if (!special(i, 1)) begin
          if (c == 0) vv.push_back(e.slot[i]);
          else hv.push_back(e.slot[i]);
        end
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        e.t[(cs == 1 ? 7 - r : r)*8 + c] = z_t'(zf[r*8+c]);
    e.cs = cs;
    if (bad_dv) begin
      e.uncomp = 1; e.two = 0; e.lat = (cs == 1) ? 11 : 8; e.len = 1025; e.kind = 3; e.sv = 0; e.sh = 0;
    end else begin
      e.uncomp = 0; e.two = 1; e.lat = (cs == 1) ? 12 : 9; e.kind = 1;
      e.sh = need(hv);
      e.len = mode_len(1, need(vv), e.sh, e.sv);
    end
    return e;
  endfunction

  function automatic gen_t gen_rand();
    gen_t e;
    for (int i = 0; i < 64; i++) begin e.t[i] = z_t'($urandom); e.slot[i] = 0; end
    e.uncomp = 1; e.two = 0; e.cs = 0; e.r0 = 0; e.c0 = 0; e.lat = 8; e.len = 1025; e.kind = 2;
    e.sv = 0; e.sh = 0; e.ref0 = 0; e.ref1 = 0; e.dh0 = 0; e.dv0 = 0; e.dh1 = 0; e.dv1 = 0;
    return e;
  endfunction

  function automatic void push(ref bit q[$], input int v, input int w);
    for (int k = w - 1; k >= 0; k--) q.push_back(v[k]);
  endfunction

  // bit-serial reference packer
  function automatic pkt_t ref_pack(gen_t e, output int nbits);
    bit b[$];
    pkt_t p;
    int wv = (e.sv <= 1) ? 1 : (e.sv == 2 ? 2 : 7);
    int wh = (e.sh <= 1) ? 1 : (e.sh == 2 ? 2 : 7);
    if (e.uncomp) begin
      b.push_back(1);
      for (int i = 0; i < 64; i++) push(b, int'(e.t[i]), 16);
    end else begin
      b.push_back(0); b.push_back(e.two);
      push(b, e.sh, 2); push(b, e.sv, 2);
      if (e.two) begin push(b, e.cs, 2); push(b, e.r0, 3); push(b, e.c0, 3); end
      push(b, e.ref0, 16);
      push(b, (e.sv == 1) ? e.dv0 - 1 : e.dv0, 7);
      if (e.two) push(b, (e.sv == 1) ? e.dv1 - 1 : e.dv1, 7);
      for (int r = 2; r < 8; r++) push(b, (e.sv == 1) ? e.slot[r*8] + 1 : e.slot[r*8], wv);
      if (e.two) push(b, e.ref1, 16);
      push(b, (e.sh == 1) ? e.dh0 - 1 : e.dh0, 7);
      if (e.two) push(b, (e.sh == 1) ? e.dh1 - 1 : e.dh1, 7);
      for (int i = 0; i < 64; i++)
        if (i % 8 != 0 && !special(i, e.two))
          push(b, (e.sh == 1) ? e.slot[i] + 1 : e.slot[i], wh);
    end
    p = '0;
    foreach (b[k]) p[PKTW-1-k] = b[k];
    nbits = b.size();
    return p;
  endfunction

endpackage
