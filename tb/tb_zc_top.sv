// tb_zc_top: end-to-end test of the depth-tile codec at its default sizes.
//
// Generates tiles whose coding is known by construction and streams them into
// the compressor as fast as its ready signal allows:
//   - one-plane tiles built from a reference, two slopes and second-order
//     differentials drawn per part from {0,1}, {-1,0}, {-1,0,1} or -64..63
//   - two-plane tiles (rising, vertical, horizontal, falling) built from two
//     planes with opposite slopes, a large offset and small differentials
//   - random tiles (uncompressed, no break-point pattern matches)
//   - vertical and falling two-plane tiles whose second plane has a
//     mismatched vertical slope (first map matches, second map fails:
//     uncompressed)
// For each packet it checks flag, plane bit, case and break point, the packet
// length against the mode table (97/103/133/188/463, 132/138/168/220/480,
// 1025), the latency (5, 9, 12, 8, or 11 for a falling tile whose second map
// fails) and, through the decompressor,
// that the tile comes back bit-exact. Each mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_zc_top;
  import zc_pkg::*;

  localparam int NTILES = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            c_in_valid;
  tile_t           c_in_tile;
  logic            c_ready, c_out_valid;
  pkt_t            c_pkt;
  logic [LENW-1:0] c_pkt_len;
  logic            d_in_valid;
  pkt_t            d_pkt;
  logic            d_out_valid;
  tile_t           d_tile;

  zc_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    tile_t t;
    logic  uncomp;
    logic  two;
    int    cs;
    int    r0, c0;
    int    lat;
    int    len;
    int    kind;     // 0 one-plane, 1 two-plane, 2 random, 3 second-map fail
    int    acc_cycle;
    int    sv, sh;   // expected schemes (0 HA2, 1 HA1, 2 D2, 3 D7)
  } exp_t;

  exp_t q[$];
  exp_t dq_[$];

  // ---------------- reference helpers (independent of the RTL) ----------
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

  // build one plane in its own frame from differentials
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

  // plane-1 region of a case/top break point, in the first frame
  function automatic bit in_p1(int cs, int r0, int c0, int r, int c);
    int start;
    if (r < r0) return 0;
    case (cs)
      2: return c >= c0;                       // vertical
      3: return 1;                             // horizontal
      default: begin                           // rising / falling
        start = c0 - (r - r0);
        return c >= (start < 0 ? 0 : start);
      end
    endcase
  endfunction

  // narrowest scheme for a list of second-order values
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

  // mode table lengths
  function automatic int mode_len(bit two, int sv, int sh, output int sv_o);
    int nv = (sv >= 2) ? sv : 0;      // 0 = HA, 2 = 2b, 3 = 7b
    int nh = (sh >= 2) ? sh : 0;
    int op[5] = '{97, 103, 133, 188, 463};
    int tp[5] = '{132, 138, 168, 220, 480};
    int m;
    if (nh == 0) m = (nv == 0) ? 0 : (nv == 2 ? 1 : 2);
    else m = (nh == 2) ? 3 : 4;
    sv_o = (nh == 0) ? sv : 3;
    return two ? tp[m] : op[m];
  endfunction

  // one-plane tile
  function automatic exp_t gen_one();
    exp_t e;
    int s[64], z[64];
    int tv = rnd(0, 3), th = rnd(0, 3);
    int vv[$], hv[$];
    int dh = rnd(-40, 40), dv = rnd(-40, 40);
    for (int i = 0; i < 64; i++) begin
      s[i] = 0;
      if (i == 0 || i == 1 || i == 8) continue;
      if (i % 8 == 0) begin s[i] = pick_val(tv); vv.push_back(s[i]); end
      else begin s[i] = pick_val(th); hv.push_back(s[i]); end
    end
    build(rnd(20000, 40000), dh, dv, s, z);
    for (int i = 0; i < 64; i++) e.t[i] = z_t'(z[i]);
    e.uncomp = 0; e.two = 0; e.cs = 0; e.r0 = 0; e.c0 = 0; e.lat = 5; e.kind = 0;
    e.sh = need(hv);
    e.len = mode_len(0, need(vv), e.sh, e.sv);
    return e;
  endfunction

  // two-plane tile; bad_dv makes only the second map fail (vertical and
  // falling cases: the second plane stays out of column 0)
  function automatic exp_t gen_two(int cs, bit bad_dv);
    exp_t e;
    int r0, c0, s0[64], s1[64], p0[64], p1[64], zf[64];
    int tv = rnd(0, 3), th = rnd(0, 3);
    int vv[$], hv[$];
    int dh = rnd(-30, 30), dv = rnd(-30, 30);
    int ref0 = rnd(20000, 40000);
    int ref1;
    case (cs)
      2: begin r0 = bad_dv ? rnd(2, 6) : rnd(0, 6); c0 = (r0 == 0) ? rnd(2, 6) : rnd(1, 6); end
      3: begin r0 = rnd(2, 6); c0 = 0; end
      default: begin
        r0 = bad_dv ? rnd(2, 5) : rnd(0, 5);
        c0 = bad_dv ? rnd(8 - r0, 7) : (r0 == 0) ? rnd(2, 7) : rnd(1, 7);
      end
    endcase
    if (bad_dv) dv = rnd(37, 40);
    for (int i = 0; i < 64; i++) begin
      int lim;
      lim = 3;
      s0[i] = (i % 8 == 0) ? pick_val(tv) : pick_val(th);
      s1[i] = (i % 8 == 0) ? pick_val(tv) : pick_val(th);
      if (s0[i] > lim) s0[i] = lim; if (s0[i] < -lim) s0[i] = -lim;
      if (s1[i] > lim) s1[i] = lim; if (s1[i] < -lim) s1[i] = -lim;
    end
    ref1 = ref0 + ((rnd(0, 1) == 1) ? 9000 : -9000);
    build(ref0, dh, dv, s0, p0);
    build(ref1, -dh, bad_dv ? 100 - dv : -dv, s1, p1);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int i = r*8 + c;
        bit m = in_p1(cs, r0, c0, r, c);
        zf[i] = m ? p1[63-i] : p0[i];
        if (!(i == 0 || i == 1 || i == 8 || i == 63 || i == 62 || i == 55)) begin
          if (c == 0) vv.push_back(m ? s1[63-i] : s0[i]);
          else hv.push_back(m ? s1[63-i] : s0[i]);
        end
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        e.t[(cs == 1 ? 7 - r : r)*8 + c] = z_t'(zf[r*8+c]);
    e.cs = cs; e.r0 = r0; e.c0 = c0;
    if (bad_dv) begin
      e.uncomp = 1; e.two = 0; e.lat = (cs == 1) ? 11 : 8; e.len = 1025; e.kind = 3; e.sv = 0; e.sh = 0;
    end else begin
      e.uncomp = 0; e.two = 1; e.lat = (cs == 1) ? 12 : 9; e.kind = 1;
      e.sh = need(hv);
      e.len = mode_len(1, need(vv), e.sh, e.sv);
    end
    return e;
  endfunction

  function automatic exp_t gen_rand();
    exp_t e;
    for (int i = 0; i < 64; i++) e.t[i] = z_t'($urandom);
    e.uncomp = 1; e.two = 0; e.cs = 0; e.r0 = 0; e.c0 = 0; e.lat = 8; e.len = 1025; e.kind = 2;
    e.sv = 0; e.sh = 0;
    return e;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_one = 0, n_case[4] = '{0, 0, 0, 0}, n_unc1 = 0, n_unc2 = 0, n_unc3 = 0;
  int n_sch_v[4] = '{0, 0, 0, 0}, n_sch_h[4] = '{0, 0, 0, 0};
  int n_overlap = 0, n_roundtrip = 0;

  // ---------------- driver ----------------
  int sent = 0;
  exp_t cur;
  initial begin
    c_in_valid = 0;
    c_in_tile  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (sent < NTILES) begin
      int k;
      k = sent % 10;
      if (k < 3) cur = gen_one();
      else if (k == 3) cur = gen_two(0, 0);
      else if (k == 4) cur = gen_two(1, 0);
      else if (k == 5) cur = gen_two(2, 0);
      else if (k == 6) cur = gen_two(3, 0);
      else if (k == 7) cur = gen_rand();
      else if (k == 8) cur = gen_two(2, 1);
      else if (sent % 20 == 9) cur = gen_two(1, 1);
      else cur = gen_one();
      // drive and sample in mid-cycle so the handshake is free of races
      @(negedge clk);
      c_in_valid = 1'b1;
      c_in_tile  = cur.t;
      while (!c_ready) @(negedge clk);
      cur.acc_cycle = cycle + 1;        // accepted at the coming rising edge
      if (q.size() > 0) n_overlap++;    // previous tile still in flight
      q.push_back(cur);
      sent++;
      @(posedge clk);
      #1 c_in_valid = 1'b0;
    end
  end

  // ---------------- compressor monitor ----------------
  int done = 0;
  always @(negedge clk) begin
    d_in_valid <= 1'b0;
    if (rst_n && c_out_valid) begin
      exp_t e;
      int lat;
      if (q.size() == 0) begin
        failures++; $display("ERROR: unexpected packet");
      end else begin
        e = q.pop_front();
        lat = cycle - e.acc_cycle;
        checks += 4;
        if (lat !== e.lat) begin failures++; $display("ERROR kind %0d case %0d: latency %0d expected %0d", e.kind, e.cs, lat, e.lat); end
        if (c_pkt[PKTW-1] !== e.uncomp) begin failures++; $display("ERROR kind %0d case %0d r0 %0d c0 %0d: flag %0b", e.kind, e.cs, e.r0, e.c0, c_pkt[PKTW-1]); end
        if (int'(c_pkt_len) !== e.len) begin failures++; $display("ERROR kind %0d: len %0d expected %0d", e.kind, c_pkt_len, e.len); end
        if (!e.uncomp && (c_pkt[PKTW-2] !== e.two)) begin failures++; $display("ERROR kind %0d: plane bit", e.kind); end
        if (!e.uncomp) begin
          checks += 2;
          if (int'(c_pkt[PKTW-5 -: 2]) !== e.sv) begin failures++; $display("ERROR kind %0d: sch_v %0d expected %0d", e.kind, c_pkt[PKTW-5 -: 2], e.sv); end
          if (int'(c_pkt[PKTW-3 -: 2]) !== e.sh) begin failures++; $display("ERROR kind %0d: sch_h %0d expected %0d", e.kind, c_pkt[PKTW-3 -: 2], e.sh); end
          n_sch_v[c_pkt[PKTW-5 -: 2]]++;
          n_sch_h[c_pkt[PKTW-3 -: 2]]++;
        end
        if (e.two) begin
          checks++;
          if (c_pkt[PKTW-7 -: 8] !== {2'(e.cs), 3'(e.r0), 3'(e.c0)}) begin
            failures++; $display("ERROR: break point %b expected case %0d r %0d c %0d", c_pkt[PKTW-7 -: 8], e.cs, e.r0, e.c0);
          end
        end
        if (e.kind == 0 && !c_pkt[PKTW-1] && !c_pkt[PKTW-2]) n_one++;
        if (e.kind == 1 && e.two && !c_pkt[PKTW-1]) n_case[e.cs]++;
        if (e.kind == 2 && c_pkt[PKTW-1]) n_unc1++;
        if (e.kind == 3 && c_pkt[PKTW-1] && e.cs != 1) n_unc2++;
        if (e.kind == 3 && c_pkt[PKTW-1] && e.cs == 1) n_unc3++;
        d_in_valid <= 1'b1;
        d_pkt      <= c_pkt;
        dq_.push_back(e);
      end
    end
    if (rst_n && d_out_valid) begin
      exp_t e;
      e = dq_.pop_front();
      checks++;
      if (d_tile !== e.t) begin
        failures++; $display("ERROR kind %0d case %0d: round trip mismatch", e.kind, e.cs);
      end else n_roundtrip++;
      done++;
    end
  end

  initial begin
    wait (done == NTILES);
    repeat (2) @(posedge clk);
    $display("mechanisms: one-plane %0d rising %0d falling %0d vertical %0d horizontal %0d",
             n_one, n_case[0], n_case[1], n_case[2], n_case[3]);
    $display("            uncompressed (no pattern) %0d uncompressed (second map fails) %0d / falling %0d",
             n_unc1, n_unc2, n_unc3);
    $display("            schemes V HA2/HA1/2b/7b %0d/%0d/%0d/%0d H %0d/%0d/%0d/%0d overlap %0d round trips %0d",
             n_sch_v[0], n_sch_v[1], n_sch_v[2], n_sch_v[3],
             n_sch_h[0], n_sch_h[1], n_sch_h[2], n_sch_h[3], n_overlap, n_roundtrip);
    checks++;
    if (n_one == 0 || n_case[0] == 0 || n_case[1] == 0 || n_case[2] == 0 || n_case[3] == 0 ||
        n_unc1 == 0 || n_unc2 == 0 || n_unc3 == 0 || n_overlap == 0) begin
      failures++; $display("ERROR: a mechanism never occurred");
    end
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (n_sch_v[k] == 0) begin failures++; $display("ERROR: V scheme %0d never used", k); end
      if (n_sch_h[k] == 0) begin failures++; $display("ERROR: H scheme %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTILES * 20 + 1000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
