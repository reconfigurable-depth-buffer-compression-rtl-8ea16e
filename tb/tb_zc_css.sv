// tb_zc_css: checks the vertical/horizontal scheme choice, including the
// rule that only the five vertical/horizontal pairs of the mode table occur,
// for one- and two-plane slot layouts.
`timescale 1ns/1ps
module tb_zc_css;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  cset_t slot;
  logic two_plane;
  sch_e sch_v, sch_h;

  zc_css dut (.*);

  int checks = 0, failures = 0;
  int seen[4][4];

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int tv, th;
      int vv[$], hv[$];
      int ev, eh;
      tv = rnd(0, 3); th = rnd(0, 3);
      vv.delete(); hv.delete();
      two_plane = n[0];
      for (int i = 0; i < 64; i++) begin
        int v;
        if (special(i, two_plane)) v = rnd(-64, 63);       // ignored positions
        else if (i % 8 == 0) begin v = pick_val(tv); vv.push_back(v); end
        else begin v = pick_val(th); hv.push_back(v); end
        slot[i] = c_t'(v);
      end
      eh = need(hv);
      void'(mode_len(two_plane, need(vv), eh, ev));
      #1;
      checks += 2;
      if (int'(sch_v) !== ev) begin failures++; $display("ERROR sch_v %0d expected %0d", sch_v, ev); end
      if (int'(sch_h) !== eh) begin failures++; $display("ERROR sch_h %0d expected %0d", sch_h, eh); end
      seen[ev][eh]++;
    end
    checks++;
    if (seen[1][0] == 0 || seen[2][1] == 0 || seen[3][2] == 0 || seen[3][3] == 0) begin
      failures++; $display("ERROR: scheme pairs not covered");
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
