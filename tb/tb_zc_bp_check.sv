// tb_zc_bp_check: builds break-point maps from the geometric plane regions of
// random cases and checks that the first-reference checks find a case whose
// region is the same, that the second-reference check accepts the matching
// rotated map, and that corrupted or random maps are rejected.
//
// Own test: expected maps come from a separate geometric model, not from the
// package functions the design uses.
`timescale 1ns/1ps
module tb_zc_bp_check;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  chk_e kind;
  map_t bp_map;
  case_e case_in;
  logic [2:0] row_in, col_in;
  logic match;
  case_e case_out;
  logic [2:0] row_out, col_out;

  zc_bp_check dut (.*);

  int checks = 0, failures = 0;

  // plane region (1 = second plane) from the geometric description
  function automatic map_t region(int cs, int r0, int c0);
    map_t m;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        m[r*8+c] = in_p1(cs, r0, c0, r, c);
    return m;
  endfunction

  // break points seen from the first reference: plane-1 pixels whose
  // scan predecessor (left, or above for column 0) is in plane 0
  function automatic map_t first_map(map_t m);
    map_t b;
    b = '0;
    for (int i = 1; i < 64; i++)
      b[i] = m[i] && !m[(i % 8 == 0) ? i - 8 : i - 1];
    return b;
  endfunction

  // break points seen from the second reference, in its own frame
  function automatic map_t second_map(map_t m);
    map_t b;
    b = '0;
    for (int j = 1; j < 64; j++) begin
      int i, p;
      i = 63 - j;
      p = (j % 8 == 0) ? 63 - (j - 8) : 63 - (j - 1);
      b[j] = !m[i] && m[p];
    end
    return b;
  endfunction

  function automatic bit legal(map_t m);
    return !m[0] && !m[1] && !m[8] && m[63] && m[62] && m[55];
  endfunction

  int n_found[4];

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int cs, r0, c0;
      map_t m, fm;
      cs = rnd(0, 3); r0 = rnd(0, 7); c0 = (cs == 3) ? 0 : rnd(0, 7);
      m = region(cs, r0, c0);
      if (!legal(m)) continue;
      fm = first_map(m);
      if (cs == 1) begin
        // falling tiles are seen upside down from the lower-left reference
        kind = CHK_LL; bp_map = fm; #1;
        checks++;
        if (!(match === 1'b1 && case_out === CASE_FALLING && region(1, int'(row_out), int'(col_out)) === m)) begin
          failures++; $display("ERROR LL check case %0d (%0d,%0d)", cs, r0, c0);
        end
      end else begin
        kind = CHK_UL; bp_map = fm; #1;
        checks++;
        if (!(match === 1'b1 && case_out !== CASE_FALLING && region(int'(case_out), int'(row_out), int'(col_out)) === m)) begin
          failures++; $display("ERROR UL check case %0d (%0d,%0d): match %0b case %0d (%0d,%0d)", cs, r0, c0, match, case_out, row_out, col_out);
        end else n_found[case_out]++;
      end
      // second reference
      kind = CHK_SECOND; case_in = case_e'(cs); row_in = 3'(r0); col_in = 3'(c0);
      bp_map = second_map(m); #1;
      checks++;
      if (match !== 1'b1 || case_out !== case_e'(cs) || row_out !== 3'(r0) || col_out !== 3'(c0)) begin
        failures++; $display("ERROR second check case %0d (%0d,%0d)", cs, r0, c0);
      end
      // one extra break point breaks the second match
      begin
        int k;
        k = rnd(1, 63);
        bp_map[k] = ~bp_map[k];
        #1;
        checks++;
        if (match !== 1'b0) begin failures++; $display("ERROR corrupted second map accepted"); end
      end
    end
    // random dense maps never fit
    for (int n = 0; n < 1000; n++) begin
      bp_map = {$urandom, $urandom} | 64'h8000_0000_0000_0002;
      for (int k = 0; k < 2; k++) begin
        kind = chk_e'(k); #1;
        checks++;
        if (match !== 1'b0) begin failures++; $display("ERROR random map accepted"); end
      end
      // an empty map is never a two-plane match
      bp_map = '0; kind = CHK_UL; #1;
      checks++;
      if (match !== 1'b0) begin failures++; $display("ERROR empty map accepted"); end
    end
    checks++;
    if (n_found[0] == 0 || n_found[2] == 0 || n_found[3] == 0) begin
      failures++; $display("ERROR: first-reference cases not all found");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
