// tb_zc_pack: checks the packer against a bit-serial reference packer for
// one-plane, two-plane and uncompressed tiles of every scheme, including the
// packet length of each mode.
//
// Own test: the reference packer writes the fields one bit at a time.
`timescale 1ns/1ps
module tb_zc_pack;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  logic uncomp, two_plane;
  sch_e sch_v, sch_h;
  case_e cs;
  logic [2:0] row, col;
  tile_t tile;
  z_t ref0, ref1;
  cset_t slot;
  pkt_t pkt;
  logic [LENW-1:0] len;

  zc_pack dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 300; n++) begin
      gen_t e;
      pkt_t exp_p;
      int nb, k;
      k = n % 7;
      e = (k < 3) ? gen_one() : (k < 6 ? gen_two(k - 3 + (k == 5), 0) : gen_rand());
      uncomp = e.uncomp; two_plane = e.two;
      sch_v = sch_e'(e.sv); sch_h = sch_e'(e.sh);
      cs = case_e'(e.cs); row = 3'(e.r0); col = 3'(e.c0);
      tile = e.t; ref0 = z_t'(e.ref0); ref1 = z_t'(e.ref1);
      for (int i = 0; i < 64; i++) slot[i] = c_t'(e.slot[i]);
      slot[1] = c_t'(e.dh0); slot[8] = c_t'(e.dv0);
      if (e.two) begin slot[62] = c_t'(e.dh1); slot[55] = c_t'(e.dv1); end
      exp_p = ref_pack(e, nb);
      #1;
      checks += 3;
      if (pkt !== exp_p) begin failures++; $display("ERROR tile %0d: packet differs", n); end
      if (int'(len) !== nb) begin failures++; $display("ERROR tile %0d: len %0d vs %0d", n, len, nb); end
      if (int'(len) !== e.len) begin failures++; $display("ERROR tile %0d: len %0d vs table %0d", n, len, e.len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
