// tb_zc_combine: checks the plane mask and the combined differentials for
// random cases and break points against the geometric plane regions.
//
// Own test: regions come from the generator's geometric model.
`timescale 1ns/1ps
module tb_zc_combine;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  case_e cs;
  logic [2:0] row, col;
  cset_t d0, d1, slot;

  zc_combine dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int c, r0, c0;
      c = rnd(0, 3); r0 = rnd(0, 7); c0 = rnd(0, 7);
      cs = case_e'(c); row = 3'(r0); col = 3'(c0);
      for (int i = 0; i < 64; i++) begin d0[i] = c_t'($urandom); d1[i] = c_t'($urandom); end
      #1;
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) begin
          int i;
          bit m;
          i = r*8 + k;
          m = in_p1(c, r0, c0, r, k);
          checks++;
          if (slot[i] !== (m ? d1[63-i] : d0[i])) begin failures++; $display("ERROR case %0d (%0d,%0d) slot %0d", c, r0, c0, i); end
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
