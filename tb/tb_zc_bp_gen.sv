// tb_zc_bp_gen: checks the break-point map and the two-plane flag for random
// differential sets concentrated around the -64..63 limits.
//
// Own test: the threshold is the 7-bit range -64..63.
`timescale 1ns/1ps
module tb_zc_bp_gen;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  dset_t diff;
  map_t bp_map;
  logic two_plane;

  zc_bp_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int v[64];
      bit any;
      any = 0;
      for (int i = 0; i < 64; i++) begin
        case ($urandom_range(3))
          0: v[i] = rnd(-66, -62);
          1: v[i] = rnd(61, 65);
          2: v[i] = rnd(-131070, 131070);
          default: v[i] = rnd(-5, 5);
        endcase
        if (n % 3 == 0) v[i] = rnd(-64, 63);     // one-plane sets
        diff[i] = d_t'(v[i]);
      end
      #1;
      for (int i = 1; i < 64; i++) begin
        bit exp_b;
        exp_b = (v[i] > 63) || (v[i] < -64);
        any |= exp_b;
        checks++;
        if (bp_map[i] !== exp_b) begin failures++; $display("ERROR pos %0d value %0d", i, v[i]); end
      end
      checks += 2;
      if (bp_map[0] !== 1'b0) failures++;
      if (two_plane !== any) begin failures++; $display("ERROR two_plane"); end
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
