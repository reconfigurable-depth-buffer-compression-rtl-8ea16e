// tb_zc_decompressor: feeds packets built by the bit-serial reference packer
// (every mode, case and scheme, plus uncompressed tiles) and checks that the
// rebuilt tile equals the original one, one clock edge after in_valid.
`timescale 1ns/1ps
module tb_zc_decompressor;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  localparam int NTILES = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  pkt_t pkt;
  logic out_valid;
  tile_t tile;

  zc_decompressor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    gen_t e;
    int nb;
    in_valid = 0; pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NTILES; n++) begin
      case (n % 7)
        0, 6: e = gen_one();
        1: e = gen_two(0, 0);
        2: e = gen_two(1, 0);
        3: e = gen_two(2, 0);
        4: e = gen_two(3, 0);
        default: e = gen_rand();
      endcase
      @(negedge clk);
      in_valid = 1'b1;
      pkt = ref_pack(e, nb);
      @(negedge clk);
      in_valid = 1'b0;
      checks += 2;
      if (out_valid !== 1'b1) begin failures++; $display("ERROR tile %0d: no out_valid", n); end
      if (tile !== e.t) begin failures++; $display("ERROR tile %0d kind %0d case %0d: tile differs", n, e.kind, e.cs); end
      @(negedge clk);
      checks++;
      if (out_valid !== 1'b0) begin failures++; $display("ERROR tile %0d: out_valid held", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTILES*4 + 1000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
