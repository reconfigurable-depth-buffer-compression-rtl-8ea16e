// tb_zc_compressor: streams one-plane, two-plane (all four cases),
// random and second-map-failure tiles through the compressor, offering each
// tile as soon as ready allows, and compares every packet bit by bit and its
// length with the bit-serial reference packer, plus the latency of each mode.
// Driving and sampling happen at the falling edge so the handshake is free
// of races.
//
// Own test: latencies are those of the mode table (5, 9, 12, 8) plus 11 for a
// falling tile whose second map fails, packets are compared with the independent bit-serial packer.
`timescale 1ns/1ps
module tb_zc_compressor;
  import zc_pkg::*;
  import zc_tb_pkg::*;

  localparam int NTILES = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  tile_t in_tile;
  logic ready, out_valid;
  pkt_t pkt;
  logic [LENW-1:0] pkt_len;

  zc_compressor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  gen_t q[$];
  int acc[$];
  int sent = 0, done = 0;

  initial begin
    gen_t e;
    in_valid = 0; in_tile = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < NTILES) begin
      case (sent % 9)
        0: e = gen_one();
        7: e = gen_two(1, 1);
        1: e = gen_two(0, 0);
        2: e = gen_two(1, 0);
        3: e = gen_two(2, 0);
        4: e = gen_two(3, 0);
        5: e = gen_rand();
        8: e = gen_two(2, 1);
        default: e = gen_one();
      endcase
      @(negedge clk);
      in_valid = 1'b1; in_tile = e.t;
      while (!ready) @(negedge clk);
      q.push_back(e); acc.push_back(cycle + 1);
      sent++;
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      gen_t e;
      pkt_t p;
      int nb, lat;
      e = q.pop_front();
      lat = cycle - acc.pop_front();
      p = ref_pack(e, nb);
      checks += 3;
      if (lat !== e.lat) begin failures++; $display("ERROR kind %0d case %0d: latency %0d expected %0d", e.kind, e.cs, lat, e.lat); end
      if (int'(pkt_len) !== nb) begin failures++; $display("ERROR kind %0d case %0d: length %0d expected %0d", e.kind, e.cs, pkt_len, nb); end
      if (pkt !== p) begin failures++; $display("ERROR kind %0d case %0d: packet differs", e.kind, e.cs); end
      done++;
    end
  end

  initial begin
    wait (done == NTILES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTILES*20 + 1000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
