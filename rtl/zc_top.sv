// zc_top: depth-tile codec top level.
//
// Places the three-stage compressor and the tile decompressor side by side,
// each with its own ports: a renderer writes tiles through the compressor and
// sends the packets to the depth buffer; tiles read back from the depth buffer
// go through the decompressor. The depth buffer memory itself is outside this
// design. Both halves share clock and reset.
//
//   compressor:   c_in_valid/c_ready handshake on c_in_tile; c_out_valid
//                 pulses once per tile with c_pkt (left-aligned) and its
//                 length c_pkt_len in bits. Latency 5/9/12/8 cycles for one
//                 plane / two planes (rising, vertical, horizontal) / two
//                 planes (falling) / uncompressed.
//   decompressor: d_in_valid with d_pkt; d_out_valid and d_tile one cycle
//                 later.
//
// Own choice: compressor and decompressor stand side by side, since the
// memory that would connect them is outside the design.
`timescale 1ns/1ps
module zc_top
  import zc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            c_in_valid,
  input  tile_t           c_in_tile,
  output logic            c_ready,
  output logic            c_out_valid,
  output pkt_t            c_pkt,
  output logic [LENW-1:0] c_pkt_len,
  input  logic            d_in_valid,
  input  pkt_t            d_pkt,
  output logic            d_out_valid,
  output tile_t           d_tile
);

  zc_compressor u_comp (
    .clk, .rst_n,
    .in_valid(c_in_valid), .in_tile(c_in_tile), .ready(c_ready),
    .out_valid(c_out_valid), .pkt(c_pkt), .pkt_len(c_pkt_len)
  );

  zc_decompressor u_decomp (
    .clk, .rst_n,
    .in_valid(d_in_valid), .pkt(d_pkt),
    .out_valid(d_out_valid), .tile(d_tile)
  );

endmodule
