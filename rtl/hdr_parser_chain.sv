// hdr_parser_chain: the NMU packet parsers, MAC -> VLAN -> IPv4 -> transport.
//
// Four single-stage parsers in a row. The packet is never stored: each stage
// copies the header fields it owns out of the beats as they pass and hands
// them on in the header record, so the fields of a parser further down the
// chain can depend on earlier ones (the IPv4 offset on the VLAN tag, the
// transport offset on the IPv4 header length). The chain adds four cycles of
// latency and keeps one beat per cycle; the header record leaving it with a
// beat holds every field whose bytes have passed by then.
//
// Interface: valid/ready stream of beat_t with an hdr_t side band in and out.
// The order of the parsers and their in-flight operation follow the
// document; stage boundaries and the side band are this design's.
module hdr_parser_chain
  import nmu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  input  hdr_t  in_hdr,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat,
  output hdr_t  out_hdr
);
  logic  v1, v2, v3, r1, r2, r3;
  beat_t b1, b2, b3;
  hdr_t  h1, h2, h3;

  mac_parser u_mac (
    .clk, .rst_n, .in_valid, .in_ready, .in_beat, .in_hdr,
    .out_valid(v1), .out_ready(r1), .out_beat(b1), .out_hdr(h1));
  vlan_parser u_vlan (
    .clk, .rst_n, .in_valid(v1), .in_ready(r1), .in_beat(b1), .in_hdr(h1),
    .out_valid(v2), .out_ready(r2), .out_beat(b2), .out_hdr(h2));
  ipv4_parser u_ipv4 (
    .clk, .rst_n, .in_valid(v2), .in_ready(r2), .in_beat(b2), .in_hdr(h2),
    .out_valid(v3), .out_ready(r3), .out_beat(b3), .out_hdr(h3));
  transport_parser u_l4 (
    .clk, .rst_n, .in_valid(v3), .in_ready(r3), .in_beat(b3), .in_hdr(h3),
    .out_valid, .out_ready, .out_beat, .out_hdr);
endmodule
