// nmu_top: Universal Network Management Unit (NMU).
//
// The NMU guards the single network port of an FPGA shared by several
// applications, the way an MMU guards shared memory: every application talks
// over logical connections, and the NMU lets each connection send only the
// packets its rule allows and receive only the packets addressed to it.
// This "universal" variant combines every mechanism: layer-2 to layer-4
// parsing, source and destination ACLs, CAM-based delivery, routing between
// connections on the same FPGA, and tagging of all traffic with the
// connection's virtual network id.
//
// Egress (applications -> network):
//   app_tx -> hdr_parser_chain (MAC, VLAN, IPv4, TCP/UDP)
//          -> nmu_check (source + destination ACL of the sending
//             connection; CAM search of the destination)
//          -> pkt_buffer_filter (drop on ACL error)
//          -> local destination ? to the ingress merge (internal routing)
//                               : pkt_inserter (add tag) -> net_tx
// Ingress (network -> applications):
//   net_rx -> pkt_remover (strip and read the tag)
//          -> hdr_parser_chain -> nmu_check (CAM search with the tag's
//             virtual network id; no hit = no valid destination)
//          -> pkt_buffer_filter (drop on missing tag or no destination)
//          -> pkt_arbiter (merged with internally routed packets) -> app_rx
//
// Interface: host register port (cfg_*, see nmu_rule_table) for the rules of
// N_CONN connections; four valid/ready streams of 64-bit beats (beat_t);
// app_tx_conn names the sending connection, app_rx_conn the receiving one.
// Counters give passed and dropped packets each way and internally routed
// packets. Timing (64-byte untagged UDP packets, no back-pressure): the
// first beat reaches the network 11 cycles after the application offers it
// and the application 12 cycles after the network offers it. Most of this
// is the wait for the transport ports (beat 4, or 5 behind the tag), since
// a packet is released only once its verdict is known. Internally routed
// packets take the egress path to the buffer and then the merge. One beat
// per cycle in steady state.
//
// The overall structure, the 32 connections and the set of mechanisms
// follow the document; the tag format, the order of routing and tagging on
// egress, the beat width and all buffer sizes are this design's.
module nmu_top
  import nmu_pkg::*;
#(
  parameter int unsigned N_CONN    = N_CONN_DEFAULT,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // host configuration
  input  logic        cfg_we,
  input  logic [7:0]  cfg_conn,
  input  logic [3:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // applications -> NMU
  input  logic        app_tx_valid,
  output logic        app_tx_ready,
  input  beat_t       app_tx_beat,
  input  logic [7:0]  app_tx_conn,
  // NMU -> Ethernet controller
  output logic        net_tx_valid,
  input  logic        net_tx_ready,
  output beat_t       net_tx_beat,
  // Ethernet controller -> NMU
  input  logic        net_rx_valid,
  output logic        net_rx_ready,
  input  beat_t       net_rx_beat,
  // NMU -> applications
  output logic        app_rx_valid,
  input  logic        app_rx_ready,
  output beat_t       app_rx_beat,
  output logic [7:0]  app_rx_conn,
  // statistics
  output logic [31:0] eg_pass_cnt,
  output logic [31:0] eg_drop_cnt,
  output logic [31:0] in_pass_cnt,
  output logic [31:0] in_drop_cnt,
  output logic [31:0] loop_cnt
);
  rule_t rules [N_CONN];

  nmu_rule_table #(.N_CONN(N_CONN)) u_rules (
    .clk, .rst_n, .cfg_we, .cfg_conn, .cfg_addr, .cfg_wdata, .cfg_rdata, .rules);

  // ---------------- egress ----------------
  hdr_t  eg_hdr0, eg_p_hdr;
  logic  eg_p_valid, eg_p_ready, eg_c_valid, eg_c_ready, eg_vv;
  beat_t eg_p_beat, eg_c_beat, eg_b_beat;
  verdict_t eg_v, eg_b_v;
  logic  eg_b_valid, eg_b_ready;

  always_comb begin
    eg_hdr0 = '0;
    eg_hdr0.src_conn = app_tx_conn;
  end

  hdr_parser_chain u_eg_parse (
    .clk, .rst_n, .in_valid(app_tx_valid), .in_ready(app_tx_ready),
    .in_beat(app_tx_beat), .in_hdr(eg_hdr0),
    .out_valid(eg_p_valid), .out_ready(eg_p_ready), .out_beat(eg_p_beat),
    .out_hdr(eg_p_hdr));

  nmu_check #(.N_CONN(N_CONN), .EGRESS(1'b1)) u_eg_check (
    .clk, .rst_n, .rules,
    .in_valid(eg_p_valid), .in_ready(eg_p_ready), .in_beat(eg_p_beat),
    .in_hdr(eg_p_hdr),
    .out_valid(eg_c_valid), .out_ready(eg_c_ready), .out_beat(eg_c_beat),
    .verdict_valid(eg_vv), .verdict(eg_v));

  pkt_buffer_filter #(.DEPTH(BUF_DEPTH)) u_eg_buf (
    .clk, .rst_n, .in_valid(eg_c_valid), .in_ready(eg_c_ready),
    .in_beat(eg_c_beat), .verdict_valid(eg_vv), .verdict(eg_v),
    .out_valid(eg_b_valid), .out_ready(eg_b_ready), .out_beat(eg_b_beat),
    .out_verdict(eg_b_v), .pass_cnt(eg_pass_cnt), .drop_cnt(eg_drop_cnt));

  // on-chip router: local destinations turn back towards the applications
  logic ins_valid, ins_ready, loop_valid, loop_ready;
  assign ins_valid  = eg_b_valid && !eg_b_v.local_dst;
  assign loop_valid = eg_b_valid &&  eg_b_v.local_dst;
  assign eg_b_ready = eg_b_v.local_dst ? loop_ready : ins_ready;

  pkt_inserter #(.OFF(TAG_OFF), .INS_BYTES(TAG_BYTES)) u_encap (
    .clk, .rst_n, .in_valid(ins_valid), .in_ready(ins_ready),
    .in_beat(eg_b_beat), .ins_data({TPID_ENCAP, 4'h0, eg_b_v.vnid}),
    .out_valid(net_tx_valid), .out_ready(net_tx_ready), .out_beat(net_tx_beat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) loop_cnt <= '0;
    else if (loop_valid && loop_ready && eg_b_beat.last) loop_cnt <= loop_cnt + 1;
  end

  // ---------------- ingress ----------------
  logic  in_d_valid, in_d_ready, in_tag_valid;
  beat_t in_d_beat;
  logic [8*TAG_BYTES-1:0] in_tag;
  hdr_t  in_hdr0, in_p_hdr;
  logic  in_p_valid, in_p_ready, in_c_valid, in_c_ready, in_vv;
  beat_t in_p_beat, in_c_beat, in_b_beat;
  verdict_t in_v, in_b_v;
  logic  in_b_valid, in_b_ready;

  pkt_remover #(.OFF(TAG_OFF), .REM_BYTES(TAG_BYTES)) u_decap (
    .clk, .rst_n, .in_valid(net_rx_valid), .in_ready(net_rx_ready),
    .in_beat(net_rx_beat),
    .out_valid(in_d_valid), .out_ready(in_d_ready), .out_beat(in_d_beat),
    .out_tag_valid(in_tag_valid), .out_tag(in_tag));

  always_comb begin
    in_hdr0 = '0;
    in_hdr0.tag_ok   = in_tag_valid && in_tag[31:16] == TPID_ENCAP;
    in_hdr0.tag_vnid = in_tag[11:0];
  end

  hdr_parser_chain u_in_parse (
    .clk, .rst_n, .in_valid(in_d_valid), .in_ready(in_d_ready),
    .in_beat(in_d_beat), .in_hdr(in_hdr0),
    .out_valid(in_p_valid), .out_ready(in_p_ready), .out_beat(in_p_beat),
    .out_hdr(in_p_hdr));

  nmu_check #(.N_CONN(N_CONN), .EGRESS(1'b0)) u_in_check (
    .clk, .rst_n, .rules,
    .in_valid(in_p_valid), .in_ready(in_p_ready), .in_beat(in_p_beat),
    .in_hdr(in_p_hdr),
    .out_valid(in_c_valid), .out_ready(in_c_ready), .out_beat(in_c_beat),
    .verdict_valid(in_vv), .verdict(in_v));

  pkt_buffer_filter #(.DEPTH(BUF_DEPTH)) u_in_buf (
    .clk, .rst_n, .in_valid(in_c_valid), .in_ready(in_c_ready),
    .in_beat(in_c_beat), .verdict_valid(in_vv), .verdict(in_v),
    .out_valid(in_b_valid), .out_ready(in_b_ready), .out_beat(in_b_beat),
    .out_verdict(in_b_v), .pass_cnt(in_pass_cnt), .drop_cnt(in_drop_cnt));

  // merge network traffic with internally routed traffic
  logic [1:0] arb_valid, arb_ready;
  beat_t      arb_beat [2];
  logic [7:0] arb_conn [2];
  assign arb_valid  = {loop_valid, in_b_valid};
  assign arb_beat   = '{in_b_beat, eg_b_beat};
  assign arb_conn   = '{in_b_v.conn, eg_b_v.dst_conn};
  assign in_b_ready = arb_ready[0];
  assign loop_ready = arb_ready[1];

  pkt_arbiter u_merge (
    .clk, .rst_n, .in_valid(arb_valid), .in_ready(arb_ready),
    .in_beat(arb_beat), .in_conn(arb_conn),
    .out_valid(app_rx_valid), .out_ready(app_rx_ready),
    .out_beat(app_rx_beat), .out_conn(app_rx_conn));
endmodule
