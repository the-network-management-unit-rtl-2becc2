// nmu_check: per-packet verdict stage (ACLs and connection CAM).
//
// A register stage that passes the parsed stream through unchanged and, once
// per packet, issues a verdict. The verdict is taken at the first beat whose
// header record has every field the checks need (the transport ports are the
// last), or, if the headers never complete, at the last beat or beat
// HDR_BEATS_MAX-1, whichever comes first; such a packet is dropped. The bound
// keeps a long packet without a verdict from filling the buffer behind.
//
// EGRESS=1 (application -> network): the packet's connection (hdr.src_conn)
// selects one rule; acl_check applies its source and destination ACLs. The
// CAM is then searched for the destination endpoint in the same virtual
// network: a hit marks the packet for internal routing to that connection.
// EGRESS=0 (network -> application): the packet must carry the NMU tag, and
// the CAM search on its destination endpoint and tag value must hit; the hit
// index is the connection the packet is delivered to.
//
// reason bits: 0 unknown or disabled connection, 1 headers incomplete (not
// IPv4 TCP/UDP or too short), 2 source ACL, 3 destination ACL, 4 tag missing,
// 5 no valid destination. Bits that belong to the other direction are
// constant 0 in a given instance (for EGRESS=1, bits 4 and 5).
//
// Timing: out beat and verdict_valid appear one cycle after the beat that
// decides is accepted. verdict_valid has no back-pressure; the buffer behind
// this stage must always take it. The filtering rules are the document's
// ("filter packets with ACL error or no valid dest"); the decision point and
// reason encoding are this design's.
module nmu_check
  import nmu_pkg::*;
#(
  parameter int unsigned N_CONN = N_CONN_DEFAULT,
  parameter bit          EGRESS = 1'b1,
  // Beats after which a verdict is forced even if the headers are incomplete
  // (the longest header the parsers read ends inside beat 11).
  parameter int unsigned HDR_BEATS_MAX = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  rule_t    rules [N_CONN],
  input  logic     in_valid,
  output logic     in_ready,
  input  beat_t    in_beat,
  input  hdr_t     in_hdr,
  output logic     out_valid,
  input  logic     out_ready,
  output beat_t    out_beat,
  output logic     verdict_valid,
  output verdict_t verdict
);
  logic     decided;      // verdict already issued for this packet
  logic [7:0] cnt;        // beat index within the packet
  logic     force_now;
  rule_t    rule;
  logic     conn_ok, src_err, dst_err, complete, cam_hit;
  logic [7:0] cam_idx;
  cam_key_t key;
  verdict_t v;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    conn_ok = 32'(in_hdr.src_conn) < N_CONN;
    rule    = conn_ok ? rules[in_hdr.src_conn[$clog2(N_CONN)-1:0]] : '0;
    conn_ok = conn_ok && rule.valid;
    complete = in_hdr.v_mac && in_hdr.v_l4;
    force_now = in_beat.last || 32'(cnt) >= HDR_BEATS_MAX - 1;
    key.mac      = in_hdr.dst_mac;
    key.has_vlan = in_hdr.has_vlan;
    key.vid      = in_hdr.vid;
    key.ip       = in_hdr.dst_ip;
    key.port     = in_hdr.dst_port;
    key.vnid     = EGRESS ? rule.vnid : in_hdr.tag_vnid;
  end

  acl_check u_acl (.rule, .hdr(in_hdr), .src_err, .dst_err);
  conn_cam #(.N_CONN(N_CONN)) u_cam (.rules, .key, .hit(cam_hit), .idx(cam_idx));

  always_comb begin
    v = '0;
    v.reason[1] = !complete;
    if (EGRESS) begin
      v.reason[0] = !conn_ok;
      v.reason[2] = complete && conn_ok && src_err;
      v.reason[3] = complete && conn_ok && dst_err;
      v.conn      = in_hdr.src_conn;
      v.vnid      = rule.vnid;
      v.local_dst = cam_hit;
      v.dst_conn  = cam_idx;
    end else begin
      v.reason[4] = !in_hdr.tag_ok;
      v.reason[5] = complete && !cam_hit;
      v.conn      = cam_idx;
      v.vnid      = in_hdr.tag_vnid;
    end
    v.drop = |v.reason;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_beat      <= '0;
      verdict_valid <= 1'b0;
      verdict       <= '0;
      decided       <= 1'b0;
      cnt           <= '0;
    end else begin
      verdict_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_beat  <= in_beat;
        if (!decided && (complete || force_now)) begin
          verdict_valid <= 1'b1;
          verdict       <= v;
        end
        decided <= in_beat.last ? 1'b0 : (decided || complete || force_now);
        cnt     <= in_beat.last ? 8'd0 : (cnt == 8'hFF ? cnt : cnt + 8'd1);
      end
    end
  end
endmodule
