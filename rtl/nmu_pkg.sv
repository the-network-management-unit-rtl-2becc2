// nmu_pkg: types and constants shared by the Network Management Unit (NMU).
//
// The NMU sits between the applications on a network-attached FPGA and the
// 10 Gb/s Ethernet controller. Packets move as streams of 64-bit beats
// (8 byte lanes, lane 0 = first byte on the wire, lane 7 = last), which is the
// width a 10 Gb/s link needs at the 156.25 MHz Ethernet controller clock.
// Every parser stage carries a header record (hdr_t) alongside each beat; the
// record fills in as the stream passes the MAC, VLAN, IPv4 and transport
// parsers. Each logical connection owns one rule_t entry that serves both as
// its access control list (ACL) entry on egress and its CAM entry on ingress.
//
// Following the document: 32 logical connections, the parser chain
// MAC -> VLAN -> IPv4 -> transport, source and destination ACLs, CAM-based
// routing and a tag inserted on egress / removed on ingress. This design's own
// choices: the 64-bit beat format, the field set and layout of rule_t, the tag
// format (a 4-byte 802.1ad-style tag with its own TPID after the source MAC)
// and the register map of the configuration port.
package nmu_pkg;

  localparam int unsigned DATA_BYTES = 8;
  localparam int unsigned DATA_W     = DATA_BYTES * 8;

  // Default number of logical connections (document: 32).
  localparam int unsigned N_CONN_DEFAULT = 32;

  localparam logic [15:0] ETH_VLAN  = 16'h8100;
  localparam logic [15:0] ETH_IPV4  = 16'h0800;
  localparam logic [7:0]  PROTO_TCP = 8'd6;
  localparam logic [7:0]  PROTO_UDP = 8'd17;
  // TPID of the tag the NMU inserts on egress and strips on ingress.
  localparam logic [15:0] TPID_ENCAP = 16'h88A8;
  // Byte offset and length of the inserted tag (right after the source MAC).
  localparam int unsigned TAG_OFF   = 12;
  localparam int unsigned TAG_BYTES = 4;

  // One stream beat.
  typedef struct packed {
    logic [DATA_W-1:0]     data;
    logic [DATA_BYTES-1:0] keep;  // contiguous from lane 0
    logic                  last;
  } beat_t;

  // Header fields gathered by the parser chain, with a valid flag per group.
  typedef struct packed {
    // logical connection the packet was sent on (egress, set at the input)
    logic [7:0]  src_conn;
    // tag found by the de-encapsulator (ingress only)
    logic        tag_ok;      // packet carried a TPID_ENCAP tag
    logic [11:0] tag_vnid;    // virtual network id from that tag
    // MAC parser
    logic        v_mac;       // dst/src MAC captured
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic        v_eth;       // outer EtherType captured
    logic [15:0] ethertype;
    // VLAN parser
    logic        v_l3;        // L3 type and offset known
    logic        has_vlan;
    logic [11:0] vid;
    logic [15:0] l3_type;
    logic [7:0]  l3_off;
    // IPv4 parser
    logic        v_ihl;
    logic [7:0]  l4_off;
    logic [7:0]  proto;
    logic [31:0] src_ip;
    logic        v_ip;        // all IPv4 fields captured
    logic [31:0] dst_ip;
    // transport parser
    logic        v_l4;        // TCP/UDP ports captured
    logic [15:0] src_port;
    logic [15:0] dst_port;
  } hdr_t;

  // Per-connection rule: own endpoint (source ACL on egress, CAM key on
  // ingress and for internal routing) and permitted remote endpoint
  // (destination ACL on egress).
  typedef struct packed {
    logic        valid;
    logic [47:0] mac;       // own MAC
    logic [11:0] vid;       // own VLAN id, 0 = untagged
    logic [31:0] ip;        // own IPv4 address
    logic [15:0] port;      // own TCP/UDP port
    logic        rmac_any;  // any remote MAC allowed
    logic [47:0] rmac;      // permitted remote MAC
    logic [31:0] rip;       // permitted remote IPv4 network
    logic [31:0] rip_mask;  // mask applied to rip and the packet's dst IP
    logic        rport_any; // any remote port allowed
    logic [15:0] rport;     // permitted remote port
    logic [11:0] vnid;      // virtual network id carried in the tag
  } rule_t;

  // Key looked up in the connection CAM: the destination endpoint of a
  // packet and the virtual network it travels in.
  typedef struct packed {
    logic [47:0] mac;
    logic        has_vlan;
    logic [11:0] vid;
    logic [31:0] ip;
    logic [15:0] port;
    logic [11:0] vnid;
  } cam_key_t;

  // Per-packet decision made once the headers are parsed.
  typedef struct packed {
    logic        drop;      // discard the packet
    logic        local_dst; // egress only: destination is on this FPGA
    logic [7:0]  conn;      // egress: source connection, ingress: destination
    logic [7:0]  dst_conn;  // egress + local_dst: destination connection
    logic [11:0] vnid;      // egress: tag value for the source connection
    logic [5:0]  reason;    // one bit per failed check, see nmu_check
  } verdict_t;

  // Copy the bytes of a big-endian field that fall into the current beat.
  // off: byte offset of the field in the packet, nbytes <= 6, beat: index of
  // the beat whose bytes are in data. Bytes outside the beat keep cur.
  function automatic logic [47:0] cap_field(input logic [47:0] cur,
                                            input int unsigned nbytes,
                                            input int unsigned off,
                                            input int unsigned beat,
                                            input logic [DATA_W-1:0] data);
    logic [47:0] r;
    int unsigned a;
    r = cur;
    for (int unsigned i = 0; i < 6; i++) begin
      a = off + i;
      if (i < nbytes && a >= beat * DATA_BYTES && a < (beat + 1) * DATA_BYTES)
        r[(nbytes - 1 - i) * 8 +: 8] = data[(a - beat * DATA_BYTES) * 8 +: 8];
    end
    return r;
  endfunction

  // True when the last byte of the field is in this beat and is present.
  function automatic logic field_done(input int unsigned nbytes,
                                      input int unsigned off,
                                      input int unsigned beat,
                                      input logic [DATA_BYTES-1:0] keep);
    int unsigned a;
    a = off + nbytes - 1;
    return (a >= beat * DATA_BYTES && a < (beat + 1) * DATA_BYTES) &&
           keep[a - beat * DATA_BYTES];
  endfunction

endpackage
