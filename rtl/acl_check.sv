// acl_check: source and destination access control for one egress packet.
//
// Compares the parsed header of a packet with the rule of the logical
// connection it was sent on. Source ACL: the source MAC, VLAN tag, source
// IPv4 address and source port must all be the connection's own. Destination
// ACL: the destination MAC must be the permitted one (unless any is allowed),
// the destination IPv4 address must lie in the permitted network (address and
// mask) and the destination port must be the permitted one (unless any is
// allowed). Purely combinational.
//
// Source ACLs (all NMU types) and destination ACLs (type C and up) are the
// document's; the exact fields and the wildcard/mask encoding are this
// design's.
module acl_check
  import nmu_pkg::*;
(
  input  rule_t rule,
  input  hdr_t  hdr,
  output logic  src_err,
  output logic  dst_err
);
  always_comb begin
    src_err = hdr.src_mac != rule.mac ||
              (hdr.has_vlan ? hdr.vid != rule.vid || rule.vid == 12'd0
                            : rule.vid != 12'd0) ||
              hdr.src_ip != rule.ip ||
              hdr.src_port != rule.port;
    dst_err = !(rule.rmac_any || hdr.dst_mac == rule.rmac) ||
              (hdr.dst_ip & rule.rip_mask) != (rule.rip & rule.rip_mask) ||
              !(rule.rport_any || hdr.dst_port == rule.rport);
  end
endmodule
