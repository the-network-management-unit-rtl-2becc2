// conn_cam: connection CAM, a parallel compare of a key against every rule.
//
// Each logical connection's rule holds its own endpoint (MAC, VLAN id, IPv4
// address, port) and its virtual network id. The key (a packet's destination
// endpoint and virtual network) is compared with all N_CONN entries at once;
// the lowest-numbered valid entry that matches wins. Purely combinational.
// A VLAN id of 0 in a rule means "untagged", so a tagged key only matches a
// rule with the same non-zero id and an untagged key a rule with id 0.
//
// Used on ingress to find the destination connection of a packet and on
// egress to detect a destination on the same FPGA (internal routing). CAMs
// for these lookups are the document's; the compare set is this design's.
module conn_cam
  import nmu_pkg::*;
#(
  parameter int unsigned N_CONN = N_CONN_DEFAULT
) (
  input  rule_t    rules [N_CONN],
  input  cam_key_t key,
  output logic     hit,
  output logic [7:0] idx
);
  logic [N_CONN-1:0] match;

  always_comb begin
    for (int unsigned c = 0; c < N_CONN; c++) begin
      match[c] = rules[c].valid &&
                 rules[c].mac  == key.mac &&
                 (key.has_vlan ? rules[c].vid == key.vid : rules[c].vid == 12'd0) &&
                 rules[c].ip   == key.ip &&
                 rules[c].port == key.port &&
                 rules[c].vnid == key.vnid;
    end
    hit = |match;
    idx = '0;
    for (int c = int'(N_CONN) - 1; c >= 0; c--)
      if (match[c]) idx = 8'(c);
  end
endmodule
