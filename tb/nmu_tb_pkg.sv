// nmu_tb_pkg: packet construction and stream helpers for the NMU testbenches.
//
// Packets are byte queues in wire order. build_pkt assembles an Ethernet
// frame with an optional 802.1Q tag, an IPv4 header (IHL words) and a TCP or
// UDP port pair, padded with a counting payload. to_beats/from_beats convert
// between byte queues and 64-bit beats (lane 0 = first byte). ins_bytes and
// del_bytes are the reference models for tag insertion and removal.
package nmu_tb_pkg;
  import nmu_pkg::*;

  typedef logic [7:0] bq_t [$];

  typedef struct {
    logic [47:0] dst_mac, src_mac;
    logic        vlan;
    logic [11:0] vid;
    logic [15:0] l3_type;
    logic [3:0]  ihl;
    logic [7:0]  proto;
    logic [31:0] src_ip, dst_ip;
    logic [15:0] sport, dport;
    int          len;      // total frame length in bytes
  } pkt_spec_t;

  function automatic pkt_spec_t default_spec();
    pkt_spec_t s;
    s.dst_mac = 48'h02_00_00_00_00_B0; s.src_mac = 48'h02_00_00_00_00_A0;
    s.vlan = 1'b0; s.vid = 12'd0; s.l3_type = ETH_IPV4; s.ihl = 4'd5;
    s.proto = PROTO_UDP; s.src_ip = 32'h0A00_0001; s.dst_ip = 32'h0A00_0102;
    s.sport = 16'd1000; s.dport = 16'd2000; s.len = 64;
    return s;
  endfunction

  function automatic bq_t build_pkt(pkt_spec_t s);
    bq_t q;
    for (int i = 5; i >= 0; i--) q.push_back(s.dst_mac[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) q.push_back(s.src_mac[i*8 +: 8]);
    if (s.vlan) begin
      q.push_back(8'h81); q.push_back(8'h00);
      q.push_back({4'h0, s.vid[11:8]}); q.push_back(s.vid[7:0]);
    end
    q.push_back(s.l3_type[15:8]); q.push_back(s.l3_type[7:0]);
    // IPv4 header
    q.push_back({4'h4, s.ihl}); q.push_back(8'h00);
    q.push_back(8'h00); q.push_back(8'h40);              // total length (unchecked)
    q.push_back(8'h12); q.push_back(8'h34); q.push_back(8'h00); q.push_back(8'h00);
    q.push_back(8'h40); q.push_back(s.proto); q.push_back(8'h00); q.push_back(8'h00);
    for (int i = 3; i >= 0; i--) q.push_back(s.src_ip[i*8 +: 8]);
    for (int i = 3; i >= 0; i--) q.push_back(s.dst_ip[i*8 +: 8]);
    for (int i = 5; i < int'(s.ihl); i++)
      for (int k = 0; k < 4; k++) q.push_back(8'h01);   // options (NOP)
    q.push_back(s.sport[15:8]); q.push_back(s.sport[7:0]);
    q.push_back(s.dport[15:8]); q.push_back(s.dport[7:0]);
    while (q.size() < s.len) q.push_back(8'(q.size()));
    while (q.size() > s.len) void'(q.pop_back());
    return q;
  endfunction

  function automatic int n_beats(bq_t q);
    return (q.size() + 7) / 8;
  endfunction

  function automatic beat_t get_beat(bq_t q, int b);
    beat_t r;
    r = '0;
    for (int j = 0; j < 8; j++)
      if (b*8 + j < q.size()) begin
        r.data[j*8 +: 8] = q[b*8 + j];
        r.keep[j] = 1'b1;
      end
    r.last = (b == n_beats(q) - 1);
    return r;
  endfunction

  function automatic bq_t ins_bytes(bq_t q, int off, bq_t ins);
    bq_t r;
    for (int i = 0; i < q.size(); i++) begin
      if (i == off) foreach (ins[k]) r.push_back(ins[k]);
      r.push_back(q[i]);
    end
    return r;
  endfunction

  function automatic bq_t del_bytes(bq_t q, int off, int n);
    bq_t r;
    for (int i = 0; i < q.size(); i++)
      if (i < off || i >= off + n) r.push_back(q[i]);
    return r;
  endfunction

  function automatic bit same(bq_t a, bq_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction
endpackage
