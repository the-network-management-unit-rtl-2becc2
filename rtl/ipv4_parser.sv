// ipv4_parser: in-flight IPv4 header parser (one pipeline stage).
//
// Once the VLAN parser has fixed the layer-3 offset (14 or 18) and the type
// is 0x0800, this stage copies, relative to that offset, the header length
// (IHL, low nibble of byte 0), the protocol (byte 9), the source address
// (bytes 12-15) and the destination address (bytes 16-19). From the IHL it
// computes where the transport header starts (l4_off = l3_off + 4*IHL).
// v_ip is raised by the beat that completes the destination address.
// Non-IPv4 packets pass through with v_ip low.
//
// Interface and timing as mac_parser: one cycle of latency, one beat per
// cycle. The IPv4 parser and its source/destination fields are the
// document's; the details above are this design's.
module ipv4_parser
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
  logic [7:0] cnt;
  hdr_t       acc;
  hdr_t       nxt;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    hdr_t        own;
    logic [7:0]  vihl;
    int unsigned base;
    own  = (cnt == 0) ? '0 : acc;
    base = int'(in_hdr.l3_off);
    vihl = '0;
    nxt  = in_hdr;
    nxt.v_ihl  = own.v_ihl;
    nxt.l4_off = own.l4_off;
    nxt.proto  = own.proto;
    nxt.src_ip = own.src_ip;
    nxt.dst_ip = own.dst_ip;
    nxt.v_ip   = own.v_ip;
    if (in_hdr.v_l3 && in_hdr.l3_type == ETH_IPV4 && !own.v_ip) begin
      if (!own.v_ihl && field_done(1, base, 32'(cnt), in_beat.keep)) begin
        vihl       = 8'(cap_field(48'd0, 1, base, 32'(cnt), in_beat.data));
        nxt.v_ihl  = 1'b1;
        nxt.l4_off = in_hdr.l3_off + {2'b00, vihl[3:0], 2'b00};
      end
      nxt.proto  = 8'(cap_field(48'(own.proto), 1, base + 9, 32'(cnt), in_beat.data));
      nxt.src_ip = 32'(cap_field(48'(own.src_ip), 4, base + 12, 32'(cnt), in_beat.data));
      nxt.dst_ip = 32'(cap_field(48'(own.dst_ip), 4, base + 16, 32'(cnt), in_beat.data));
      nxt.v_ip   = field_done(4, base + 16, 32'(cnt), in_beat.keep);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_beat  <= '0;
      out_hdr   <= '0;
      acc       <= '0;
      cnt       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_beat  <= in_beat;
        out_hdr   <= nxt;
        acc       <= nxt;
        cnt       <= in_beat.last ? 8'd0 : (cnt == 8'hFF ? cnt : cnt + 8'd1);
      end
    end
  end
endmodule
