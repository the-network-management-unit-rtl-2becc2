// transport_parser: in-flight TCP/UDP port parser (one pipeline stage).
//
// When the IPv4 parser has seen the whole address pair and the protocol is
// TCP (6) or UDP (17), this stage copies the source port (bytes 0-1) and the
// destination port (bytes 2-3) of the transport header, which starts at
// l4_off. v_l4 is raised by the beat that completes the destination port; it
// is the last header field any NMU check needs.
//
// Interface and timing as mac_parser: one cycle of latency, one beat per
// cycle. Port fields come from the document ("Port dest & src"); restricting
// them to TCP and UDP is this design's choice.
module transport_parser
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
    int unsigned base;
    own  = (cnt == 0) ? '0 : acc;
    base = int'(in_hdr.l4_off);
    nxt  = in_hdr;
    nxt.src_port = own.src_port;
    nxt.dst_port = own.dst_port;
    nxt.v_l4     = own.v_l4;
    if (in_hdr.v_ip && (in_hdr.proto == PROTO_TCP || in_hdr.proto == PROTO_UDP) && !own.v_l4) begin
      nxt.src_port = 16'(cap_field(48'(own.src_port), 2, base, 32'(cnt), in_beat.data));
      nxt.dst_port = 16'(cap_field(48'(own.dst_port), 2, base + 2, 32'(cnt), in_beat.data));
      nxt.v_l4     = field_done(2, base + 2, 32'(cnt), in_beat.keep);
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
