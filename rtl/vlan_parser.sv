// vlan_parser: in-flight 802.1Q VLAN parser (one pipeline stage).
//
// Uses the EtherType found by the MAC parser. If it is 0x8100 the packet is
// tagged: the VLAN id is the low 12 bits of bytes 14-15, the layer-3 type is
// in bytes 16-17 and the layer-3 header starts at byte 18. Otherwise the
// packet is untagged, the EtherType is the layer-3 type and layer 3 starts at
// byte 14. Because the MAC parser is one stage ahead, the EtherType of a beat
// is already in in_hdr when that same beat reaches this stage.
//
// Interface and timing as mac_parser: valid/ready stream with the header
// record as side band, one cycle of latency, one beat per cycle. The VLAN
// parser itself is named in the document; how it decides is this design's.
module vlan_parser
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
    hdr_t own;
    logic [15:0] tci;
    own = (cnt == 0) ? '0 : acc;
    tci = '0;
    nxt = in_hdr;
    nxt.has_vlan = own.has_vlan;
    nxt.vid      = own.vid;
    nxt.l3_type  = own.l3_type;
    nxt.l3_off   = own.l3_off;
    nxt.v_l3     = own.v_l3;
    if (in_hdr.v_eth && !own.v_l3) begin
      if (in_hdr.ethertype == ETH_VLAN) begin
        nxt.has_vlan = 1'b1;
        tci          = 16'(cap_field({36'd0, own.vid}, 2, 14, 32'(cnt), in_beat.data));
        nxt.vid      = tci[11:0];
        nxt.l3_type  = 16'(cap_field(48'(own.l3_type), 2, 16, 32'(cnt), in_beat.data));
        nxt.l3_off   = 8'd18;
        nxt.v_l3     = field_done(2, 16, 32'(cnt), in_beat.keep);
      end else begin
        nxt.has_vlan = 1'b0;
        nxt.vid      = '0;
        nxt.l3_type  = in_hdr.ethertype;
        nxt.l3_off   = 8'd14;
        nxt.v_l3     = 1'b1;
      end
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
