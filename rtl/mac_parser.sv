// mac_parser: in-flight Ethernet MAC header parser (one pipeline stage).
//
// The packet streams through a single register stage. While a beat passes,
// the destination MAC (bytes 0-5), source MAC (bytes 6-11) and EtherType
// (bytes 12-13) bytes found in it are copied into the header record that
// travels with the beat, so later stages see the fields as soon as the beat
// that completes them leaves this stage. No packet is held back: the parser
// adds one cycle of latency and runs at one beat per cycle.
//
// Interface: valid/ready stream in and out (beat_t plus hdr_t side band).
// in_hdr carries fields set by earlier stages; this stage clears its own
// fields at the first beat of every packet. Parsing in flight, with the
// fields handed on to the next parser, follows the document; the stage
// structure and handshake are this design's choice.
module mac_parser
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
  logic [7:0] cnt;     // index of the next beat within the packet
  hdr_t       acc;     // fields captured from earlier beats of this packet
  hdr_t       nxt;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    hdr_t own;
    own = (cnt == 0) ? '0 : acc;
    nxt = in_hdr;
    nxt.dst_mac   = cap_field(own.dst_mac, 6, 0, 32'(cnt), in_beat.data);
    nxt.src_mac   = cap_field(own.src_mac, 6, 6, 32'(cnt), in_beat.data);
    nxt.ethertype = 16'(cap_field(48'(own.ethertype), 2, 12, 32'(cnt), in_beat.data));
    nxt.v_mac     = own.v_mac | field_done(6, 6, 32'(cnt), in_beat.keep);
    nxt.v_eth     = own.v_eth | field_done(2, 12, 32'(cnt), in_beat.keep);
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
