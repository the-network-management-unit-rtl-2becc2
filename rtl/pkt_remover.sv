// pkt_remover: de-encapsulator/de-tagger with tag parser; removes REM_BYTES
// bytes at byte OFF.
//
// The bytes to be removed are never written into the segmented FIFO: the
// write FSM (beat index within the packet) writes every byte of a beat except
// those at absolute positions OFF..OFF+REM_BYTES-1, and seg_fifo re-packs the
// rest into full beats. The removed bytes are captured as the packet's tag
// (tag parser). Each packet's tag goes into a small FIFO when it is complete
// (or, for a packet too short to hold one, at its last beat with tag_valid
// low) and is shown beside every output beat of that packet once known; it
// is released when the packet's last beat leaves.
//
// Interface: valid/ready stream in and out; out_tag/out_tag_valid side band.
// out_tag_valid may still be low on an output beat that leaves before the
// input beat completing the tag has been accepted, never on a later one.
// Timing: a packet's first beat can leave one cycle after it is accepted;
// one beat per cycle.
//
// Removal by not writing into the FIFO, the FSM and the tag parser are the
// document's; offsets, sizes and the tag FIFO are this design's.
module pkt_remover
  import nmu_pkg::*;
#(
  parameter int unsigned OFF        = TAG_OFF,
  parameter int unsigned REM_BYTES  = TAG_BYTES,
  parameter int unsigned FIFO_BYTES = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat,
  output logic  out_tag_valid,
  output logic [8*REM_BYTES-1:0] out_tag
);
  localparam int unsigned TQ = 4;   // tag FIFO depth (packets)

  logic [7:0] cnt;
  logic [7:0] wbytes [DATA_BYTES];
  logic [$clog2(DATA_BYTES+1)-1:0] wcnt;
  logic wr_ready, wr_en;
  logic [47:0] tag_acc, tag_nxt;
  logic        tag_got;      // this packet's tag already queued
  logic        tag_done, tag_push;
  logic [8*REM_BYTES-1:0] tq_data [TQ];
  logic                   tq_ok   [TQ];
  logic [$clog2(TQ):0]    tq_wp, tq_rp;
  logic tq_full, tq_empty;

  always_comb begin
    int unsigned n;
    n = 0;
    for (int unsigned k = 0; k < DATA_BYTES; k++) wbytes[k] = 8'h00;
    for (int unsigned j = 0; j < DATA_BYTES; j++) begin
      if (in_beat.keep[j] &&
          !(32'(cnt) * DATA_BYTES + j >= OFF && 32'(cnt) * DATA_BYTES + j < OFF + REM_BYTES)) begin
        wbytes[n] = in_beat.data[j*8 +: 8];
        n = n + 1;
      end
    end
    wcnt = ($clog2(DATA_BYTES+1))'(n);
    tag_nxt  = cap_field(cnt == 0 ? 48'd0 : tag_acc, REM_BYTES, OFF, 32'(cnt), in_beat.data);
    tag_done = field_done(REM_BYTES, OFF, 32'(cnt), in_beat.keep);
    tag_push = in_valid && in_ready && !tag_got && (tag_done || in_beat.last);
  end

  assign tq_empty = tq_wp == tq_rp;
  assign tq_full  = (tq_wp[$clog2(TQ)] != tq_rp[$clog2(TQ)]) &&
                    (tq_wp[$clog2(TQ)-1:0] == tq_rp[$clog2(TQ)-1:0]);
  assign in_ready = wr_ready && !tq_full;
  assign wr_en    = in_valid && !tq_full;

  seg_fifo #(.WR_BYTES(DATA_BYTES), .DEPTH(FIFO_BYTES)) u_fifo (
    .clk, .rst_n,
    .wr_en, .wr_ready, .wr_data(wbytes), .wr_cnt(wcnt),
    .wr_last(in_beat.last),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_beat(out_beat));

  assign out_tag_valid = !tq_empty && tq_ok[tq_rp[$clog2(TQ)-1:0]];
  assign out_tag       = tq_data[tq_rp[$clog2(TQ)-1:0]];

  always_ff @(posedge clk) begin
    if (tag_push) begin
      tq_data[tq_wp[$clog2(TQ)-1:0]] <= tag_nxt[8*REM_BYTES-1:0];
      tq_ok[tq_wp[$clog2(TQ)-1:0]]   <= tag_done;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; tag_acc <= '0; tag_got <= 1'b0;
      tq_wp <= '0; tq_rp <= '0;
    end else begin
      if (in_valid && in_ready) begin
        cnt     <= in_beat.last ? 8'd0 : (cnt == 8'hFF ? cnt : cnt + 8'd1);
        tag_acc <= tag_nxt;
        tag_got <= in_beat.last ? 1'b0 : (tag_got || tag_done);
      end
      if (tag_push) tq_wp <= tq_wp + 1'b1;
      if (out_valid && out_ready && out_beat.last && !tq_empty) tq_rp <= tq_rp + 1'b1;
    end
  end
endmodule
