// pkt_inserter: encapsulator/tagger, inserts INS_BYTES bytes at byte OFF.
//
// The packet is split across the lanes of a segmented FIFO (seg_fifo) and
// read out with the inserted bytes in place. A small write FSM (the beat
// index within the packet) walks the bytes of each incoming beat in order;
// when it reaches absolute byte OFF it first writes the INS_BYTES bytes of
// ins_data, then the packet byte, so the write of that one beat carries up
// to 8 + INS_BYTES bytes. The FIFO re-packs everything into full 8-byte
// beats. A packet shorter than OFF+1 bytes leaves without insertion.
//
// Interface: valid/ready stream in with ins_data held for the whole packet
// (byte 0 of the inserted data in bits [8*INS_BYTES-1 -: 8], network order);
// valid/ready stream out. Timing: a packet's first beat can leave one cycle
// after it is accepted; one beat per cycle, plus one extra output beat per
// packet when the inserted bytes make the tail spill into a new beat.
//
// The segment FIFO, the insert-data source, the FSM and the output mux are
// the document's; the byte offset, insert length and sizes are this design's.
module pkt_inserter
  import nmu_pkg::*;
#(
  parameter int unsigned OFF        = TAG_OFF,
  parameter int unsigned INS_BYTES  = TAG_BYTES,
  parameter int unsigned FIFO_BYTES = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  input  logic [8*INS_BYTES-1:0] ins_data,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat
);
  localparam int unsigned WR = DATA_BYTES + INS_BYTES;

  logic [7:0] cnt;     // FSM state: index of the next beat within the packet
  logic [7:0] wbytes [WR];
  logic [$clog2(WR+1)-1:0] wcnt;
  logic wr_ready;

  always_comb begin
    int unsigned n;
    n = 0;
    for (int unsigned k = 0; k < WR; k++) wbytes[k] = 8'h00;
    for (int unsigned j = 0; j < DATA_BYTES; j++) begin
      if (in_beat.keep[j]) begin
        if (32'(cnt) * DATA_BYTES + j == OFF)
          for (int unsigned i = 0; i < INS_BYTES; i++) begin
            wbytes[n] = ins_data[8*(INS_BYTES-1-i) +: 8];
            n = n + 1;
          end
        wbytes[n] = in_beat.data[j*8 +: 8];
        n = n + 1;
      end
    end
    wcnt = ($clog2(WR+1))'(n);
  end

  assign in_ready = wr_ready;

  seg_fifo #(.WR_BYTES(WR), .DEPTH(FIFO_BYTES)) u_fifo (
    .clk, .rst_n,
    .wr_en(in_valid), .wr_ready, .wr_data(wbytes), .wr_cnt(wcnt),
    .wr_last(in_beat.last),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_beat(out_beat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid && in_ready)
      cnt <= in_beat.last ? 8'd0 : (cnt == 8'hFF ? cnt : cnt + 8'd1);
  end
endmodule
