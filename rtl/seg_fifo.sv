// seg_fifo: segmented (byte-lane) FIFO used by the encapsulator and the
// de-encapsulator.
//
// The FIFO is a ring of DEPTH bytes, each with an end-of-packet flag. A write
// appends 0..WR_BYTES bytes, packed from wr_data[0] upward, so the writer may
// add bytes (insertion) or leave bytes out (removal) of a beat. The read side
// shows the next 8 bytes as a beat: it is valid when 8 bytes are stored or
// when an end-of-packet byte is among the stored ones, in which case the beat
// stops at that byte (keep marks the lanes used, last is set). A packet
// therefore leaves re-aligned to lane 0 of full beats.
//
// Interface: wr_ready is high when WR_BYTES bytes are free, so a write never
// has to be split. One beat per cycle each way. The byte-lane FIFO is the
// document's structure ("packet split into segment FIFOs"); its sizes are
// this design's.
module seg_fifo
  import nmu_pkg::*;
#(
  parameter int unsigned WR_BYTES = 12,
  parameter int unsigned DEPTH    = 32  // bytes, a power of two
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  output logic       wr_ready,
  input  logic [7:0] wr_data [WR_BYTES],
  input  logic [$clog2(WR_BYTES+1)-1:0] wr_cnt,
  input  logic       wr_last,   // the last written byte ends a packet
  output logic       rd_valid,
  input  logic       rd_ready,
  output beat_t      rd_beat
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0] mem  [DEPTH];
  logic       eop  [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic [3:0]    rd_n;      // bytes popped by a read

  assign wr_ready = 32'(count) + WR_BYTES <= DEPTH;

  always_comb begin
    logic found;
    found   = 1'b0;
    rd_n    = 4'd8;
    rd_beat = '0;
    for (int unsigned j = 0; j < DATA_BYTES; j++) begin
      if (!found && j < 32'(count)) begin
        rd_beat.data[j*8 +: 8] = mem[AW'(rp + AW'(j))];
        rd_beat.keep[j]        = 1'b1;
        if (eop[AW'(rp + AW'(j))]) begin
          found        = 1'b1;
          rd_n         = 4'(j + 1);
          rd_beat.last = 1'b1;
        end
      end
    end
    rd_valid = found || 32'(count) >= DATA_BYTES;
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready)
      for (int unsigned i = 0; i < WR_BYTES; i++)
        if (i < 32'(wr_cnt)) begin
          mem[AW'(wp + AW'(i))] <= wr_data[i];
          eop[AW'(wp + AW'(i))] <= wr_last && (i + 1 == 32'(wr_cnt));
        end
  end

  logic [AW:0] n_wr, n_rd;
  assign n_wr = (wr_en && wr_ready)    ? (AW+1)'(wr_cnt) : '0;
  assign n_rd = (rd_valid && rd_ready) ? (AW+1)'(rd_n)   : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      wp    <= wp + n_wr[AW-1:0];
      rp    <= rp + n_rd[AW-1:0];
      count <= count + n_wr - n_rd;
    end
  end
endmodule
