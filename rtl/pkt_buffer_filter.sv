// pkt_buffer_filter: packet buffer that forwards or discards whole packets.
//
// Beats are written into a FIFO of DEPTH beats as they arrive. Verdicts, one
// per packet and in packet order, go into a second FIFO. The read side waits
// until the packet at its head has a verdict, then either streams the packet
// out (with the verdict beside every beat) or drops it, one beat per cycle,
// without ever showing it on the output. Since the verdict comes as soon as
// the headers are parsed, a packet is held only until then, not until its
// end. Counters report passed and dropped packets.
//
// Interface: valid/ready stream in; verdict_valid/verdict with no
// back-pressure (the verdict FIFO is as deep as the beat FIFO, so it cannot
// overflow: every packet holds at least one beat); valid/ready stream out with
// out_verdict. Timing: the first beat of a passing packet can leave in the
// cycle after both it and its verdict are stored.
//
// Buffering and filtering packets that failed a check is the document's; the
// two-FIFO organisation is this design's.
module pkt_buffer_filter
  import nmu_pkg::*;
#(
  parameter int unsigned DEPTH = 32   // beats, a power of two
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  input  logic        verdict_valid,
  input  verdict_t    verdict,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output verdict_t    out_verdict,
  output logic [31:0] pass_cnt,
  output logic [31:0] drop_cnt
);
  localparam int unsigned AW = $clog2(DEPTH);

  beat_t    mem  [DEPTH];
  verdict_t vmem [DEPTH];
  logic [AW:0] wp, rp, vwp, vrp;
  logic empty, full, vempty, pop, discard;

  assign empty    = wp == rp;
  assign full     = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign vempty   = vwp == vrp;
  assign in_ready = !full;

  assign out_beat    = mem[rp[AW-1:0]];
  assign out_verdict = vmem[vrp[AW-1:0]];
  assign discard     = !empty && !vempty && out_verdict.drop;
  assign out_valid   = !empty && !vempty && !out_verdict.drop;
  assign pop         = (out_valid && out_ready) || discard;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_beat;
    if (verdict_valid) vmem[vwp[AW-1:0]] <= verdict;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; vwp <= '0; vrp <= '0;
      pass_cnt <= '0; drop_cnt <= '0;
    end else begin
      if (in_valid && in_ready) wp <= wp + 1'b1;
      if (verdict_valid) vwp <= vwp + 1'b1;
      if (pop) begin
        rp <= rp + 1'b1;
        if (out_beat.last) begin
          vrp <= vrp + 1'b1;
          if (discard) drop_cnt <= drop_cnt + 1;
          else         pass_cnt <= pass_cnt + 1;
        end
      end
    end
  end

  // The verdict FIFO never overflows (one verdict per buffered packet).
  assert property (@(posedge clk) disable iff (!rst_n)
                   verdict_valid |-> !((vwp[AW] != vrp[AW]) && (vwp[AW-1:0] == vrp[AW-1:0])));
endmodule
