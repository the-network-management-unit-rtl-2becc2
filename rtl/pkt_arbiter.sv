// pkt_arbiter: packet-level round-robin merge of two streams.
//
// Merges the filtered network ingress stream (input 0) with packets that
// the egress side routed internally (input 1) onto the single stream that
// goes to the applications. Once a packet has started, its input keeps the
// output until the packet's last beat; then priority passes to the other
// input. Each beat carries the destination connection id beside it.
//
// Interface: two valid/ready streams with conn, one out. Combinational path
// from in to out (no added latency), one beat per cycle. That internally
// routed packets share the ingress path is the document's ("rerouted
// packets"); round-robin is this design's choice.
module pkt_arbiter
  import nmu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_valid,
  output logic [1:0] in_ready,
  input  beat_t      in_beat [2],
  input  logic [7:0] in_conn [2],
  output logic       out_valid,
  input  logic       out_ready,
  output beat_t      out_beat,
  output logic [7:0] out_conn
);
  logic locked;     // a packet is in progress on input sel
  logic sel;        // input owning the output
  logic prio;       // input preferred at the next packet start
  logic cur;

  always_comb begin
    if (locked) cur = sel;
    else if (in_valid[prio]) cur = prio;
    else cur = !prio;
    out_valid = in_valid[cur];
    out_beat  = in_beat[cur];
    out_conn  = in_conn[cur];
    in_ready  = '0;
    in_ready[cur] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0; sel <= 1'b0; prio <= 1'b0;
    end else if (out_valid && out_ready) begin
      if (out_beat.last) begin
        locked <= 1'b0;
        prio   <= !cur;
      end else begin
        locked <= 1'b1;
        sel    <= cur;
      end
    end
  end
endmodule
